// tb_ripple_stage: checks the 64-bit ripple-carry final stage.
//
// Directed cases include a carry that enters at bit 0 and runs through every
// bit to cout, and random cases cover the rest; the expected result is the
// plain sum x + y + cin. The run fails if the full-length carry never occurred.
module tb_ripple_stage;
  localparam int W = 64;

  logic [W-1:0] x, y, s;
  logic         cin, cout;
  int checks     = 0;
  int failures   = 0;
  int full_chain = 0;  // cases where the carry passed every bit

  ripple_stage dut (.x(x), .y(y), .cin(cin), .s(s), .cout(cout));

  function automatic logic [W-1:0] rnd();
    return {$urandom(), $urandom()};
  endfunction

  task automatic check();
    logic [W:0] expect_v;
    #1;
    expect_v = {1'b0, x} + {1'b0, y} + {{W{1'b0}}, cin};
    checks++;
    if ({cout, s} !== expect_v) begin
      failures++;
      $display("FAIL x=%h y=%h cin=%b: got %h want %h", x, y, cin, {cout, s}, expect_v);
    end
    if (dut.c === '1) full_chain++;
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog: test did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    x = '1; y = '0; cin = 1'b1; check();   // carry ripples from bit 0 to cout
    x = '1; y = '1; cin = 1'b1; check();
    x = '0; y = '0; cin = 1'b0; check();
    x = '0; y = '0; cin = 1'b1; check();
    x = {1'b1, {(W-1){1'b0}}}; y = x; cin = 1'b0; check();
    for (int n = 0; n < 2000; n++) begin
      x = rnd(); y = rnd(); cin = 1'($urandom());
      check();
    end
    checks++;
    if (full_chain == 0) begin
      failures++;
      $display("FAIL the carry never ran the full length of the stage");
    end
    $display("full-length carry chains: %0d", full_chain);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
