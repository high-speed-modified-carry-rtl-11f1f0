// tb_mux_csa4: end-to-end check of the four-operand adder at 8-bit operands,
// the smaller size the adder was evaluated at.
//
// Operands mix random words, all-ones words, all-ones-but-one-bit words and
// single-bit words, so that every carry path is used; the expected result is
// the plain sum a + b + c + d in W+2 bits. Besides the value it counts how
// often the row-1 top carry was routed around row 2, how often the ripple row
// carried through every bit, and how often the carry out was set, and fails if
// any of them never happened.
module tb_mux_csa4;
  localparam int W = 8;

  logic [W-1:0] a, b, c, d;
  logic [W:0]   sum;
  logic         cout;
  int checks      = 0;
  int failures    = 0;
  // How often each mechanism of the adder was exercised.
  int n_row1_top  = 0;  // row-1 top carry routed past row 2 into the ripple row
  int n_full_ripple = 0;  // ripple-row carry set at every internal bit
  int n_cout      = 0;  // result needed all W+2 bits

  mux_csa4 #(.WIDTH(W)) dut (.a(a), .b(b), .c(c), .d(d), .sum(sum), .cout(cout));

  function automatic logic [W-1:0] rnd(int kind);
    logic [W-1:0] v;
    v = '0;
    for (int i = 0; i < W; i += 32) v = (v << 32) | W'($urandom());
    case (kind)
      0: return v;
      1: return '1;                // all ones
      2: return ~(W'(1) << ($urandom() % W));  // all ones but one bit
      default: return v & (W'(1) << ($urandom() % W));  // at most one bit
    endcase
  endfunction

  task automatic check();
    logic [W+1:0] expect_v;
    #1;
    expect_v = {2'b0, a} + {2'b0, b} + {2'b0, c} + {2'b0, d};
    checks++;
    if ({cout, sum} !== expect_v) begin
      failures++;
      if (failures < 10)
        $display("FAIL a=%h b=%h c=%h d=%h: got %h want %h", a, b, c, d, {cout, sum}, expect_v);
    end
    if (dut.c1[W-1]) n_row1_top++;
    if (dut.u_row3.c[W-1:1] === '1) n_full_ripple++;
    if (cout) n_cout++;
  endtask

  initial begin
    #10000000;
    failures++;
    $display("watchdog: test did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a = '0; b = '0; c = '0; d = '0; check();
    a = '1; b = '1; c = '1; d = '1; check();   // largest sum, full ripple, cout
    a = '1; b = '0; c = '0; d = '1; check();
    a = '0; b = '0; c = '0; d = '1; check();
    a = W'(1); b = '1; c = '0; d = '0; check();
    for (int n = 0; n < 50000; n++) begin
      a = rnd($urandom() % 4); b = rnd($urandom() % 4);
      c = rnd($urandom() % 4); d = rnd($urandom() % 4);
      check();
    end
    $display("row-1 top carries: %0d, full-length ripples: %0d, carry outs: %0d",
             n_row1_top, n_full_ripple, n_cout);
    checks += 3;
    if (n_row1_top == 0)    begin failures++; $display("FAIL no row-1 top carry"); end
    if (n_full_ripple == 0) begin failures++; $display("FAIL no full-length ripple"); end
    if (n_cout == 0)        begin failures++; $display("FAIL no carry out"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
