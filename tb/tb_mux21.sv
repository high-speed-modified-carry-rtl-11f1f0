// tb_mux21: exhaustive self-check of the 2-to-1 multiplexer.
//
// All eight input combinations are applied; the expected output is the
// sum-of-products a & ~s | b & s. A watchdog ends the run with a failure if
// the sequence does not complete.
module tb_mux21;
  logic a, b, s, y;
  int   checks   = 0;
  int   failures = 0;

  mux21 dut (.a(a), .b(b), .s(s), .y(y));

  initial begin
    #1000;
    failures++;
    $display("watchdog: test did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      {s, b, a} = 3'(v);
      #1;
      checks++;
      if (y !== ((a & ~s) | (b & s))) begin
        failures++;
        $display("FAIL s=%b b=%b a=%b: y=%b", s, b, a, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
