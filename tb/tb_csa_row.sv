// tb_csa_row: checks one 64-bit carry-save row.
//
// For directed and random words it checks, bit by bit, that s is the parity
// and co the majority of the three inputs, and as whole numbers that
// x + y + z == s + 2*co.
module tb_csa_row;
  localparam int W = 64;

  logic [W-1:0] x, y, z, s, co;
  int checks   = 0;
  int failures = 0;

  csa_row dut (.x(x), .y(y), .z(z), .s(s), .co(co));

  function automatic logic [W-1:0] rnd();
    return {$urandom(), $urandom()};
  endfunction

  task automatic check();
    logic [W+1:0] lhs, rhs;
    #1;
    lhs = {2'b0, x} + {2'b0, y} + {2'b0, z};
    rhs = {2'b0, s} + {1'b0, co, 1'b0};
    checks++;
    for (int i = 0; i < W; i++) begin
      if (s[i] !== (x[i] ^ y[i] ^ z[i]) ||
          co[i] !== ((x[i] & y[i]) | (x[i] & z[i]) | (y[i] & z[i]))) begin
        failures++;
        $display("FAIL bit %0d: x=%h y=%h z=%h s=%h co=%h", i, x, y, z, s, co);
        break;
      end
    end
    checks++;
    if (lhs !== rhs) begin
      failures++;
      $display("FAIL value: x=%h y=%h z=%h s=%h co=%h", x, y, z, s, co);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog: test did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    x = '0; y = '0; z = '0; check();
    x = '1; y = '1; z = '1; check();
    x = '1; y = '0; z = '0; check();
    x = '1; y = '1; z = '0; check();
    x = '0; y = '0; z = '1; check();
    for (int n = 0; n < 2000; n++) begin
      x = rnd(); y = rnd(); z = rnd();
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
