// tb_mux_full_adder: checks the three-multiplexer full adder against the
// eight rows of the full adder truth table, written out as constants, and
// checks the internal x xor y signal that selects both output multiplexers.
module tb_mux_full_adder;
  logic x, y, cin, sum, cout;
  int   checks   = 0;
  int   failures = 0;

  // One row per input combination: {x, y, cin, x^y, sum, cout}.
  localparam logic [5:0] TRUTH [8] = '{
    6'b000_000, 6'b001_010, 6'b010_110, 6'b011_101,
    6'b100_110, 6'b101_101, 6'b110_001, 6'b111_011
  };

  mux_full_adder dut (.x(x), .y(y), .cin(cin), .sum(sum), .cout(cout));

  initial begin
    #1000;
    failures++;
    $display("watchdog: test did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (TRUTH[r]) begin
      {x, y, cin} = TRUTH[r][5:3];
      #1;
      checks += 3;
      if (dut.p !== TRUTH[r][2]) begin
        failures++;
        $display("FAIL x=%b y=%b cin=%b: p=%b", x, y, cin, dut.p);
      end
      if (sum !== TRUTH[r][1]) begin
        failures++;
        $display("FAIL x=%b y=%b cin=%b: sum=%b", x, y, cin, sum);
      end
      if (cout !== TRUTH[r][0]) begin
        failures++;
        $display("FAIL x=%b y=%b cin=%b: cout=%b", x, y, cin, cout);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
