// tb_two_rail_checker: self-checking testbench for two_rail_checker.
//
// For the 3-pair checker it applies all 64 combinations of the two rails:
// F and G must differ exactly when every pair is complementary (y == ~x).
// A 1-pair and a 5-pair instance are checked the same way on all inputs.
module tb_two_rail_checker;
  logic [2:0] x3, y3;
  logic       f3, g3;
  logic [0:0] x1, y1;
  logic       f1, g1;
  logic [4:0] x5, y5;
  logic       f5, g5;
  int         checks = 0;
  int         failures = 0;

  two_rail_checker #(.W(3)) dut3 (.x(x3), .y(y3), .f(f3), .g(g3));
  two_rail_checker #(.W(1)) dut1 (.x(x1), .y(y1), .f(f1), .g(g1));
  two_rail_checker #(.W(5)) dut5 (.x(x5), .y(y5), .f(f5), .g(g5));

  initial begin
    for (int v = 0; v < 64; v++) begin
      {x3, y3} = 6'(v);
      #1;
      checks++;
      if ((f3 != g3) != (y3 == ~x3)) begin
        failures++;
        $display("FAIL W=3 x=%b y=%b f=%b g=%b", x3, y3, f3, g3);
      end
    end
    for (int v = 0; v < 4; v++) begin
      {x1, y1} = 2'(v);
      #1;
      checks++;
      if ((f1 != g1) != (y1 == ~x1)) begin
        failures++;
        $display("FAIL W=1 x=%b y=%b f=%b g=%b", x1, y1, f1, g1);
      end
    end
    for (int v = 0; v < 1024; v++) begin
      {x5, y5} = 10'(v);
      #1;
      checks++;
      if ((f5 != g5) != (y5 == ~x5)) begin
        failures++;
        $display("FAIL W=5 x=%b y=%b f=%b g=%b", x5, y5, f5, g5);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
