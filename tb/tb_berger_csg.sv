// tb_berger_csg: self-checking testbench for berger_csg.
//
// Applies every 4-bit word and every 7-bit word (second instance) and checks
// the count of ones against a count made bit by bit in the testbench.
module tb_berger_csg;
  logic [3:0] d4;
  logic [2:0] c4;
  logic [6:0] d7;
  logic [2:0] c7;
  int         checks = 0;
  int         failures = 0;

  berger_csg #(.N(4)) dut4 (.data(d4), .ncs(c4));
  berger_csg #(.N(7)) dut7 (.data(d7), .ncs(c7));

  function automatic int ones(input logic [31:0] v);
    int n = 0;
    for (int i = 0; i < 32; i++) if (v[i]) n++;
    return n;
  endfunction

  initial begin
    for (int v = 0; v < 16; v++) begin
      d4 = 4'(v);
      #1;
      checks++;
      if (int'(c4) != ones(32'(v))) begin
        failures++;
        $display("FAIL N=4 data=%b ncs=%0d expected=%0d", d4, c4, ones(32'(v)));
      end
    end
    for (int v = 0; v < 128; v++) begin
      d7 = 7'(v);
      #1;
      checks++;
      if (int'(c7) != ones(32'(v))) begin
        failures++;
        $display("FAIL N=7 data=%b ncs=%0d expected=%0d", d7, c7, ones(32'(v)));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
