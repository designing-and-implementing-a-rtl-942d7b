// tb_check_register: self-checking testbench for check_register.
//
// Drives random modes and random values on Din, MSB, LSB and NCS and keeps
// its own reference count: zero on reset, NCS - MSB + Din on load, and the
// count less the discarded bit on a shift. After every clock it checks that
// the register holds the complement of that count. Each update rule is
// counted and must have happened at least once.
module tb_check_register;
  localparam int unsigned CW = 3;

  logic          clk = 1'b0;
  logic          rl, rr, din, msb, lsb;
  logic [CW-1:0] ncs;
  logic [CW-1:0] rfcs_n;
  int            ref_cnt;
  int            checks = 0;
  int            failures = 0;
  int            n_reset = 0, n_load = 0, n_keep = 0, n_dec = 0;

  check_register #(.CW(CW)) dut (
    .clk(clk), .rl(rl), .rr(rr), .din(din), .msb(msb), .lsb(lsb),
    .ncs(ncs), .rfcs_n(rfcs_n)
  );

  always #5 clk = ~clk;

  task automatic step(input logic [1:0] mode);
    {rl, rr} = mode;
    din = 1'($urandom);
    msb = 1'($urandom);
    lsb = 1'($urandom);
    ncs = CW'($urandom_range(4, 0));
    @(posedge clk);
    case (mode)
      2'b00: begin ref_cnt = 0; n_reset++; end
      2'b01: begin ref_cnt = (ref_cnt - int'(lsb)) & 7; if (lsb) n_dec++; else n_keep++; end
      2'b10: begin ref_cnt = (ref_cnt - int'(msb)) & 7; if (msb) n_dec++; else n_keep++; end
      2'b11: begin ref_cnt = (int'(ncs) - int'(msb) + int'(din)) & 7; n_load++; end
    endcase
    #1;
    checks++;
    if (rfcs_n !== ~CW'(ref_cnt)) begin
      failures++;
      $display("FAIL mode=%b rfcs_n=%b expected=%b", mode, rfcs_n, ~CW'(ref_cnt));
    end
  endtask

  initial begin
    ref_cnt = 0;
    step(2'b00);
    repeat (300) step(2'($urandom));
    checks += 4;
    if (n_reset == 0 || n_load == 0 || n_keep == 0 || n_dec == 0) begin
      failures++;
      $display("FAIL update rule never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
