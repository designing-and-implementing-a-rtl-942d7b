// tb_shift_register: self-checking testbench for shift_register.
//
// Loads the word 1001 serially (rightmost bit first) and checks that after
// four clocks it sits in Q4..Q1 as 1001, then shifts it left and right and
// checks each step, including the zero fill of a full word. After that it
// applies 400 random modes and serial bits and compares the register with a
// reference model kept as an integer (shift, mask, insert) every cycle.
// A watchdog ends the run if it hangs.
module tb_shift_register;
  localparam int unsigned N = 4;

  logic         clk = 1'b0;
  logic         rl, rr, din;
  logic [N-1:0] q;
  int unsigned  model;
  int           checks = 0;
  int           failures = 0;

  shift_register #(.N(N)) dut (.clk(clk), .rl(rl), .rr(rr), .din(din), .q(q));

  always #5 clk = ~clk;

  // one clock in mode {a, b}; the model follows with integer arithmetic
  task automatic step(input logic a, input logic b, input logic d);
    rl = a; rr = b; din = d;
    @(posedge clk);
    case ({a, b})
      2'b00: model = 0;
      2'b01: model = model >> 1;
      2'b10: model = (model << 1) % (1 << N);
      2'b11: model = ((model << 1) % (1 << N)) + int'(d);
    endcase
    #1;
    checks++;
    if (q !== N'(model)) begin
      failures++;
      $display("FAIL mode=%b%b din=%b q=%b expected=%b", a, b, d, q, N'(model));
    end
  endtask

  task automatic expect_q(input logic [N-1:0] exp);
    checks++;
    if (q !== exp) begin
      failures++;
      $display("FAIL q=%b expected=%b", q, exp);
    end
  endtask

  initial begin
    model = 0;
    step(1'b0, 1'b0, 1'b0);
    expect_q(4'b0000);
    // serial load of 1001, rightmost bit first
    step(1'b1, 1'b1, 1'b1);
    step(1'b1, 1'b1, 1'b0);
    step(1'b1, 1'b1, 1'b0);
    step(1'b1, 1'b1, 1'b1);
    expect_q(4'b1001);
    step(1'b1, 1'b0, 1'b0);  // shift left: MSB lost, LSB zero-filled
    expect_q(4'b0010);
    step(1'b0, 1'b1, 1'b0);  // shift right
    expect_q(4'b0001);
    step(1'b0, 1'b1, 1'b0);  // LSB lost
    expect_q(4'b0000);
    // all ones, then zero fill from either end
    repeat (4) step(1'b1, 1'b1, 1'b1);
    expect_q(4'b1111);
    step(1'b0, 1'b1, 1'b1);
    expect_q(4'b0111);
    step(1'b1, 1'b0, 1'b1);
    expect_q(4'b1110);
    repeat (400) begin
      step(1'($urandom), 1'($urandom), 1'($urandom));
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
