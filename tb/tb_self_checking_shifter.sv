// tb_self_checking_shifter: end-to-end testbench for the self-checking
// shifter at its default size (4-bit word, 3-bit check symbol).
//
// Part 1 repeats the demonstration sequence: reset, serial load of 1001
// (rightmost bit first), then shifts left and right. Part 2 runs 600 random
// modes and serial bits. In both, after every clock the testbench checks the
// word against an integer model, the generated check symbol against a
// count of the model's ones, the stored symbol against its complement, and
// that the two-rail outputs differ (no error). Part 3 injects errors: it
// overrides the shift register's outputs between clock edges with a
// corrupted word and checks, in the same cycle, that an error is flagged
// exactly when the number of ones changed (every unidirectional error, and
// no error for a swap that keeps the count, which a Berger code cannot see).
// A reset then clears the error. Every mechanism (reset, load, shift left
// and right with the lost bit 0 and 1, detected and undetected errors) is
// counted and must occur at least once.
module tb_self_checking_shifter;
  localparam int unsigned N  = 4;
  localparam int unsigned CW = 3;

  logic          clk = 1'b0;
  logic          rl = 1'b0, rr = 1'b0, din = 1'b0;
  logic [N-1:0]  q;
  logic [CW-1:0] ncs, rfcs_n;
  logic          f, g, error;

  int unsigned   model = 0;
  int            checks = 0;
  int            failures = 0;
  int            n_reset = 0, n_load = 0;
  int            n_shl_keep = 0, n_shl_dec = 0, n_shr_keep = 0, n_shr_dec = 0;
  int            n_detected = 0, n_undetected_swap = 0;

  self_checking_shifter dut (
    .clk(clk), .rl(rl), .rr(rr), .din(din), .q(q),
    .ncs(ncs), .rfcs_n(rfcs_n), .f(f), .g(g), .error(error)
  );

  always #5 clk = ~clk;

  function automatic int ones(input int unsigned v);
    int n = 0;
    for (int i = 0; i < 32; i++) if (v[i]) n++;
    return n;
  endfunction

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s: q=%b ncs=%0d rfcs_n=%b f=%b g=%b model=%b", what, q, ncs,
               rfcs_n, f, g, N'(model));
    end
  endtask

  task automatic check_clean();
    check(q === N'(model), "word");
    check(int'(ncs) == ones(model), "generated check symbol");
    check(rfcs_n === ~CW'(ones(model)), "stored check symbol");
    check(f != g && !error, "two-rail result");
  endtask

  task automatic step(input logic [1:0] mode, input logic d);
    {rl, rr} = mode;
    din = d;
    @(posedge clk);
    case (mode)
      2'b00: begin model = 0; n_reset++; end
      2'b01: begin
        if (model[0]) n_shr_dec++; else n_shr_keep++;
        model = model >> 1;
      end
      2'b10: begin
        if (model[N-1]) n_shl_dec++; else n_shl_keep++;
        model = (model << 1) % (1 << N);
      end
      2'b11: begin model = ((model << 1) % (1 << N)) + int'(d); n_load++; end
    endcase
    #1;
    check_clean();
  endtask

  // drive the shift register's outputs to bad, as a fault in its flip-flops
  // would, check the checker in the same cycle, then resync
  task automatic inject(input logic [N-1:0] bad);
    bit expect_err;
    expect_err = ones(int'(bad)) != ones(model);
    @(negedge clk);
    force dut.q = bad;
    #1;
    check(q === bad, "injected word");
    check(error == expect_err && ((f == g) == expect_err), "error flag");
    if (expect_err && error) n_detected++;
    if (!expect_err && bad != N'(model) && !error) n_undetected_swap++;
    release dut.q;
    step(2'b00, 1'b0);  // reset mode clears both register and reference
  endtask

  initial begin
    logic [N-1:0] w, m, s;
    int i1, i0;
    // part 1: reset, load 1001 rightmost bit first, shift
    step(2'b00, 1'b0);
    step(2'b11, 1'b1);
    step(2'b11, 1'b0);
    step(2'b11, 1'b0);
    step(2'b11, 1'b1);
    check(q === 4'b1001 && ncs == 3'd2 && rfcs_n == 3'b101, "1001 loaded");
    step(2'b10, 1'b0);  // MSB 1 lost: reference 2 -> 1
    step(2'b10, 1'b0);  // MSB 0 lost: reference kept
    check(q === 4'b0100 && ncs == 3'd1 && rfcs_n == 3'b110, "shifted left twice");
    step(2'b01, 1'b0);  // LSB 0 lost: reference kept
    step(2'b01, 1'b0);  // LSB 0 lost: reference kept
    step(2'b01, 1'b0);  // LSB 1 lost: reference 1 -> 0
    check(q === 4'b0000 && rfcs_n == 3'b111, "shifted out");

    // part 2: random operation
    repeat (600) step(2'($urandom), 1'($urandom));

    // part 3: error injection on random words
    repeat (200) begin
      // load a random word
      w = N'($urandom);
      for (int i = N - 1; i >= 0; i--) step(2'b11, w[i]);
      m = N'($urandom_range((1 << N) - 1, 1));
      case ($urandom_range(3, 0))
        0: inject(w ^ (N'(1) << $urandom_range(N - 1, 0)));  // single flip
        1: inject(w | m);                                     // 0 -> 1 only
        2: inject(w & ~m);                                    // 1 -> 0 only
        default: begin                                        // swap a 1 and a 0
          i1 = -1;
          i0 = -1;
          for (int i = 0; i < N; i++) begin
            if (w[i] && i1 < 0) i1 = i;
            if (!w[i] && i0 < 0) i0 = i;
          end
          if (i1 >= 0 && i0 >= 0) begin
            s = w;
            s[i1] = 1'b0;
            s[i0] = 1'b1;
            inject(s);
          end
        end
      endcase
    end

    $display("reset=%0d load=%0d shl_keep=%0d shl_dec=%0d shr_keep=%0d shr_dec=%0d detected=%0d undetected_swap=%0d",
             n_reset, n_load, n_shl_keep, n_shl_dec, n_shr_keep, n_shr_dec, n_detected,
             n_undetected_swap);
    check(n_reset > 0, "reset happened");
    check(n_load > 0, "load happened");
    check(n_shl_keep > 0, "shift left with MSB 0 happened");
    check(n_shl_dec > 0, "shift left with MSB 1 happened");
    check(n_shr_keep > 0, "shift right with LSB 0 happened");
    check(n_shr_dec > 0, "shift right with LSB 1 happened");
    check(n_detected > 0, "an error was detected");
    check(n_undetected_swap > 0, "a count-preserving error was seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
