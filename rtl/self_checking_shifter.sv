// self_checking_shifter: an N-bit left/right shift register that checks
// itself on line with a Berger code.
//
// Four parts are wired in a loop:
//   shift_register   (B1) holds the data word Q1..QN, modes set by RL/RR
//   berger_csg       (B2) counts the ones of the word now held (NCS)
//   check_register   (B3) holds the complement of the reference count
//                         (RFCS): saved from the generator on load, kept or
//                         decremented on shifts, by the bit that falls out
//   two_rail_checker (TRC) compares NCS with ~RFCS, pair by pair
// If the word in B1 has lost or gained ones that no shift explains (a
// unidirectional error such as a flip-flop that flips or sticks), NCS and
// RFCS differ and the checker's two rails F, G become equal. An error that
// turns as many ones into zeros as zeros into ones keeps the count and is
// not detected, as with any Berger code.
//
// Timing: B1 and B3 change on the same rising clock edge; NCS, F and G are
// combinational, so a word is checked in the cycle it is held. Mode {RL, RR}:
// 00 reset, 01 shift right, 10 shift left, 11 serial load of Din at Q1.
// Apply the reset mode for one clock before relying on F and G.
//
// The split into these four parts, the 4-bit word with a 3-bit check symbol,
// the mode table and the check-symbol update rules follow the design
// description. The error flag (F == G), the reset of the check register and
// the exact way the saved check symbol is formed on load are this design's
// own choices.
module self_checking_shifter
  import berger_pkg::*;
#(
  parameter int unsigned N  = 4,
  parameter int unsigned CW = check_width(N)
) (
  input  logic          clk,
  input  logic          rl,      // mode select, see berger_pkg::shift_mode_e
  input  logic          rr,
  input  logic          din,     // serial data input
  output logic [N-1:0]  q,       // q[0] = Q1 (LSB) ... q[N-1] = QN (MSB)
  output logic [CW-1:0] ncs,     // check symbol of the word in q
  output logic [CW-1:0] rfcs_n,  // stored complemented reference symbol
  output logic          f,       // two-rail result: f != g means no error
  output logic          g,
  output logic          error    // f == g
);

  shift_register #(.N(N)) u_b1 (
    .clk(clk), .rl(rl), .rr(rr), .din(din), .q(q)
  );

  berger_csg #(.N(N), .CW(CW)) u_csg (
    .data(q), .ncs(ncs)
  );

  check_register #(.CW(CW)) u_b3 (
    .clk(clk), .rl(rl), .rr(rr), .din(din),
    .msb(q[N-1]), .lsb(q[0]), .ncs(ncs), .rfcs_n(rfcs_n)
  );

  two_rail_checker #(.W(CW)) u_trc (
    .x(ncs), .y(rfcs_n), .f(f), .g(g)
  );

  assign error = ~(f ^ g);

endmodule
