// check_register: the 3-bit parallel-in/parallel-out register that holds the
// reference check symbol (RFCS) in complemented form, together with the
// logic that decides what it loads.
//
// The register must keep predicting how many ones the shift register ought
// to hold, without looking at the shift register's bits except the one that
// a shift throws away. On each rising clock edge, by mode {RL, RR}:
//   load (11)         the check symbol of the word being pushed in is saved:
//                     RFCS <= NCS - Q4 + Din (NCS is the generator's count of
//                     the current word, Q4 leaves and Din enters)
//   shift left (10)   RFCS <= RFCS - Q4   (unchanged if the lost MSB was 0)
//   shift right (01)  RFCS <= RFCS - Q1   (unchanged if the lost LSB was 0)
//   reset (00)        RFCS <= 0           (the cleared word has no ones)
// The register stores ~RFCS, so its outputs are the complement rail that the
// two-rail checker compares with NCS. Saving the new check symbol on load and
// keeping or decrementing it on shifts follows the design description;
// deriving the saved value from NCS of the current word and the two bits
// that move, so that the reference is correct in the cycle right after a
// load, is this design's own choice, as is clearing it in the reset mode.
//
// Interface: msb = Q4, lsb = Q1, ncs from the generator, rfcs_n = ~RFCS.
// rfcs_n is valid from the first clock edge in the reset mode onwards.
module check_register
  import berger_pkg::*;
#(
  parameter int unsigned CW = 3
) (
  input  logic          clk,
  input  logic          rl,
  input  logic          rr,
  input  logic          din,
  input  logic          msb,
  input  logic          lsb,
  input  logic [CW-1:0] ncs,
  output logic [CW-1:0] rfcs_n
);

  shift_mode_e     mode;
  logic [CW-1:0]   rfcs;
  logic [CW-1:0]   rfcs_next;

  assign mode = shift_mode_e'({rl, rr});
  assign rfcs = ~rfcs_n;

  always_comb begin
    unique case (mode)
      MODE_RESET: rfcs_next = '0;
      MODE_SHR:   rfcs_next = rfcs - CW'(lsb);
      MODE_SHL:   rfcs_next = rfcs - CW'(msb);
      MODE_LOAD:  rfcs_next = ncs - CW'(msb) + CW'(din);
    endcase
  end

  always_ff @(posedge clk) begin
    rfcs_n <= ~rfcs_next;
  end

endmodule
