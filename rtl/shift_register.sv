// shift_register: the N-bit left/right shift register of the self-checking
// shifter (N = 4: flip-flops FF0..FF3 holding Q1..Q4).
//
// Each flip-flop takes one of three sources chosen by the mode lines RL and
// RR: its right neighbour, its left neighbour, or (at the ends) zero or the
// serial input Din. Q1 is the least significant bit and the end where serial
// data enters; Q4 is the most significant bit. Modes, sampled on the rising
// clock edge, with {RL, RR}:
//   00  reset        all bits cleared
//   01  shift right  Q(i) <= Q(i+1), Q4 <= 0, Q1 is discarded
//   10  shift left   Q(i+1) <= Q(i), Q1 <= 0, Q4 is discarded
//   11  load         Q(i+1) <= Q(i), Q1 <= Din (serial in; after N clocks the
//                    first bit loaded sits in Q4)
// The mode table, the serial entry at Q1 and the zero fill of logical shifts
// follow the design description. Reset is synchronous because it is one of
// the four modes; there is no separate reset pin. Which end counts as MSB is
// this design's reading of the load and shift waveforms.
//
// Interface: q[0] = Q1 ... q[N-1] = QN. One shift or load per clock.
module shift_register
  import berger_pkg::*;
#(
  parameter int unsigned N = 4
) (
  input  logic         clk,
  input  logic         rl,
  input  logic         rr,
  input  logic         din,
  output logic [N-1:0] q
);

  shift_mode_e mode;
  assign mode = shift_mode_e'({rl, rr});

  always_ff @(posedge clk) begin
    unique case (mode)
      MODE_RESET: q <= '0;
      MODE_SHR:   q <= {1'b0, q[N-1:1]};
      MODE_SHL:   q <= {q[N-2:0], 1'b0};
      MODE_LOAD:  q <= {q[N-2:0], din};
    endcase
  end

endmodule
