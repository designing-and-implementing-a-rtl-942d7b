// berger_pkg: types and constants shared by the self-checking shifter.
//
// The shifter is steered by two control lines, RL and RR. Their four
// combinations select reset, shift right, shift left and serial load; this
// table is the one the design is built around. shift_mode_e packs them as
// {RL, RR}. check_width() gives the width of a Berger check symbol for an
// N-bit word: enough bits to count from 0 to N ones (3 bits for N = 4).
package berger_pkg;

  // {RL, RR}
  typedef enum logic [1:0] {
    MODE_RESET = 2'b00,  // clear the register
    MODE_SHR   = 2'b01,  // shift right: Q1 (LSB) dropped, 0 enters at Q4 (MSB)
    MODE_SHL   = 2'b10,  // shift left: Q4 (MSB) dropped, 0 enters at Q1 (LSB)
    MODE_LOAD  = 2'b11   // serial load: Din enters at Q1, Q4 dropped
  } shift_mode_e;

  function automatic int unsigned check_width(input int unsigned n);
    return $clog2(n + 1);
  endfunction

endpackage
