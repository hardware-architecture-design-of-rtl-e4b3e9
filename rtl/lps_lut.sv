// lps_lut: LPS sub-range look-up table of the arithmetic decoding unit.
//
// CABAC replaces the multiplication range * p_LPS by a table indexed with
// the 6-bit probability state of the context and the quarter of the current
// 9-bit range (bits 7:6).  The table holds the 64 x 4 values of the HEVC
// standard (see cabac_pkg::range_tab_lps).  Purely combinational: the
// sub-range is valid in the same cycle as the state and range.
module lps_lut
  import cabac_pkg::*;
(
  input  logic [5:0] state,    // probability state index of the context
  input  logic [8:0] range_in, // current interval range (256..510)
  output logic [7:0] r_lps     // LPS sub-range
);
  always_comb r_lps = range_tab_lps(state, range_in[7:6]);
endmodule
