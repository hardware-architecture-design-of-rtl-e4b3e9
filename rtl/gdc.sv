// gdc: general (regular, context-coded) bin decoding component.
//
// Decodes one context-coded bin per call.  The MPS sub-range is the range
// minus the LPS sub-range from lps_lut; an offset at or above it selects
// the LPS.  The context is then adapted (state up by one on an MPS,
// saturating at 62; LPS state transition table on an LPS, flipping the MPS
// when the state was 0) and the interval is renormalised to at least 256
// by shifting range and offset left, filling the offset from the next
// bitstream bits.  Combinational; at most 6 bits are consumed per bin.
module gdc
  import cabac_pkg::*;
(
  input  logic [8:0]  range_in,
  input  logic [8:0]  offset_in,
  input  ctx_t        ctx_in,
  input  logic [7:0]  r_lps,      // from lps_lut
  input  logic [5:0]  bits,       // next bitstream bits, MSB first
  output logic        bin,
  output ctx_t        ctx_out,
  output logic [8:0]  range_out,
  output logic [8:0]  offset_out,
  output logic [3:0]  nbits       // bits consumed by renormalisation
);
  logic [8:0]  r_mps, rng, off;
  logic [14:0] tmp;
  logic [3:0]  sh;

  always_comb begin
    r_mps = range_in - 9'(r_lps);
    if (offset_in >= r_mps) begin
      bin = ~ctx_in.mps;
      off = offset_in - r_mps;
      rng = 9'(r_lps);
      ctx_out.mps   = (ctx_in.state == 6'd0) ? ~ctx_in.mps : ctx_in.mps;
      ctx_out.state = trans_idx_lps(ctx_in.state);
    end else begin
      bin = ctx_in.mps;
      off = offset_in;
      rng = r_mps;
      ctx_out.mps   = ctx_in.mps;
      ctx_out.state = (ctx_in.state < 6'd62) ? ctx_in.state + 6'd1 : ctx_in.state;
    end
    // leading zeros of the 9-bit range = renormalisation shift
    sh = 4'd0;
    for (int i = 8; i >= 0; i--)
      if (rng[i] == 1'b0 && sh == 4'(8 - i)) sh = 4'(9 - i);
    range_out  = rng << sh;
    tmp        = {off, bits} << sh;
    offset_out = tmp[14:6];
    nbits      = sh;
  end
endmodule
