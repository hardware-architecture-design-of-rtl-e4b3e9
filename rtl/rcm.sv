// rcm: residual coefficient fast scanning module.
//
// Combinational helper of the residual parser that removes the scan
// bookkeeping from the state machine:
//  * converts the decoded last significant position (last_x, last_y) of a
//    2^log2_size transform block into the index of its 4x4 sub-block and
//    its position inside that sub-block, both in the block's scan order
//    (up-right diagonal, horizontal or vertical), so parsing starts
//    directly at the last coefficient;
//  * maps a sub-block scan index and an in-sub-block scan position to
//    coordinates;
//  * from the 16-bit significance map of a sub-block (bit n = scan
//    position n) gives the number of significant coefficients and the
//    position of the k-th one counted from the highest scan position, so
//    that level decoding jumps from one significant coefficient to the next
//    instead of re-walking all 16 positions; it also gives the highest and
//    lowest significant scan positions, which decide sign data hiding.
module rcm
  import cabac_pkg::*;
(
  input  logic [2:0]  log2_size,   // 2..5
  input  scan_e       scan,
  input  logic [4:0]  last_x,
  input  logic [4:0]  last_y,
  output logic [5:0]  last_sb,
  output logic [3:0]  last_pos,
  input  logic [5:0]  sb_idx,
  output logic [2:0]  sb_x,
  output logic [2:0]  sb_y,
  input  logic [3:0]  pos,
  output logic [1:0]  pos_x,
  output logic [1:0]  pos_y,
  input  logic [15:0] sig_map,
  input  logic [3:0]  k,
  output logic [4:0]  num_sig,
  output logic [3:0]  kth_pos,
  output logic [3:0]  hi_pos,      // highest significant scan position
  output logic [3:0]  lo_pos       // lowest significant scan position
);
  logic [1:0] log2sb;
  logic [5:0] sbxy, pxy;
  logic [4:0] cnt;

  always_comb begin
    log2sb   = 2'(log2_size - 3'd2);
    last_sb  = scan_index(last_x[4:2], last_y[4:2], log2sb, scan);
    last_pos = 4'(scan_index({1'b0, last_x[1:0]}, {1'b0, last_y[1:0]}, 2'd2, scan));
    sbxy     = scan_pos(sb_idx, log2sb, scan);
    sb_x     = sbxy[2:0];
    sb_y     = sbxy[5:3];
    pxy      = scan_pos({2'b00, pos}, 2'd2, scan);
    pos_x    = pxy[1:0];
    pos_y    = pxy[4:3];
    num_sig  = '0;
    for (int n = 0; n < 16; n++) num_sig = num_sig + 5'(sig_map[n]);
    hi_pos  = '0;
    lo_pos  = '0;
    for (int n = 15; n >= 0; n--) if (sig_map[n]) lo_pos = 4'(n);
    for (int n = 0; n < 16; n++)  if (sig_map[n]) hi_pos = 4'(n);
    kth_pos = '0;
    cnt     = '0;
    for (int n = 15; n >= 0; n--) begin
      if (sig_map[n]) begin
        if (cnt == {1'b0, k}) kth_pos = 4'(n);
        cnt = cnt + 5'd1;
      end
    end
  end
endmodule
