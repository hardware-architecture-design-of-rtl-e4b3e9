// adu: arithmetic decoding unit.
//
// Holds the 9-bit interval range and offset of the CABAC decoding engine
// and decodes one bin per cycle in one of three modes: regular (gdc with
// the lps_lut sub-range, context read from and written back to the context
// storage), bypass (bdc) and terminate.  Initialisation sets the range to
// 510 and loads the offset with the next 9 bitstream bits.  A terminate
// bin equal to 1 ends the arithmetic-coded data: the unit goes inactive
// and must be initialised again.
//
// Timing: a request (req_valid) is served combinationally in the cycle it
// is presented, provided the unit is active and the bitstream buffer holds
// at least 9 bits; bin_valid then marks the bin, and the new range/offset
// and context are written at the clock edge.  Otherwise the request waits
// (bin_valid low).  init_req is served the same way and pulses init_done.
// The split into the three decoding components and the table follow the
// document's figure; the handshake and the 9-bit stall rule are this
// design's own.
module adu
  import cabac_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  // control
  input  logic       init_req,
  output logic       init_done,
  output logic       active,
  // bin request
  input  logic       req_valid,
  input  bin_mode_e  req_mode,
  input  ctx_t       ctx_in,
  output logic       bin_valid,
  output logic       bin,
  // context write-back
  output logic       ctx_we,
  output ctx_t       ctx_out,
  // bitstream buffer
  input  logic [15:0] bits,
  input  logic [7:0]  avail,
  output logic        consume_en,
  output logic [3:0]  consume_n
);
  logic [8:0] range_q, offset_q, range_d, offset_d;
  logic       active_q, active_d;
  logic       go;

  // regular
  logic [7:0] r_lps;
  logic       g_bin;
  ctx_t       g_ctx;
  logic [8:0] g_range, g_offset;
  logic [3:0] g_nbits;
  // bypass
  logic       b_bin;
  logic [8:0] b_offset;
  // terminate
  logic [8:0] t_rng;

  lps_lut u_lut (.state(ctx_in.state), .range_in(range_q), .r_lps(r_lps));

  gdc u_gdc (
    .range_in(range_q), .offset_in(offset_q), .ctx_in(ctx_in), .r_lps(r_lps),
    .bits(bits[15:10]), .bin(g_bin), .ctx_out(g_ctx), .range_out(g_range),
    .offset_out(g_offset), .nbits(g_nbits)
  );

  bdc u_bdc (
    .range_in(range_q), .offset_in(offset_q), .bit_in(bits[15]),
    .bin(b_bin), .offset_out(b_offset)
  );

  assign go     = avail >= 8'd9;
  assign active = active_q;
  assign t_rng  = range_q - 9'd2;
  assign ctx_out = g_ctx;

  always_comb begin
    range_d    = range_q;
    offset_d   = offset_q;
    active_d   = active_q;
    init_done  = 1'b0;
    bin_valid  = 1'b0;
    bin        = 1'b0;
    ctx_we     = 1'b0;
    consume_en = 1'b0;
    consume_n  = 4'd0;
    if (init_req) begin
      if (go) begin
        range_d    = 9'd510;
        offset_d   = bits[15:7];
        active_d   = 1'b1;
        init_done  = 1'b1;
        consume_en = 1'b1;
        consume_n  = 4'd9;
      end
    end else if (req_valid && active_q && go) begin
      bin_valid = 1'b1;
      unique case (req_mode)
        BIN_REGULAR: begin
          bin        = g_bin;
          ctx_we     = 1'b1;
          range_d    = g_range;
          offset_d   = g_offset;
          consume_en = 1'b1;
          consume_n  = g_nbits;
        end
        BIN_BYPASS: begin
          bin        = b_bin;
          offset_d   = b_offset;
          consume_en = 1'b1;
          consume_n  = 4'd1;
        end
        default: begin  // BIN_TERM
          if (offset_q >= t_rng) begin
            bin      = 1'b1;
            active_d = 1'b0;
          end else begin
            bin = 1'b0;
            if (t_rng[8]) begin
              range_d = t_rng;
            end else begin
              range_d    = {t_rng[7:0], 1'b0};
              offset_d   = {offset_q[7:0], bits[15]};
              consume_en = 1'b1;
              consume_n  = 4'd1;
            end
          end
        end
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      range_q  <= 9'd510;
      offset_q <= '0;
      active_q <= 1'b0;
    end else begin
      range_q  <= range_d;
      offset_q <= offset_d;
      active_q <= active_d;
    end
  end

  offset_below_range: assert property (@(posedge clk) disable iff (!rst_n)
    active_q |-> (offset_q < range_q));
endmodule
