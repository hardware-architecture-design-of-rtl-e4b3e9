// bs_buffer: bitstream buffer between the off-chip bitstream memory and the
// arithmetic decoding unit.
//
// A 64-bit left-aligned shift register holds the next unread bits, most
// significant first.  A 32-bit word is accepted (in_valid && in_ready)
// whenever at most 32 bits are held, so the buffer refills while the
// decoder runs.  The top 16 bits are always visible on peek together with
// the number of valid bits; the consumer removes 0..15 bits per cycle with
// consume_en/consume_n, and may take a word in the same cycle.  flush
// empties the buffer (used at a slice start).  The word width and the
// register size are this design's own choices.
module bs_buffer #(
  parameter int unsigned WORD_W = 32
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              flush,
  input  logic [WORD_W-1:0] in_word,
  input  logic              in_valid,
  output logic              in_ready,
  output logic [15:0]       peek,
  output logic [7:0]        avail,
  input  logic              consume_en,
  input  logic [3:0]        consume_n
);
  localparam int unsigned BUF_W = 2 * WORD_W;
  logic [BUF_W-1:0] buf_q, shifted;
  logic [7:0]       cnt_q, cnt_after;

  assign in_ready = (cnt_q <= 8'(WORD_W)) && !flush;
  assign peek     = buf_q[BUF_W-1 -: 16];
  assign avail    = cnt_q;

  always_comb begin
    shifted   = consume_en ? (buf_q << consume_n) : buf_q;
    cnt_after = consume_en ? (cnt_q - 8'(consume_n)) : cnt_q;
    if (in_valid && in_ready) begin
      shifted   = shifted | ({in_word, {WORD_W{1'b0}}} >> cnt_after);
      cnt_after = cnt_after + 8'(WORD_W);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      buf_q <= '0;
      cnt_q <= '0;
    end else if (flush) begin
      buf_q <= '0;
      cnt_q <= '0;
    end else begin
      buf_q <= shifted;
      cnt_q <= cnt_after;
    end
  end

  consume_le_avail: assert property (@(posedge clk) disable iff (!rst_n)
    consume_en |-> (8'(consume_n) <= cnt_q));
endmodule
