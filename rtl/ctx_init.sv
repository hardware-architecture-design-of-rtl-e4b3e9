// ctx_init: context initialization module.
//
// At a slice start it walks through all NUM_CTX context addresses, reads
// each 8-bit init value from the off-chip initialization-parameter memory
// (one table of NUM_CTX values per initialization type 0..2, so the memory
// address is init_type * NUM_CTX + index), converts it with the slice QP
// using the HEVC formula (slope m = 5*(v>>4)-45, offset n = 8*(v&15)-16,
// preCtxState = clip(1,126,((m*QP)>>4)+n)) and writes the context storage.
//
// Timing: start for one cycle; the memory answers one cycle after the
// address (synchronous read), so the module writes one context per cycle,
// from the second cycle after start on, and pulses done NUM_CTX + 2 cycles
// after start (busy is high in between).  The memory organisation and
// latency are this design's choices.
module ctx_init
  import cabac_pkg::*;
#(
  parameter int unsigned NCTX = NUM_CTX,
  parameter int unsigned AW   = CTX_AW
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [5:0]    slice_qp,
  input  logic [1:0]    init_type,
  output logic          busy,
  output logic          done,
  // off-chip init value memory
  output logic [8:0]    mem_addr,
  output logic          mem_re,
  input  logic [7:0]    mem_rdata,
  // context storage write port
  output logic          we,
  output logic [AW-1:0] waddr,
  output ctx_t          wdata
);
  logic [AW-1:0] idx_q;      // address being requested
  logic          busy_q, rd_pend_q;
  logic [AW-1:0] widx_q;     // address of the data now on mem_rdata
  logic [5:0]    qp_q;
  logic [1:0]    type_q;

  assign busy     = busy_q;
  assign mem_re   = busy_q && (32'(idx_q) < NCTX);
  assign mem_addr = 9'(32'(type_q) * NCTX + 32'(idx_q));
  assign we       = rd_pend_q;
  assign waddr    = widx_q;
  assign wdata    = init_ctx(mem_rdata, qp_q);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      idx_q     <= '0;
      busy_q    <= 1'b0;
      rd_pend_q <= 1'b0;
      widx_q    <= '0;
      qp_q      <= '0;
      type_q    <= '0;
      done      <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start && !busy_q) begin
        busy_q    <= 1'b1;
        idx_q     <= '0;
        rd_pend_q <= 1'b0;
        qp_q      <= slice_qp;
        type_q    <= init_type;
      end else if (busy_q) begin
        rd_pend_q <= (32'(idx_q) < NCTX);
        widx_q    <= idx_q;
        if (32'(idx_q) < NCTX) idx_q <= idx_q + 1'b1;
        if (rd_pend_q && 32'(widx_q) == NCTX - 1) begin
          busy_q <= 1'b0;
          done   <= 1'b1;
        end
      end
    end
  end
endmodule
