// cgm_buffer: context storage area of the context modeling region.
//
// An array of NUM_CTX context variables (6-bit state, 1-bit MPS).  The
// initialization module fills it at each slice start; afterwards the
// arithmetic decoding unit reads the context selected by the context
// index generator and writes the adapted value back.  The read is
// asynchronous (distributed memory), so a regular bin is read, decoded and
// written back in one cycle; a write and a read of the same address in one
// cycle return the old value.  The memory depth and the asynchronous read
// are this design's choices.
module cgm_buffer
  import cabac_pkg::*;
#(
  parameter int unsigned DEPTH = NUM_CTX,
  parameter int unsigned AW    = CTX_AW
) (
  input  logic          clk,
  input  logic [AW-1:0] raddr,
  output ctx_t          rdata,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  ctx_t          wdata
);
  ctx_t mem [DEPTH];

  assign rdata = (32'(raddr) < DEPTH) ? mem[raddr] : '0;

  always_ff @(posedge clk) begin
    if (we && 32'(waddr) < DEPTH) mem[waddr] <= wdata;
  end
endmodule
