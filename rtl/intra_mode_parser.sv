// intra_mode_parser: sequencer for the intra prediction mode syntax of one
// intra coding unit.
//
// The bitstream resolution FSM starts it once per intra CU.  It walks the
// HEVC syntax for 4:2:0 video in its fixed order: one
// prev_intra_luma_pred_flag per prediction block (four when the CU is split
// NxN, else one; one shared context), then for each prediction block
// either mpm_idx (truncated unary, cMax 2, bypass) when its flag is 1 or
// rem_intra_luma_pred_mode (5 bits, bypass) when it is 0, and finally
// intra_chroma_pred_mode.  The last element is handed to the de-binarizer
// in two parts: its first, context-coded bin (SE_CHROMA_FLAG; 0 means
// chroma mode 4) and, when that bin is 1, its two bypass bins
// (SE_CHROMA_IDX, chroma mode 0..3).  Like the other sequencers it only
// decides element, mode and binarization of the next bin; bins come from
// the arithmetic decoding unit and values from the shared de-binarizer.
//
// Interface: start with nxn (partition NxN, four prediction blocks) begins
// a CU; req_valid/req_mode ask for a bin, bin_valid says it was decoded;
// done pulses one cycle after the last element.  The element set,
// contexts and binarizations are HEVC's; the two-part chroma element and
// the handshake are this design's own.
module intra_mode_parser
  import cabac_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic        nxn,
  output logic        busy,
  output logic        done,
  output logic        req_valid,
  output bin_mode_e   req_mode,
  input  logic        bin_valid,
  output se_e         se,
  output bin_type_e   btype,
  output logic [3:0]  bparam,
  input  logic        se_done,
  input  logic [15:0] se_value
);
  typedef enum logic [2:0] {I_IDLE, I_PREV, I_MODE, I_CFLAG, I_CIDX, I_FIN} istate_e;

  istate_e    st_q;
  logic       nxn_q;
  logic [1:0] j_q;          // prediction block 0..3
  logic [3:0] prev_q;       // prev_intra_luma_pred_flag per block
  logic       last_j;       // j_q is the last prediction block
  logic       step;         // the current element completes this cycle

  assign busy   = (st_q != I_IDLE);
  assign step   = bin_valid && se_done;
  assign last_j = !nxn_q || (j_q == 2'd3);

  always_comb begin
    req_valid = 1'b0;
    req_mode  = BIN_BYPASS;
    se        = SE_PREV_INTRA;
    btype     = BT_FL;
    bparam    = 4'd1;
    unique case (st_q)
      I_PREV:  begin req_valid = 1'b1; req_mode = BIN_REGULAR; end
      I_MODE:  begin
        req_valid = 1'b1;
        if (prev_q[j_q]) begin se = SE_MPM_IDX; btype = BT_TR; bparam = 4'd2; end
        else begin se = SE_REM_INTRA; bparam = 4'd5; end
      end
      I_CFLAG: begin req_valid = 1'b1; req_mode = BIN_REGULAR; se = SE_CHROMA_FLAG; end
      I_CIDX:  begin req_valid = 1'b1; se = SE_CHROMA_IDX; bparam = 4'd2; end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st_q   <= I_IDLE;
      nxn_q  <= 1'b0;
      j_q    <= '0;
      prev_q <= '0;
      done   <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (st_q)
        I_IDLE: if (start) begin
          nxn_q <= nxn;
          j_q   <= '0;
          st_q  <= I_PREV;
        end
        I_PREV: if (step) begin
          prev_q[j_q] <= se_value[0];
          j_q <= last_j ? 2'd0 : j_q + 2'd1;
          if (last_j) st_q <= I_MODE;
        end
        I_MODE: if (step) begin
          j_q <= j_q + 2'd1;
          if (last_j) st_q <= I_CFLAG;
        end
        I_CFLAG: if (step) st_q <= se_value[0] ? I_CIDX : I_FIN;
        I_CIDX:  if (step) st_q <= I_FIN;
        I_FIN: begin
          done <= 1'b1;
          st_q <= I_IDLE;
        end
        default: st_q <= I_IDLE;
      endcase
    end
  end

  // A bin is only requested while a CU is being parsed.
  req_only_when_busy: assert property (@(posedge clk) disable iff (!rst_n)
    req_valid |-> busy);
endmodule
