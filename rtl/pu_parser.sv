// pu_parser: sequencer for one inter prediction unit (prediction_unit).
//
// The bitstream resolution FSM starts it once per inter prediction block.
// It walks the prediction_unit() syntax of HEVC: for a skipped CU only
// merge_idx; otherwise merge_flag, then merge_idx when it is 1, or else
// inter_pred_idc (B slices only), and for each list used ref_idx_lX (when
// the list has more than one reference), an mvd_coding and mvp_lX_flag.
// The L1 mvd_coding is left out when mvd_l1_zero_flag is set and the
// block is bi-predicted.  merge_idx is truncated unary with cMax =
// MaxNumMergeCand-1, first bin context-coded, the rest bypass; ref_idx_lX
// is truncated unary with cMax = num_ref_idx_active-1, first two bins
// context-coded, the rest bypass.  inter_pred_idc is handed to the
// de-binarizer in two parts: SE_INTER_BI, its first bin (1: PRED_BI),
// present unless nPbW+nPbH is 12, and SE_INTER_L1 (0: PRED_L0, 1:
// PRED_L1) when the block is not bi-predicted.  The motion vector
// differences are parsed by starting the MVD sequencer (mvd_start) and
// waiting for its done; meanwhile this unit requests nothing.
//
// Interface: start with the CU and slice facts the host knows (skip,
// slice_b, max_merge_m1 = MaxNumMergeCand-1, nref0_m1/nref1_m1 =
// num_ref_idx_lX_active_minus1, mvd_l1_zero, ct_depth, pb12 = nPbW+nPbH
// equals 12) begins a block; req_valid/req_mode ask for a bin, bin_valid
// says it was decoded; done pulses one cycle after the last element.
// cur_depth gives the context index generator the CU depth.  Element set,
// contexts and binarizations are HEVC's; the two-part inter_pred_idc and
// the handshake are this design's own.
module pu_parser
  import cabac_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic        skip,
  input  logic        slice_b,
  input  logic [2:0]  max_merge_m1,
  input  logic [3:0]  nref0_m1,
  input  logic [3:0]  nref1_m1,
  input  logic        mvd_l1_zero,
  input  logic [1:0]  ct_depth,
  input  logic        pb12,
  output logic        busy,
  output logic        done,
  output logic        req_valid,
  output bin_mode_e   req_mode,
  input  logic        bin_valid,
  output se_e         se,
  output bin_type_e   btype,
  output logic [3:0]  bparam,
  input  logic        se_done,
  input  logic [15:0] se_value,
  input  logic [4:0]  bin_idx,
  output logic [1:0]  cur_depth,
  output logic        mvd_start,
  input  logic        mvd_done
);
  typedef enum logic [3:0] {
    U_IDLE, U_MFLAG, U_MIDX, U_IBI, U_IL1, U_REF0, U_MVD0, U_MVP0,
    U_REF1, U_MVD1, U_MVP1, U_FIN
  } ustate_e;

  ustate_e    st_q;
  logic       b_q, l1zero_q, pb12_q;
  logic [2:0] mm1_q;
  logic [3:0] nr0_q, nr1_q;
  logic [1:0] depth_q;
  logic [1:0] pred_q;       // 0 PRED_L0, 1 PRED_L1, 2 PRED_BI
  logic       wait_q;       // an mvd_coding is running
  logic       step;         // the current element completes this cycle

  assign busy      = (st_q != U_IDLE);
  assign step      = bin_valid && se_done;
  assign cur_depth = depth_q;

  always_comb begin
    req_valid = 1'b0;
    req_mode  = BIN_REGULAR;
    se        = SE_MERGE_FLAG;
    btype     = BT_FL;
    bparam    = 4'd1;
    unique case (st_q)
      U_MFLAG: req_valid = 1'b1;
      U_MIDX: begin
        req_valid = 1'b1; se = SE_MERGE_IDX; btype = BT_TR; bparam = 4'(mm1_q);
        req_mode  = (bin_idx == 5'd0) ? BIN_REGULAR : BIN_BYPASS;
      end
      U_IBI: begin req_valid = 1'b1; se = SE_INTER_BI; end
      U_IL1: begin req_valid = 1'b1; se = SE_INTER_L1; end
      U_REF0, U_REF1: begin
        req_valid = 1'b1; se = SE_REF_IDX; btype = BT_TR;
        bparam    = (st_q == U_REF0) ? nr0_q : nr1_q;
        req_mode  = (bin_idx < 5'd2) ? BIN_REGULAR : BIN_BYPASS;
      end
      U_MVP0, U_MVP1: begin req_valid = 1'b1; se = SE_MVP_FLAG; end
      default: ;
    endcase
  end

  // first state of the first list used by direction p
  function automatic ustate_e first_list(input logic [1:0] p);
    if (p == 2'd1) return (nr1_q != 4'd0) ? U_REF1 : U_MVD1;
    return (nr0_q != 4'd0) ? U_REF0 : U_MVD0;
  endfunction
  // the state after the L1 reference index
  function automatic ustate_e after_ref1(input logic [1:0] p);
    return (l1zero_q && p == 2'd2) ? U_MVP1 : U_MVD1;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st_q <= U_IDLE;
      b_q <= 1'b0; l1zero_q <= 1'b0; pb12_q <= 1'b0; mm1_q <= '0;
      nr0_q <= '0; nr1_q <= '0; depth_q <= '0; pred_q <= '0; wait_q <= 1'b0;
      done <= 1'b0; mvd_start <= 1'b0;
    end else begin
      done      <= 1'b0;
      mvd_start <= 1'b0;
      unique case (st_q)
        U_IDLE: if (start) begin
          b_q <= slice_b; l1zero_q <= mvd_l1_zero; pb12_q <= pb12; mm1_q <= max_merge_m1;
          nr0_q <= nref0_m1; nr1_q <= nref1_m1; depth_q <= ct_depth; pred_q <= 2'd0;
          if (skip) st_q <= (max_merge_m1 != 3'd0) ? U_MIDX : U_FIN;
          else      st_q <= U_MFLAG;
        end
        U_MFLAG: if (step) begin
          if (se_value[0])  st_q <= (mm1_q != 3'd0) ? U_MIDX : U_FIN;
          else if (!b_q)    st_q <= first_list(2'd0);
          else if (!pb12_q) st_q <= U_IBI;
          else              st_q <= U_IL1;
        end
        U_MIDX: if (step) st_q <= U_FIN;
        U_IBI: if (step) begin
          if (se_value[0]) begin
            pred_q <= 2'd2;
            st_q   <= first_list(2'd2);
          end else begin
            st_q <= U_IL1;
          end
        end
        U_IL1: if (step) begin
          pred_q <= {1'b0, se_value[0]};
          st_q   <= first_list({1'b0, se_value[0]});
        end
        U_REF0: if (step) st_q <= U_MVD0;
        U_REF1: if (step) st_q <= after_ref1(pred_q);
        U_MVD0, U_MVD1: begin
          if (!wait_q) begin
            mvd_start <= 1'b1;
            wait_q    <= 1'b1;
          end else if (mvd_done) begin
            wait_q <= 1'b0;
            st_q   <= (st_q == U_MVD0) ? U_MVP0 : U_MVP1;
          end
        end
        U_MVP0: if (step) begin
          if (pred_q == 2'd2) st_q <= (nr1_q != 4'd0) ? U_REF1 : after_ref1(pred_q);
          else                st_q <= U_FIN;
        end
        U_MVP1: if (step) st_q <= U_FIN;
        U_FIN: begin
          done <= 1'b1;
          st_q <= U_IDLE;
        end
        default: st_q <= U_IDLE;
      endcase
    end
  end

  // A bin is only requested while a prediction unit is being parsed.
  req_only_when_busy: assert property (@(posedge clk) disable iff (!rst_n)
    req_valid |-> busy);
endmodule
