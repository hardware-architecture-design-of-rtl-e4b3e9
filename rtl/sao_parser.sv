// sao_parser: sequencer for the sample adaptive offset parameters of one
// coding tree block.
//
// The bitstream resolution FSM starts it for each CTB of a slice that uses
// SAO.  It walks the sao() syntax of HEVC (version 1, 8-bit video):
// sao_merge_left_flag when the left CTB is a merge candidate,
// sao_merge_up_flag when the upper one is and no left merge took place;
// then, unless merged, for luma, Cb and Cr (each only when SAO is enabled
// for luma or chroma in the slice): sao_type_idx (truncated unary, cMax 2,
// first bin context-coded, second bypass; Cr reuses the Cb type), four
// sao_offset_abs (truncated unary bypass, cMax 7), and for band offset a
// sign for every non-zero offset plus a 5-bit sao_band_position, or for
// edge offset a 2-bit sao_eo_class (luma and Cb only).  Like the residual
// parser it only decides element, mode and binarization of the next bin;
// the bin comes from the arithmetic decoding unit and the element value
// from the shared de-binarizer (se_done/se_value, bin_idx).  The parsed
// values leave through the decoder's syntax-element output in this order.
//
// Interface: start (with luma_en, chroma_en = slice SAO flags, left_cand,
// up_cand = merge candidates available, as the host knows the CTB
// position, slice and tile) begins a CTB; req_valid/req_mode ask for a bin,
// bin_valid says it was decoded; done pulses one cycle after the last
// element.  The element set is HEVC's; the split into this sequencer and
// its handshake are this design's own.
module sao_parser
  import cabac_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic        luma_en,
  input  logic        chroma_en,
  input  logic        left_cand,
  input  logic        up_cand,
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
  input  logic [4:0]  bin_idx
);
  typedef enum logic [3:0] {
    P_IDLE, P_MLEFT, P_MUP, P_COMP, P_TYPE, P_OFF, P_SIGN, P_BAND, P_EO, P_FIN
  } pstate_e;

  pstate_e    st_q;
  logic       luma_q, chroma_q, up_q;
  logic [1:0] c_q;          // component 0..2
  logic [1:0] i_q;          // offset index 0..3
  logic [1:0] type_q;       // SaoTypeIdx of the current component
  logic [1:0] type_c_q;     // chroma SaoTypeIdx (Cb, reused for Cr)
  logic [3:0] nz_q;         // which offsets are non-zero
  logic       step;         // the current element completes this cycle

  assign busy = (st_q != P_IDLE);
  assign step = bin_valid && se_done;

  always_comb begin
    req_valid = 1'b0;
    req_mode  = BIN_BYPASS;
    se        = SE_SAO_MERGE_LEFT;
    btype     = BT_FL;
    bparam    = 4'd1;
    unique case (st_q)
      P_MLEFT: begin req_valid = 1'b1; req_mode = BIN_REGULAR; end
      P_MUP:   begin req_valid = 1'b1; req_mode = BIN_REGULAR; se = SE_SAO_MERGE_UP; end
      P_TYPE:  begin
        req_valid = 1'b1; se = SE_SAO_TYPE; btype = BT_TR; bparam = 4'd2;
        req_mode  = (bin_idx == 5'd0) ? BIN_REGULAR : BIN_BYPASS;
      end
      P_OFF:   begin req_valid = 1'b1; se = SE_SAO_OFFSET_ABS; btype = BT_TR; bparam = 4'd7; end
      P_SIGN:  begin req_valid = nz_q[i_q]; se = SE_SAO_OFFSET_SIGN; end
      P_BAND:  begin req_valid = 1'b1; se = SE_SAO_BAND_POS; bparam = 4'd5; end
      P_EO:    begin req_valid = 1'b1; se = SE_SAO_EO_CLASS; bparam = 4'd2; end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st_q <= P_IDLE;
      luma_q <= 1'b0; chroma_q <= 1'b0; up_q <= 1'b0;
      c_q <= '0; i_q <= '0; type_q <= '0; type_c_q <= '0; nz_q <= '0;
      done <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (st_q)
        P_IDLE: if (start) begin
          luma_q   <= luma_en;
          chroma_q <= chroma_en;
          up_q     <= up_cand;
          c_q      <= '0;
          st_q     <= left_cand ? P_MLEFT : (up_cand ? P_MUP : P_COMP);
        end
        P_MLEFT: if (step) begin
          if (se_value[0]) st_q <= P_FIN;
          else             st_q <= up_q ? P_MUP : P_COMP;
        end
        P_MUP: if (step) st_q <= se_value[0] ? P_FIN : P_COMP;
        P_COMP: begin
          // one cycle per component to decide what it carries
          if (c_q == 2'd3) begin
            st_q <= P_FIN;
          end else if (!((c_q == 2'd0) ? luma_q : chroma_q)) begin
            c_q <= c_q + 2'd1;
          end else if (c_q == 2'd2) begin
            type_q <= type_c_q;
            i_q    <= '0;
            if (type_c_q != 2'd0) st_q <= P_OFF;
            else                  c_q  <= c_q + 2'd1;
          end else begin
            st_q <= P_TYPE;
          end
        end
        P_TYPE: if (step) begin
          type_q <= se_value[1:0];
          if (c_q == 2'd1) type_c_q <= se_value[1:0];
          i_q <= '0;
          if (se_value[1:0] != 2'd0) begin
            st_q <= P_OFF;
          end else begin
            c_q  <= c_q + 2'd1;
            st_q <= P_COMP;
          end
        end
        P_OFF: if (step) begin
          nz_q[i_q] <= (se_value != 16'd0);
          i_q <= i_q + 2'd1;
          if (i_q == 2'd3) begin
            if (type_q == 2'd1) begin
              st_q <= P_SIGN;
            end else if (c_q == 2'd2) begin
              c_q  <= c_q + 2'd1;
              st_q <= P_COMP;
            end else begin
              st_q <= P_EO;
            end
          end
        end
        P_SIGN: if (!nz_q[i_q] || step) begin
          i_q <= i_q + 2'd1;
          if (i_q == 2'd3) st_q <= P_BAND;
        end
        P_BAND, P_EO: if (step) begin
          c_q  <= c_q + 2'd1;
          st_q <= P_COMP;
        end
        P_FIN: begin
          done <= 1'b1;
          st_q <= P_IDLE;
        end
        default: st_q <= P_IDLE;
      endcase
    end
  end

  // A bin is only requested while a CTB is being parsed.
  req_only_when_busy: assert property (@(posedge clk) disable iff (!rst_n)
    req_valid |-> busy);
endmodule
