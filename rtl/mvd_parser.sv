// mvd_parser: sequencer for one motion vector difference (mvd_coding).
//
// The bitstream resolution FSM starts it once per motion vector difference
// the host asks for.  It walks the mvd_coding() syntax of HEVC in its
// fixed order: abs_mvd_greater0_flag for x then y (one shared context),
// abs_mvd_greater1_flag for each component whose greater0 flag is set (one
// shared context), then for x and then y, if greater0 is set,
// abs_mvd_minus2 (first-order Exp-Golomb, bypass) when greater1 is set,
// followed by mvd_sign_flag (bypass).  The sequence is a fixed list of
// eight steps; a step whose condition is false is passed over in one cycle
// without asking for a bin.  Like the other sequencers it only decides the
// element, mode and binarization of the next bin; bins come from the
// arithmetic decoding unit and values from the shared de-binarizer
// (se_done/se_value).  The element values leave through the decoder's
// syntax-element output in syntax order.
//
// Interface: start begins one mvd_coding; req_valid/req_mode ask for a bin,
// bin_valid says it was decoded; done pulses one cycle after the last
// element.  The element set, contexts and binarizations are HEVC's; the
// step list and its skip cycles are this design's own.
module mvd_parser
  import cabac_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
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
  typedef enum logic [3:0] {
    M_IDLE, M_GT0X, M_GT0Y, M_GT1X, M_GT1Y, M_M2X, M_SX, M_M2Y, M_SY, M_FIN
  } mstate_e;

  mstate_e    st_q;
  logic [1:0] gt0_q, gt1_q;   // bit 0: x component, bit 1: y component
  logic       active;         // the current step carries an element
  logic       step;           // the current element completes this cycle

  assign busy = (st_q != M_IDLE);
  assign step = bin_valid && se_done;

  always_comb begin
    active   = 1'b0;
    req_mode = BIN_BYPASS;
    se       = SE_MVD_GT0;
    btype    = BT_FL;
    bparam   = 4'd1;
    unique case (st_q)
      M_GT0X, M_GT0Y: begin active = 1'b1; req_mode = BIN_REGULAR; end
      M_GT1X: begin active = gt0_q[0]; req_mode = BIN_REGULAR; se = SE_MVD_GT1; end
      M_GT1Y: begin active = gt0_q[1]; req_mode = BIN_REGULAR; se = SE_MVD_GT1; end
      M_M2X:  begin active = gt0_q[0] && gt1_q[0]; se = SE_MVD_MINUS2; btype = BT_EGK; end
      M_M2Y:  begin active = gt0_q[1] && gt1_q[1]; se = SE_MVD_MINUS2; btype = BT_EGK; end
      M_SX:   begin active = gt0_q[0]; se = SE_MVD_SIGN; end
      M_SY:   begin active = gt0_q[1]; se = SE_MVD_SIGN; end
      default: ;
    endcase
    req_valid = active;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st_q  <= M_IDLE;
      gt0_q <= '0;
      gt1_q <= '0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (st_q)
        M_IDLE: if (start) begin
          gt0_q <= '0;
          gt1_q <= '0;
          st_q  <= M_GT0X;
        end
        M_FIN: begin
          done <= 1'b1;
          st_q <= M_IDLE;
        end
        default: if (!active || step) begin
          if (st_q == M_GT0X) gt0_q[0] <= se_value[0];
          if (st_q == M_GT0Y) gt0_q[1] <= se_value[0];
          if (st_q == M_GT1X && active) gt1_q[0] <= se_value[0];
          if (st_q == M_GT1Y && active) gt1_q[1] <= se_value[0];
          st_q <= mstate_e'(st_q + 4'd1);
        end
      endcase
    end
  end

  // A bin is only requested while an mvd_coding is being parsed.
  req_only_when_busy: assert property (@(posedge clk) disable iff (!rst_n)
    req_valid |-> busy);
endmodule
