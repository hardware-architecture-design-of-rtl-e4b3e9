// hevc_entropy_decoder: CABAC entropy decoder for HEVC residual, SAO, intra
// prediction mode and inter prediction unit syntax.
//
// Wires the units of the architecture together:
//   bfsm        bitstream resolution FSM (commands, sequencing, request mux)
//   bsru + rcm  bitstream resolution region: residual syntax sequencing
//               with the residual coefficient fast scanning module
//   sao_parser  SAO parameter sequencing of one CTB
//   mvd_parser  motion vector difference sequencing (mvd_coding)
//   intra_mode_parser  intra prediction mode sequencing of one CU
//   pu_parser   inter prediction unit sequencing (calls mvd_parser)
//   cgm         context index generation
//   cgm_buffer  context storage
//   ctx_init    context initialization from the off-chip init values
//   bs_buffer   bitstream buffer fed from the off-chip bitstream memory
//   adu         arithmetic decoding unit (gdc, lps_lut, bdc, terminate)
//   debin       binarization inverse
// One bin is decoded per cycle when the bitstream buffer holds at least 9
// bits: the residual parser's state selects the context index, the
// context is read, decoded and written back, and the de-binarizer closes
// the syntax element in the same cycle.
//
// Host interface: commands (see bfsm) on cmd_valid/cmd_ready with
// slice_qp/init_type for CMD_SLICE and log2_size/c_idx/scan/sdh_en/ts_en
// for CMD_TU (scan order, sign data hiding enable and transform_skip_flag
// presence, which the host derives from the CU and picture parameters), and
// sao_luma/sao_chroma/sao_left/sao_up for CMD_SAO (slice SAO enables and
// merge-candidate availability); CMD_MVD needs no parameters; intra_nxn for
// CMD_INTRA (the CU is split into four prediction blocks); pu_* for CMD_PU
// (skip, B slice, MaxNumMergeCand-1, reference counts minus 1 per list,
// mvd_l1_zero_flag, CU depth, nPbW+nPbH == 12).  The
// off-chip init-value memory is read through init_mem_addr/init_mem_re with
// data on init_mem_rdata one cycle later; the bitstream arrives as 32-bit
// words, first bit in the MSB, on bs_word/bs_valid/bs_ready.  Outputs:
// each coefficient (coef_*), each completed syntax element (se_*), the
// end of a block (tu_done) and the end_of_slice_segment_flag (eos_*).
module hevc_entropy_decoder
  import cabac_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  // host commands
  input  logic        cmd_valid,
  input  cmd_e        cmd,
  output logic        cmd_ready,
  input  logic [5:0]  slice_qp,
  input  logic [1:0]  init_type,
  input  logic [2:0]  log2_size,
  input  logic [1:0]  c_idx,
  input  scan_e       scan,
  input  logic        sdh_en,
  input  logic        ts_en,
  input  logic        sao_luma,
  input  logic        sao_chroma,
  input  logic        sao_left,
  input  logic        sao_up,
  input  logic        intra_nxn,
  input  logic        pu_skip,
  input  logic        pu_slice_b,
  input  logic [2:0]  pu_max_merge_m1,
  input  logic [3:0]  pu_nref0_m1,
  input  logic [3:0]  pu_nref1_m1,
  input  logic        pu_mvd_l1_zero,
  input  logic [1:0]  pu_ct_depth,
  input  logic        pu_pb12,
  // off-chip init-value memory
  output logic [8:0]  init_mem_addr,
  output logic        init_mem_re,
  input  logic [7:0]  init_mem_rdata,
  // off-chip bitstream
  input  logic [31:0] bs_word,
  input  logic        bs_valid,
  output logic        bs_ready,
  // results
  output logic        coef_valid,
  output logic [4:0]  coef_x,
  output logic [4:0]  coef_y,
  output logic signed [15:0] coef_value,
  output logic        tu_done,
  output logic        se_valid,
  output se_e         se_id,
  output logic [15:0] se_value,
  output logic        eos_valid,
  output logic        eos_flag
);
  // bitstream buffer
  logic        bs_flush, consume_en;
  logic [3:0]  consume_n;
  logic [15:0] peek;
  logic [7:0]  avail;
  // context init
  logic        init_start, init_busy, init_done, init_we;
  logic [CTX_AW-1:0] init_waddr;
  ctx_t        init_wdata;
  // adu
  logic        adu_init_req, adu_init_done, adu_active;
  logic        adu_req_valid, adu_bin_valid, adu_bin, adu_ctx_we;
  bin_mode_e   adu_req_mode;
  ctx_t        ctx_rd, ctx_upd;
  // residual parser
  logic        tu_start, tu_busy;
  logic        bsru_req_valid;
  bin_mode_e   bsru_req_mode;
  se_e         se;
  logic [1:0]  cg_c_idx, prev_csbf, ctx_set, g1ctx;
  logic [2:0]  cg_log2;
  // SAO sequencer
  logic        sao_start, sao_busy, sao_done, sao_req_valid;
  bin_mode_e   sao_req_mode;
  se_e         sao_se, tu_se;
  bin_type_e   sao_btype, tu_btype;
  logic [3:0]  sao_bparam, tu_bparam;
  // MVD sequencer
  logic        mvd_start, mvd_busy, mvd_done, mvd_req_valid;
  bin_mode_e   mvd_req_mode;
  se_e         mvd_se;
  bin_type_e   mvd_btype;
  logic [3:0]  mvd_bparam;
  // intra prediction mode sequencer
  logic        intra_start, intra_busy, intra_done, intra_req_valid;
  bin_mode_e   intra_req_mode;
  se_e         intra_se;
  bin_type_e   intra_btype;
  logic [3:0]  intra_bparam;
  // prediction unit sequencer
  logic        pu_start, pu_busy, pu_done, pu_req_valid, pu_mvd_start;
  bin_mode_e   pu_req_mode;
  se_e         pu_se;
  bin_type_e   pu_btype;
  logic [3:0]  pu_bparam;
  logic [1:0]  pu_depth;
  scan_e       cg_scan;
  logic [4:0]  x_c, y_c;
  bin_type_e   btype;
  logic [3:0]  bparam;
  // debin
  logic        db_bin_valid, db_done;
  logic [15:0] db_value;
  logic [4:0]  db_bin_idx;
  // context index
  logic [CTX_AW-1:0] ctx_idx;

  bs_buffer #(.WORD_W(32)) u_bs_buffer (
    .clk, .rst_n, .flush(bs_flush), .in_word(bs_word), .in_valid(bs_valid),
    .in_ready(bs_ready), .peek, .avail, .consume_en, .consume_n
  );

  ctx_init u_ctx_init (
    .clk, .rst_n, .start(init_start), .slice_qp, .init_type, .busy(init_busy),
    .done(init_done), .mem_addr(init_mem_addr), .mem_re(init_mem_re),
    .mem_rdata(init_mem_rdata), .we(init_we), .waddr(init_waddr), .wdata(init_wdata)
  );

  cgm_buffer u_cgm_buffer (
    .clk, .raddr(ctx_idx), .rdata(ctx_rd),
    .we(init_we || adu_ctx_we),
    .waddr(init_we ? init_waddr : ctx_idx),
    .wdata(init_we ? init_wdata : ctx_upd)
  );

  bfsm u_bfsm (
    .clk, .rst_n, .cmd_valid, .cmd, .cmd_ready, .bs_flush, .init_start,
    .init_done, .adu_init_req, .adu_init_done, .tu_start, .tu_done,
    .bsru_req_valid, .bsru_req_mode, .sao_start, .sao_done, .sao_req_valid,
    .sao_req_mode, .mvd_start, .mvd_done, .mvd_req_valid, .mvd_req_mode,
    .intra_start, .intra_done, .intra_req_valid, .intra_req_mode,
    .pu_start, .pu_done, .pu_req_valid, .pu_req_mode,
    .adu_req_valid, .adu_req_mode,
    .adu_bin_valid, .adu_bin, .eos_valid, .eos_flag
  );

  adu u_adu (
    .clk, .rst_n, .init_req(adu_init_req), .init_done(adu_init_done),
    .active(adu_active), .req_valid(adu_req_valid), .req_mode(adu_req_mode),
    .ctx_in(ctx_rd), .bin_valid(adu_bin_valid), .bin(adu_bin),
    .ctx_we(adu_ctx_we), .ctx_out(ctx_upd), .bits(peek), .avail,
    .consume_en, .consume_n
  );

  bsru u_bsru (
    .clk, .rst_n, .start(tu_start), .log2_size, .c_idx, .scan, .sdh_en, .ts_en,
    .busy(tu_busy),
    .done(tu_done), .req_valid(bsru_req_valid), .req_mode(bsru_req_mode),
    .bin_valid(adu_bin_valid && tu_busy), .se(tu_se), .cg_c_idx,
    .cg_log2_size(cg_log2), .cg_scan, .x_c, .y_c, .prev_csbf, .ctx_set, .g1ctx,
    .btype(tu_btype), .bparam(tu_bparam), .se_done(db_done), .se_value(db_value),
    .coef_valid, .coef_x, .coef_y, .coef_value
  );

  sao_parser u_sao (
    .clk, .rst_n, .start(sao_start), .luma_en(sao_luma), .chroma_en(sao_chroma),
    .left_cand(sao_left), .up_cand(sao_up), .busy(sao_busy), .done(sao_done),
    .req_valid(sao_req_valid), .req_mode(sao_req_mode),
    .bin_valid(adu_bin_valid && sao_busy), .se(sao_se), .btype(sao_btype),
    .bparam(sao_bparam), .se_done(db_done), .se_value(db_value), .bin_idx(db_bin_idx)
  );

  mvd_parser u_mvd (
    .clk, .rst_n, .start(mvd_start || pu_mvd_start), .busy(mvd_busy), .done(mvd_done),
    .req_valid(mvd_req_valid), .req_mode(mvd_req_mode),
    .bin_valid(adu_bin_valid && mvd_busy), .se(mvd_se), .btype(mvd_btype),
    .bparam(mvd_bparam), .se_done(db_done), .se_value(db_value)
  );

  intra_mode_parser u_intra (
    .clk, .rst_n, .start(intra_start), .nxn(intra_nxn), .busy(intra_busy),
    .done(intra_done), .req_valid(intra_req_valid), .req_mode(intra_req_mode),
    .bin_valid(adu_bin_valid && intra_busy), .se(intra_se), .btype(intra_btype),
    .bparam(intra_bparam), .se_done(db_done), .se_value(db_value)
  );

  pu_parser u_pu (
    .clk, .rst_n, .start(pu_start), .skip(pu_skip), .slice_b(pu_slice_b),
    .max_merge_m1(pu_max_merge_m1), .nref0_m1(pu_nref0_m1), .nref1_m1(pu_nref1_m1),
    .mvd_l1_zero(pu_mvd_l1_zero), .ct_depth(pu_ct_depth), .pb12(pu_pb12),
    .busy(pu_busy), .done(pu_done), .req_valid(pu_req_valid), .req_mode(pu_req_mode),
    .bin_valid(adu_bin_valid && pu_busy && !mvd_busy), .se(pu_se), .btype(pu_btype),
    .bparam(pu_bparam), .se_done(db_done), .se_value(db_value), .bin_idx(db_bin_idx),
    .cur_depth(pu_depth), .mvd_start(pu_mvd_start), .mvd_done
  );

  // the de-binarizer and context index generator serve whichever
  // sequencer is active
  always_comb begin
    if (sao_busy) begin
      se = sao_se;   btype = sao_btype;   bparam = sao_bparam;
    end else if (mvd_busy) begin
      se = mvd_se;   btype = mvd_btype;   bparam = mvd_bparam;
    end else if (intra_busy) begin
      se = intra_se; btype = intra_btype; bparam = intra_bparam;
    end else if (pu_busy) begin
      se = pu_se;    btype = pu_btype;    bparam = pu_bparam;
    end else begin
      se = tu_se;    btype = tu_btype;    bparam = tu_bparam;
    end
  end
  assign db_bin_valid = adu_bin_valid && (tu_busy || sao_busy || mvd_busy || intra_busy || pu_busy);

  debin u_debin (
    .clk, .rst_n, .clear(tu_start || sao_start || mvd_start || intra_start || pu_start || pu_mvd_start), .btype, .param(bparam),
    .bin_valid(db_bin_valid), .bin(adu_bin), .done(db_done),
    .value(db_value), .bin_idx(db_bin_idx)
  );

  cgm u_cgm (
    .se, .bin_idx(db_bin_idx), .c_idx(cg_c_idx), .log2_size(cg_log2), .scan(cg_scan),
    .x_c, .y_c, .prev_csbf, .ctx_set, .g1ctx, .ct_depth(pu_depth), .ctx_idx
  );

  assign se_valid = db_bin_valid && db_done;
  assign se_id    = se;
  assign se_value = db_value;

  // The context memory is written by one source at a time.
  one_ctx_writer: assert property (@(posedge clk) disable iff (!rst_n)
    !(init_we && adu_ctx_we));
  // No bin is decoded while the contexts are being initialised.
  no_decode_during_init: assert property (@(posedge clk) disable iff (!rst_n)
    init_busy |-> !adu_bin_valid);
  // The unit that requests bins must find an initialised decoder.
  decoder_ready_for_tu: assert property (@(posedge clk) disable iff (!rst_n)
    tu_busy |-> adu_active);
endmodule
