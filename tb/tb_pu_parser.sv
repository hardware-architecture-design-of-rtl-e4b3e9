// tb_pu_parser: the prediction unit sequencer together with the MVD
// sequencer it calls, the de-binarizer and the context index generator,
// driven by the testbench acting as the arithmetic decoding unit.  For
// random CU and slice facts (skip, P or B slice, 1..5 merge candidates,
// 1..16 references per list, mvd_l1_zero_flag, CU depth, 8x4/4x8 blocks)
// the reference generator produces the bins and the expected (element,
// value) list.  At each request the testbench checks the element, the
// mode and, for context-coded bins, the context address, then answers
// with the expected bin after a random delay; every completed element is
// compared with the list, and done must follow the last element.
module tb_pu_parser;
  import cabac_pkg::*;
  import tb_cabac_pkg::*;
  logic clk = 0, rst_n = 0;
  logic start, skip, slice_b, mvd_l1_zero, pb12, busy, done;
  logic [2:0] max_merge_m1;
  logic [3:0] nref0_m1, nref1_m1;
  logic [1:0] ct_depth, cur_depth;
  logic req_valid, bin_valid, bin, se_done;
  bin_mode_e req_mode, pu_mode, mv_mode;
  se_e se, pu_se, mv_se;
  bin_type_e btype, pu_btype, mv_btype;
  logic [3:0] bparam, pu_bparam, mv_bparam;
  logic pu_req, mv_req, mv_busy, mv_done, mvd_start;
  logic [15:0] se_value;
  logic [4:0] bin_idx;
  logic [CTX_AW-1:0] ctx_idx;
  int checks = 0, failures = 0;

  pu_parser dut (.clk, .rst_n, .start, .skip, .slice_b, .max_merge_m1, .nref0_m1, .nref1_m1,
                 .mvd_l1_zero, .ct_depth, .pb12, .busy, .done, .req_valid(pu_req),
                 .req_mode(pu_mode), .bin_valid(bin_valid && !mv_busy), .se(pu_se),
                 .btype(pu_btype), .bparam(pu_bparam), .se_done, .se_value, .bin_idx,
                 .cur_depth, .mvd_start, .mvd_done(mv_done));
  mvd_parser u_mvd (.clk, .rst_n, .start(mvd_start), .busy(mv_busy), .done(mv_done),
                    .req_valid(mv_req), .req_mode(mv_mode), .bin_valid(bin_valid && mv_busy),
                    .se(mv_se), .btype(mv_btype), .bparam(mv_bparam), .se_done, .se_value);
  assign req_valid = pu_req || mv_req;
  assign req_mode  = mv_busy ? mv_mode   : pu_mode;
  assign se        = mv_busy ? mv_se     : pu_se;
  assign btype     = mv_busy ? mv_btype  : pu_btype;
  assign bparam    = mv_busy ? mv_bparam : pu_bparam;
  debin u_db (.clk, .rst_n, .clear(start || mvd_start), .btype, .param(bparam), .bin_valid, .bin,
              .done(se_done), .value(se_value), .bin_idx);
  cgm u_cgm (.se, .bin_idx, .c_idx(2'd0), .log2_size(3'd2), .scan(SCAN_DIAG), .x_c(5'd0),
             .y_c(5'd0), .prev_csbf(2'd0), .ctx_set(2'd0), .g1ctx(2'd0), .ct_depth(cur_depth),
             .ctx_idx);
  always #5 clk = ~clk;

  // completed elements
  se_rec_t got[$];
  always @(posedge clk) if (rst_n && bin_valid && se_done) begin
    se_rec_t r;
    r.se = int'(se); r.val = int'(se_value);
    got.push_back(r);
  end

  initial begin
    resid_gen g = new();
    int n_skip = 0, n_merge = 0, n_bi = 0, n_l1 = 0, n_ref = 0, n_l1zero = 0, n_mvd = 0;
    start = 0; bin_valid = 0; bin = 0; skip = 0; slice_b = 0; max_merge_m1 = 0;
    nref0_m1 = 0; nref1_m1 = 0; mvd_l1_zero = 0; ct_depth = 0; pb12 = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int it = 0; it < 1500; it++) begin
      bit sk, b, lz, p12;
      int mm1, nr0, nr1, dep;
      sk = ($urandom_range(0, 4) == 0); b = $urandom_range(0, 1); lz = $urandom_range(0, 1);
      p12 = ($urandom_range(0, 3) == 0);
      mm1 = $urandom_range(0, 4); dep = $urandom_range(0, 3);
      nr0 = ($urandom_range(0, 2) == 0) ? 0 : $urandom_range(0, 15);
      nr1 = b ? (($urandom_range(0, 2) == 0) ? 0 : $urandom_range(0, 15)) : 0;
      g.q.delete(); g.sev.delete(); got.delete();
      g.gen_pu(sk, b, mm1, nr0, nr1, lz, dep, p12);
      @(negedge clk);
      start = 1; skip = sk; slice_b = b; max_merge_m1 = 3'(mm1); nref0_m1 = 4'(nr0);
      nref1_m1 = 4'(nr1); mvd_l1_zero = lz; ct_depth = 2'(dep); pb12 = p12;
      @(negedge clk);
      start = 0;
      foreach (g.q[k]) begin
        for (int w = 0; w < 20 && !req_valid; w++) @(negedge clk);
        repeat ($urandom_range(0, 2)) @(negedge clk);
        checks++;
        if (!req_valid || se != se_e'(g.q[k].se) || req_mode != bin_mode_e'(g.q[k].mode) ||
            (g.q[k].mode == 0 && int'(ctx_idx) != g.q[k].ctx)) begin
          failures++;
          if (failures < 10)
            $display("FAIL pu %0d bin %0d: se %0d/%0d mode %0d/%0d ctx %0d/%0d", it, k,
                     se, g.q[k].se, req_mode, g.q[k].mode, ctx_idx, g.q[k].ctx);
        end
        bin_valid = 1; bin = g.q[k].b;
        @(negedge clk);
        bin_valid = 0;
      end
      for (int w = 0; w < 12 && !done; w++) begin
        checks++;
        if (req_valid) begin failures++; $display("FAIL extra request pu %0d", it); end
        @(negedge clk);
      end
      checks++;
      if (busy) begin failures++; $display("FAIL pu %0d not finished", it); end
      checks++;
      if (got.size() != g.sev.size()) begin
        failures++;
        if (failures < 10) $display("FAIL pu %0d: %0d elements, %0d expected", it, got.size(), g.sev.size());
      end else begin
        foreach (got[j]) begin
          checks++;
          if (got[j].se != g.sev[j].se || got[j].val != g.sev[j].val) begin
            failures++;
            if (failures < 10) $display("FAIL pu %0d element %0d: %0d=%0d expected %0d=%0d", it, j,
                                        got[j].se, got[j].val, g.sev[j].se, g.sev[j].val);
          end
        end
      end
      if (sk) n_skip++;
      foreach (g.sev[j]) begin
        if (g.sev[j].se == SE_MERGE_FLAG && g.sev[j].val == 1) n_merge++;
        if (g.sev[j].se == SE_INTER_BI && g.sev[j].val == 1) begin
          n_bi++;
          if (lz) n_l1zero++;
        end
        if (g.sev[j].se == SE_INTER_L1 && g.sev[j].val == 1) n_l1++;
        if (g.sev[j].se == SE_REF_IDX && g.sev[j].val >= 2) n_ref++;
        if (g.sev[j].se == SE_MVD_GT0 && j > 0 && g.sev[j-1].se != SE_MVD_GT0) n_mvd++;
      end
    end
    $display("skip=%0d merge=%0d bi=%0d l1=%0d ref>=2=%0d bi-with-l1zero=%0d mvd=%0d",
             n_skip, n_merge, n_bi, n_l1, n_ref, n_l1zero, n_mvd);
    checks++;
    if (n_skip == 0 || n_merge == 0 || n_bi == 0 || n_l1 == 0 || n_ref == 0 || n_l1zero == 0 ||
        n_mvd == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
