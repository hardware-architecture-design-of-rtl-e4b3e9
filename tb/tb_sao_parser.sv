// tb_sao_parser: the SAO parameter sequencer with the de-binarizer and the
// context index generator, driven by the testbench acting as the
// arithmetic decoding unit.  For random slice SAO enables and merge
// candidates, the reference generator produces the bins of one CTB and the
// expected (element, value) list.  At each request the testbench checks the
// element, the mode and, for context-coded bins, the context address, then
// answers with the expected bin after a random delay; every completed
// element is compared with the list, and done must follow the last one.
module tb_sao_parser;
  import cabac_pkg::*;
  import tb_cabac_pkg::*;
  logic clk = 0, rst_n = 0;
  logic start, luma_en, chroma_en, left_cand, up_cand, busy, done;
  logic req_valid, bin_valid, bin, se_done;
  bin_mode_e req_mode;
  se_e se;
  bin_type_e btype;
  logic [3:0] bparam;
  logic [15:0] se_value;
  logic [4:0] bin_idx;
  logic [CTX_AW-1:0] ctx_idx;
  int checks = 0, failures = 0;

  sao_parser dut (.*);
  debin u_db (.clk, .rst_n, .clear(start), .btype, .param(bparam), .bin_valid, .bin,
              .done(se_done), .value(se_value), .bin_idx);
  cgm u_cgm (.se, .bin_idx, .c_idx(2'd0), .log2_size(3'd2), .scan(SCAN_DIAG), .x_c(5'd0),
             .y_c(5'd0), .prev_csbf(2'd0), .ctx_set(2'd0), .g1ctx(2'd0), .ct_depth(2'd0), .ctx_idx);
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
    int n_band = 0, n_edge = 0, n_merge = 0, n_sign = 0;
    start = 0; bin_valid = 0; bin = 0; luma_en = 0; chroma_en = 0; left_cand = 0; up_cand = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int it = 0; it < 400; it++) begin
      bit le, ce, lc, uc;
      le = $urandom_range(0, 3) != 0; ce = $urandom_range(0, 3) != 0;
      lc = $urandom_range(0, 1);     uc = $urandom_range(0, 1);
      g.q.delete(); g.sev.delete(); got.delete();
      g.gen_sao(le, ce, lc, uc);
      @(negedge clk);
      luma_en = le; chroma_en = ce; left_cand = lc; up_cand = uc; start = 1;
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
            $display("FAIL ctb %0d bin %0d: se %0d/%0d mode %0d/%0d ctx %0d/%0d", it, k,
                     se, g.q[k].se, req_mode, g.q[k].mode, ctx_idx, g.q[k].ctx);
        end
        bin_valid = 1; bin = g.q[k].b;
        @(negedge clk);
        bin_valid = 0;
      end
      for (int w = 0; w < 8 && !done; w++) begin
        checks++;
        if (req_valid) begin failures++; $display("FAIL extra request ctb %0d", it); end
        @(negedge clk);
      end
      checks++;
      if (busy) begin failures++; $display("FAIL ctb %0d not finished", it); end
      checks++;
      if (got.size() != g.sev.size()) begin
        failures++;
        $display("FAIL ctb %0d: %0d elements, %0d expected", it, got.size(), g.sev.size());
      end else begin
        foreach (got[j]) begin
          checks++;
          if (got[j].se != g.sev[j].se || got[j].val != g.sev[j].val) begin
            failures++;
            if (failures < 10) $display("FAIL ctb %0d element %0d: %0d=%0d expected %0d=%0d", it, j,
                                        got[j].se, got[j].val, g.sev[j].se, g.sev[j].val);
          end
        end
      end
      foreach (g.sev[j]) begin
        if (g.sev[j].se == SE_SAO_BAND_POS) n_band++;
        if (g.sev[j].se == SE_SAO_EO_CLASS) n_edge++;
        if (g.sev[j].se == SE_SAO_OFFSET_SIGN) n_sign++;
        if ((g.sev[j].se == SE_SAO_MERGE_LEFT || g.sev[j].se == SE_SAO_MERGE_UP) && g.sev[j].val == 1) n_merge++;
      end
    end
    $display("band=%0d edge=%0d signs=%0d merges=%0d", n_band, n_edge, n_sign, n_merge);
    checks++;
    if (n_band == 0 || n_edge == 0 || n_sign == 0 || n_merge == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
