// tb_intra_mode_parser: the intra prediction mode sequencer with the
// de-binarizer and the context index generator, driven by the testbench
// acting as the arithmetic decoding unit.  For random CUs (2Nx2N and NxN,
// every mix of most-probable-mode flags, all chroma modes) the reference
// generator produces the bins and the expected (element, value) list.  At
// each request the testbench checks the element, the mode and, for
// context-coded bins, the context address, then answers with the expected
// bin after a random delay; every completed element is compared with the
// list, and done must follow the last element.
module tb_intra_mode_parser;
  import cabac_pkg::*;
  import tb_cabac_pkg::*;
  logic clk = 0, rst_n = 0;
  logic start, nxn, busy, done;
  logic req_valid, bin_valid, bin, se_done;
  bin_mode_e req_mode;
  se_e se;
  bin_type_e btype;
  logic [3:0] bparam;
  logic [15:0] se_value;
  logic [4:0] bin_idx;
  logic [CTX_AW-1:0] ctx_idx;
  int checks = 0, failures = 0;

  intra_mode_parser dut (.*);
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
    int n_nxn = 0, n_mpm = 0, n_rem = 0, n_c4 = 0;
    start = 0; bin_valid = 0; bin = 0; nxn = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int it = 0; it < 1000; it++) begin
      bit n4;
      n4 = $urandom_range(0, 1);
      g.q.delete(); g.sev.delete(); got.delete();
      g.gen_intra(n4);
      @(negedge clk);
      start = 1; nxn = n4;
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
            $display("FAIL cu %0d bin %0d: se %0d/%0d mode %0d/%0d ctx %0d/%0d", it, k,
                     se, g.q[k].se, req_mode, g.q[k].mode, ctx_idx, g.q[k].ctx);
        end
        bin_valid = 1; bin = g.q[k].b;
        @(negedge clk);
        bin_valid = 0;
      end
      for (int w = 0; w < 8 && !done; w++) begin
        checks++;
        if (req_valid) begin failures++; $display("FAIL extra request cu %0d", it); end
        @(negedge clk);
      end
      checks++;
      if (busy) begin failures++; $display("FAIL cu %0d not finished", it); end
      checks++;
      if (got.size() != g.sev.size()) begin
        failures++;
        $display("FAIL cu %0d: %0d elements, %0d expected", it, got.size(), g.sev.size());
      end else begin
        foreach (got[j]) begin
          checks++;
          if (got[j].se != g.sev[j].se || got[j].val != g.sev[j].val) begin
            failures++;
            if (failures < 10) $display("FAIL cu %0d element %0d: %0d=%0d expected %0d=%0d", it, j,
                                        got[j].se, got[j].val, g.sev[j].se, g.sev[j].val);
          end
        end
      end
      if (n4) n_nxn++;
      foreach (g.sev[j]) begin
        if (g.sev[j].se == SE_MPM_IDX) n_mpm++;
        if (g.sev[j].se == SE_REM_INTRA) n_rem++;
        if (g.sev[j].se == SE_CHROMA_FLAG && g.sev[j].val == 0) n_c4++;
      end
    end
    $display("nxn=%0d mpm=%0d rem=%0d chroma4=%0d", n_nxn, n_mpm, n_rem, n_c4);
    checks++;
    if (n_nxn == 0 || n_mpm == 0 || n_rem == 0 || n_c4 == 0) failures++;
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
