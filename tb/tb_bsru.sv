// tb_bsru: the residual parser with the de-binarizer and context index
// generator, driven by the testbench acting as the arithmetic decoding
// unit.  Random blocks of every size and component, with random scan order
// (horizontal/vertical only for 4x4 and 8x8, as in HEVC), sign data hiding
// and transform_skip_flag settings, are turned into the
// expected bin list by the reference syntax generator; at each request
// the testbench checks the syntax element, the mode and (for regular
// bins) the context address, answers with the expected bin after a random
// delay, and finally compares the output coefficients with the block.
module tb_bsru;
  import cabac_pkg::*;
  import tb_cabac_pkg::*;
  logic clk = 0, rst_n = 0;
  logic sdh_en, ts_en;
  scan_e scan, cg_scan;
  logic start, busy, done, req_valid, bin_valid, bin, se_done, coef_valid;
  logic [2:0] log2_size, cg_log2_size;
  logic [1:0] c_idx, cg_c_idx, prev_csbf, ctx_set, g1ctx;
  bin_mode_e req_mode;
  se_e se;
  logic [4:0] x_c, y_c, coef_x, coef_y, bin_idx;
  bin_type_e btype;
  logic [3:0] bparam;
  logic [15:0] se_value;
  logic signed [15:0] coef_value;
  logic [CTX_AW-1:0] ctx_idx;
  int checks = 0, failures = 0;

  bsru dut (.*);
  debin u_db (.clk, .rst_n, .clear(start), .btype, .param(bparam), .bin_valid, .bin,
              .done(se_done), .value(se_value), .bin_idx);
  cgm u_cgm (.se, .bin_idx, .c_idx(cg_c_idx), .log2_size(cg_log2_size), .scan(cg_scan), .x_c, .y_c,
             .prev_csbf, .ctx_set, .g1ctx, .ct_depth(2'd0), .ctx_idx);
  always #5 clk = ~clk;

  int recv [1024];
  int nrecv;
  always @(posedge clk) if (coef_valid) begin
    recv[int'(coef_x) + 32 * int'(coef_y)] = int'(coef_value);
    nrecv++;
  end

  initial begin
    resid_gen g = new();
    int c[1024];
    start = 0; bin_valid = 0; bin = 0; log2_size = 2; c_idx = 0;
    scan = SCAN_DIAG; sdh_en = 0; ts_en = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    g.n_hidden = 0;
    for (int it = 0; it < 240; it++) begin
      int l2, ci, nz, dens, sc;
      bit sd, te, tf;
      l2 = 2 + (it % 4);
      ci = (it % 5 == 4) ? 1 + (it % 2) : 0;
      dens = $urandom_range(1, 100);
      sc = (l2 <= 3) ? $urandom_range(0, 2) : 0;
      sd = $urandom_range(0, 1);
      te = $urandom_range(0, 1);
      tf = $urandom_range(0, 1);
      nz = 0;
      for (int i = 0; i < 1024; i++) begin
        c[i] = 0;
        if ((i % 32) < (1 << l2) && (i / 32) < (1 << l2) && $urandom_range(1, 100) <= dens) begin
          c[i] = ($urandom_range(0, 9) == 0) ? $urandom_range(3, 900) : $urandom_range(1, 3);
          if ($urandom_range(0, 1)) c[i] = -c[i];
        end
      end
      if (dens < 5) begin  // ensure at least one, placed in a sub-block DC
        c[0] = 0;
        c[4 * $urandom_range(0, (1 << l2) / 4 - 1)] = 2;
      end
      for (int i = 0; i < 1024; i++) begin recv[i] = 0; if (c[i] != 0) nz++; end
      if (nz == 0) begin c[0] = 1; nz = 1; end
      nrecv = 0;
      g.q.delete();
      g.gen(c, l2, ci, sc, sd, te, tf);
      @(negedge clk);
      log2_size = 3'(l2); c_idx = 2'(ci); start = 1;
      scan = scan_e'(sc); sdh_en = sd; ts_en = te;
      @(negedge clk);
      start = 0;
      foreach (g.q[k]) begin
        while (!req_valid) @(negedge clk);
        bin_valid = 0;
        repeat ($urandom_range(0, 2)) @(negedge clk);
        checks++;
        if (!req_valid || se != se_e'(g.q[k].se) || req_mode != bin_mode_e'(g.q[k].mode) ||
            (g.q[k].mode == 0 && int'(ctx_idx) != g.q[k].ctx)) begin
          failures++;
          if (failures < 10)
            $display("FAIL block %0d bin %0d: se %0d/%0d mode %0d/%0d ctx %0d/%0d", it, k,
                     se, g.q[k].se, req_mode, g.q[k].mode, ctx_idx, g.q[k].ctx);
        end
        bin_valid = 1; bin = g.q[k].b;
        @(negedge clk);
        bin_valid = 0;
      end
      while (busy) @(negedge clk);
      checks++;
      if (req_valid) begin failures++; $display("FAIL extra request"); end
      for (int i = 0; i < 1024; i++) begin
        checks++;
        if (recv[i] != c[i]) begin
          failures++;
          if (failures < 10) $display("FAIL block %0d (%0d,%0d): %0d expected %0d", it, i % 32, i / 32, recv[i], c[i]);
        end
      end
      checks++;
      if (nrecv != nz) begin failures++; $display("FAIL count %0d expected %0d", nrecv, nz); end
    end
    $display("hidden-sign sub-blocks: %0d", g.n_hidden);
    checks++;
    if (g.n_hidden == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
