// tb_mvd_parser: the motion vector difference sequencer with the
// de-binarizer and the context index generator, driven by the testbench
// acting as the arithmetic decoding unit.  For random differences (zero,
// one, small and up to +-32768 per component) the reference generator
// produces the bins of one mvd_coding and the expected (element, value)
// list.  At each request the testbench checks the element, the mode and,
// for context-coded bins, the context address, then answers with the
// expected bin after a random delay; every completed element is compared
// with the list, the difference rebuilt from the elements must equal the
// one generated, and done must follow the last element.
module tb_mvd_parser;
  import cabac_pkg::*;
  import tb_cabac_pkg::*;
  logic clk = 0, rst_n = 0;
  logic start, busy, done;
  logic req_valid, bin_valid, bin, se_done;
  bin_mode_e req_mode;
  se_e se;
  bin_type_e btype;
  logic [3:0] bparam;
  logic [15:0] se_value;
  logic [4:0] bin_idx;
  logic [CTX_AW-1:0] ctx_idx;
  int checks = 0, failures = 0;

  mvd_parser dut (.*);
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

  function automatic int pick();
    case ($urandom_range(0, 4))
      0: return 0;
      1: return $urandom_range(0, 1) ? 1 : -1;
      2: return $urandom_range(0, 16) - 8;
      3: return $urandom_range(0, 600) - 300;
      default: return $urandom_range(0, 65536) - 32768;
    endcase
  endfunction

  initial begin
    resid_gen g = new();
    int n_zero = 0, n_one = 0, n_big = 0;
    start = 0; bin_valid = 0; bin = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int it = 0; it < 1000; it++) begin
      int mx, my, rx, ry, comp;
      int mag[2];
      mx = pick(); my = pick();
      g.q.delete(); g.sev.delete(); got.delete();
      g.gen_mvd(mx, my);
      @(negedge clk);
      start = 1;
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
            $display("FAIL mvd %0d bin %0d: se %0d/%0d mode %0d/%0d ctx %0d/%0d", it, k,
                     se, g.q[k].se, req_mode, g.q[k].mode, ctx_idx, g.q[k].ctx);
        end
        bin_valid = 1; bin = g.q[k].b;
        @(negedge clk);
        bin_valid = 0;
      end
      for (int w = 0; w < 12 && !done; w++) begin
        checks++;
        if (req_valid) begin failures++; $display("FAIL extra request mvd %0d", it); end
        @(negedge clk);
      end
      checks++;
      if (busy) begin failures++; $display("FAIL mvd %0d not finished", it); end
      checks++;
      if (got.size() != g.sev.size()) begin
        failures++;
        $display("FAIL mvd %0d: %0d elements, %0d expected", it, got.size(), g.sev.size());
      end else begin
        foreach (got[j]) begin
          checks++;
          if (got[j].se != g.sev[j].se || got[j].val != g.sev[j].val) begin
            failures++;
            if (failures < 10) $display("FAIL mvd %0d element %0d: %0d=%0d expected %0d=%0d", it, j,
                                        got[j].se, got[j].val, g.sev[j].se, g.sev[j].val);
          end
        end
      end
      // rebuild the difference from the decoded elements
      mag[0] = 0; mag[1] = 0; comp = 0; rx = 0; ry = 0;
      foreach (got[j]) begin
        case (got[j].se)
          SE_MVD_MINUS2: mag[comp] = got[j].val + 2;
          SE_MVD_SIGN: begin
            if (mag[comp] == 0) mag[comp] = 1;
            if (comp == 0) rx = got[j].val ? -mag[0] : mag[0];
            else           ry = got[j].val ? -mag[1] : mag[1];
          end
          default: ;
        endcase
        // x elements come first; x has none after the flags when it is zero
        if (got[j].se == SE_MVD_SIGN && comp == 0) comp = 1;
        if (j == 1 && got[0].val == 0) comp = 1;
      end
      checks++;
      if (rx != mx || ry != my) begin
        failures++;
        if (failures < 10) $display("FAIL mvd %0d rebuilt (%0d,%0d) expected (%0d,%0d)", it, rx, ry, mx, my);
      end
      if (mx == 0 || my == 0) n_zero++;
      if (mx == 1 || mx == -1 || my == 1 || my == -1) n_one++;
      if (mx > 1000 || mx < -1000) n_big++;
    end
    $display("with_zero=%0d with_one=%0d large=%0d", n_zero, n_one, n_big);
    checks++;
    if (n_zero == 0 || n_one == 0 || n_big == 0) failures++;
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
