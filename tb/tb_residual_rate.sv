// tb_residual_rate: throughput of the decoder on residual data.
//
// Two slices of 40 transform blocks each are encoded with the reference
// encoder: one with sparse, small levels (a coarse quantizer) and one with
// dense, larger levels (a fine quantizer).  The bitstream is offered every
// cycle, so the decoder is never starved.  Besides checking every decoded
// coefficient, the test measures per slice
//   * bins per cycle while a block is being parsed,
//   * coded bits consumed per cycle,
//   * how the parsing cycles split into bin-decoding cycles, cycles spent
//     on the last-position elements, and bookkeeping cycles without a bin,
// and derives the residual-data rate the decoder would sustain at a
// 400 MHz clock.  It fails if the bin rate drops below 0.8 bins per
// parsing cycle or if that residual rate stays below 1,500 KB/s, the bit
// rate of an HEVC Level 4 main-tier stream.  Runs the top at its default
// parameters.
module tb_residual_rate;
  import cabac_pkg::*;
  import tb_cabac_pkg::*;

  localparam int NSLICE = 2;
  localparam int NTU    = 40;
  localparam real CLK_MHZ    = 400.0;
  localparam real LEVEL4_KBS = 1500.0;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        cmd_valid, cmd_ready;
  cmd_e        cmd;
  logic [5:0]  slice_qp;
  logic [1:0]  init_type;
  logic [2:0]  log2_size;
  logic [1:0]  c_idx;
  scan_e       scan;
  logic        sdh_en, ts_en;
  logic        sao_luma = 0, sao_chroma = 0, sao_left = 0, sao_up = 0, intra_nxn = 0;
  logic        pu_skip = 0, pu_slice_b = 0, pu_mvd_l1_zero = 0, pu_pb12 = 0;
  logic [2:0]  pu_max_merge_m1 = 0;
  logic [3:0]  pu_nref0_m1 = 0, pu_nref1_m1 = 0;
  logic [1:0]  pu_ct_depth = 0;
  logic [8:0]  init_mem_addr;
  logic        init_mem_re;
  logic [7:0]  init_mem_rdata;
  logic [31:0] bs_word;
  logic        bs_valid, bs_ready;
  logic        coef_valid, tu_done, se_valid, eos_valid, eos_flag;
  logic [4:0]  coef_x, coef_y;
  logic signed [15:0] coef_value;
  se_e         se_id;
  logic [15:0] se_value;

  hevc_entropy_decoder dut (.*);

  int checks = 0, failures = 0;

  logic [7:0] init_mem [3 * NUM_CTX];
  always_ff @(posedge clk) if (init_mem_re) init_mem_rdata <= init_mem[init_mem_addr];

  int          tu_log2 [NSLICE][NTU];
  int          tu_cidx [NSLICE][NTU];
  int          coefs   [NSLICE][NTU][1024];
  logic [31:0] words   [NSLICE][$];

  // bitstream offered every cycle
  int feed_slice = -1;
  int feed_pos;
  always_ff @(posedge clk) if (bs_valid && bs_ready) feed_pos <= feed_pos + 1;
  always_comb begin
    bs_valid = (feed_slice >= 0) && (feed_pos < words[feed_slice].size());
    bs_word  = bs_valid ? words[feed_slice][feed_pos] : '0;
  end

  int recv [1024];
  always @(posedge clk) if (rst_n && coef_valid)
    recv[int'(coef_x) + 32 * int'(coef_y)] = int'(coef_value);

  // per-slice measurements, taken while a block is being parsed
  int m_cyc, m_bins, m_bits, m_last, m_idle;
  always @(posedge clk) if (rst_n && dut.tu_busy) begin
    m_cyc++;
    if (dut.adu_bin_valid) m_bins++;
    else m_idle++;
    if (dut.consume_en) m_bits += int'(dut.consume_n);
    if (dut.se inside {SE_LAST_X_PREFIX, SE_LAST_Y_PREFIX, SE_LAST_X_SUFFIX, SE_LAST_Y_SUFFIX}
        && dut.bsru_req_valid)
      m_last++;
  end

  // coarse (0) or fine (1) quantizer level statistics
  function automatic void make_block(int log2, bit fine, ref int c[1024]);
    int s = 1 << log2;
    int any = 0;
    for (int i = 0; i < 1024; i++) c[i] = 0;
    for (int y = 0; y < s; y++)
      for (int x = 0; x < s; x++) begin
        // density falls off away from the low frequencies
        int p = fine ? 90 - 2 * (x + y) : 30 - 4 * (x + y);
        if ($urandom_range(1, 100) <= p) begin
          int r = $urandom_range(0, 99);
          int mag = fine ? ((r < 40) ? 1 : (r < 60) ? 2 : (r < 85) ? $urandom_range(3, 10) : $urandom_range(11, 200))
                         : ((r < 80) ? 1 : (r < 95) ? 2 : $urandom_range(3, 8));
          c[x + 32 * y] = $urandom_range(0, 1) ? -mag : mag;
          any = 1;
        end
      end
    if (!any) c[0] = 1;
  endfunction

  task automatic build();
    for (int i = 0; i < 3 * NUM_CTX; i++) init_mem[i] = 8'($urandom_range(0, 255));
    for (int s = 0; s < NSLICE; s++) begin
      cabac_enc enc = new();
      resid_gen g = new();
      ctx_t ctxs[NUM_CTX];
      bit   bits[$];
      for (int i = 0; i < NUM_CTX; i++) ctxs[i] = ref_init(int'(init_mem[i]), (s == 0) ? 37 : 22);
      for (int t = 0; t < NTU; t++) begin
        tu_log2[s][t] = $urandom_range(2, 5);
        tu_cidx[s][t] = (t % 3 == 2) ? 1 : 0;
        make_block(tu_log2[s][t], s == 1, coefs[s][t]);
        g.q.delete();
        g.gen(coefs[s][t], tu_log2[s][t], tu_cidx[s][t]);
        foreach (g.q[k]) begin
          if (g.q[k].mode == 0) enc.decision(ctxs[g.q[k].ctx], g.q[k].b);
          else enc.bypass(g.q[k].b);
        end
      end
      enc.terminate(1);
      bits = enc.bits;
      while (bits.size() % 32 != 0) bits.push_back(0);
      for (int i = 0; i < 96; i++) bits.push_back(0);
      for (int w = 0; w < bits.size() / 32; w++) begin
        logic [31:0] wd;
        for (int b = 0; b < 32; b++) wd[31 - b] = bits[32 * w + b];
        words[s].push_back(wd);
      end
    end
  endtask

  task automatic issue(cmd_e c);
    cmd       <= c;
    cmd_valid <= 1'b1;
    @(posedge clk);
    while (!cmd_ready) @(posedge clk);
    cmd_valid <= 1'b0;
  endtask

  initial begin : main
    cmd_valid = 0; cmd = CMD_SLICE; slice_qp = 0; init_type = 0; log2_size = 2; c_idx = 0;
    scan = SCAN_DIAG; sdh_en = 0; ts_en = 0;
    feed_pos = 0;
    build();
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    for (int s = 0; s < NSLICE; s++) begin
      real bpc, kbs;
      string nm;
      slice_qp  <= (s == 0) ? 6'd37 : 6'd22;
      init_type <= 2'd0;
      issue(CMD_SLICE);
      feed_slice = s;
      feed_pos   = 0;
      while (!cmd_ready) @(posedge clk);
      m_cyc = 0; m_bins = 0; m_bits = 0; m_last = 0; m_idle = 0;
      for (int t = 0; t < NTU; t++) begin
        for (int i = 0; i < 1024; i++) recv[i] = 0;
        log2_size <= 3'(tu_log2[s][t]);
        c_idx     <= 2'(tu_cidx[s][t]);
        issue(CMD_TU);
        while (!tu_done) @(posedge clk);
        @(posedge clk);
        for (int i = 0; i < 1024; i++) begin
          checks++;
          if (recv[i] != coefs[s][t][i]) begin
            failures++;
            if (failures < 10)
              $display("FAIL slice %0d tu %0d pos (%0d,%0d): got %0d expected %0d",
                       s, t, i % 32, i / 32, recv[i], coefs[s][t][i]);
          end
        end
      end
      issue(CMD_END);
      while (!eos_valid) @(posedge clk);
      checks++;
      if (!eos_flag) begin failures++; $display("FAIL end-of-slice flag"); end
      @(posedge clk);
      nm  = (s == 0) ? "coarse" : "fine";
      bpc = real'(m_bits) / real'(m_cyc);
      kbs = bpc * CLK_MHZ * 1.0e6 / 8.0 / 1024.0;
      $display("%s levels: %0d parsing cycles, %0d bins (%.3f per cycle), %0d coded bits (%.3f per cycle)",
               nm, m_cyc, m_bins, real'(m_bins) / real'(m_cyc), m_bits, bpc);
      $display("  cycles: bin decoding %.1f%%, of them last position %.1f%%; no bin %.1f%%",
               100.0 * real'(m_bins) / real'(m_cyc), 100.0 * real'(m_last) / real'(m_cyc),
               100.0 * real'(m_idle) / real'(m_cyc));
      $display("  residual data rate at %.0f MHz: %.1f KB/s (Level 4 main tier: %.0f KB/s)",
               CLK_MHZ, kbs, LEVEL4_KBS);
      checks++;
      if (real'(m_bins) < 0.8 * real'(m_cyc)) begin
        failures++;
        $display("FAIL bin rate below 0.8 per cycle");
      end
      checks++;
      if (kbs < LEVEL4_KBS) begin
        failures++;
        $display("FAIL residual rate below the Level 4 bit rate");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
