// tb_adu: round trip through the reference CABAC encoder.  A random
// sequence of regular bins (over 16 contexts with skewed probabilities),
// bypass bins and terminate-0 bins, closed by a terminate-1, is encoded;
// the decoder is initialised and asked for the same sequence with random
// request gaps and a bitstream window that sometimes holds fewer than 9
// bits.  Checks every bin, the adapted contexts written back, that no bin
// is produced while fewer than 9 bits are available, that the unit goes
// inactive after the final terminate bin, and the one-bin-per-cycle rate.
module tb_adu;
  import cabac_pkg::*;
  import tb_cabac_pkg::*;
  logic clk = 0, rst_n = 0;
  logic init_req, init_done, active, req_valid, bin_valid, bin, ctx_we, consume_en;
  bin_mode_e req_mode;
  ctx_t ctx_in, ctx_out;
  logic [15:0] bits;
  logic [7:0]  avail;
  logic [3:0]  consume_n;
  int checks = 0, failures = 0;

  adu dut (.*);
  always #5 clk = ~clk;

  bit stream[$];
  int pos = 0;
  bit starve;
  int stream_ver = 0;   // bumped when the stream is loaded
  ctx_t dctx [16];

  always_comb begin
    int left;
    left = stream.size() - pos + 0 * stream_ver;
    for (int b = 0; b < 16; b++) bits[15 - b] = (pos + b < stream.size()) ? stream[pos + b] : 1'b0;
    avail = starve ? 8'($urandom_range(0, 8)) : 8'((left > 200) ? 200 : left);
  end
  always @(posedge clk) if (consume_en) pos <= pos + int'(consume_n);

  initial begin
    cabac_enc enc = new();
    ctx_t ectx [16];
    int mode [$], ctxi [$];
    bit val [$];
    int n = 6000, served = 0, req_cycles = 0;
    for (int i = 0; i < 16; i++) begin
      ectx[i] = ref_init($urandom_range(0, 255), 30);
      dctx[i] = ectx[i];
    end
    for (int i = 0; i < n; i++) begin
      int m, c;
      bit b;
      m = $urandom_range(0, 9);
      m = (m < 6) ? 0 : (m < 9) ? 1 : 2;
      c = $urandom_range(0, 15);
      if (m == 0) b = ($urandom_range(0, 99) < c * 6);
      else if (m == 1) b = $urandom_range(0, 1);
      else b = 0;
      if (m == 0) enc.decision(ectx[c], b);
      else if (m == 1) enc.bypass(b);
      else enc.terminate(0);
      mode.push_back(m); ctxi.push_back(c); val.push_back(b);
    end
    enc.terminate(1);
    mode.push_back(2); ctxi.push_back(0); val.push_back(1);
    stream = enc.bits;
    repeat (64) stream.push_back(0);
    stream_ver++;
    init_req = 0; req_valid = 0; req_mode = BIN_REGULAR; ctx_in = '0; starve = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    init_req = 1;
    #1;
    while (!init_done) begin @(negedge clk); #1; end
    @(negedge clk);
    init_req = 0;
    checks++;
    if (!active) begin failures++; $display("FAIL not active after init"); end
    foreach (mode[i]) begin
      req_valid = ($urandom_range(0, 4) != 0);
      while (!req_valid) begin
        @(negedge clk);
        req_valid = ($urandom_range(0, 4) != 0);
      end
      req_mode = bin_mode_e'(mode[i]);
      ctx_in   = dctx[ctxi[i]];
      starve   = ($urandom_range(0, 9) == 0);
      #1;
      while (!bin_valid) begin
        checks++;
        if (!starve) begin failures++; $display("FAIL request not served with bits available"); end
        @(negedge clk);
        starve = ($urandom_range(0, 9) == 0);
        #1;
      end
      req_cycles++;
      checks++;
      if (avail < 8'd9) begin failures++; $display("FAIL bin with %0d bits", avail); end
      checks++;
      if (bin != val[i]) begin
        failures++;
        if (failures < 10) $display("FAIL bin %0d mode %0d: %0d expected %0d", i, mode[i], bin, val[i]);
      end
      checks++;
      if (ctx_we != (mode[i] == 0)) begin failures++; $display("FAIL ctx_we"); end
      if (mode[i] == 0) dctx[ctxi[i]] = ctx_out;
      served++;
      @(negedge clk);
      starve = 0;
    end
    req_valid = 0;
    for (int i = 0; i < 16; i++) begin
      checks++;
      if (dctx[i] != ectx[i]) begin failures++; $display("FAIL context %0d differs from encoder", i); end
    end
    checks++;
    if (active) begin failures++; $display("FAIL still active after terminate 1"); end
    checks++;
    if (req_cycles != served) begin failures++; $display("FAIL rate"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
