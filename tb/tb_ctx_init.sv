// tb_ctx_init: runs the initialization with random init-value tables,
// QPs (including values above 51, which clip) and init types; checks every
// written context against the reference formula, that each context is
// written exactly once, and that done comes NUM_CTX + 2 cycles after start.
module tb_ctx_init;
  import cabac_pkg::*;
  import tb_cabac_pkg::*;
  logic clk = 0, rst_n = 0, start = 0;
  logic [5:0] slice_qp;
  logic [1:0] init_type;
  logic busy, done, mem_re, we;
  logic [8:0] mem_addr;
  logic [7:0] mem_rdata;
  logic [CTX_AW-1:0] waddr;
  ctx_t wdata;
  logic [7:0] mem [3 * NUM_CTX];
  ctx_t got [NUM_CTX];
  int   nwr [NUM_CTX];
  int checks = 0, failures = 0;

  ctx_init dut (.*);
  always #5 clk = ~clk;
  always_ff @(posedge clk) if (mem_re) mem_rdata <= mem[mem_addr];
  always @(posedge clk) if (we) begin got[waddr] = wdata; nwr[waddr]++; end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int r = 0; r < 12; r++) begin
      int t0, qp, ty;
      foreach (mem[i]) mem[i] = 8'($urandom);
      foreach (nwr[i]) nwr[i] = 0;
      qp = (r == 0) ? 63 : $urandom_range(0, 51);
      ty = r % 3;
      @(negedge clk);
      slice_qp = 6'(qp); init_type = 2'(ty); start = 1;
      @(negedge clk);
      start = 0;
      t0 = 1;
      while (!done) begin @(negedge clk); t0++; end
      checks++;
      if (t0 != NUM_CTX + 2) begin failures++; $display("FAIL latency %0d", t0); end
      @(negedge clk);
      for (int i = 0; i < NUM_CTX; i++) begin
        ctx_t e;
        e = ref_init(int'(mem[ty * NUM_CTX + i]), qp);
        checks++;
        if (got[i] != e || nwr[i] != 1) begin
          failures++;
          if (failures < 10) $display("FAIL ctx %0d qp %0d: %h expected %h (%0d writes)", i, qp, got[i], e, nwr[i]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
