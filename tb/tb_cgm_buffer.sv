// tb_cgm_buffer: random writes and reads of the context storage against
// an array model, including a read of the address written in the same
// cycle (old value expected).
module tb_cgm_buffer;
  import cabac_pkg::*;
  logic clk = 0;
  logic [CTX_AW-1:0] raddr, waddr;
  ctx_t rdata, wdata;
  logic we;
  ctx_t model [NUM_CTX];
  int checks = 0, failures = 0;

  cgm_buffer dut (.*);
  always #5 clk = ~clk;

  initial begin
    we = 1;
    for (int i = 0; i < NUM_CTX; i++) begin
      @(negedge clk);
      waddr = CTX_AW'(i); wdata = 7'($urandom); model[i] = wdata;
    end
    for (int it = 0; it < 5000; it++) begin
      @(negedge clk);
      raddr = CTX_AW'($urandom_range(0, NUM_CTX - 1));
      we    = $urandom_range(0, 1);
      waddr = ($urandom_range(0, 3) == 0) ? raddr : CTX_AW'($urandom_range(0, NUM_CTX - 1));
      wdata = 7'($urandom);
      #1;
      checks++;
      if (rdata != model[raddr]) begin
        failures++;
        if (failures < 10) $display("FAIL addr %0d", raddr);
      end
      @(posedge clk);
      if (we) model[waddr] = wdata;
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
