// tb_bs_buffer: random word pushes and random bit consumption against a
// bit-queue model; checks the visible bits, the fill count and the
// refill rule (a word is accepted whenever at most 32 bits are held), and
// that flush empties the buffer.
module tb_bs_buffer;
  logic        clk = 0, rst_n = 0, flush = 0;
  logic [31:0] in_word;
  logic        in_valid, in_ready;
  logic [15:0] peek;
  logic [7:0]  avail;
  logic        consume_en;
  logic [3:0]  consume_n;
  int checks = 0, failures = 0;
  bit q[$];

  bs_buffer dut (.*);
  always #5 clk = ~clk;

  initial begin
    in_valid = 0; consume_en = 0; consume_n = 0; in_word = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int it = 0; it < 20000; it++) begin
      @(negedge clk);
      // check state
      checks++;
      if (avail != 8'(q.size())) begin
        failures++;
        if (failures < 10) $display("FAIL avail %0d expected %0d", avail, q.size());
      end
      for (int b = 0; b < 16 && b < q.size(); b++) begin
        checks++;
        if (peek[15 - b] != q[b]) begin
          failures++;
          if (failures < 10) $display("FAIL bit %0d", b);
        end
      end
      checks++;
      if (in_ready != (q.size() <= 32 && !flush)) begin failures++; $display("FAIL in_ready"); end
      // drive
      in_valid   = $urandom_range(0, 2) != 0;
      in_word    = $urandom;
      consume_en = $urandom_range(0, 1);
      consume_n  = 4'($urandom_range(0, (q.size() < 15) ? q.size() : 15));
      flush      = (it % 5000 == 4999);
      @(posedge clk);
      #1;
      if (flush) q.delete();
      else begin
        if (consume_en) repeat (consume_n) void'(q.pop_front());
        if (in_valid && (q.size() + (consume_en ? consume_n : 0)) <= 32)
          for (int b = 31; b >= 0; b--) q.push_back(in_word[b]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
