// tb_debin: random values binarized by the testbench (fixed length,
// truncated unary, coeff_abs_level_remaining with Rice parameters 0..4,
// k-th order Exp-Golomb with k 0..3)
// are fed bin by bin with random gaps; checks that done comes exactly with
// the last bin, the value, and the bin index seen before each bin.
module tb_debin;
  import cabac_pkg::*;
  import tb_cabac_pkg::*;
  logic clk = 0, rst_n = 0, clear = 0;
  bin_type_e btype;
  logic [3:0] param;
  logic bin_valid, bin, done;
  logic [15:0] value;
  logic [4:0] bin_idx;
  int checks = 0, failures = 0;

  debin dut (.*);
  always #5 clk = ~clk;

  initial begin
    resid_gen g = new();
    bin_valid = 0; bin = 0; btype = BT_FL; param = 1;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int it = 0; it < 4000; it++) begin
      int t, p, v;
      bit bs[$];
      bs.delete();
      t = $urandom_range(0, 3);
      if (t == 0) begin
        p = $urandom_range(1, 12); v = $urandom_range(0, (1 << p) - 1);
        for (int i = p - 1; i >= 0; i--) bs.push_back((v >> i) & 1);
      end else if (t == 1) begin
        p = $urandom_range(1, 9); v = $urandom_range(0, p);
        for (int i = 0; i < v; i++) bs.push_back(1);
        if (v < p) bs.push_back(0);
      end else if (t == 3) begin
        p = $urandom_range(0, 3);
        v = ($urandom_range(0, 3) == 0) ? $urandom_range(0, 30000) : $urandom_range(0, 40);
        g.q.delete();
        g.put_egk(0, v, p);
        foreach (g.q[i]) bs.push_back(g.q[i].b);
      end else begin
        p = $urandom_range(0, 4);
        v = ($urandom_range(0, 3) == 0) ? $urandom_range(0, 4000) : $urandom_range(0, 30);
        g.q.delete();
        g.put_rem(v, p);
        foreach (g.q[i]) bs.push_back(g.q[i].b);
      end
      btype = bin_type_e'(t); param = 4'(p);
      foreach (bs[i]) begin
        @(negedge clk);
        while ($urandom_range(0, 3) == 0) begin bin_valid = 0; @(negedge clk); end
        checks++;
        if (bin_idx != 5'(i < 31 ? i : 31) && i < 31) begin
          failures++; if (failures < 10) $display("FAIL bin_idx %0d at %0d", bin_idx, i);
        end
        bin_valid = 1; bin = bs[i];
        #1;
        checks++;
        if (done != (i == bs.size() - 1)) begin
          failures++; if (failures < 10) $display("FAIL done at bin %0d of %0d (type %0d)", i, bs.size(), t);
        end
        if (done) begin
          checks++;
          if (value != 16'(v)) begin
            failures++; if (failures < 10) $display("FAIL type %0d param %0d value %0d expected %0d", t, p, value, v);
          end
        end
      end
      @(negedge clk);
      bin_valid = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (500000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
