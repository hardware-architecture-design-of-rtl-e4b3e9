// tb_lps_lut: checks the LPS range table against values of the HEVC
// standard table and against its structural properties (non-increasing in
// the state, increasing with the range quarter, state 63 fixed at 2).
module tb_lps_lut;
  logic [5:0] state;
  logic [8:0] range_in;
  logic [7:0] r_lps;
  int checks = 0, failures = 0;

  lps_lut dut (.*);

  task automatic look(int s, int q, output int v);
    state = 6'(s);
    range_in = 9'(256 + 64 * q + $urandom_range(0, 63));
    #1 v = int'(r_lps);
  endtask

  // (state, quarter, value) triples from the standard table
  int ref_tab [][3] = '{
    '{0, 0, 128}, '{0, 3, 240}, '{1, 1, 167}, '{5, 2, 160}, '{12, 3, 128},
    '{20, 0, 51}, '{31, 1, 35}, '{40, 3, 30}, '{47, 0, 12}, '{55, 3, 14},
    '{62, 0, 6}, '{62, 3, 9}, '{63, 0, 2}, '{63, 2, 2}, '{9, 1, 110}, '{26, 2, 54}};

  initial begin
    int v, prev;
    foreach (ref_tab[i]) begin
      look(ref_tab[i][0], ref_tab[i][1], v);
      checks++;
      if (v != ref_tab[i][2]) begin
        failures++;
        $display("FAIL state %0d q %0d: %0d expected %0d", ref_tab[i][0], ref_tab[i][1], v, ref_tab[i][2]);
      end
    end
    for (int q = 0; q < 4; q++) begin
      prev = 256;
      for (int s = 0; s < 63; s++) begin
        look(s, q, v);
        checks++;
        if (v > prev || v < 6) begin
          failures++;
          $display("FAIL monotonic state %0d q %0d", s, q);
        end
        prev = v;
      end
    end
    for (int s = 0; s < 63; s++) begin
      int a, b;
      for (int q = 0; q < 3; q++) begin
        look(s, q, a);
        look(s, q + 1, b);
        checks++;
        if (!(b > a)) begin failures++; $display("FAIL quarter order state %0d", s); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
