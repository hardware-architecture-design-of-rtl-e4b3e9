// tb_rcm: the scan conversions and the significant-coefficient list of the
// fast scanning module against scan tables built independently (walking
// the anti-diagonals for the diagonal scan, rows and columns for the
// horizontal and vertical scans), for every block size; also the highest
// and lowest significant positions.
module tb_rcm;
  import cabac_pkg::*;
  scan_e       scan;
  logic [3:0]  hi_pos, lo_pos;
  logic [2:0]  log2_size;
  logic [4:0]  last_x, last_y, num_sig;
  logic [5:0]  last_sb, sb_idx;
  logic [3:0]  last_pos, pos, k, kth_pos;
  logic [2:0]  sb_x, sb_y;
  logic [1:0]  pos_x, pos_y;
  logic [15:0] sig_map;
  int checks = 0, failures = 0;

  rcm dut (.*);

  // scan order of an s x s grid
  function automatic void order(int s, int sc, ref int xs[$], ref int ys[$]);
    xs.delete(); ys.delete();
    if (sc == 1) begin
      for (int y = 0; y < s; y++) for (int x = 0; x < s; x++) begin xs.push_back(x); ys.push_back(y); end
      return;
    end
    if (sc == 2) begin
      for (int x = 0; x < s; x++) for (int y = 0; y < s; y++) begin xs.push_back(x); ys.push_back(y); end
      return;
    end
    for (int d = 0; d < 2 * s - 1; d++)
      for (int y = s - 1; y >= 0; y--)
        if (d - y >= 0 && d - y < s) begin xs.push_back(d - y); ys.push_back(y); end
  endfunction

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  initial begin
    int sx[$], sy[$], px[$], py[$];
    for (int sc = 0; sc < 3; sc++)
    for (int l2 = 2; l2 <= 5; l2++) begin
      int nsb = 1 << (l2 - 2);
      order(4, sc, px, py);
      order(nsb, sc, sx, sy);
      log2_size = 3'(l2);
      scan = scan_e'(sc);
      for (int i = 0; i < nsb * nsb; i++)
        for (int n = 0; n < 16; n++) begin
          last_x = 5'(sx[i] * 4 + px[n]);
          last_y = 5'(sy[i] * 4 + py[n]);
          sb_idx = 6'(i);
          pos = 4'(n);
          #1;
          chk(last_sb == 6'(i) && last_pos == 4'(n), "last position");
          chk(sb_x == 3'(sx[i]) && sb_y == 3'(sy[i]), "sub-block coordinates");
          chk(pos_x == 2'(px[n]) && pos_y == 2'(py[n]), "position coordinates");
        end
    end
    for (int it = 0; it < 3000; it++) begin
      int lst[$];
      lst.delete();
      sig_map = 16'($urandom);
      for (int n = 15; n >= 0; n--) if (sig_map[n]) lst.push_back(n);
      k = 4'($urandom_range(0, 15));
      #1;
      chk(num_sig == 5'(lst.size()), "count");
      if (lst.size() > 0) chk(hi_pos == 4'(lst[0]) && lo_pos == 4'(lst[lst.size() - 1]), "extremes");
      if (int'(k) < lst.size()) chk(kth_pos == 4'(lst[k]), "k-th position");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
