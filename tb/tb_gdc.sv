// tb_gdc: regular bin decoding against a bit-serial reference (decision,
// context adaptation, renormalisation one bit at a time) for random
// ranges, offsets, contexts and bitstream bits.
module tb_gdc;
  import cabac_pkg::*;
  logic [8:0] range_in, offset_in, range_out, offset_out;
  ctx_t       ctx_in, ctx_out;
  logic [7:0] r_lps;
  logic [5:0] bits;
  logic       bin;
  logic [3:0] nbits;
  int checks = 0, failures = 0;

  gdc dut (.*);

  initial begin
    for (int it = 0; it < 20000; it++) begin
      int rng, off, rl, st, mps, eb, er, eo, en, est, emps, bi;
      rng = $urandom_range(256, 510);
      off = $urandom_range(0, rng - 1);
      st  = $urandom_range(0, 62);
      mps = $urandom_range(0, 1);
      range_in = 9'(rng); offset_in = 9'(off);
      ctx_in.state = 6'(st); ctx_in.mps = mps[0];
      bits = 6'($urandom);
      rl = int'(range_tab_lps(6'(st), 2'((rng >> 6) & 3)));
      r_lps = 8'(rl);
      // reference
      er = rng - rl;
      if (off >= er) begin
        eb = 1 - mps; eo = off - er; er = rl;
        emps = (st == 0) ? 1 - mps : mps;
        est = int'(trans_idx_lps(6'(st)));
      end else begin
        eb = mps; eo = off; emps = mps; est = (st < 62) ? st + 1 : 62;
      end
      en = 0; bi = 5;
      while (er < 256) begin
        er = er * 2;
        eo = eo * 2 + int'(bits[bi]);
        bi--; en++;
      end
      #1;
      checks++;
      if (bin != eb[0] || range_out != 9'(er) || offset_out != 9'(eo) || nbits != 4'(en) ||
          ctx_out.state != 6'(est) || ctx_out.mps != emps[0]) begin
        failures++;
        if (failures < 10)
          $display("FAIL rng %0d off %0d st %0d mps %0d: bin %0d/%0d r %0d/%0d o %0d/%0d n %0d/%0d",
                   rng, off, st, mps, bin, eb, range_out, er, offset_out, eo, nbits, en);
      end
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
