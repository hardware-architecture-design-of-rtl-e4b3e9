// tb_bdc: bypass bin decoding against the arithmetic definition for
// random ranges, offsets and input bits.
module tb_bdc;
  logic [8:0] range_in, offset_in, offset_out;
  logic       bit_in, bin;
  int checks = 0, failures = 0;

  bdc dut (.*);

  initial begin
    for (int it = 0; it < 20000; it++) begin
      int rng, off, v, eb;
      rng = $urandom_range(256, 510);
      off = $urandom_range(0, rng - 1);
      range_in = 9'(rng); offset_in = 9'(off); bit_in = 1'($urandom);
      v = 2 * off + int'(bit_in);
      eb = (v >= rng);
      if (eb) v -= rng;
      #1;
      checks++;
      if (bin != eb[0] || offset_out != 9'(v)) begin
        failures++;
        if (failures < 10) $display("FAIL rng %0d off %0d bit %0d", rng, off, bit_in);
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
