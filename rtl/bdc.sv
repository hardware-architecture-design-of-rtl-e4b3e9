// bdc: bypass bin decoding component.
//
// Bypass bins are equiprobable, so no context is read or written: the
// offset is doubled, the next bitstream bit is appended, and the bin is 1
// when the result reaches the range (which is then subtracted).  The range
// is unchanged.  Combinational, one bin and one bitstream bit per call.
module bdc (
  input  logic [8:0] range_in,
  input  logic [8:0] offset_in,
  input  logic       bit_in,
  output logic       bin,
  output logic [8:0] offset_out
);
  logic [9:0] scaled;
  always_comb begin
    scaled = {offset_in, bit_in};
    if (scaled >= {1'b0, range_in}) begin
      bin        = 1'b1;
      offset_out = 9'(scaled - {1'b0, range_in});
    end else begin
      bin        = 1'b0;
      offset_out = scaled[8:0];
    end
  end
endmodule
