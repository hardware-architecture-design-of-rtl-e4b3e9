// debin: binarization inverse (de-binarizer).
//
// Collects the bins of one syntax element, decides when the element is
// complete and converts the bin string to its value.  Three binarizations
// are supported, chosen by btype with its parameter held steady by the
// requester for the whole element:
//   BT_FL  fixed length, param = number of bits, MSB first;
//   BT_TR  truncated unary with cMax = param (count of 1s, ended by a 0
//          or by reaching cMax);
//   BT_REM coeff_abs_level_remaining with Rice parameter k = param: a unary
//          prefix p, then a k-bit suffix when p <= 3 (value (p<<k)+s) or a
//          (p-3+k)-bit suffix otherwise (value ((2^(p-3)+2)<<k)+s), the
//          Golomb-Rice / Exp-Golomb split of HEVC;
//   BT_EGK k-th order Exp-Golomb with k = param: a unary prefix p, then a
//          (p+k)-bit suffix s, value ((2^p - 1) << k) + s.
// Timing: done and value are combinational with the last bin (bin_valid
// && done), so the parser can move on in the same cycle; the internal
// state then clears.  bin_idx is the index of the bin about to be decoded,
// used for context selection.  clear aborts an element.
module debin
  import cabac_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        clear,
  input  bin_type_e   btype,
  input  logic [3:0]  param,
  input  logic        bin_valid,
  input  logic        bin,
  output logic        done,
  output logic [15:0] value,
  output logic [4:0]  bin_idx
);
  logic [4:0]  idx_q, idx_d;
  logic [15:0] acc_q, acc_d;     // FL value / REM suffix accumulator
  logic [15:0] base_q, base_d;   // REM value without suffix
  logic        sfx_q, sfx_d;     // REM: in suffix
  logic [4:0]  left_q, left_d;   // REM: suffix bits still to come

  logic [4:0]  p;
  logic [4:0]  sl;
  logic [15:0] bs;

  always_comb begin
    idx_d  = idx_q;
    acc_d  = acc_q;
    base_d = base_q;
    sfx_d  = sfx_q;
    left_d = left_q;
    done   = 1'b0;
    value  = '0;
    p      = idx_q;
    sl     = '0;
    bs     = '0;
    if (bin_valid) begin
      idx_d = idx_q + 5'd1;
      unique case (btype)
        BT_FL: begin
          acc_d = {acc_q[14:0], bin};
          value = acc_d;
          done  = (idx_q + 5'd1 == 5'(param));
        end
        BT_TR: begin
          value = 16'(idx_q) + 16'(bin);
          done  = !bin || (idx_q + 5'd1 == 5'(param));
        end
        default: begin  // BT_REM, BT_EGK
          if (!sfx_q) begin
            if (!bin) begin
              if (btype == BT_EGK) begin
                sl = p + 5'(param);
                bs = ((16'd1 << p) - 16'd1) << param;
              end else if (p <= 5'd3) begin
                sl = 5'(param);
                bs = 16'(p) << param;
              end else begin
                sl = p - 5'd3 + 5'(param);
                bs = ((16'd1 << (p - 5'd3)) + 16'd2) << param;
              end
              if (sl == 5'd0) begin
                done  = 1'b1;
                value = bs;
              end else begin
                sfx_d  = 1'b1;
                left_d = sl;
                base_d = bs;
                acc_d  = '0;
              end
            end
          end else begin
            acc_d  = {acc_q[14:0], bin};
            left_d = left_q - 5'd1;
            if (left_q == 5'd1) begin
              done  = 1'b1;
              value = base_q + acc_d;
            end
          end
        end
      endcase
    end
    if (done || clear) begin
      idx_d  = '0;
      acc_d  = '0;
      sfx_d  = 1'b0;
      left_d = '0;
      base_d = '0;
    end
  end

  assign bin_idx = idx_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      idx_q  <= '0;
      acc_q  <= '0;
      base_q <= '0;
      sfx_q  <= 1'b0;
      left_q <= '0;
    end else begin
      idx_q  <= idx_d;
      acc_q  <= acc_d;
      base_q <= base_d;
      sfx_q  <= sfx_d;
      left_q <= left_d;
    end
  end
endmodule
