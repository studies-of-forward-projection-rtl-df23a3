// f32_to_fix: IEEE-754 single precision to signed fixed point (fix_t).
//
// A single-precision word is sign | 8-bit exponent (bias 127) | 23-bit
// mantissa with a hidden leading one, value = 1.m * 2^(e-127). The fixed-point
// value is the 24-bit significand shifted left by e - 127 - 23 + FIX_F (right
// when negative, truncating toward zero), then negated for a negative sign.
// Zero and subnormal inputs give 0; values beyond the fix_t range, infinities
// and NaNs saturate. Used where phantom samples leave external memory.
//
// Interface: purely combinational, f in, x out.
module f32_to_fix
  import fp_pkg::*;
(
  input  logic [31:0] f,
  output fix_t        x
);

  logic        sgn;
  logic [7:0]  ex;
  logic [23:0] sig;
  int signed   sh;
  logic [FIX_W-1:0] mag;

  assign sgn = f[31];
  assign ex  = f[30:23];
  assign sig = {1'b1, f[22:0]};
  assign sh  = int'(ex) - 127 - 23 + int'(FIX_F);

  always_comb begin
    mag = '0;
    if (ex == 8'd0) begin
      mag = '0;
    end else if (ex == 8'hFF || sh > int'(FIX_W) - 25) begin
      mag = FIX_W'(FIX_MAX);
    end else if (sh >= 0) begin
      mag = FIX_W'(sig) << sh;
    end else if (sh > -24) begin
      mag = FIX_W'(sig >> (-sh));
    end else begin
      mag = '0;
    end
    x = sgn ? -fix_t'(mag) : fix_t'(mag);
  end

endmodule
