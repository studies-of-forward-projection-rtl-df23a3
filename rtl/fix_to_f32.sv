// fix_to_f32: signed fixed point (fix_t) to IEEE-754 single precision.
//
// The magnitude is normalised on its leading one at bit p; the exponent is
// p - FIX_F + 127 and the 23 bits below the leading one form the mantissa,
// rounded to nearest with ties to even using a guard bit and a sticky OR of
// the rest. A rounding carry out of the mantissa bumps the exponent. Zero maps
// to +0. Every fix_t value is inside the single-precision range, so there is
// no overflow. Used where ray sums are stored as sinogram samples.
//
// Interface: purely combinational, x in, f out.
module fix_to_f32
  import fp_pkg::*;
(
  input  fix_t        x,
  output logic [31:0] f
);

  logic             sgn;
  logic [FIX_W-1:0] mag, norm;
  int unsigned      p;
  logic [23:0]      sig;      // hidden one + 23 mantissa bits
  logic             guard, sticky, round_up;
  logic [24:0]      sig_r;
  logic [7:0]       ex;

  always_comb begin
    sgn = x[FIX_W-1];
    mag = sgn ? FIX_W'(-x) : FIX_W'(x);
    p   = 0;
    for (int i = 0; i < int'(FIX_W); i++)
      if (mag[i]) p = i;
    // put the leading one at bit FIX_W-1
    norm     = mag << (FIX_W - 1 - p);
    sig      = norm[FIX_W-1 -: 24];
    guard    = norm[FIX_W-25];
    sticky   = |norm[FIX_W-26:0];
    round_up = guard && (sticky || sig[0]);
    sig_r    = {1'b0, sig} + 25'(round_up);
    ex       = 8'(int'(p) - int'(FIX_F) + 127);
    if (sig_r[24]) begin
      ex    = ex + 8'd1;
      sig_r = sig_r >> 1;
    end
    if (mag == '0) f = 32'h0;
    else           f = {sgn, ex, sig_r[22:0]};
  end

endmodule
