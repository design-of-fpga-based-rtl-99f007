// fp32_round_pack: final rounding and packing stage shared by fp32_add and
// fp32_mul.
//
// The caller hands over a finite, non-zero result as a sign, a 48-bit
// significand normalised so that its leading one sits in bit 47, and the
// biased exponent that goes with that leading one (value =
// sig/2^47 * 2^(exp_r-127)). The stage denormalises results below the normal
// range (keeping every shifted-out bit as sticky), rounds to nearest with
// ties to even using bit 23 as guard and bits 22..0 plus the sticky bit,
// and packs the word. A carry out of the fraction increments the exponent,
// which also turns a rounded-up subnormal into the smallest normal number;
// results that reach exponent 255 become infinity. Gradual underflow and
// round-to-nearest-even are the defaults of the VHDL-2008 floating-point
// package the controller was written against; they are taken as the
// rounding rules here. Purely combinational.
module fp32_round_pack
  import nn_fp_pkg::*;
(
  input  logic               sign,
  input  logic signed [11:0] exp_r,
  input  logic [47:0]        sig,
  output fp32_t              y
);

  logic [5:0]   sh;          // right shift for subnormal results
  logic [111:0] wide;
  logic [47:0]  shifted;
  logic         sticky_sh;
  logic [7:0]   exp_field;
  logic [22:0]  frac;
  logic         guard, sticky, round_up;
  logic [30:0]  packed_word;

  always_comb begin
    if (exp_r >= 12'sd1) begin
      sh        = 6'd0;
      exp_field = exp_r[7:0];
    end else begin
      // 1 - exp_r, capped: beyond 63 every bit is sticky anyway
      sh        = (exp_r < -12'sd62) ? 6'd63 : 6'(12'sd1 - exp_r);
      exp_field = 8'd0;
    end
    wide      = {sig, 64'd0} >> sh;
    shifted   = wide[111:64];
    sticky_sh = |wide[63:0];

    frac        = shifted[46:24];  // bit 47 is the hidden bit, not stored
    guard       = shifted[23];
    sticky      = (|shifted[22:0]) | sticky_sh;
    round_up    = guard & (sticky | frac[0]);
    packed_word = {exp_field, frac} + 31'(round_up);

    if (exp_r >= 12'sd255 || packed_word[30:23] == 8'hFF)
      y = '{sign: sign, exp: 8'hFF, frac: '0};
    else
      y = fp32_t'({sign, packed_word});
  end

endmodule
