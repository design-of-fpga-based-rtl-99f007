// fp32_mul: IEEE-754 single-precision multiplier, y = a * b.
//
// Used for every weight-times-input product of the neural-network
// controller. The two 24-bit significands (hidden bit included, subnormal
// operands taken as 0.frac with exponent 1) are multiplied exactly into 48
// bits, the product is shifted left until its leading one reaches bit 47,
// and fp32_round_pack rounds it to nearest-even, with gradual underflow and
// overflow to infinity. Special operands follow IEEE-754: NaN in, or
// infinity times zero, gives the quiet NaN 0x7FC00000; infinity times a
// non-zero number gives a signed infinity; a zero operand gives a signed
// zero. The sign is always the XOR of the operand signs (except for NaN).
// Purely combinational, no clock: the document's neurons compute with the
// float32 multiply of the VHDL-2008 floating-point package, and this module
// is a plain re-implementation of that operation.
module fp32_mul
  import nn_fp_pkg::*;
(
  input  fp32_t a,
  input  fp32_t b,
  output fp32_t y
);

  logic               sign;
  logic [47:0]        prod;
  logic [5:0]         lz;
  logic [47:0]        sig;
  logic signed [11:0] exp_r;
  fp32_t              rounded;

  always_comb begin
    sign  = a.sign ^ b.sign;
    prod  = 48'(fp_mant(a)) * 48'(fp_mant(b));
    lz    = clz48(prod);
    sig   = prod << lz;
    // value = sig/2^47 * 2^(ea + eb - 253 - lz) = sig/2^47 * 2^(exp_r - 127)
    exp_r = 12'(signed'({4'd0, fp_eff_exp(a)})) + 12'(signed'({4'd0, fp_eff_exp(b)}))
          - 12'(FP_BIAS) + 12'sd1 - 12'(signed'({6'd0, lz}));
  end

  fp32_round_pack u_round (
    .sign  (sign),
    .exp_r (exp_r),
    .sig   (sig),
    .y     (rounded)
  );

  always_comb begin
    if (fp_is_nan(a) || fp_is_nan(b) ||
        (fp_is_inf(a) && fp_is_zero(b)) || (fp_is_zero(a) && fp_is_inf(b)))
      y = FP_QNAN;
    else if (fp_is_inf(a) || fp_is_inf(b))
      y = '{sign: sign, exp: 8'hFF, frac: '0};
    else if (fp_is_zero(a) || fp_is_zero(b))
      y = '{sign: sign, exp: '0, frac: '0};
    else
      y = rounded;
  end

endmodule
