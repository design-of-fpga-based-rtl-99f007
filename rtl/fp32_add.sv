// fp32_add: IEEE-754 single-precision adder, y = a + b.
//
// Used for the summation stage of every neuron. The operand with the larger
// magnitude is taken as opa; opb's significand is shifted right by the exponent
// difference into a field GUARD_BITS bits wider than the significand, every
// bit shifted past that field being ORed into its last bit (sticky). The
// aligned significands are added or subtracted according to the signs, the
// result is normalised with a leading-zero count and handed to
// fp32_round_pack for round-to-nearest-even, gradual underflow and overflow
// to infinity. An exact zero sum is +0, except -0 when both operands are
// negative. NaN in, or infinity plus the opposite infinity, gives the quiet
// NaN 0x7FC00000; otherwise an infinite operand is passed on. GUARD_BITS = 3
// (guard, round, sticky) is enough for a correctly rounded sum and is also
// the guard-bit default of the VHDL-2008 floating-point package the
// document's neurons use. Purely combinational.
module fp32_add
  import nn_fp_pkg::*;
#(
  parameter int unsigned GUARD_BITS = 3
) (
  input  fp32_t a,
  input  fp32_t b,
  output fp32_t y
);

  localparam int unsigned AW = FP_MANT_W + GUARD_BITS;  // aligned width
  localparam int unsigned SW = AW + 1;                  // sum width (carry)

  fp32_t              opa, opb;
  logic [7:0]         d;
  logic [AW-1:0]      ma;
  logic [2*AW-1:0]    mb_wide;
  logic [AW-1:0]      mb_al;
  logic [SW-1:0]      s;
  logic [47:0]        s48;
  logic [5:0]         lz;
  logic [47:0]        sig;
  logic signed [11:0] exp_r;
  fp32_t              rounded;

  always_comb begin
    if ({a.exp, a.frac} >= {b.exp, b.frac}) begin
      opa   = a;
      opb = b;
    end else begin
      opa   = b;
      opb = a;
    end
    d  = fp_eff_exp(opa) - fp_eff_exp(opb);
    ma = {fp_mant(opa), GUARD_BITS'(0)};
    if (d >= 8'(AW)) begin
      mb_wide = '0;
      mb_al   = AW'(fp_mant(opb) != '0);
    end else begin
      mb_wide = {fp_mant(opb), GUARD_BITS'(0), AW'(0)} >> d;
      mb_al   = mb_wide[2*AW-1:AW] | AW'(|mb_wide[AW-1:0]);
    end
    s     = (opa.sign == opb.sign) ? SW'(ma) + SW'(mb_al) : SW'(ma) - SW'(mb_al);
    s48   = {s, (48 - SW)'(0)};
    lz    = clz48(s48);
    sig   = s48 << lz;
    // leading one of s in bit SW-1 means exponent eff_exp(opa) + 1
    exp_r = 12'(signed'({4'd0, fp_eff_exp(opa)})) + 12'sd1 - 12'(signed'({6'd0, lz}));
  end

  fp32_round_pack u_round (
    .sign  (opa.sign),
    .exp_r (exp_r),
    .sig   (sig),
    .y     (rounded)
  );

  always_comb begin
    if (fp_is_nan(a) || fp_is_nan(b) ||
        (fp_is_inf(a) && fp_is_inf(b) && (a.sign != b.sign)))
      y = FP_QNAN;
    else if (fp_is_inf(a))
      y = a;
    else if (fp_is_inf(b))
      y = b;
    else if (s == '0)
      y = '{sign: a.sign & b.sign, exp: '0, frac: '0};
    else
      y = rounded;
  end

endmodule
