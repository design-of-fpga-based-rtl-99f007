// nn_fp_pkg: types, constants and helper functions shared by the float32
// neural-network datapath.
//
// The controller computes in IEEE-754 binary32 ("float32"): 1 sign bit,
// 8 exponent bits with bias 127, 23 fraction bits. fp32_t is the packed
// struct view of such a word; the fields line up with the bit positions of
// the standard format, so a 32-bit vector and an fp32_t convert by cast.
// The helpers below classify operands and count leading zeros for the
// normalisation step of the adder and the multiplier. Everything here is
// combinational.
package nn_fp_pkg;

  localparam int unsigned FP_EXP_W  = 8;
  localparam int unsigned FP_FRAC_W = 23;
  localparam int unsigned FP_MANT_W = FP_FRAC_W + 1;  // with the hidden bit
  localparam int unsigned FP_BIAS   = 127;

  typedef struct packed {
    logic                 sign;
    logic [FP_EXP_W-1:0]  exp;
    logic [FP_FRAC_W-1:0] frac;
  } fp32_t;

  // Canonical quiet NaN returned for every invalid operation.
  localparam fp32_t FP_QNAN = '{sign: 1'b0, exp: '1, frac: 23'h40_0000};

  function automatic logic fp_is_nan(input fp32_t a);
    return (a.exp == '1) && (a.frac != '0);
  endfunction

  function automatic logic fp_is_inf(input fp32_t a);
    return (a.exp == '1) && (a.frac == '0);
  endfunction

  function automatic logic fp_is_zero(input fp32_t a);
    return (a.exp == '0) && (a.frac == '0);
  endfunction

  // Significand with the hidden bit: 1.frac for normal numbers, 0.frac for
  // subnormals and zero.
  function automatic logic [FP_MANT_W-1:0] fp_mant(input fp32_t a);
    return {a.exp != '0, a.frac};
  endfunction

  // Exponent that goes with fp_mant: subnormals use the minimum exponent 1.
  function automatic logic [FP_EXP_W-1:0] fp_eff_exp(input fp32_t a);
    return (a.exp == '0) ? FP_EXP_W'(1) : a.exp;
  endfunction

  // Leading-zero count of a 48-bit vector (48 when it is all zero).
  function automatic logic [5:0] clz48(input logic [47:0] v);
    logic [5:0] n;
    logic       found;
    n     = 6'd48;
    found = 1'b0;
    for (int i = 47; i >= 0; i--) begin
      if (!found && v[i]) begin
        n     = 6'(47 - i);
        found = 1'b1;
      end
    end
    return n;
  endfunction

endpackage
