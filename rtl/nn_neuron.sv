// nn_neuron: two-input neuron with a pure linear activation, in float32.
//
// Computes y = purelin((w_a*x_a + w_b*x_b) + bias) = (w_a*x_a + w_b*x_b) +
// bias, following the document's neuron structure: a multiplication stage
// (one fp32_mul per input), a summation stage (fp32_add of the two products,
// then a second fp32_add for the bias) and the activation stage. The
// document's network uses the pure linear function in both layers, so the
// activation stage is the identity and needs no logic. Every operation is
// rounded to nearest-even in float32; the order of the two additions (the
// products first, then the bias) is this design's choice.
//
// The block is combinational: y follows the inputs after the delay of two
// multiplier levels and two adder levels. In the controller it is the
// output-layer neuron, and the combinational part of each hidden neuron.
module nn_neuron
  import nn_fp_pkg::*;
(
  input  fp32_t x_a,   // first input (error, or hidden output Y1)
  input  fp32_t x_b,   // second input (ambient temperature, or Y2)
  input  fp32_t w_a,   // weight of x_a
  input  fp32_t w_b,   // weight of x_b
  input  fp32_t bias,
  output fp32_t y
);

  fp32_t prod_a, prod_b, sum_prod;

  fp32_mul u_mul_a (.a(w_a), .b(x_a), .y(prod_a));
  fp32_mul u_mul_b (.a(w_b), .b(x_b), .y(prod_b));

  fp32_add u_add_prod (.a(prod_a),   .b(prod_b), .y(sum_prod));
  fp32_add u_add_bias (.a(sum_prod), .b(bias),   .y(y));

endmodule
