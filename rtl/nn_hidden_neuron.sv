// nn_hidden_neuron: registered hidden-layer neuron of the controller.
//
// The neuron value (w_a*x_a + w_b*x_b) + bias, pure linear activation, is
// computed by nn_neuron and captured into a 32-bit output register on the
// rising clock edge when load is high; with load low the register holds
// its value. res is an active-high asynchronous reset that clears the
// register to +0.0. The hidden neurons of the document's block diagram are
// the blocks with clk, load and res inputs; those pins and the float32
// datapath follow the document, while the register placement (one 32-bit
// register at the neuron output, which gives the 64 flip-flops the
// document's area report lists for two hidden neurons), the polarity and
// asynchronous form of res, and the reset value are this design's choices.
//
// Timing: y changes one clock edge after a load; latency 1 cycle.
module nn_hidden_neuron
  import nn_fp_pkg::*;
(
  input  logic  clk,
  input  logic  res,
  input  logic  load,
  input  fp32_t x_a,
  input  fp32_t x_b,
  input  fp32_t w_a,
  input  fp32_t w_b,
  input  fp32_t bias,
  output fp32_t y
);

  fp32_t value;

  nn_neuron u_neuron (
    .x_a  (x_a),
    .x_b  (x_b),
    .w_a  (w_a),
    .w_b  (w_b),
    .bias (bias),
    .y    (value)
  );

  always_ff @(posedge clk or posedge res) begin
    if (res)       y <= '0;
    else if (load) y <= value;
  end

endmodule
