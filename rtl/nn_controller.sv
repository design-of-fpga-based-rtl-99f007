// nn_controller: 2-2-1 neural-network charge-current controller for a
// stand-alone photovoltaic earth-station power system.
//
// Inputs are the error between generated and load current and the ambient
// temperature; the output is the change of battery charge current. The
// network has two hidden neurons and one output neuron, all with the pure
// linear activation, and computes in IEEE-754 single precision:
//   Y1     = w11*error + w21*airtemp + b1     (hidden neuron, u_m2)
//   Y2     = w12*error + w22*airtemp + b2     (hidden neuron, u_m3)
//   output = w13*Y1    + w23*Y2      + b3     (output neuron, u_outlayer)
// Weights and biases are inputs, so a trained network is loaded by driving
// them; they are not stored inside. The port list, the naming of the
// weights, the float32 format and the split into two clocked hidden neurons
// and a combinational output neuron follow the document's block diagram;
// the output port is called nn_output because "output" is a keyword.
//
// Timing: on a rising clk edge with load high the hidden neurons register
// Y1 and Y2 from the current inputs; nn_output is a combinational function
// of the registered Y1, Y2 and of w13, w23, b3, so a new result is
// available one clock edge after a load. res (active high, asynchronous)
// clears Y1 and Y2 to +0.0, so nn_output then equals b3.
module nn_controller
  import nn_fp_pkg::*;
(
  input  logic  clk,
  input  logic  res,
  input  logic  load,
  input  fp32_t error,
  input  fp32_t airtemp,
  input  fp32_t w11,
  input  fp32_t w12,
  input  fp32_t w13,
  input  fp32_t w21,
  input  fp32_t w22,
  input  fp32_t w23,
  input  fp32_t b1,
  input  fp32_t b2,
  input  fp32_t b3,
  output fp32_t y1,
  output fp32_t y2,
  output fp32_t nn_output
);

  nn_hidden_neuron u_m2 (
    .clk  (clk),
    .res  (res),
    .load (load),
    .x_a  (error),
    .x_b  (airtemp),
    .w_a  (w11),
    .w_b  (w21),
    .bias (b1),
    .y    (y1)
  );

  nn_hidden_neuron u_m3 (
    .clk  (clk),
    .res  (res),
    .load (load),
    .x_a  (error),
    .x_b  (airtemp),
    .w_a  (w12),
    .w_b  (w22),
    .bias (b2),
    .y    (y2)
  );

  nn_neuron u_outlayer (
    .x_a  (y1),
    .x_b  (y2),
    .w_a  (w13),
    .w_b  (w23),
    .bias (b3),
    .y    (nn_output)
  );

endmodule
