// tb_nn_neuron: self-checking testbench for the combinational two-input
// neuron (the output-layer neuron of the controller).
//
// Applies directed vectors with hand-worked results (for example
// 0.5*4 + (-2)*1.5 + 0.25 = -0.75) and random float32 weights, inputs and
// biases in the controller's range. Expected values come from fp_ref_pkg:
// (w_a*x_a + w_b*x_b) + bias with each operation rounded to float32 in the
// same order as the neuron; random vectors whose reference sums are not
// exact in double precision are skipped. Each vector is checked 1 time unit
// after it is applied. A watchdog ends the run with a failure if it hangs.
module tb_nn_neuron;
  import nn_fp_pkg::*;
  import fp_ref_pkg::*;

  logic [31:0] x_a, x_b, w_a, w_b, bias, y;
  int checks = 0, failures = 0, skipped = 0;

  nn_neuron dut (
    .x_a(fp32_t'(x_a)), .x_b(fp32_t'(x_b)), .w_a(fp32_t'(w_a)), .w_b(fp32_t'(w_b)),
    .bias(fp32_t'(bias)), .y(y)
  );

  task automatic apply(input logic [31:0] ta, tb_, twa, twb, tbias);
    x_a = ta; x_b = tb_; w_a = twa; w_b = twb; bias = tbias;
    #1;
  endtask

  task automatic expect_value(input logic [31:0] exp, input string what);
    checks++;
    if (!f32_match(y, exp)) begin
      failures++;
      if (failures <= 10) $display("NEURON MISMATCH %s got=%h exp=%h", what, y, exp);
    end
  endtask

  initial begin
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic exact;
    logic [31:0] exp;
    // 0.5*4 + (-2)*1.5 + 0.25 = -0.75
    apply(32'h4080_0000, 32'h3FC0_0000, 32'h3F00_0000, 32'hC000_0000, 32'h3E80_0000);
    expect_value(32'hBF40_0000, "directed 1");
    // 1*20 + 0.5*(-3) + 0 = 18.5
    apply(32'h41A0_0000, 32'hC040_0000, 32'h3F80_0000, 32'h3F00_0000, 32'h0000_0000);
    expect_value(32'h4194_0000, "directed 2");
    // zero weights: output is the bias (-1.25)
    apply(32'h41A0_0000, 32'hC040_0000, 32'h0000_0000, 32'h8000_0000, 32'hBFA0_0000);
    expect_value(32'hBFA0_0000, "bias only");
    // infinite input times zero weight gives NaN
    apply(32'h7F80_0000, 32'h3F80_0000, 32'h0000_0000, 32'h3F80_0000, 32'h3F80_0000);
    expect_value(32'h7FC0_0000, "inf*0");
    for (int i = 0; i < 30000; i++) begin
      logic [31:0] ta, tb_, twa, twb, tbias;
      ta = rand_f32(115, 135); tb_ = rand_f32(115, 135);
      twa = rand_f32(115, 130); twb = rand_f32(115, 130); tbias = rand_f32(110, 130);
      exp = ref_neuron(ta, tb_, twa, twb, tbias, exact);
      if (!exact) begin
        skipped++;
        continue;
      end
      apply(ta, tb_, twa, twb, tbias);
      expect_value(exp, "random");
    end
    $display("skipped %0d vectors with inexact reference sums", skipped);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
