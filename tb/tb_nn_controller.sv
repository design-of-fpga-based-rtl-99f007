// tb_nn_controller: end-to-end testbench of the 2-2-1 controller at its
// default (and only) configuration.
//
// Part 1 replays an operating sequence like the document's 6400 ns
// simulation: a 100 ns clock, reset first, then 64 cycles with load high
// while the ambient temperature steps up from 20.0 degrees by 0.25 per
// cycle and the current error changes every few cycles; the weights and
// biases are a fixed set chosen for this test (the trained values are not
// part of the design). Part 2 runs 2000 cycles of random inputs, random
// weights and a random load pattern, with an asynchronous reset pulse from
// time to time. After every clock edge Y1, Y2 and the controller output
// are compared with a float32 reference of the network computed in
// fp_ref_pkg, which also checks the one-edge latency of a load and that
// nn_output follows w13, w23 and b3 combinationally. Each mechanism of the
// design (a load, a hold with load low, an asynchronous reset) is counted,
// and one that never happens counts as a failure. A watchdog counts a
// failure after a fixed number of cycles.
`timescale 1ns/1ps
module tb_nn_controller;
  import nn_fp_pkg::*;
  import fp_ref_pkg::*;

  logic        clk = 1'b0, res = 1'b1, load = 1'b0;
  logic [31:0] error, airtemp, w11, w12, w13, w21, w22, w23, b1, b2, b3;
  logic [31:0] y1, y2, nn_output;
  int checks = 0, failures = 0, skipped = 0;
  int n_load = 0, n_hold = 0, n_reset = 0;
  // reference state: the hidden values the registers should hold
  logic [31:0] ref_y1 = '0, ref_y2 = '0;
  logic        ref_exact = 1'b1;

  always #50 clk = ~clk;

  nn_controller dut (
    .clk(clk), .res(res), .load(load),
    .error(fp32_t'(error)), .airtemp(fp32_t'(airtemp)),
    .w11(fp32_t'(w11)), .w12(fp32_t'(w12)), .w13(fp32_t'(w13)),
    .w21(fp32_t'(w21)), .w22(fp32_t'(w22)), .w23(fp32_t'(w23)),
    .b1(fp32_t'(b1)), .b2(fp32_t'(b2)), .b3(fp32_t'(b3)),
    .y1(y1), .y2(y2), .nn_output(nn_output)
  );

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic compare(input logic [31:0] got, input logic [31:0] exp, input string what);
    checks++;
    if (!f32_match(got, exp)) begin
      failures++;
      if (failures <= 10) $display("MISMATCH %s got=%h exp=%h t=%0t", what, got, exp, $time);
    end
  endtask

  // Check all three outputs against the reference state.
  task automatic check_outputs(input string what);
    logic [31:0] exp_out;
    logic        ex;
    exp_out = ref_neuron(ref_y1, ref_y2, w13, w23, b3, ex);
    if (!ref_exact || !ex) begin
      skipped++;
      return;
    end
    compare(y1, ref_y1, {what, " y1"});
    compare(y2, ref_y2, {what, " y2"});
    compare(nn_output, exp_out, {what, " output"});
  endtask

  // One clock cycle: inputs were set before the edge; update the reference
  // as the registers should, then check just after the edge.
  task automatic cycle(input string what);
    logic e1, e2;
    logic [31:0] n1, n2;
    n1 = ref_neuron(error, airtemp, w11, w21, b1, e1);
    n2 = ref_neuron(error, airtemp, w12, w22, b2, e2);
    // before the edge the outputs still show the previous values
    #1 check_outputs({what, " before edge"});
    @(posedge clk);
    if (load) begin
      ref_y1 = n1;
      ref_y2 = n2;
      ref_exact = e1 && e2;
      n_load++;
    end else begin
      n_hold++;
    end
    #1 check_outputs(what);
    @(negedge clk);
  endtask

  task automatic set_weights(input logic [31:0] a11, a12, a13, a21, a22, a23, c1, c2, c3);
    w11 = a11; w12 = a12; w13 = a13; w21 = a21; w22 = a22; w23 = a23;
    b1 = c1; b2 = c2; b3 = c3;
  endtask

  initial begin
    logic [31:0] t;
    // weights: 0.75, -0.5, 1.25, 0.0625, -0.125, -0.75; biases 0.5, -1.0, 0.25
    set_weights(32'h3F40_0000, 32'hBF00_0000, 32'h3FA0_0000,
                32'h3D80_0000, 32'hBE00_0000, 32'hBF40_0000,
                32'h3F00_0000, 32'hBF80_0000, 32'h3E80_0000);
    error   = 32'h4000_0000;     // 2.0
    airtemp = 32'h41A0_0000;     // 20.0
    repeat (2) @(posedge clk);
    #1 check_outputs("in reset");
    if (nn_output != b3) begin
      failures++;
      $display("output under reset is not b3");
    end
    checks++;
    n_reset++;
    @(negedge clk) res = 1'b0;

    // Part 1: 64-cycle temperature sweep with load high (6400 ns)
    load = 1'b1;
    for (int i = 0; i < 64; i++) begin
      airtemp = f64_to_f32(20.0 + 0.25 * i);
      if (i % 8 == 0) error = f64_to_f32(2.0 - 0.5 * (i / 8));
      // a short window with load low in the middle of the sweep
      load = !(i >= 30 && i < 34);
      cycle("sweep");
    end
    // a weight change reaches the output without a clock edge
    w13 = 32'h3F80_0000;   // 1.0
    #1 check_outputs("weight change");
    t = b3;
    b3 = 32'h4000_0000;    // 2.0
    #1 check_outputs("bias change");
    b3 = t;

    // Part 2: random operation
    for (int i = 0; i < 2000; i++) begin
      if (i % 200 == 0)
        set_weights(rand_f32(118, 128), rand_f32(118, 128), rand_f32(118, 128),
                    rand_f32(118, 128), rand_f32(118, 128), rand_f32(118, 128),
                    rand_f32(115, 128), rand_f32(115, 128), rand_f32(115, 128));
      error   = rand_f32(110, 131);
      airtemp = rand_f32(126, 133);
      load    = ($urandom_range(4) != 0);
      if (i % 250 == 125) begin
        // asynchronous reset pulse between clock edges
        #10 res = 1'b1;
        #1;
        ref_y1 = '0;
        ref_y2 = '0;
        ref_exact = 1'b1;
        check_outputs("async reset");
        n_reset++;
        #5 res = 1'b0;
      end
      cycle("random");
    end

    $display("mechanisms: loads=%0d holds=%0d resets=%0d (skipped %0d checks)",
             n_load, n_hold, n_reset, skipped);
    if (n_load == 0)  begin failures++; $display("no load happened"); end
    if (n_hold == 0)  begin failures++; $display("no hold happened"); end
    if (n_reset == 0) begin failures++; $display("no reset happened"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
