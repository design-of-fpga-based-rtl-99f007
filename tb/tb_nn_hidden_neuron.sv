// tb_nn_hidden_neuron: self-checking testbench for the registered hidden
// neuron.
//
// A 100 ns clock (the period seen in the document's simulation) drives the
// neuron. The test checks that the output register loads
// (w_a*x_a + w_b*x_b) + bias on the first rising edge with load high and
// not before (latency of one edge), holds while load is low even when the
// inputs change, and is cleared to +0.0 by res at once, without waiting for
// a clock edge. Expected values come from fp_ref_pkg. A watchdog counts a
// failure after a fixed number of cycles.
`timescale 1ns/1ps
module tb_nn_hidden_neuron;
  import nn_fp_pkg::*;
  import fp_ref_pkg::*;

  logic        clk = 1'b0, res = 1'b1, load = 1'b0;
  logic [31:0] x_a, x_b, w_a, w_b, bias, y;
  int checks = 0, failures = 0, cycles = 0;

  always #50 clk = ~clk;
  always @(posedge clk) cycles++;

  nn_hidden_neuron dut (
    .clk(clk), .res(res), .load(load),
    .x_a(fp32_t'(x_a)), .x_b(fp32_t'(x_b)), .w_a(fp32_t'(w_a)), .w_b(fp32_t'(w_b)),
    .bias(fp32_t'(bias)), .y(y)
  );

  task automatic expect_value(input logic [31:0] exp, input string what);
    checks++;
    if (!f32_match(y, exp)) begin
      failures++;
      if (failures <= 10) $display("HIDDEN MISMATCH %s got=%h exp=%h t=%0t", what, y, exp, $time);
    end
  endtask

  task automatic set_inputs(input logic [31:0] ta, tb_, twa, twb, tbias);
    x_a = ta; x_b = tb_; w_a = twa; w_b = twb; bias = tbias;
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] exp, held;
    logic exact;
    set_inputs(32'h4080_0000, 32'h3FC0_0000, 32'h3F00_0000, 32'hC000_0000, 32'h3E80_0000);
    repeat (2) @(posedge clk);
    #10 expect_value(32'h0000_0000, "in reset");
    res = 1'b0;
    // load low: register keeps its reset value
    @(posedge clk); #10 expect_value(32'h0000_0000, "hold after reset");
    // raise load between edges: nothing changes until the next edge
    load = 1'b1;
    #10 expect_value(32'h0000_0000, "before edge");
    @(posedge clk); #1 expect_value(32'hBF40_0000, "one edge after load");
    held = 32'hBF40_0000;
    // load low, new inputs: value is held
    @(negedge clk);
    load = 1'b0;
    set_inputs(32'h41A0_0000, 32'hC040_0000, 32'h3F80_0000, 32'h3F00_0000, 32'h0000_0000);
    repeat (3) begin
      @(posedge clk); #1 expect_value(held, "held with load low");
    end
    @(negedge clk) load = 1'b1;
    @(posedge clk); #1 expect_value(32'h4194_0000, "second load");
    // asynchronous reset in the middle of a clock phase
    #20 res = 1'b1;
    #1 expect_value(32'h0000_0000, "async reset");
    @(negedge clk) res = 1'b0;
    // random loads, one per cycle, each checked right after its edge
    for (int i = 0; i < 2000; i++) begin
      logic [31:0] ta, tb_, twa, twb, tbias;
      @(negedge clk);
      do begin
        ta = rand_f32(115, 135); tb_ = rand_f32(115, 135);
        twa = rand_f32(115, 130); twb = rand_f32(115, 130); tbias = rand_f32(110, 130);
        exp = ref_neuron(ta, tb_, twa, twb, tbias, exact);
      end while (!exact);
      set_inputs(ta, tb_, twa, twb, tbias);
      load = ($urandom_range(3) != 0);
      if (load) held = exp;
      @(posedge clk); #1 expect_value(held, load ? "random load" : "random hold");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
