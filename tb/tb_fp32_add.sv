// tb_fp32_add: self-checking testbench for the float32 adder.
//
// Drives directed special cases (signed zeros, exact cancellation,
// infinities, inf - inf, NaN, subnormal sums, overflow, ties) and random
// operand pairs: near and far exponents, equal exponents with opposite
// signs (massive cancellation), and subnormals. Each sum is compared with
// a double-precision reference rounded to float32 by fp_ref_pkg; a random
// vector whose double sum is not exact is skipped (it would be rounded
// twice in the reference) and counted separately. The adder is
// combinational; each vector is checked 1 time unit after it is applied.
// A watchdog ends the run with a failure if it hangs.
module tb_fp32_add;
  import nn_fp_pkg::*;
  import fp_ref_pkg::*;

  logic [31:0] a, b, y;
  int checks = 0, failures = 0, skipped = 0;

  fp32_add dut (.a(fp32_t'(a)), .b(fp32_t'(b)), .y(y));

  task automatic check(input logic [31:0] ta, input logic [31:0] tb_);
    logic [31:0] exp;
    if (!sum_is_exact(ta, tb_) && !is_nan(ref_add(ta, tb_))) begin
      skipped++;
      return;
    end
    a = ta;
    b = tb_;
    #1;
    exp = ref_add(ta, tb_);
    checks++;
    if (!f32_match(y, exp)) begin
      failures++;
      if (failures <= 10)
        $display("ADD MISMATCH a=%h b=%h got=%h exp=%h", ta, tb_, y, exp);
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
    check(32'h3F80_0000, 32'h3F80_0000);  // 1 + 1
    check(32'h3F80_0000, 32'hBF80_0000);  // 1 - 1 = +0
    check(32'h8000_0000, 32'h8000_0000);  // -0 + -0 = -0
    check(32'h8000_0000, 32'h0000_0000);  // -0 + 0 = +0
    check(32'h7F80_0000, 32'hFF80_0000);  // inf - inf = NaN
    check(32'hFF80_0000, 32'h4000_0000);  // -inf + 2
    check(32'h4000_0000, 32'h7FC0_0000);  // 2 + NaN
    check(32'h7F7F_FFFF, 32'h7F7F_FFFF);  // overflow
    check(32'h0000_0001, 32'h0000_0001);  // subnormal sum
    check(32'h0080_0000, 32'h8000_0001);  // normal - subnormal -> subnormal
    check(32'h3F80_0000, 32'h3380_0000);  // 1 + 2^-24: tie, stays 1
    check(32'h3F80_0001, 32'h3380_0000);  // tie, rounds up to even
    check(32'h3F80_0000, 32'hB380_0000);  // 1 - 2^-24: exact
    check(32'h4B7F_FFFF, 32'h3F00_0000);  // carry into the exponent
    check(32'h41A0_0000, 32'hC1A0_0000);  // 20 - 20
    for (int i = 0; i < 20000; i++) check(rand_f32(110, 140), rand_f32(110, 140));
    for (int i = 0; i < 20000; i++) begin
      logic [31:0] x, z;
      x = rand_f32(100, 150);
      z = x ^ 32'h8000_0000;
      z[7:0] = 8'($urandom());        // same exponent, opposite sign
      if ($urandom_range(1) != 0) z[20:8] = 13'($urandom());
      check(x, z);
    end
    for (int i = 0; i < 20000; i++) begin
      logic [31:0] x;
      x = rand_f32(1, 254);
      check(x, rand_f32(int'(x[30:23]) > 28 ? int'(x[30:23]) - 28 : 1, int'(x[30:23])));
    end
    for (int i = 0; i < 10000; i++) check(rand_f32(0, 3), rand_f32(0, 3));
    $display("skipped %0d inexact reference sums", skipped);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
