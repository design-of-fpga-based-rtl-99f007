// tb_fp32_mul: self-checking testbench for the float32 multiplier.
//
// Drives directed special cases (zeros, infinities, NaN, invalid inf*0,
// subnormal operands, overflow and underflow) and random operands over
// several exponent ranges, and compares every product with a reference
// computed in double precision and rounded to float32 by fp_ref_pkg
// (the product of two float32 values is exact in double precision). The
// multiplier is combinational; each vector is checked 1 time unit after it
// is applied. A watchdog ends the run with a failure if it hangs.
module tb_fp32_mul;
  import nn_fp_pkg::*;
  import fp_ref_pkg::*;

  logic [31:0] a, b, y;
  int checks = 0, failures = 0;

  fp32_mul dut (.a(fp32_t'(a)), .b(fp32_t'(b)), .y(y));

  task automatic check(input logic [31:0] ta, input logic [31:0] tb_);
    logic [31:0] exp;
    a = ta;
    b = tb_;
    #1;
    exp = ref_mul(ta, tb_);
    checks++;
    if (!f32_match(y, exp)) begin
      failures++;
      if (failures <= 10)
        $display("MUL MISMATCH a=%h b=%h got=%h exp=%h", ta, tb_, y, exp);
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
    // directed cases
    check(32'h3F80_0000, 32'h3F80_0000);  // 1 * 1
    check(32'h4000_0000, 32'hC040_0000);  // 2 * -3 = -6
    check(32'h0000_0000, 32'h4120_0000);  // 0 * 10
    check(32'h8000_0000, 32'h4120_0000);  // -0 * 10
    check(32'h7F80_0000, 32'h4000_0000);  // inf * 2
    check(32'h7F80_0000, 32'h0000_0000);  // inf * 0 = NaN
    check(32'h7FC0_0000, 32'h3F80_0000);  // NaN * 1
    check(32'h7F7F_FFFF, 32'h4000_0000);  // overflow to inf
    check(32'h0000_0001, 32'h3F00_0000);  // smallest subnormal / 2 -> 0 (tie to even)
    check(32'h0000_0003, 32'h3F00_0000);  // 3 ulp / 2 -> 2 ulp (tie to even)
    check(32'h0080_0000, 32'h3F00_0000);  // smallest normal / 2 -> subnormal
    check(32'h007F_FFFF, 32'h4000_0000);  // subnormal * 2 -> normal
    check(32'h0040_0000, 32'h4B00_0000);  // subnormal operand * 2^23
    check(32'h3F80_0001, 32'h3F80_0001);  // rounding of (1+u)^2
    check(32'h3FFF_FFFF, 32'h3FFF_FFFF);  // rounding carry into the exponent
    check(32'h41A0_0000, 32'hBF00_0000);  // 20 * -0.5
    // random operands: typical controller range, wide range, underflow range
    for (int i = 0; i < 20000; i++) check(rand_f32(100, 154), rand_f32(100, 154));
    for (int i = 0; i < 20000; i++) check(rand_f32(1, 254), rand_f32(1, 254));
    for (int i = 0; i < 10000; i++) check(rand_f32(0, 60), rand_f32(40, 130));
    for (int i = 0; i < 5000; i++)  check(rand_f32(190, 254), rand_f32(100, 200));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
