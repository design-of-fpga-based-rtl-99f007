# Float32 neural-network charge controller for a stand-alone PV earth station

A stand-alone photovoltaic (PV) power system, such as the supply of a remote
receiving earth station, has a PV array, a storage battery, an inverter feeding
the AC load, and a charge controller that decides how much current goes into
or comes out of the battery. Here the charge controller is a small neural
network. It looks at two quantities:

- `error`: the difference between the generated current and the load current;
- `airtemp`: the ambient temperature.

From these it produces one number, the change of battery charge current
(delta I_BC). The network is a 2-2-1 multilayer perceptron: two inputs, two
hidden neurons and one output neuron. Every neuron uses the pure linear
activation, the identity. All arithmetic is IEEE-754 single precision (float32).
The network was trained offline (Levenberg-Marquardt back-propagation). Its
nine weights and biases are **inputs** of the hardware, so the same RTL runs
any trained set.

This repository holds synthesizable SystemVerilog for the controller and its
float32 arithmetic, plus self-checking testbenches. The PV array, battery,
inverter and the analog summing point that forms the error are plant models
with no digital function. They are not part of the RTL. The error arrives on
the `error` port, and the result leaves on `nn_output` towards the battery's
power stage.

## The network

```
            w11         Y1 (registered)
 error  ---+----> [M2] -----------+        w13
           | w12                  +----> [outlayer] ----> nn_output (delta I_BC)
 airtemp --+----> [M3] -----------+        w23, b3
            w21, w22, b1, b2   Y2 (registered)
```

    Y1        = w11*error + w21*airtemp + b1
    Y2        = w12*error + w22*airtemp + b2
    nn_output = w13*Y1    + w23*Y2      + b3

The weight names follow the usual MLP convention: `w<i><j>` goes from input
`i` to neuron `j`, and neuron 3 is the output neuron. `Y1` and `Y2` are also
brought out as ports, so the hidden layer can be observed.

Each neuron has three stages: two float32 multipliers (weight times input),
an adder tree (the two products first, then the bias), and the activation.
Because the activation is the identity, it costs no logic.

## Timing: load, reset and latency

The two hidden neurons are clocked and the output neuron is not:

- On a rising `clk` edge with `load` high, `Y1` and `Y2` are computed from the
  present `error`, `airtemp`, weights and biases, and registered.
- With `load` low, `Y1` and `Y2` hold their values, whatever the inputs do.
- `nn_output` is a combinational function of the registered `Y1` and `Y2` and
  of `w13`, `w23` and `b3`. A new result is therefore valid one clock edge
  after a load, after the output neuron's combinational delay. A change of
  `w13`, `w23` or `b3` reaches the output with no clock edge at all.
- `res` is active high and asynchronous. It clears `Y1` and `Y2` to +0.0, so
  `nn_output` then equals `b3`.

The whole design has 64 flip-flops: two 32-bit hidden registers. There are no
memories and no pipeline registers. Between the hidden registers and
`nn_output` sit a multiplier and two adders. Between the inputs and the hidden
registers sit another multiplier and two adders. In an FPGA this gives a long
path, and the clock must be slow enough for it. Nothing here pipelines it
further.

## Float32 arithmetic

The arithmetic is the hardest part to get right. It lives in three modules:

- `fp32_mul`: multiplies the two 24-bit significands exactly into 48 bits.
  Subnormal operands count as `0.frac` with exponent 1. It then shifts the
  product left until its leading one sits in bit 47, and computes the
  matching exponent `ea + eb - 127 + 1 - lz`.
- `fp32_add`: the operand of larger magnitude is taken as the base. The other
  significand is shifted right by the exponent difference into a field with
  `GUARD_BITS` (3) extra bits. Every bit shifted past the field is ORed into
  the last bit, the sticky bit. The aligned significands are added or
  subtracted, and a leading-zero count normalises the result.
- `fp32_round_pack`: the final stage both units share. Results below the
  normal range are shifted right into subnormals, and every shifted-out bit is
  kept as sticky. Rounding is to nearest, ties to even. The rounding increment
  is added to the packed `{exponent, fraction}` word. A carry out of the
  fraction therefore bumps the exponent, which also turns a rounded-up
  subnormal into the smallest normal number. Exponent 255 means infinity.

The special values follow IEEE-754:

- A NaN operand, `inf*0` or `inf-inf` gives the quiet NaN `0x7FC00000`.
- An infinite operand otherwise gives infinity with the proper sign.
- An exact zero sum is `+0`, unless both addends are negative.

All three modules are purely combinational. The types and helpers they share
(`fp32_t`, a packed struct with `sign`, `exp` and `frac`, the operand
classification and `clz48`) are in `nn_fp_pkg`.

## Module hierarchy

| File | Module | Role |
|---|---|---|
| `rtl/nn_fp_pkg.sv` | package | float32 type, constants, helper functions |
| `rtl/fp32_round_pack.sv` | `fp32_round_pack` | shared rounding and packing stage |
| `rtl/fp32_mul.sv` | `fp32_mul` | float32 multiplier |
| `rtl/fp32_add.sv` | `fp32_add` | float32 adder (`GUARD_BITS` = 3) |
| `rtl/nn_neuron.sv` | `nn_neuron` | two-input neuron, combinational; the output layer |
| `rtl/nn_hidden_neuron.sv` | `nn_hidden_neuron` | `nn_neuron` plus a 32-bit load-enabled register |
| `rtl/nn_controller.sv` | `nn_controller` | top: two hidden neurons and the output neuron |

The top's ports are `clk`, `res`, `load`, the float32 inputs `error`,
`airtemp`, `w11`, `w12`, `w13`, `w21`, `w22`, `w23`, `b1`, `b2` and `b3`, and
the float32 outputs `y1`, `y2` and `nn_output`. The float32 ports have type
`nn_fp_pkg::fp32_t`, which is 32 packed bits. A plain `logic [31:0]`
connects to them directly.

## Departures and choices

The design follows the published controller in these points:

- the 2-2-1 topology and the pure linear activations;
- float32 arithmetic throughout;
- the port list, including the weight and bias ports;
- only the hidden neurons have `clk`, `load` and `res`;
- two 32-bit registers in total, 64 flip-flops.

The following points were not specified and are choices of this design:

- **What `load` does.** Here it is the capture enable of the hidden
  registers.
- **Reset.** `res` is active high and asynchronous, and it resets to +0.0.
- **Where the registers sit.** They are at the hidden-neuron outputs, which
  matches the published flip-flop count.
- **Summation order.** The two products are added first, then the bias. With
  float32 rounding, a different order can differ in the last bit.
- **Rounding details.** Round to nearest even, gradual underflow and the
  canonical quiet NaN. These are the defaults of the VHDL-2008 floating-point
  package the original was built on, but a bit-exact match with that package
  was not verified.
- **Port name.** The output is called `nn_output`, since `output` is a
  keyword.

The following parts are not included:

- the trained weight values, which belong to one training run rather than
  to the hardware, so the testbenches use their own;
- any weight storage or host interface for loading weights;
- the MATLAB co-simulation flow;
- the plant models: PV array, battery, inverter and error summing point.

## Simulation

Each testbench prints `TB_RESULT checks=N failures=M` and ends with
`$finish`. From the repository root, for example:

    verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -Itb -y rtl -y tb +libext+.sv \
        rtl/nn_fp_pkg.sv tb/fp_ref_pkg.sv tb/tb_nn_controller.sv \
        --top-module tb_nn_controller
    ./obj_dir/Vtb_nn_controller

Replace `tb_nn_controller` with `tb_fp32_mul`, `tb_fp32_add`, `tb_nn_neuron`
or `tb_nn_hidden_neuron` to run the block-level tests. Each takes well under a
second.

- `tb_fp32_mul` and `tb_fp32_add` run about 55,000 and 70,000 vectors. These
  cover directed corner cases (signed zeros, infinities, NaN, ties, carries
  into the exponent, subnormal results, overflow) and random operands over
  several exponent ranges.
- `tb_nn_neuron` checks hand-worked neuron results and 30,000 random ones.
- `tb_nn_hidden_neuron` checks the one-edge latency, holding with `load` low,
  and the asynchronous reset.
- `tb_nn_controller` is the end-to-end test at the top's default
  configuration. It first runs a 6400 ns operating sequence: a 100 ns clock,
  the temperature stepping up from 20.0 degrees, the error changing every
  eight cycles, and a short window with `load` low. It then runs 2000 random
  cycles with random weights and occasional reset pulses. It counts loads,
  holds and resets, and fails if any of them never happens.

## How far it can be trusted

The expected values never come from the RTL. `tb/fp_ref_pkg.sv` converts the
operands to double precision, does the operation there, and rounds the result
to float32 with its own bit-level round-to-nearest-even.

- **Products.** A product of two float32 values is exact in double
  precision, so the multiplier's reference is exact.
- **Sums.** A sum is used only when a two-sum error test shows that the
  double result was exact. The few vectors where it was not are skipped and
  counted, which rules out double-rounding errors in the reference.

Every testbench was also run against a copy of its module with one deliberate
fault, and each one failed. The faults were:

- a wrong product sign;
- a dropped sticky bit;
- a swapped multiplier input;
- a register that ignores `load`;
- a miswired weight.

The arithmetic has not been compared bit by bit with the VHDL-2008
floating-point package. Timing closure on a real FPGA has not been checked.
