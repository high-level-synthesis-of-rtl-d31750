// fp_cores_top: the set of floating-point cores, side by side.
//
// Five independent pipelined units, each with its own operands, input valid
// and output valid, each accepting a new operand pair every clock cycle:
//   add  - single-precision adder        (fp_addsub, LATENCY = ADD_LATENCY)
//   sub  - single-precision subtractor   (fp_addsub with SUB = 1)
//   mul  - single-precision multiplier   (fp_mul, LATENCY = MUL_LATENCY)
//   div  - single-precision divider      (fp_div, 2 + ceil(26 / DIV_STEPS) stages)
//   rpa  - reduced-precision adder, 4-bit exponent and 10-bit mantissa
//          (15-bit word, fp_addsub with LATENCY = RP_LATENCY)
// EXC selects, for all four single-precision units, full IEEE 754 handling
// of zero, infinity and NaN operands (1) or none (0); RP_EXC does the same
// for the reduced-precision adder, whose only departure from IEEE 754 by
// default is its narrower format. All units round to
// nearest even and flush subnormals to zero. The units share only the clock
// and the active-low asynchronous reset of their valid pipelines.
// The set of units, the two formats and the default depths (2, 1 and 1
// stages for the smallest adder, multiplier and reduced-precision adder, 28
// for the divider) follow the original cores; placing them side by side
// with separate ports is this design's choice, as the cores were evaluated
// on their own.
module fp_cores_top
  import fp_pkg::*;
#(
  parameter bit          EXC         = 1'b1,
  parameter int unsigned ADD_LATENCY = 2,
  parameter int unsigned MUL_LATENCY = 1,
  parameter int unsigned DIV_STEPS   = 1,
  parameter bit          RP_EXC      = 1'b1,
  parameter int unsigned RP_LATENCY  = 1
) (
  input  logic  clk,
  input  logic  rst_n,
  // adder
  input  logic  add_in_valid,
  input  fp32_t add_a,
  input  fp32_t add_b,
  output logic  add_out_valid,
  output fp32_t add_result,
  // subtractor
  input  logic  sub_in_valid,
  input  fp32_t sub_a,
  input  fp32_t sub_b,
  output logic  sub_out_valid,
  output fp32_t sub_result,
  // multiplier
  input  logic  mul_in_valid,
  input  fp32_t mul_a,
  input  fp32_t mul_b,
  output logic  mul_out_valid,
  output fp32_t mul_result,
  // divider
  input  logic  div_in_valid,
  input  fp32_t div_a,
  input  fp32_t div_b,
  output logic  div_out_valid,
  output fp32_t div_result,
  // reduced-precision adder
  input  logic  rpa_in_valid,
  input  fp15_t rpa_a,
  input  fp15_t rpa_b,
  output logic  rpa_out_valid,
  output fp15_t rpa_result
);

  fp_addsub #(.EXP_W(SP_EXP_W), .MAN_W(SP_MAN_W), .SUB(1'b0), .EXC(EXC),
              .LATENCY(ADD_LATENCY)) u_add (
    .clk, .rst_n,
    .in_valid (add_in_valid), .a(add_a), .b(add_b),
    .out_valid(add_out_valid), .result(add_result)
  );

  fp_addsub #(.EXP_W(SP_EXP_W), .MAN_W(SP_MAN_W), .SUB(1'b1), .EXC(EXC),
              .LATENCY(ADD_LATENCY)) u_sub (
    .clk, .rst_n,
    .in_valid (sub_in_valid), .a(sub_a), .b(sub_b),
    .out_valid(sub_out_valid), .result(sub_result)
  );

  fp_mul #(.EXP_W(SP_EXP_W), .MAN_W(SP_MAN_W), .EXC(EXC),
           .LATENCY(MUL_LATENCY)) u_mul (
    .clk, .rst_n,
    .in_valid (mul_in_valid), .a(mul_a), .b(mul_b),
    .out_valid(mul_out_valid), .result(mul_result)
  );

  fp_div #(.EXP_W(SP_EXP_W), .MAN_W(SP_MAN_W), .EXC(EXC),
           .STEPS_PER_STAGE(DIV_STEPS)) u_div (
    .clk, .rst_n,
    .in_valid (div_in_valid), .a(div_a), .b(div_b),
    .out_valid(div_out_valid), .result(div_result)
  );

  fp_addsub #(.EXP_W(RP_EXP_W), .MAN_W(RP_MAN_W), .SUB(1'b0), .EXC(RP_EXC),
              .LATENCY(RP_LATENCY)) u_rpa (
    .clk, .rst_n,
    .in_valid (rpa_in_valid), .a(rpa_a), .b(rpa_b),
    .out_valid(rpa_out_valid), .result(rpa_result)
  );

endmodule
