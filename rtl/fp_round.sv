// fp_round: round-to-nearest-even and result packing shared by the cores.
//
// Input is a normalised significand `sig` (hidden 1 in its top bit), the
// round bit (first bit below the kept ones), the sticky bit (OR of all bits
// further below), the result sign and the unbiased-plus-bias exponent `exp`
// as a signed number wide enough to hold any overflow or underflow.
// The significand is incremented when round=1 and (sticky=1 or its lsb=1),
// i.e. ties go to the even value; a carry out of the increment bumps the
// exponent. After rounding, an exponent at or above the all-ones code gives
// infinity and an exponent of zero or below gives a signed zero: subnormal
// results are flushed to zero, as the cores support no subnormals.
// Guard/round/sticky rounding and the absence of subnormals follow the
// original cores; ties-to-even and deciding underflow after rounding are
// this design's choices.
// Purely combinational.
module fp_round #(
  parameter int unsigned EXP_W = 8,
  parameter int unsigned MAN_W = 23,
  localparam int unsigned XE_W = EXP_W + 3
) (
  input  logic                   sign,
  input  logic signed [XE_W-1:0] exp,
  input  logic [MAN_W:0]         sig,
  input  logic                   rnd,
  input  logic                   sticky,
  output logic [EXP_W+MAN_W:0]   result
);

  localparam logic signed [XE_W-1:0] EMAX = XE_W'((1 << EXP_W) - 1);

  logic                   round_up;
  logic [MAN_W+1:0]       sum;
  logic signed [XE_W-1:0] e2;

  always_comb begin
    round_up = rnd & (sticky | sig[0]);
    sum      = {1'b0, sig} + (MAN_W+2)'(round_up);
    // Carry out of the increment: significand became 10.00..0 = 1.00..0 x 2
    e2       = exp + XE_W'(sum[MAN_W+1]);
    if (e2 >= EMAX)
      result = {sign, {EXP_W{1'b1}}, {MAN_W{1'b0}}};
    else if (e2 <= 0)
      result = {sign, {EXP_W{1'b0}}, {MAN_W{1'b0}}};
    else
      result = {sign, e2[EXP_W-1:0], sum[MAN_W-1:0]};
  end

endmodule
