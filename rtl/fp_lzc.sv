// fp_lzc: leading-zero counter used by the normalisation step.
//
// Counts the zeros above the most significant 1 of `in` (WIDTH when `in` is
// zero). It works by successive halving: at each level it asks whether the
// upper half of the window still being examined is all zero, records that
// answer as one bit of the count (16, 8, 4, 2, 1 for a 32-bit input) and
// keeps either the lower half (if the upper half was zero) or the upper half
// for the next, half as wide, level. This is the structure the cores'
// normalisation uses; here the window is kept left-aligned in a vector of
// the next power of two above WIDTH, padded below `in` with a single 1 so
// that an all-zero input counts exactly WIDTH. Purely combinational.
// Default WIDTH = 32 is the 32-bit count of the original formulation.
module fp_lzc #(
  parameter int unsigned WIDTH = 32,
  localparam int unsigned CNT_W = $clog2(WIDTH + 1)
) (
  input  logic [WIDTH-1:0] in,
  output logic [CNT_W-1:0] count,
  output logic             zero    // in == 0
);

  localparam int unsigned LEVELS = $clog2(WIDTH + 1);
  localparam int unsigned P      = 1 << LEVELS;   // padded window width

  logic [P-1:0]      win;
  logic [LEVELS-1:0] n;
  logic              cond;

  always_comb begin
    win = P'({in, 1'b1}) << (P - WIDTH - 1);
    n   = '0;
    for (int k = LEVELS - 1; k >= 0; k--) begin
      // Upper 2^k bits of the window all zero?
      cond = ((win >> (P - (1 << k))) == '0);
      n[k] = cond;
      if (cond) win = win << (1 << k);
    end
    count = CNT_W'(n);
    zero  = (in == '0);
  end

endmodule
