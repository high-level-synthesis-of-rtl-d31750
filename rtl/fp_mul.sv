// fp_mul: pipelined floating-point multiplier.
//
// Computes a * b on words of the format {sign, EXP_W-bit biased exponent,
// MAN_W-bit mantissa}, rounded to nearest even, accepting one operand pair
// per clock (initiation interval 1) and returning the result LATENCY cycles
// later with out_valid. The default LATENCY = 1 is the single-stage
// multiplier: one register at the output. LATENCY = 2 adds a register
// between the significand product and the normalise/round phase; further
// registers trail the output, for register retiming in synthesis.
//
// Datapath: the result sign is the XOR of the signs; the exponents are added
// and the bias removed; the two significands (hidden 1 restored) are
// multiplied in one wide product, which lies in [1, 4): if its top bit is
// set the product is taken one place lower and the exponent incremented.
// The bits below the kept significand give the round bit and the sticky bit
// for fp_round, which also turns exponent overflow into infinity and
// underflow into a signed zero (no subnormals).
//
// EXC = 1 adds IEEE 754 special operands: NaN in, or 0 * inf, gives the
// quiet NaN 0x7FC00000; otherwise an infinite operand gives infinity and a
// zero (or subnormal) operand gives zero, with the XOR sign. EXC = 0 omits
// that detection and treats every operand as a normal number.
//
// The format, the single wide product and the one-stage default follow the
// original cores; the rounding mode, the register placement and the
// special-case encodings are this design's choices.
module fp_mul
  import fp_pkg::*;
#(
  parameter int unsigned EXP_W   = 8,
  parameter int unsigned MAN_W   = 23,
  parameter bit          EXC     = 1'b1,
  parameter int unsigned LATENCY = 1,
  localparam int unsigned FW     = 1 + EXP_W + MAN_W
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  input  logic [FW-1:0] a,
  input  logic [FW-1:0] b,
  output logic          out_valid,
  output logic [FW-1:0] result
);

  localparam int unsigned W    = MAN_W + 1;
  localparam int unsigned XE_W = EXP_W + 3;
  localparam logic signed [XE_W-1:0] BIAS = XE_W'(bias(EXP_W));

  logic             sa, sb, s;
  logic [EXP_W-1:0] ea, eb;
  logic [MAN_W-1:0] ma, mb;
  logic             a_zero, b_zero, a_inf, b_inf, a_nan, b_nan;

  localparam logic [FW-1:0] QNAN = {1'b0, {EXP_W{1'b1}}, 1'b1, {(MAN_W-1){1'b0}}};

  // Contents of the register between the product and the rounding.
  typedef struct packed {
    logic                   spec;       // result is spec_word
    logic [FW-1:0]          spec_word;
    logic                   sign;
    logic signed [XE_W-1:0] e_sum;      // ea + eb - bias
    logic [2*W-1:0]         prod;       // significand product, in [1, 4)
  } prod_t;

  // Pipeline registers: the first at the output, the second between the
  // product and the normalise/round phase; more trail the output.
  localparam bit          CUT_PRD = (LATENCY >= 2);
  localparam int unsigned OUT_LAT = LATENCY - int'(CUT_PRD);

  // ---- phase 1: special cases, exponent sum, significand product ----------
  prod_t p1, p1_q;
  logic  v1_q;

  always_comb begin
    sa = a[FW-1];  ea = a[FW-2:MAN_W];  ma = a[MAN_W-1:0];
    sb = b[FW-1];  eb = b[FW-2:MAN_W];  mb = b[MAN_W-1:0];
    s  = sa ^ sb;
    a_zero = EXC && (ea == '0);
    b_zero = EXC && (eb == '0);
    a_inf  = EXC && (ea == '1) && (ma == '0);
    b_inf  = EXC && (eb == '1) && (mb == '0);
    a_nan  = EXC && (ea == '1) && (ma != '0);
    b_nan  = EXC && (eb == '1) && (mb != '0);

    p1.spec = 1'b1;
    if (a_nan | b_nan | (a_inf & b_zero) | (a_zero & b_inf))
      p1.spec_word = QNAN;
    else if (a_inf | b_inf)
      p1.spec_word = {s, {EXP_W{1'b1}}, {MAN_W{1'b0}}};
    else if (a_zero | b_zero)
      p1.spec_word = {s, {(FW-1){1'b0}}};
    else begin
      p1.spec      = 1'b0;
      p1.spec_word = '0;
    end
    p1.sign  = s;
    p1.e_sum = XE_W'(ea) + XE_W'(eb) - BIAS;
    p1.prod  = {{W{1'b0}}, 1'b1, ma} * {{W{1'b0}}, 1'b1, mb};
  end

  fp_pipe #(.WIDTH($bits(prod_t)), .LATENCY(int'(CUT_PRD))) u_cut_prd (
    .clk, .rst_n, .in_valid(in_valid), .in_data(p1),
    .out_valid(v1_q), .out_data(p1_q)
  );

  // ---- phase 2: normalise by at most one place, round, pack ---------------
  logic [W-1:0]           n_sig;
  logic                   n_rnd, n_sticky;
  logic signed [XE_W-1:0] n_exp;

  always_comb begin
    if (p1_q.prod[2*W-1]) begin              // product in [2, 4)
      n_sig    = p1_q.prod[2*W-1:W];
      n_rnd    = p1_q.prod[W-1];
      n_sticky = |p1_q.prod[W-2:0];
      n_exp    = p1_q.e_sum + XE_W'(1);
    end else begin                           // product in [1, 2)
      n_sig    = p1_q.prod[2*W-2:W-1];
      n_rnd    = p1_q.prod[W-2];
      n_sticky = |p1_q.prod[W-3:0];
      n_exp    = p1_q.e_sum;
    end
  end

  // The product of two significands in [1, 2) lies in [1, 4).
  a_product_range: assert property (@(posedge clk) disable iff (!rst_n)
    (v1_q && !p1_q.spec) |-> (p1_q.prod[2*W-1] | p1_q.prod[2*W-2]));

  logic [FW-1:0] rounded, res_c;

  fp_round #(.EXP_W(EXP_W), .MAN_W(MAN_W)) u_round (
    .sign  (p1_q.sign),
    .exp   (n_exp),
    .sig   (n_sig),
    .rnd   (n_rnd),
    .sticky(n_sticky),
    .result(rounded)
  );

  assign res_c = p1_q.spec ? p1_q.spec_word : rounded;

  fp_pipe #(.WIDTH(FW), .LATENCY(OUT_LAT)) u_pipe (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (v1_q),
    .in_data  (res_c),
    .out_valid(out_valid),
    .out_data (result)
  );

endmodule
