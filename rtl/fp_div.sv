// fp_div: pipelined floating-point divider, restoring digit recurrence.
//
// Computes a / b on words of the format {sign, EXP_W-bit biased exponent,
// MAN_W-bit mantissa}, rounded to nearest even. One operand pair is accepted
// every clock (initiation interval 1); its result leaves LATENCY cycles
// later with out_valid, LATENCY = 2 + ceil((MAN_W+3) / STEPS_PER_STAGE).
//
// The quotient of the two significands (each in [1, 2)) lies in (1/2, 2).
// It is found one bit per iteration by restoring division: the partial
// remainder starts as the dividend significand; each iteration compares it
// with the divisor significand, subtracts the divisor when it is not
// smaller (quotient bit 1) or keeps it (quotient bit 0), and doubles it.
// MAN_W+3 iterations give the quotient from weight 2^0 down to
// 2^-(MAN_W+2): enough for the MAN_W+1 kept bits and a round bit in both
// cases (quotient >= 1 or < 1); the remaining quotient bit and a non-zero
// final remainder form the sticky bit. A quotient below 1 is shifted up one
// place and the exponent (ea - eb + bias) decremented. fp_round then rounds
// and packs, overflow giving infinity and underflow a signed zero.
//
// Pipeline: stage 1 registers the unpacked operands, exponent and special
// case; each following stage registers the state after STEPS_PER_STAGE
// iterations; the last stage registers the rounded result. The default of
// one iteration per stage gives 28 stages for single precision.
//
// EXC = 1 adds IEEE 754 special operands: NaN in, 0/0 and inf/inf give the
// quiet NaN 0x7FC00000; inf/x and x/0 give infinity; 0/x and x/inf give
// zero, all with the XOR sign. EXC = 0 omits that detection and treats every
// operand as a normal number. Subnormal operands count as zero (EXC = 1).
//
// The restoring recurrence and the 28-stage default depth follow the
// original cores; the radix, the number of quotient bits, the stage
// structure and the special-case encodings are this design's choices.
module fp_div
  import fp_pkg::*;
#(
  parameter int unsigned EXP_W           = 8,
  parameter int unsigned MAN_W           = 23,
  parameter bit          EXC             = 1'b1,
  parameter int unsigned STEPS_PER_STAGE = 1,
  localparam int unsigned FW             = 1 + EXP_W + MAN_W,
  localparam int unsigned QB             = MAN_W + 3,
  localparam int unsigned NST            = (QB + STEPS_PER_STAGE - 1) / STEPS_PER_STAGE,
  localparam int unsigned LATENCY        = NST + 2
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

  typedef enum logic [1:0] {SP_NONE, SP_NAN, SP_INF, SP_ZERO} special_e;

  typedef struct packed {
    special_e               spec;
    logic                   sign;
    logic signed [XE_W-1:0] exp;
    logic [W:0]             rem;   // partial remainder, < 2 * divisor
    logic [W-1:0]           dvs;   // divisor significand
    logic [QB-1:0]          q;     // quotient bits found so far (lsb last)
  } dstate_t;

  // n restoring iterations on state x
  function automatic dstate_t iterate(input dstate_t x, input int unsigned n);
    dstate_t y = x;
    for (int unsigned i = 0; i < STEPS_PER_STAGE; i++) begin
      if (i < n) begin
        if (y.rem >= {1'b0, y.dvs}) begin
          y.rem = y.rem - {1'b0, y.dvs};
          y.q   = {y.q[QB-2:0], 1'b1};
        end else begin
          y.q   = {y.q[QB-2:0], 1'b0};
        end
        y.rem = {y.rem[W-1:0], 1'b0};
      end
    end
    return y;
  endfunction

  // ---- stage 1: unpack ----------------------------------------------------
  logic             sa, sb;
  logic [EXP_W-1:0] ea, eb;
  logic [MAN_W-1:0] ma, mb;
  logic             a_zero, b_zero, a_inf, b_inf, a_nan, b_nan;
  dstate_t          s0;

  always_comb begin
    sa = a[FW-1];  ea = a[FW-2:MAN_W];  ma = a[MAN_W-1:0];
    sb = b[FW-1];  eb = b[FW-2:MAN_W];  mb = b[MAN_W-1:0];
    a_zero = EXC && (ea == '0);
    b_zero = EXC && (eb == '0);
    a_inf  = EXC && (ea == '1) && (ma == '0);
    b_inf  = EXC && (eb == '1) && (mb == '0);
    a_nan  = EXC && (ea == '1) && (ma != '0);
    b_nan  = EXC && (eb == '1) && (mb != '0);

    if (a_nan | b_nan | (a_zero & b_zero) | (a_inf & b_inf)) s0.spec = SP_NAN;
    else if (a_inf | b_zero)                                   s0.spec = SP_INF;
    else if (a_zero | b_inf)                                   s0.spec = SP_ZERO;
    else                                                       s0.spec = SP_NONE;
    s0.sign = sa ^ sb;
    s0.exp  = XE_W'(ea) - XE_W'(eb) + BIAS;
    s0.rem  = {2'b01, ma};
    s0.dvs  = {1'b1, mb};
    s0.q    = '0;
  end

  dstate_t          st0_q;
  logic [NST+1:0]   v_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) v_q <= '0;
    else        v_q <= {v_q[NST:0], in_valid};
  end

  always_ff @(posedge clk) st0_q <= s0;

  // ---- stages 2 .. NST+1: restoring iterations ------------------------------
  for (genvar k = 0; k < NST; k++) begin : g_iter
    localparam int unsigned DONE = k * STEPS_PER_STAGE;
    localparam int unsigned N    = (QB - DONE < STEPS_PER_STAGE) ? QB - DONE : STEPS_PER_STAGE;
    dstate_t st_q;                             // state after this stage
    if (k == 0) begin : g_first
      always_ff @(posedge clk) st_q <= iterate(st0_q, N);
    end else begin : g_next
      always_ff @(posedge clk) st_q <= iterate(g_iter[k-1].st_q, N);
    end
    // Restoring invariant: the partial remainder stays below twice the divisor.
    a_remainder: assert property (@(posedge clk) disable iff (!rst_n)
      v_q[k+1] |-> (st_q.rem < {st_q.dvs, 1'b0}));
  end

  // ---- last stage: normalise, round, pack -----------------------------------
  dstate_t                f;
  logic [W-1:0]           n_sig;
  logic                   n_rnd, n_sticky;
  logic signed [XE_W-1:0] n_exp;
  logic [FW-1:0]          rounded, res_c, res_q;

  always_comb begin
    f = g_iter[NST-1].st_q;
    if (f.q[QB-1]) begin                       // quotient in [1, 2)
      n_sig    = f.q[QB-1:2];
      n_rnd    = f.q[1];
      n_sticky = f.q[0] | (f.rem != '0);
      n_exp    = f.exp;
    end else begin                             // quotient in (1/2, 1)
      n_sig    = f.q[QB-2:1];
      n_rnd    = f.q[0];
      n_sticky = (f.rem != '0);
      n_exp    = f.exp - XE_W'(1);
    end
  end

  fp_round #(.EXP_W(EXP_W), .MAN_W(MAN_W)) u_round (
    .sign    (f.sign),
    .exp     (n_exp),
    .sig     (n_sig),
    .rnd     (n_rnd),
    .sticky  (n_sticky),
    .result  (rounded)
  );

  localparam logic [FW-1:0] QNAN = {1'b0, {EXP_W{1'b1}}, 1'b1, {(MAN_W-1){1'b0}}};

  always_comb begin
    unique case (f.spec)
      SP_NAN:  res_c = QNAN;
      SP_INF:  res_c = {f.sign, {EXP_W{1'b1}}, {MAN_W{1'b0}}};
      SP_ZERO: res_c = {f.sign, {(FW-1){1'b0}}};
      default: res_c = rounded;
    endcase
  end

  always_ff @(posedge clk) res_q <= res_c;

  assign result    = res_q;
  assign out_valid = v_q[NST+1];

endmodule
