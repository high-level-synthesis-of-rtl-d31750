// fp_addsub: pipelined floating-point adder / subtractor.
//
// Computes a + b (SUB = 0) or a - b (SUB = 1) on words of the format
// {sign, EXP_W-bit biased exponent, MAN_W-bit mantissa}, rounded to nearest
// even. One operand pair is accepted every clock cycle (initiation
// interval 1); its result appears LATENCY cycles later with out_valid.
//
// The datapath is branch-free, one select per decision, following the
// classic steps: unpack the fields and restore the hidden 1; order the
// operands by magnitude (the larger one also gives the result sign); shift
// the smaller significand right by the exponent difference, keeping guard,
// round and sticky bits; add or subtract the aligned significands; normalise
// by one right shift on a carry or by a left shift of the leading-zero count
// (fp_lzc); round and pack (fp_round).
//
// EXC = 1 gives the IEEE 754 behaviour for special operands: NaN in or
// inf - inf gives a quiet NaN, infinities propagate, and zeros are handled
// exactly (-0 + -0 = -0, x - x = +0). EXC = 0 leaves out all detection of
// zero, infinity and NaN operands: every input is taken as a normal number,
// which is smaller and is correct only when no such operand arrives. In
// both, subnormal operands (exponent field 0) are read as zero (EXC = 1) and
// subnormal results are flushed to zero; overflow gives infinity.
//
// Pipeline: the datapath has four phases (special cases/order/align, add,
// normalise, round/pack) and LATENCY registers. The first register goes at
// the output, the second between add and normalise, the third between align
// and add, the fourth between normalise and round; more trail the output,
// for register retiming in synthesis. LATENCY = 0 is purely combinational.
// Valid bits travel with the data and are reset; data registers are not.
//
// Design choices not fixed by the original description: the rounding mode
// (nearest even), the canonical NaN 0x7FC00000 (sign 0, top mantissa bit
// set), the placement of the pipeline registers and the valid/reset
// handshake.
module fp_addsub
  import fp_pkg::*;
#(
  parameter int unsigned EXP_W   = 8,
  parameter int unsigned MAN_W   = 23,
  parameter bit          SUB     = 1'b0,
  parameter bit          EXC     = 1'b1,
  parameter int unsigned LATENCY = 2,
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

  localparam int unsigned W    = MAN_W + 1;       // significand with hidden 1
  localparam int unsigned XE_W = EXP_W + 3;       // signed working exponent
  localparam int unsigned CW   = $clog2(W + 4);   // leading-zero count width

  // ---- unpack ---------------------------------------------------------
  logic             sa, sb;
  logic [EXP_W-1:0] ea, eb;
  logic [MAN_W-1:0] ma, mb;
  logic             a_zero, b_zero, a_inf, b_inf, a_nan, b_nan;

  always_comb begin
    sa = a[FW-1];
    ea = a[FW-2:MAN_W];
    ma = a[MAN_W-1:0];
    sb = b[FW-1] ^ SUB;                  // subtraction: flip the sign of b
    eb = b[FW-2:MAN_W];
    mb = b[MAN_W-1:0];
    a_zero = EXC && (ea == '0);
    b_zero = EXC && (eb == '0);
    a_inf  = EXC && (ea == '1) && (ma == '0);
    b_inf  = EXC && (eb == '1) && (mb == '0);
    a_nan  = EXC && (ea == '1) && (ma != '0);
    b_nan  = EXC && (eb == '1) && (mb != '0);
  end

  // ---- special cases (decided from the operands alone) -------------------
  localparam logic [FW-1:0]    QNAN  = {1'b0, {EXP_W{1'b1}}, 1'b1, {(MAN_W-1){1'b0}}};
  localparam logic [EXP_W-1:0] EONES = '1;
  localparam logic [MAN_W-1:0] MZERO = '0;

  // Stage contents at the three possible cuts inside the datapath.
  typedef struct packed {
    logic             spec;       // result is spec_word, not the arithmetic
    logic [FW-1:0]    spec_word;
    logic             s_l;        // sign of the larger operand = result sign
    logic [EXP_W-1:0] e_l;        // exponent of the larger operand
    logic             eff_sub;
    logic [W+2:0]     al_l, al_s; // significand, guard, round, sticky
  } align_t;

  typedef struct packed {
    logic             spec;
    logic [FW-1:0]    spec_word;
    logic             s_l;
    logic [EXP_W-1:0] e_l;
    logic [W+3:0]     sum;        // one carry bit above al_*
  } sum_t;

  typedef struct packed {
    logic                   spec;
    logic [FW-1:0]          spec_word;
    logic                   sign;
    logic signed [XE_W-1:0] exp;
    logic [W-1:0]           sig;
    logic                   rnd, sticky;
  } norm_t;

  // Pipeline registers: the first at the output, the second between add and
  // normalise, the third between align and add, the fourth between normalise
  // and round; any further ones trail the output.
  localparam bit          CUT_ADD  = (LATENCY >= 2);
  localparam bit          CUT_ALN  = (LATENCY >= 3);
  localparam bit          CUT_NRM  = (LATENCY >= 4);
  localparam int unsigned OUT_LAT  = LATENCY - int'(CUT_ADD) - int'(CUT_ALN) - int'(CUT_NRM);

  // ---- phase 1: special cases, order by magnitude, align ------------------
  align_t           p1, p1_q;
  logic             v1_q;
  logic             a_ge;
  logic             s_s;
  logic [EXP_W-1:0] e_s, diff;
  logic [W-1:0]     sig_l, sig_s;
  logic [2*W+1:0]   shifted;

  always_comb begin
    p1.spec = 1'b1;
    if (a_nan | b_nan | (a_inf & b_inf & (sa ^ sb)))
      p1.spec_word = QNAN;
    else if (a_inf)
      p1.spec_word = {sa, EONES, MZERO};
    else if (b_inf)
      p1.spec_word = {sb, EONES, MZERO};
    else if (a_zero & b_zero)
      p1.spec_word = {sa & sb, {(FW-1){1'b0}}};
    else if (a_zero)
      p1.spec_word = {sb, eb, mb};
    else if (b_zero)
      p1.spec_word = a;
    else begin
      p1.spec      = 1'b0;
      p1.spec_word = '0;
    end

    a_ge       = (ea > eb) | ((ea == eb) & (ma >= mb));
    p1.s_l     = a_ge ? sa : sb;
    s_s        = a_ge ? sb : sa;
    p1.e_l     = a_ge ? ea : eb;
    e_s        = a_ge ? eb : ea;
    sig_l      = {1'b1, a_ge ? ma : mb};
    sig_s      = {1'b1, a_ge ? mb : ma};
    diff       = p1.e_l - e_s;
    shifted    = {sig_s, {(W+2){1'b0}}} >> diff;
    p1.al_l    = {sig_l, 3'b000};
    p1.al_s    = {shifted[2*W+1:W], |shifted[W-1:0]};
    p1.eff_sub = p1.s_l ^ s_s;
  end

  fp_pipe #(.WIDTH($bits(align_t)), .LATENCY(int'(CUT_ALN))) u_cut_aln (
    .clk, .rst_n, .in_valid(in_valid), .in_data(p1),
    .out_valid(v1_q), .out_data(p1_q)
  );

  // ---- phase 2: add or subtract the aligned significands ------------------
  sum_t p2, p2_q;
  logic v2_q;

  always_comb begin
    p2.spec      = p1_q.spec;
    p2.spec_word = p1_q.spec_word;
    p2.s_l       = p1_q.s_l;
    p2.e_l       = p1_q.e_l;
    p2.sum       = p1_q.eff_sub ? ({1'b0, p1_q.al_l} - {1'b0, p1_q.al_s})
                                : ({1'b0, p1_q.al_l} + {1'b0, p1_q.al_s});
  end

  fp_pipe #(.WIDTH($bits(sum_t)), .LATENCY(int'(CUT_ADD))) u_cut_add (
    .clk, .rst_n, .in_valid(v1_q), .in_data(p2),
    .out_valid(v2_q), .out_data(p2_q)
  );

  // ---- phase 3: normalise -------------------------------------------------
  norm_t         p3, p3_q;
  logic          v3_q;
  logic [CW-1:0] lz;
  logic          sum_zero;
  logic [W+2:0]  norm;

  fp_lzc #(.WIDTH(W + 3)) u_lzc (
    .in   (p2_q.sum[W+2:0]),
    .count(lz),
    .zero (sum_zero)
  );

  always_comb begin
    p3.spec      = p2_q.spec;
    p3.spec_word = p2_q.spec_word;
    p3.sign      = p2_q.s_l;
    norm         = p2_q.sum[W+2:0] << lz;
    if (p2_q.sum[W+3]) begin                 // carry: shift right by one
      p3.sig    = p2_q.sum[W+3:4];
      p3.rnd    = p2_q.sum[3];
      p3.sticky = |p2_q.sum[2:0];
      p3.exp    = XE_W'(p2_q.e_l) + XE_W'(1);
    end else begin                           // shift left by leading zeros
      p3.sig    = norm[W+2:3];
      p3.rnd    = norm[2];
      p3.sticky = |norm[1:0];
      p3.exp    = XE_W'(p2_q.e_l) - XE_W'(lz);
      if (sum_zero && !p2_q.spec) begin      // exact cancellation gives +0
        p3.spec      = 1'b1;
        p3.spec_word = '0;
      end
    end
  end

  // A normalised non-special result always has its hidden bit set.
  a_normalised: assert property (@(posedge clk) disable iff (!rst_n)
    (v2_q && !p3.spec) |-> p3.sig[W-1]);

  fp_pipe #(.WIDTH($bits(norm_t)), .LATENCY(int'(CUT_NRM))) u_cut_nrm (
    .clk, .rst_n, .in_valid(v2_q), .in_data(p3),
    .out_valid(v3_q), .out_data(p3_q)
  );

  // ---- phase 4: round, pack, select --------------------------------------
  logic [FW-1:0] rounded, res_c;

  fp_round #(.EXP_W(EXP_W), .MAN_W(MAN_W)) u_round (
    .sign  (p3_q.sign),
    .exp   (p3_q.exp),
    .sig   (p3_q.sig),
    .rnd   (p3_q.rnd),
    .sticky(p3_q.sticky),
    .result(rounded)
  );

  assign res_c = p3_q.spec ? p3_q.spec_word : rounded;

  fp_pipe #(.WIDTH(FW), .LATENCY(OUT_LAT)) u_pipe (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (v3_q),
    .in_data  (res_c),
    .out_valid(out_valid),
    .out_data (result)
  );

endmodule
