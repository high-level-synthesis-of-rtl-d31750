// fp_ref_pkg: reference model of the cores' arithmetic, for the testbenches.
//
// The reference computes with the simulator's double-precision `real`: an
// operand of a format with E exponent and M mantissa bits (E <= 8,
// M <= 23) converts exactly to a double, subnormal operands read as zero;
// the double sum, difference, product or quotient is then rounded once more
// to the target format with round-to-nearest-even. For +, -, * and / this
// second rounding gives the correctly rounded result, because a double
// carries more than twice the target's significand bits plus two. Results
// follow the cores' conventions: exponent overflow after rounding gives
// infinity, a result below the smallest normal number a signed zero, and
// every NaN the canonical quiet NaN (sign 0, top mantissa bit set).
// Words are passed right-aligned in 64-bit vectors.
package fp_ref_pkg;

  typedef enum int {OP_ADD, OP_SUB, OP_MUL, OP_DIV} op_e;

  function automatic int ebias(input int e);
    return (1 << (e - 1)) - 1;
  endfunction

  function automatic logic [63:0] qnan(input int e, input int m);
    return (64'((1 << e) - 1) << m) | (64'd1 << (m - 1));
  endfunction

  // Format word -> double (exact).
  function automatic real to_real(input logic [63:0] w, input int e, input int m);
    logic        s;
    int          ex;
    logic [63:0] mm, db;
    s  = w[e + m];
    ex = int'((w >> m) & ((64'd1 << e) - 1));
    mm = w & ((64'd1 << m) - 1);
    if (ex == 0)                db = {s, 63'd0};
    else if (ex == (1 << e) - 1) db = {s, 11'h7ff, (mm != 0) ? 52'h8_0000_0000_0000 : 52'd0};
    else                        db = {s, 11'(ex - ebias(e) + 1023), 52'(mm << (52 - m))};
    return $bitstoreal(db);
  endfunction

  // Double -> format word, round to nearest even, flush underflow to zero.
  function automatic logic [63:0] from_real(input real r, input int e, input int m);
    logic [63:0] db, sig, kept, rest, half;
    logic        s;
    int          de, be;
    db = $realtobits(r);
    s  = db[63];
    de = int'(db[62:52]);
    if (de == 2047) begin
      if (db[51:0] != 0) return qnan(e, m);
      return (64'(s) << (e + m)) | (64'((1 << e) - 1) << m);
    end
    if (de == 0) return 64'(s) << (e + m);
    sig  = {11'd0, 1'b1, db[51:0]};
    kept = sig >> (52 - m);
    rest = sig & ((64'd1 << (52 - m)) - 1);
    half = 64'd1 << (51 - m);
    be   = de - 1023 + ebias(e);
    if (rest > half || (rest == half && kept[0])) kept = kept + 1;
    if (kept == (64'd1 << (m + 1))) begin
      kept = kept >> 1;
      be   = be + 1;
    end
    if (be >= (1 << e) - 1) return (64'(s) << (e + m)) | (64'((1 << e) - 1) << m);
    if (be <= 0)            return 64'(s) << (e + m);
    return (64'(s) << (e + m)) | (64'(be) << m) | (kept & ((64'd1 << m) - 1));
  endfunction

  function automatic real apply(input op_e op, input real x, input real y);
    case (op)
      OP_ADD:  return x + y;
      OP_SUB:  return x - y;
      OP_MUL:  return x * y;
      default: return x / y;
    endcase
  endfunction

  function automatic logic [63:0] expected(input op_e op, input logic [63:0] a,
                                           input logic [63:0] b, input int e, input int m);
    return from_real(apply(op, to_real(a, e, m), to_real(b, e, m)), e, m);
  endfunction

  function automatic logic [63:0] pack(input logic s, input int ex, input logic [63:0] mm,
                                       input int e, input int m);
    return (64'(s) << (e + m)) | (64'(ex) << m) | (mm & ((64'd1 << m) - 1));
  endfunction

  function automatic logic [63:0] rand_man(input int m);
    return {$urandom, $urandom} & ((64'd1 << m) - 1);
  endfunction

  // Random operand. With exc = 0 only normal numbers are produced. `other`
  // is the partner operand already drawn (or 0): some operands are placed
  // near it or equal to it in magnitude, to force cancellation.
  function automatic logic [63:0] rand_operand(input int e, input int m, input bit exc,
                                               input logic [63:0] other);
    int          r, emax, oe, ex;
    logic        s;
    r    = int'($urandom_range(0, 99));
    s    = 1'($urandom);
    emax = (1 << e) - 1;
    oe   = int'((other >> m) & ((64'd1 << e) - 1));
    if (oe == 0 || oe == emax) oe = emax / 2;
    if (exc && r < 3)  return pack(s, 0, 0, e, m);                    // zero
    if (exc && r < 5)  return pack(s, 0, rand_man(m), e, m);          // subnormal
    if (exc && r < 8)  return pack(s, emax, 0, e, m);                 // infinity
    if (exc && r < 10) return pack(s, emax, rand_man(m) | 1, e, m);   // NaN
    if (r < 18) return pack(s, oe, other, e, m);                      // same magnitude
    if (r < 35) begin                                                 // near the partner
      ex = oe + int'($urandom_range(0, 4)) - 2;
      if (ex < 1) ex = 1;
      if (ex > emax - 1) ex = emax - 1;
      return pack(s, ex, rand_man(m), e, m);
    end
    if (r < 42) return pack(s, emax - 1, rand_man(m), e, m);          // largest binade
    if (r < 48) return pack(s, 1, rand_man(m), e, m);                 // smallest binade
    if (r < 60) begin                                                 // large or tiny
      if ($urandom_range(0, 1) == 0) ex = emax - 1 - int'($urandom_range(0, emax / 4));
      else                           ex = 1 + int'($urandom_range(0, emax / 4));
      return pack(s, ex, rand_man(m), e, m);
    end
    return pack(s, int'($urandom_range(1, emax - 1)), rand_man(m), e, m);
  endfunction

endpackage
