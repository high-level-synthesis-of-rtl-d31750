// fp_pkg: formats shared by the floating-point cores.
//
// A floating-point word is {sign, biased exponent, mantissa}, as in IEEE 754.
// Single precision (8-bit exponent, 23-bit mantissa) is the main format; the
// reduced-precision format (4-bit exponent, 10-bit mantissa) is the
// non-standard variant the adder is also built in. Every core is
// parameterised by EXP_W/MAN_W; the constants below are those two formats.
// The struct types give the single- and reduced-precision words named fields
// at the top level; bias() gives the exponent bias of a format.
package fp_pkg;

  localparam int unsigned SP_EXP_W = 8;   // single precision exponent bits
  localparam int unsigned SP_MAN_W = 23;  // single precision mantissa bits
  localparam int unsigned RP_EXP_W = 4;   // reduced precision exponent bits
  localparam int unsigned RP_MAN_W = 10;  // reduced precision mantissa bits

  typedef struct packed {
    logic                sign;
    logic [SP_EXP_W-1:0] exp;
    logic [SP_MAN_W-1:0] man;
  } fp32_t;

  typedef struct packed {
    logic                sign;
    logic [RP_EXP_W-1:0] exp;
    logic [RP_MAN_W-1:0] man;
  } fp15_t;

  // Exponent bias 2^(E-1)-1: 127 for single precision, 7 for E=4.
  function automatic int unsigned bias(input int unsigned exp_w);
    return (1 << (exp_w - 1)) - 1;
  endfunction

endpackage
