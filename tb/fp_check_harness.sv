// fp_check_harness: drives one floating-point core and checks its results.
//
// Every falling clock edge after reset it either leaves a bubble (in_valid
// low, one cycle in eight) or issues a new random operand pair, so operands
// mostly arrive back to back at the initiation interval of 1. For each pair
// it computes the expected result with fp_ref_pkg and queues it with the
// issue cycle. When out_valid is seen, the oldest queued entry must match
// the result bit for bit and must have been issued exactly LATENCY cycles
// earlier. `done` rises once N pairs have been issued and all have come back.
// The counters say how often each case the cores handle has been exercised:
// NaN results, special operands, overflow to infinity, underflow flushed to
// zero, exact cancellation to zero, rounded (inexact) results, bubbles and
// back-to-back issues.
module fp_check_harness
  import fp_ref_pkg::*;
#(
  parameter op_e OP      = OP_ADD,
  parameter int  EXP_W   = 8,
  parameter int  MAN_W   = 23,
  parameter bit  EXC     = 1'b1,
  parameter int  LATENCY = 2,
  parameter int  N       = 1000,
  localparam int FW      = 1 + EXP_W + MAN_W
) (
  input  logic          clk,
  input  logic          rst_n,
  output logic          in_valid,
  output logic [FW-1:0] a,
  output logic [FW-1:0] b,
  input  logic          out_valid,
  input  logic [FW-1:0] result,
  output logic          done,
  output int            checks,
  output int            failures,
  output int            n_nan,
  output int            n_special,
  output int            n_ovf,
  output int            n_flush,
  output int            n_cancel,
  output int            n_inexact,
  output int            n_bubble,
  output int            n_b2b
);

  typedef struct {
    logic [63:0] a, b, exp;
    longint      cyc;
  } entry_t;

  entry_t      q[$];
  longint      cyc;
  int          issued;
  logic        last_valid;

  initial begin
    in_valid = 1'b0;  a = '0;  b = '0;  done = 1'b0;
    checks = 0;  failures = 0;  n_nan = 0;  n_special = 0;  n_ovf = 0;
    n_flush = 0;  n_cancel = 0;  n_inexact = 0;  n_bubble = 0;  n_b2b = 0;
    cyc = 0;  issued = 0;  last_valid = 1'b0;
  end

  always @(posedge clk) cyc <= cyc + 1;

  function automatic bit is_special(input logic [63:0] w);
    int ex = int'((w >> MAN_W) & ((64'd1 << EXP_W) - 1));
    return EXC && (ex == 0 || ex == (1 << EXP_W) - 1);
  endfunction

  always @(negedge clk) begin
    entry_t      e;
    logic [63:0] ra, rb, rx, mag;
    real         exact;
    int          rex;
    if (rst_n) begin
      // ---- check -------------------------------------------------------
      if (out_valid) begin
        checks++;
        if (q.size() == 0) begin
          failures++;
          $display("FAIL: unexpected result %h", result);
        end else begin
          e = q.pop_front();
          if (64'(result) != e.exp || cyc - e.cyc != longint'(LATENCY)) begin
            failures++;
            if (failures <= 10)
              $display("FAIL op=%0d a=%h b=%h got=%h exp=%h latency=%0d (want %0d)",
                       OP, e.a[FW-1:0], e.b[FW-1:0], result, e.exp[FW-1:0],
                       cyc - e.cyc, LATENCY);
          end
        end
      end
      // ---- issue -------------------------------------------------------
      if (issued < N && $urandom_range(0, 7) != 0) begin
        ra = rand_operand(EXP_W, MAN_W, EXC, 64'd0);
        rb = rand_operand(EXP_W, MAN_W, EXC, ra);
        if ($urandom_range(0, 1) == 0) begin rx = ra; ra = rb; rb = rx; end
        e.a = ra;  e.b = rb;  e.cyc = cyc;
        e.exp = expected(OP, ra, rb, EXP_W, MAN_W);
        q.push_back(e);
        a = FW'(ra);  b = FW'(rb);  in_valid = 1'b1;
        issued++;
        if (last_valid) n_b2b++;
        // classify what this pair exercises
        exact = apply(OP, to_real(ra, EXP_W, MAN_W), to_real(rb, EXP_W, MAN_W));
        mag   = e.exp & ((64'd1 << (FW - 1)) - 1);
        rex   = int'(mag >> MAN_W);
        if (is_special(ra) || is_special(rb)) n_special++;
        if (e.exp == qnan(EXP_W, MAN_W)) n_nan++;
        else if (!is_special(ra) && !is_special(rb)) begin
          if (rex == (1 << EXP_W) - 1) n_ovf++;
          else if (mag == 0 && exact != 0.0) n_flush++;
          else if (exact == 0.0) n_cancel++;
          else if (to_real(e.exp, EXP_W, MAN_W) != exact) n_inexact++;
        end
      end else begin
        in_valid = 1'b0;
        if (issued < N) n_bubble++;
      end
      last_valid = in_valid;
      if (issued == N && q.size() == 0 && !out_valid) done = 1'b1;
    end
  end

endmodule
