// tb_fp_mul: self-checking test of the single-precision multiplier (fp_mul,
// full IEEE 754 special-case handling, 1-stage pipeline). Exact cancellation
// cannot occur in a product, so that case is not required.
// Random operands, including zeros, subnormals, infinities, NaNs, operands
// of equal or near magnitude and operands in the extreme binades, are
// issued at up to one pair per cycle; results are compared bit for bit with
// a double-precision reference rounded to single precision, and the
// latency of every result is checked. A second instance with the
// special-case logic removed (EXC = 0) is checked on normal operands only.
module tb_fp_mul;
  import fp_ref_pkg::*;

  localparam int N = 20000;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        iv0, ov0, iv1, ov1, d0, d1;
  logic [31:0] a0, b0, r0, a1, b1, r1;
  int          c0, f0, c1, f1;
  int          k0[8], k1[8];

  fp_check_harness #(.OP(OP_MUL), .EXC(1'b1), .LATENCY(1), .N(N)) u_h0 (
    .clk, .rst_n, .in_valid(iv0), .a(a0), .b(b0), .out_valid(ov0), .result(r0),
    .done(d0), .checks(c0), .failures(f0),
    .n_nan(k0[0]), .n_special(k0[1]), .n_ovf(k0[2]), .n_flush(k0[3]),
    .n_cancel(k0[4]), .n_inexact(k0[5]), .n_bubble(k0[6]), .n_b2b(k0[7]));

  fp_mul #(.EXC(1'b1), .LATENCY(1)) dut0 (
    .clk, .rst_n, .in_valid(iv0), .a(a0), .b(b0), .out_valid(ov0), .result(r0));

  fp_check_harness #(.OP(OP_MUL), .EXC(1'b0), .LATENCY(1), .N(N)) u_h1 (
    .clk, .rst_n, .in_valid(iv1), .a(a1), .b(b1), .out_valid(ov1), .result(r1),
    .done(d1), .checks(c1), .failures(f1),
    .n_nan(k1[0]), .n_special(k1[1]), .n_ovf(k1[2]), .n_flush(k1[3]),
    .n_cancel(k1[4]), .n_inexact(k1[5]), .n_bubble(k1[6]), .n_b2b(k1[7]));

  fp_mul #(.EXC(1'b0), .LATENCY(1)) dut1 (
    .clk, .rst_n, .in_valid(iv1), .a(a1), .b(b1), .out_valid(ov1), .result(r1));

  int checks, failures;

  initial begin
    checks = 0;  failures = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (d0 && d1);
    checks   = c0 + c1;
    failures = f0 + f1;
    $display("EXC=1: nan=%0d special=%0d ovf=%0d flush=%0d cancel=%0d inexact=%0d bubble=%0d b2b=%0d",
             k0[0], k0[1], k0[2], k0[3], k0[4], k0[5], k0[6], k0[7]);
    $display("EXC=0: ovf=%0d flush=%0d cancel=%0d inexact=%0d",
             k1[2], k1[3], k1[4], k1[5]);
    // every case the multiplier handles must have been exercised
    for (int i = 0; i < 8; i++) begin
      checks++;
      if (k0[i] == 0 && i != 4) begin failures++; $display("FAIL: case %0d never exercised", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

endmodule
