// tb_fp_random_million: one million random operand pairs through each unit
// of fp_cores_top at its default parameters (five million results in all),
// the scale of random verification the cores were meant to pass.
//
// All five units run at once, each fed by its own fp_check_harness with
// random operand pairs at up to one pair per cycle; every result is checked
// bit for bit against the double-precision reference and for its latency
// (adder and subtractor 2 cycles, multiplier 1, divider 28, reduced-precision
// adder 1). At the end each unit must have exercised every case it handles:
// NaN results, special operands, overflow to infinity, underflow flushed to
// zero, exact cancellation (adders only), rounded results, input bubbles
// and back-to-back issue. A case that never happened counts as a failure.
module tb_fp_random_million;
  import fp_ref_pkg::*;
  import fp_pkg::*;

  localparam int N = 1000000;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic  add_iv, add_ov, sub_iv, sub_ov, mul_iv, mul_ov, div_iv, div_ov, rpa_iv, rpa_ov;
  fp32_t add_a, add_b, add_r, sub_a, sub_b, sub_r, mul_a, mul_b, mul_r, div_a, div_b, div_r;
  fp15_t rpa_a, rpa_b, rpa_r;

  fp_cores_top dut (
    .clk, .rst_n,
    .add_in_valid(add_iv), .add_a, .add_b, .add_out_valid(add_ov), .add_result(add_r),
    .sub_in_valid(sub_iv), .sub_a, .sub_b, .sub_out_valid(sub_ov), .sub_result(sub_r),
    .mul_in_valid(mul_iv), .mul_a, .mul_b, .mul_out_valid(mul_ov), .mul_result(mul_r),
    .div_in_valid(div_iv), .div_a, .div_b, .div_out_valid(div_ov), .div_result(div_r),
    .rpa_in_valid(rpa_iv), .rpa_a, .rpa_b, .rpa_out_valid(rpa_ov), .rpa_result(rpa_r)
  );

  logic done [5];
  int   c [5], f [5];
  int   k [5][8];

  fp_check_harness #(.OP(OP_ADD), .LATENCY(2), .N(N)) h_add (
    .clk, .rst_n, .in_valid(add_iv), .a(add_a), .b(add_b), .out_valid(add_ov), .result(add_r),
    .done(done[0]), .checks(c[0]), .failures(f[0]),
    .n_nan(k[0][0]), .n_special(k[0][1]), .n_ovf(k[0][2]), .n_flush(k[0][3]),
    .n_cancel(k[0][4]), .n_inexact(k[0][5]), .n_bubble(k[0][6]), .n_b2b(k[0][7]));

  fp_check_harness #(.OP(OP_SUB), .LATENCY(2), .N(N)) h_sub (
    .clk, .rst_n, .in_valid(sub_iv), .a(sub_a), .b(sub_b), .out_valid(sub_ov), .result(sub_r),
    .done(done[1]), .checks(c[1]), .failures(f[1]),
    .n_nan(k[1][0]), .n_special(k[1][1]), .n_ovf(k[1][2]), .n_flush(k[1][3]),
    .n_cancel(k[1][4]), .n_inexact(k[1][5]), .n_bubble(k[1][6]), .n_b2b(k[1][7]));

  fp_check_harness #(.OP(OP_MUL), .LATENCY(1), .N(N)) h_mul (
    .clk, .rst_n, .in_valid(mul_iv), .a(mul_a), .b(mul_b), .out_valid(mul_ov), .result(mul_r),
    .done(done[2]), .checks(c[2]), .failures(f[2]),
    .n_nan(k[2][0]), .n_special(k[2][1]), .n_ovf(k[2][2]), .n_flush(k[2][3]),
    .n_cancel(k[2][4]), .n_inexact(k[2][5]), .n_bubble(k[2][6]), .n_b2b(k[2][7]));

  fp_check_harness #(.OP(OP_DIV), .LATENCY(28), .N(N)) h_div (
    .clk, .rst_n, .in_valid(div_iv), .a(div_a), .b(div_b), .out_valid(div_ov), .result(div_r),
    .done(done[3]), .checks(c[3]), .failures(f[3]),
    .n_nan(k[3][0]), .n_special(k[3][1]), .n_ovf(k[3][2]), .n_flush(k[3][3]),
    .n_cancel(k[3][4]), .n_inexact(k[3][5]), .n_bubble(k[3][6]), .n_b2b(k[3][7]));

  fp_check_harness #(.OP(OP_ADD), .EXP_W(4), .MAN_W(10), .LATENCY(1), .N(N)) h_rpa (
    .clk, .rst_n, .in_valid(rpa_iv), .a(rpa_a), .b(rpa_b), .out_valid(rpa_ov), .result(rpa_r),
    .done(done[4]), .checks(c[4]), .failures(f[4]),
    .n_nan(k[4][0]), .n_special(k[4][1]), .n_ovf(k[4][2]), .n_flush(k[4][3]),
    .n_cancel(k[4][4]), .n_inexact(k[4][5]), .n_bubble(k[4][6]), .n_b2b(k[4][7]));

  int checks, failures;
  string unit_name [5] = '{"add", "sub", "mul", "div", "rpa"};
  string case_name [8] = '{"nan", "special", "overflow", "flush", "cancel", "inexact", "bubble", "back-to-back"};

  initial begin
    checks = 0;  failures = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (done[0] && done[1] && done[2] && done[3] && done[4]);
    for (int u = 0; u < 5; u++) begin
      checks   += c[u];
      failures += f[u];
      $display("%s: results=%0d nan=%0d special=%0d overflow=%0d flush=%0d cancel=%0d inexact=%0d bubble=%0d b2b=%0d",
               unit_name[u], c[u], k[u][0], k[u][1], k[u][2], k[u][3], k[u][4], k[u][5], k[u][6], k[u][7]);
      for (int i = 0; i < 8; i++) begin
        if (i == 4 && (u == 2 || u == 3)) continue;   // no cancellation in * and /
        checks++;
        if (k[u][i] == 0) begin
          failures++;
          $display("FAIL: %s never exercised %s", unit_name[u], case_name[i]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000000) @(posedge clk);
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

endmodule
