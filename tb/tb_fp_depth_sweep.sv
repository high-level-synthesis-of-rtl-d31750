// tb_fp_depth_sweep: the cores at the pipeline depths of the evaluated
// configurations.
//
// The cores were evaluated over a range of pipeline depths, each depth a
// separate build. This testbench builds the adder, subtractor, multiplier,
// divider and reduced-precision adder at several such depths, with and
// without special-case handling, and runs random operands through each at
// up to one pair per cycle, checking every result bit for bit and its
// latency (one divider depth, 15, is an extra intermediate point). Adder,
// subtractor and multiplier depths are set with LATENCY; the
// divider depth is 2 + ceil(26 / STEPS_PER_STAGE), so 28 (one quotient bit
// per stage), 15 (two) and 8 (five) stages.
module tb_fp_depth_sweep;
  import fp_ref_pkg::*;

  localparam int N  = 3000;
  localparam int NC = 18;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic done [NC];
  int   c [NC], f [NC];
  int   k [NC][8];

  // add IEEE, 2 stages
  logic iv0, ov0;
  logic [31:0] a0, b0, r0;
  fp_check_harness #(.OP(OP_ADD), .EXP_W(8), .MAN_W(23), .EXC(1'b1), .LATENCY(2), .N(N)) h0 (
    .clk, .rst_n, .in_valid(iv0), .a(a0), .b(b0), .out_valid(ov0), .result(r0),
    .done(done[0]), .checks(c[0]), .failures(f[0]),
    .n_nan(k[0][0]), .n_special(k[0][1]), .n_ovf(k[0][2]), .n_flush(k[0][3]),
    .n_cancel(k[0][4]), .n_inexact(k[0][5]), .n_bubble(k[0][6]), .n_b2b(k[0][7]));
  fp_addsub #(.EXP_W(8), .MAN_W(23), .EXC(1'b1), .SUB(1'b0), .LATENCY(2)) d0 (
    .clk, .rst_n, .in_valid(iv0), .a(a0), .b(b0), .out_valid(ov0), .result(r0));

  // add IEEE, 26 stages
  logic iv1, ov1;
  logic [31:0] a1, b1, r1;
  fp_check_harness #(.OP(OP_ADD), .EXP_W(8), .MAN_W(23), .EXC(1'b1), .LATENCY(26), .N(N)) h1 (
    .clk, .rst_n, .in_valid(iv1), .a(a1), .b(b1), .out_valid(ov1), .result(r1),
    .done(done[1]), .checks(c[1]), .failures(f[1]),
    .n_nan(k[1][0]), .n_special(k[1][1]), .n_ovf(k[1][2]), .n_flush(k[1][3]),
    .n_cancel(k[1][4]), .n_inexact(k[1][5]), .n_bubble(k[1][6]), .n_b2b(k[1][7]));
  fp_addsub #(.EXP_W(8), .MAN_W(23), .EXC(1'b1), .SUB(1'b0), .LATENCY(26)) d1 (
    .clk, .rst_n, .in_valid(iv1), .a(a1), .b(b1), .out_valid(ov1), .result(r1));

  // add no-exc, 4 stages
  logic iv2, ov2;
  logic [31:0] a2, b2, r2;
  fp_check_harness #(.OP(OP_ADD), .EXP_W(8), .MAN_W(23), .EXC(1'b0), .LATENCY(4), .N(N)) h2 (
    .clk, .rst_n, .in_valid(iv2), .a(a2), .b(b2), .out_valid(ov2), .result(r2),
    .done(done[2]), .checks(c[2]), .failures(f[2]),
    .n_nan(k[2][0]), .n_special(k[2][1]), .n_ovf(k[2][2]), .n_flush(k[2][3]),
    .n_cancel(k[2][4]), .n_inexact(k[2][5]), .n_bubble(k[2][6]), .n_b2b(k[2][7]));
  fp_addsub #(.EXP_W(8), .MAN_W(23), .EXC(1'b0), .SUB(1'b0), .LATENCY(4)) d2 (
    .clk, .rst_n, .in_valid(iv2), .a(a2), .b(b2), .out_valid(ov2), .result(r2));

  // add no-exc, 31 stages
  logic iv3, ov3;
  logic [31:0] a3, b3, r3;
  fp_check_harness #(.OP(OP_ADD), .EXP_W(8), .MAN_W(23), .EXC(1'b0), .LATENCY(31), .N(N)) h3 (
    .clk, .rst_n, .in_valid(iv3), .a(a3), .b(b3), .out_valid(ov3), .result(r3),
    .done(done[3]), .checks(c[3]), .failures(f[3]),
    .n_nan(k[3][0]), .n_special(k[3][1]), .n_ovf(k[3][2]), .n_flush(k[3][3]),
    .n_cancel(k[3][4]), .n_inexact(k[3][5]), .n_bubble(k[3][6]), .n_b2b(k[3][7]));
  fp_addsub #(.EXP_W(8), .MAN_W(23), .EXC(1'b0), .SUB(1'b0), .LATENCY(31)) d3 (
    .clk, .rst_n, .in_valid(iv3), .a(a3), .b(b3), .out_valid(ov3), .result(r3));

  // sub IEEE, 2 stages
  logic iv4, ov4;
  logic [31:0] a4, b4, r4;
  fp_check_harness #(.OP(OP_SUB), .EXP_W(8), .MAN_W(23), .EXC(1'b1), .LATENCY(2), .N(N)) h4 (
    .clk, .rst_n, .in_valid(iv4), .a(a4), .b(b4), .out_valid(ov4), .result(r4),
    .done(done[4]), .checks(c[4]), .failures(f[4]),
    .n_nan(k[4][0]), .n_special(k[4][1]), .n_ovf(k[4][2]), .n_flush(k[4][3]),
    .n_cancel(k[4][4]), .n_inexact(k[4][5]), .n_bubble(k[4][6]), .n_b2b(k[4][7]));
  fp_addsub #(.EXP_W(8), .MAN_W(23), .EXC(1'b1), .SUB(1'b1), .LATENCY(2)) d4 (
    .clk, .rst_n, .in_valid(iv4), .a(a4), .b(b4), .out_valid(ov4), .result(r4));

  // sub IEEE, 31 stages
  logic iv5, ov5;
  logic [31:0] a5, b5, r5;
  fp_check_harness #(.OP(OP_SUB), .EXP_W(8), .MAN_W(23), .EXC(1'b1), .LATENCY(31), .N(N)) h5 (
    .clk, .rst_n, .in_valid(iv5), .a(a5), .b(b5), .out_valid(ov5), .result(r5),
    .done(done[5]), .checks(c[5]), .failures(f[5]),
    .n_nan(k[5][0]), .n_special(k[5][1]), .n_ovf(k[5][2]), .n_flush(k[5][3]),
    .n_cancel(k[5][4]), .n_inexact(k[5][5]), .n_bubble(k[5][6]), .n_b2b(k[5][7]));
  fp_addsub #(.EXP_W(8), .MAN_W(23), .EXC(1'b1), .SUB(1'b1), .LATENCY(31)) d5 (
    .clk, .rst_n, .in_valid(iv5), .a(a5), .b(b5), .out_valid(ov5), .result(r5));

  // sub no-exc, 5 stages
  logic iv6, ov6;
  logic [31:0] a6, b6, r6;
  fp_check_harness #(.OP(OP_SUB), .EXP_W(8), .MAN_W(23), .EXC(1'b0), .LATENCY(5), .N(N)) h6 (
    .clk, .rst_n, .in_valid(iv6), .a(a6), .b(b6), .out_valid(ov6), .result(r6),
    .done(done[6]), .checks(c[6]), .failures(f[6]),
    .n_nan(k[6][0]), .n_special(k[6][1]), .n_ovf(k[6][2]), .n_flush(k[6][3]),
    .n_cancel(k[6][4]), .n_inexact(k[6][5]), .n_bubble(k[6][6]), .n_b2b(k[6][7]));
  fp_addsub #(.EXP_W(8), .MAN_W(23), .EXC(1'b0), .SUB(1'b1), .LATENCY(5)) d6 (
    .clk, .rst_n, .in_valid(iv6), .a(a6), .b(b6), .out_valid(ov6), .result(r6));

  // sub no-exc, 29 stages
  logic iv7, ov7;
  logic [31:0] a7, b7, r7;
  fp_check_harness #(.OP(OP_SUB), .EXP_W(8), .MAN_W(23), .EXC(1'b0), .LATENCY(29), .N(N)) h7 (
    .clk, .rst_n, .in_valid(iv7), .a(a7), .b(b7), .out_valid(ov7), .result(r7),
    .done(done[7]), .checks(c[7]), .failures(f[7]),
    .n_nan(k[7][0]), .n_special(k[7][1]), .n_ovf(k[7][2]), .n_flush(k[7][3]),
    .n_cancel(k[7][4]), .n_inexact(k[7][5]), .n_bubble(k[7][6]), .n_b2b(k[7][7]));
  fp_addsub #(.EXP_W(8), .MAN_W(23), .EXC(1'b0), .SUB(1'b1), .LATENCY(29)) d7 (
    .clk, .rst_n, .in_valid(iv7), .a(a7), .b(b7), .out_valid(ov7), .result(r7));

  // mul IEEE, 1 stage
  logic iv8, ov8;
  logic [31:0] a8, b8, r8;
  fp_check_harness #(.OP(OP_MUL), .EXP_W(8), .MAN_W(23), .EXC(1'b1), .LATENCY(1), .N(N)) h8 (
    .clk, .rst_n, .in_valid(iv8), .a(a8), .b(b8), .out_valid(ov8), .result(r8),
    .done(done[8]), .checks(c[8]), .failures(f[8]),
    .n_nan(k[8][0]), .n_special(k[8][1]), .n_ovf(k[8][2]), .n_flush(k[8][3]),
    .n_cancel(k[8][4]), .n_inexact(k[8][5]), .n_bubble(k[8][6]), .n_b2b(k[8][7]));
  fp_mul #(.EXP_W(8), .MAN_W(23), .EXC(1'b1), .LATENCY(1)) d8 (
    .clk, .rst_n, .in_valid(iv8), .a(a8), .b(b8), .out_valid(ov8), .result(r8));

  // mul IEEE, 6 stages
  logic iv9, ov9;
  logic [31:0] a9, b9, r9;
  fp_check_harness #(.OP(OP_MUL), .EXP_W(8), .MAN_W(23), .EXC(1'b1), .LATENCY(6), .N(N)) h9 (
    .clk, .rst_n, .in_valid(iv9), .a(a9), .b(b9), .out_valid(ov9), .result(r9),
    .done(done[9]), .checks(c[9]), .failures(f[9]),
    .n_nan(k[9][0]), .n_special(k[9][1]), .n_ovf(k[9][2]), .n_flush(k[9][3]),
    .n_cancel(k[9][4]), .n_inexact(k[9][5]), .n_bubble(k[9][6]), .n_b2b(k[9][7]));
  fp_mul #(.EXP_W(8), .MAN_W(23), .EXC(1'b1), .LATENCY(6)) d9 (
    .clk, .rst_n, .in_valid(iv9), .a(a9), .b(b9), .out_valid(ov9), .result(r9));

  // mul no-exc, 1 stage
  logic iv10, ov10;
  logic [31:0] a10, b10, r10;
  fp_check_harness #(.OP(OP_MUL), .EXP_W(8), .MAN_W(23), .EXC(1'b0), .LATENCY(1), .N(N)) h10 (
    .clk, .rst_n, .in_valid(iv10), .a(a10), .b(b10), .out_valid(ov10), .result(r10),
    .done(done[10]), .checks(c[10]), .failures(f[10]),
    .n_nan(k[10][0]), .n_special(k[10][1]), .n_ovf(k[10][2]), .n_flush(k[10][3]),
    .n_cancel(k[10][4]), .n_inexact(k[10][5]), .n_bubble(k[10][6]), .n_b2b(k[10][7]));
  fp_mul #(.EXP_W(8), .MAN_W(23), .EXC(1'b0), .LATENCY(1)) d10 (
    .clk, .rst_n, .in_valid(iv10), .a(a10), .b(b10), .out_valid(ov10), .result(r10));

  // mul no-exc, 8 stages
  logic iv11, ov11;
  logic [31:0] a11, b11, r11;
  fp_check_harness #(.OP(OP_MUL), .EXP_W(8), .MAN_W(23), .EXC(1'b0), .LATENCY(8), .N(N)) h11 (
    .clk, .rst_n, .in_valid(iv11), .a(a11), .b(b11), .out_valid(ov11), .result(r11),
    .done(done[11]), .checks(c[11]), .failures(f[11]),
    .n_nan(k[11][0]), .n_special(k[11][1]), .n_ovf(k[11][2]), .n_flush(k[11][3]),
    .n_cancel(k[11][4]), .n_inexact(k[11][5]), .n_bubble(k[11][6]), .n_b2b(k[11][7]));
  fp_mul #(.EXP_W(8), .MAN_W(23), .EXC(1'b0), .LATENCY(8)) d11 (
    .clk, .rst_n, .in_valid(iv11), .a(a11), .b(b11), .out_valid(ov11), .result(r11));

  // div IEEE, 28 stages
  logic iv12, ov12;
  logic [31:0] a12, b12, r12;
  fp_check_harness #(.OP(OP_DIV), .EXP_W(8), .MAN_W(23), .EXC(1'b1), .LATENCY(28), .N(N)) h12 (
    .clk, .rst_n, .in_valid(iv12), .a(a12), .b(b12), .out_valid(ov12), .result(r12),
    .done(done[12]), .checks(c[12]), .failures(f[12]),
    .n_nan(k[12][0]), .n_special(k[12][1]), .n_ovf(k[12][2]), .n_flush(k[12][3]),
    .n_cancel(k[12][4]), .n_inexact(k[12][5]), .n_bubble(k[12][6]), .n_b2b(k[12][7]));
  fp_div #(.EXP_W(8), .MAN_W(23), .EXC(1'b1), .STEPS_PER_STAGE(1)) d12 (
    .clk, .rst_n, .in_valid(iv12), .a(a12), .b(b12), .out_valid(ov12), .result(r12));

  // div IEEE, 8 stages
  logic iv13, ov13;
  logic [31:0] a13, b13, r13;
  fp_check_harness #(.OP(OP_DIV), .EXP_W(8), .MAN_W(23), .EXC(1'b1), .LATENCY(8), .N(N)) h13 (
    .clk, .rst_n, .in_valid(iv13), .a(a13), .b(b13), .out_valid(ov13), .result(r13),
    .done(done[13]), .checks(c[13]), .failures(f[13]),
    .n_nan(k[13][0]), .n_special(k[13][1]), .n_ovf(k[13][2]), .n_flush(k[13][3]),
    .n_cancel(k[13][4]), .n_inexact(k[13][5]), .n_bubble(k[13][6]), .n_b2b(k[13][7]));
  fp_div #(.EXP_W(8), .MAN_W(23), .EXC(1'b1), .STEPS_PER_STAGE(5)) d13 (
    .clk, .rst_n, .in_valid(iv13), .a(a13), .b(b13), .out_valid(ov13), .result(r13));

  // div no-exc, 8 stages
  logic iv14, ov14;
  logic [31:0] a14, b14, r14;
  fp_check_harness #(.OP(OP_DIV), .EXP_W(8), .MAN_W(23), .EXC(1'b0), .LATENCY(8), .N(N)) h14 (
    .clk, .rst_n, .in_valid(iv14), .a(a14), .b(b14), .out_valid(ov14), .result(r14),
    .done(done[14]), .checks(c[14]), .failures(f[14]),
    .n_nan(k[14][0]), .n_special(k[14][1]), .n_ovf(k[14][2]), .n_flush(k[14][3]),
    .n_cancel(k[14][4]), .n_inexact(k[14][5]), .n_bubble(k[14][6]), .n_b2b(k[14][7]));
  fp_div #(.EXP_W(8), .MAN_W(23), .EXC(1'b0), .STEPS_PER_STAGE(5)) d14 (
    .clk, .rst_n, .in_valid(iv14), .a(a14), .b(b14), .out_valid(ov14), .result(r14));

  // div no-exc, 15 stages
  logic iv15, ov15;
  logic [31:0] a15, b15, r15;
  fp_check_harness #(.OP(OP_DIV), .EXP_W(8), .MAN_W(23), .EXC(1'b0), .LATENCY(15), .N(N)) h15 (
    .clk, .rst_n, .in_valid(iv15), .a(a15), .b(b15), .out_valid(ov15), .result(r15),
    .done(done[15]), .checks(c[15]), .failures(f[15]),
    .n_nan(k[15][0]), .n_special(k[15][1]), .n_ovf(k[15][2]), .n_flush(k[15][3]),
    .n_cancel(k[15][4]), .n_inexact(k[15][5]), .n_bubble(k[15][6]), .n_b2b(k[15][7]));
  fp_div #(.EXP_W(8), .MAN_W(23), .EXC(1'b0), .STEPS_PER_STAGE(2)) d15 (
    .clk, .rst_n, .in_valid(iv15), .a(a15), .b(b15), .out_valid(ov15), .result(r15));

  // rp add, 1 stage
  logic iv16, ov16;
  logic [14:0] a16, b16, r16;
  fp_check_harness #(.OP(OP_ADD), .EXP_W(4), .MAN_W(10), .EXC(1'b1), .LATENCY(1), .N(N)) h16 (
    .clk, .rst_n, .in_valid(iv16), .a(a16), .b(b16), .out_valid(ov16), .result(r16),
    .done(done[16]), .checks(c[16]), .failures(f[16]),
    .n_nan(k[16][0]), .n_special(k[16][1]), .n_ovf(k[16][2]), .n_flush(k[16][3]),
    .n_cancel(k[16][4]), .n_inexact(k[16][5]), .n_bubble(k[16][6]), .n_b2b(k[16][7]));
  fp_addsub #(.EXP_W(4), .MAN_W(10), .EXC(1'b1), .SUB(1'b0), .LATENCY(1)) d16 (
    .clk, .rst_n, .in_valid(iv16), .a(a16), .b(b16), .out_valid(ov16), .result(r16));

  // rp add, 13 stages
  logic iv17, ov17;
  logic [14:0] a17, b17, r17;
  fp_check_harness #(.OP(OP_ADD), .EXP_W(4), .MAN_W(10), .EXC(1'b1), .LATENCY(13), .N(N)) h17 (
    .clk, .rst_n, .in_valid(iv17), .a(a17), .b(b17), .out_valid(ov17), .result(r17),
    .done(done[17]), .checks(c[17]), .failures(f[17]),
    .n_nan(k[17][0]), .n_special(k[17][1]), .n_ovf(k[17][2]), .n_flush(k[17][3]),
    .n_cancel(k[17][4]), .n_inexact(k[17][5]), .n_bubble(k[17][6]), .n_b2b(k[17][7]));
  fp_addsub #(.EXP_W(4), .MAN_W(10), .EXC(1'b1), .SUB(1'b0), .LATENCY(13)) d17 (
    .clk, .rst_n, .in_valid(iv17), .a(a17), .b(b17), .out_valid(ov17), .result(r17));

  string name [NC] = '{"add IEEE, 2 stages", "add IEEE, 26 stages", "add no-exc, 4 stages", "add no-exc, 31 stages", "sub IEEE, 2 stages", "sub IEEE, 31 stages", "sub no-exc, 5 stages", "sub no-exc, 29 stages", "mul IEEE, 1 stage", "mul IEEE, 6 stages", "mul no-exc, 1 stage", "mul no-exc, 8 stages", "div IEEE, 28 stages", "div IEEE, 8 stages", "div no-exc, 8 stages", "div no-exc, 15 stages", "rp add, 1 stage", "rp add, 13 stages"};
  int checks, failures;

  initial begin
    bit all_done;
    checks = 0;  failures = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    do begin
      @(posedge clk);
      all_done = 1'b1;
      for (int i = 0; i < NC; i++) all_done &= done[i];
    end while (!all_done);
    for (int i = 0; i < NC; i++) begin
      checks   += c[i];
      failures += f[i];
      $display("%-24s results=%0d failures=%0d overflow=%0d flush=%0d inexact=%0d",
               name[i], c[i], f[i], k[i][2], k[i][3], k[i][5]);
      // each build must have produced all its results and rounded some
      checks++;
      if (c[i] != N || k[i][5] == 0) begin
        failures++;
        $display("FAIL: %s incomplete", name[i]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

endmodule
