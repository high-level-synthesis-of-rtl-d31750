// tb_fp_lzc: self-checking test of the leading-zero counter.
// Drives a 32-bit counter (the default width) and a 27-bit one (the width
// the single-precision adder uses) with zero, all-ones, every single-bit
// value and random values with a random number of leading zeros, and
// compares count and zero flag with a bit-by-bit scan.
module tb_fp_lzc;

  logic [31:0] in32;
  logic [5:0]  cnt32;
  logic        z32;
  logic [26:0] in27;
  logic [4:0]  cnt27;
  logic        z27;

  fp_lzc            dut32 (.in(in32), .count(cnt32), .zero(z32));
  fp_lzc #(.WIDTH(27)) dut27 (.in(in27), .count(cnt27), .zero(z27));

  int checks = 0, failures = 0;

  function automatic int ref_lz(input logic [31:0] x, input int w);
    for (int i = w - 1; i >= 0; i--) if (x[i]) return w - 1 - i;
    return w;
  endfunction

  task automatic check(input logic [31:0] x);
    in32 = x;
    in27 = x[26:0];
    #1;
    checks += 2;
    if (int'(cnt32) != ref_lz(x, 32) || z32 != (x == 0)) begin
      failures++;
      $display("FAIL w=32 in=%h count=%0d want %0d", x, cnt32, ref_lz(x, 32));
    end
    if (int'(cnt27) != ref_lz({5'd0, x[26:0]}, 27) || z27 != (x[26:0] == 0)) begin
      failures++;
      $display("FAIL w=27 in=%h count=%0d want %0d", x[26:0], cnt27, ref_lz({5'd0, x[26:0]}, 27));
    end
  endtask

  initial begin
    check(32'd0);
    check(32'hffff_ffff);
    for (int i = 0; i < 32; i++) check(32'd1 << i);
    for (int i = 0; i < 5000; i++) check($urandom >> $urandom_range(0, 31));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // watchdog
  initial begin
    #1000000;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

endmodule
