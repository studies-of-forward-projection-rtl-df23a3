// tb_f32_to_fix: checks the single-precision to fixed-point converter.
// Directed cases (the worked example 85.125 = 0x42AA4000, zero, a
// subnormal, a negative value, values that saturate, infinity) and random
// normal values whose expected fixed-point value is worked out in real
// arithmetic and truncated toward zero.
module tb_f32_to_fix;
  import fp_pkg::*;
  import tb_fp_pkg::*;

  logic [31:0] f;
  fix_t x;
  int checks = 0, failures = 0;

  f32_to_fix u_dut (.f(f), .x(x));

  task automatic expect_fix(input logic [31:0] fin, input fix_t want, input string what);
    f = fin;
    #1;
    checks++;
    if (x !== want) begin
      failures++;
      $display("FAIL: %s: f=%h got %0d want %0d", what, fin, x, want);
    end
  endtask

  initial begin
    expect_fix(32'h42AA4000, fix_t'(48'sd85 <<< 32) + fix_t'(48'sd1 <<< 29), "85.125");
    expect_fix(32'h00000000, '0, "zero");
    expect_fix(32'h80000000, '0, "negative zero");
    expect_fix(32'h00400000, '0, "subnormal");
    expect_fix(32'h3F800000, FIX_ONE, "one");
    expect_fix(32'hBF000000, -FIX_HALF, "minus one half");
    expect_fix(32'h3DCCCCCD, fix_t'(48'sd429496736), "0.1 (rounded single)");
    expect_fix(32'h47800000, FIX_MAX, "65536 saturates");
    expect_fix(32'hC7800000, -FIX_MAX, "-65536 saturates");
    expect_fix(32'h7F800000, FIX_MAX, "infinity saturates");
    expect_fix(32'h2F800000, fix_t'(1), "2^-32 is one step");
    expect_fix(32'h2F000000, '0, "2^-33 truncates to zero");
    for (int n = 0; n < 2000; n++) begin
      real r, sc;
      logic [31:0] w;
      longint want;
      sc = 2.0 ** ($urandom_range(30) - 20);
      r  = (real'($urandom) / 4294967296.0) * sc;
      if ($urandom_range(1)) r = -r;
      w  = r2f(r);
      // exact value of the single times 2^32, truncated toward zero
      r    = f2r(w) * 4294967296.0;
      want = (r < 0.0) ? -longint'($floor(-r)) : longint'($floor(r));
      expect_fix(w, fix_t'(want), "random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
