// tb_fix_to_f32: checks the fixed-point to single-precision converter.
// Directed cases (85.125 -> 0x42AA4000, zero, one, negative values, a value
// whose rounding carries into the exponent, the smallest and largest
// magnitudes) and random values of every magnitude, each compared with the
// double-precision value rounded to single precision (nearest, ties to even).
module tb_fix_to_f32;
  import fp_pkg::*;
  import tb_fp_pkg::*;

  fix_t x;
  logic [31:0] f;
  int checks = 0, failures = 0;

  fix_to_f32 u_dut (.x(x), .f(f));

  task automatic expect_f(input fix_t xin, input logic [31:0] want, input string what);
    x = xin;
    #1;
    checks++;
    if (f !== want) begin
      failures++;
      $display("FAIL: %s: x=%0d got %h want %h", what, xin, f, want);
    end
  endtask

  initial begin
    expect_f(fix_t'(48'sd85 <<< 32) + fix_t'(48'sd1 <<< 29), 32'h42AA4000, "85.125");
    expect_f('0, 32'h00000000, "zero");
    expect_f(FIX_ONE, 32'h3F800000, "one");
    expect_f(-FIX_HALF, 32'hBF000000, "minus one half");
    expect_f(fix_t'(1), 32'h2F800000, "one step");
    // 2^25 - 1 steps: 25 significant bits, rounds up to 2^25 steps
    expect_f(fix_t'((48'sd1 <<< 25) - 1), 32'h3C000000, "carry into exponent");
    expect_f(FIX_MAX, r2f(fix2r(FIX_MAX)), "largest");
    for (int n = 0; n < 5000; n++) begin
      fix_t v;
      int   sh;
      v  = fix_t'({$urandom, $urandom});
      sh = $urandom_range(46);
      v  = v >>> sh;
      expect_f(v, r2f(fix2r(v)), "random");
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
