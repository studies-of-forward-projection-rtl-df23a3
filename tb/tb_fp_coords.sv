// tb_fp_coords: checks the angle-to-coordinates unit at the reference
// geometry (Ds = Dd = 500 mm, 1000 detector pixels of 1 mm). The angle 0
// must give source (0, -500), detector start (-500, 500), step (1, 0); random
// angles over 0..pi are compared with the formulas evaluated in real
// arithmetic to within 1e-5 mm. Latency: ap_done 35 clock edges after the
// edge that accepts ap_start.
module tb_fp_coords;
  import fp_pkg::*;
  import tb_fp_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic ap_start, ap_done, ap_idle, ap_ready;
  fix_t theta;
  coords_t coords;
  int checks = 0, failures = 0;

  fp_coords u_dut (.ap_clk(clk), .ap_rst_n(rst_n), .ap_start, .ap_done, .ap_idle,
                   .ap_ready, .theta, .coords);

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  function automatic logic near(input fix_t got, input real want);
    real e;
    e = fix2r(got) - want;
    return (e < 1e-5) && (e > -1e-5);
  endfunction

  task automatic run(input real th);
    int lat;
    real s, c, d;
    theta    <= r2fix(th);
    ap_start <= 1'b1;
    @(posedge clk);
    #1;
    lat = 0;
    while (!ap_done) begin
      @(posedge clk);
      #1;
      lat++;
    end
    ap_start <= 1'b0;
    check(lat == 35, $sformatf("latency %0d, expected 35", lat));
    s = $sin(th);
    c = $cos(th);
    d = -500.0;
    check(near(coords.sx, 500.0 * s), $sformatf("Sx at %f", th));
    check(near(coords.sy, -500.0 * c), $sformatf("Sy at %f", th));
    check(near(coords.dx, d * c - 500.0 * s), $sformatf("Dx at %f", th));
    check(near(coords.dy, d * s + 500.0 * c), $sformatf("Dy at %f", th));
    check(near(coords.ddx, c), $sformatf("dDx at %f", th));
    check(near(coords.ddy, s), $sformatf("dDy at %f", th));
    @(posedge clk);
  endtask

  initial begin
    ap_start = 1'b0;
    theta    = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    run(0.0);
    check(near(coords.sx, 0.0) && near(coords.sy, -500.0), "source at angle 0");
    check(near(coords.dx, -500.0) && near(coords.dy, 500.0), "detector start at angle 0");
    run(PI / 2.0);
    run(PI);
    for (int n = 0; n < 100; n++) run(PI * real'($urandom) / 4294967296.0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
