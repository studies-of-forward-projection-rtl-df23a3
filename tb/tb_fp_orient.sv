// tb_fp_orient: checks the coordinate-to-orientation unit. The worked
// example of a horizontal ray (source (-500, 0), detector start (500, 500),
// step (0, -1), pixel 0: centre (500, 499.5), R = (-1000, -499.5),
// horizontal) and random views and pixels compared with real arithmetic.
// Latency: ap_done one clock edge after the edge that accepts ap_start.
module tb_fp_orient;
  import fp_pkg::*;
  import tb_fp_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic ap_start, ap_done, ap_idle, ap_ready;
  coords_t coords;
  logic [$clog2(N_DET)-1:0] det_idx;
  orient_t orient;
  int checks = 0, failures = 0;
  int n_vert = 0, n_horz = 0;

  fp_orient u_dut (.ap_clk(clk), .ap_rst_n(rst_n), .ap_start, .ap_done, .ap_idle,
                   .ap_ready, .coords, .det_idx, .orient);

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
    return (e < 1e-6) && (e > -1e-6);
  endfunction

  task automatic run(input real sx, input real sy, input real dx, input real dy,
                     input real ddx, input real ddy, input int i);
    int lat;
    real cx, cy, rx, ry;
    coords   <= '{sx: r2fix(sx), sy: r2fix(sy), dx: r2fix(dx), dy: r2fix(dy),
                  ddx: r2fix(ddx), ddy: r2fix(ddy)};
    det_idx  <= $clog2(N_DET)'(i);
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
    check(lat == 1, $sformatf("latency %0d, expected 1", lat));
    cx = fix2r(r2fix(dx)) + (real'(i) + 0.5) * fix2r(r2fix(ddx));
    cy = fix2r(r2fix(dy)) + (real'(i) + 0.5) * fix2r(r2fix(ddy));
    rx = fix2r(r2fix(sx)) - cx;
    ry = fix2r(r2fix(sy)) - cy;
    check(near(orient.dix, cx) && near(orient.diy, cy), "pixel centre");
    check(near(orient.rx, rx) && near(orient.ry, ry), "displacement");
    check(orient.vertical == ((ry < 0 ? -ry : ry) > (rx < 0 ? -rx : rx)), "orientation");
    if (orient.vertical) n_vert++; else n_horz++;
    @(posedge clk);
  endtask

  initial begin
    ap_start = 1'b0;
    coords   = '0;
    det_idx  = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    run(-500.0, 0.0, 500.0, 500.0, 0.0, -1.0, 0);
    check(near(orient.dix, 500.0) && near(orient.diy, 499.5), "example: centre (500, 499.5)");
    check(near(orient.rx, -1000.0) && near(orient.ry, -499.5), "example: R = (-1000, -499.5)");
    check(!orient.vertical, "example: horizontal ray");
    for (int n = 0; n < 300; n++) begin
      real th, s, c;
      th = PI * real'($urandom) / 4294967296.0;
      s = $sin(th);
      c = $cos(th);
      run(500.0 * s, -500.0 * c, -500.0 * c - 500.0 * s, -500.0 * s + 500.0 * c, c, s,
          $urandom_range(N_DET - 1));
    end
    check(n_vert > 0 && n_horz > 0, "both orientations seen");
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
