// tb_fp_loop: checks the per-ray loop calculation at the full 512 x 512 FOV.
//
// 1. The ray of the reference timing example (ratio Rx/Ry = 0.996490836,
//    column at row 0 = 194.6826): the set-up values must match the example's
//    S = 0.0017546, T = 0.9982454, length per row = 1.4117343,
//    length/(T - S) = 1.4167058 and delta = -0.9964908.
// 2. Random rays of the reference geometry (source and detector 500 mm from
//    the centre, 1000 detector pixels): the pushed (index, weight) list must
//    equal, entry by entry, a real-valued traversal written in this bench
//    (same indices, weights within 2e-5: the fixed-point step accumulation is
//    amplified by 1/|ratio| in the weights of nearly axis-parallel rays).
// The cycle count of each ray must be a fixed set-up time plus one cycle per
// step and one per neighbour entry.
module tb_fp_loop;
  import fp_pkg::*;
  import tb_fp_pkg::*;

  localparam int N = FOV_N;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic ap_start, ap_done, ap_idle, ap_ready;
  orient_t orient;
  logic push;
  stack_entry_t push_entry;
  int checks = 0, failures = 0;

  fp_loop u_dut (.ap_clk(clk), .ap_rst_n(rst_n), .ap_start, .ap_done, .ap_idle,
                 .ap_ready, .orient, .push, .push_entry);

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  function automatic logic near(input real a, input real b, input real tol);
    return (a - b < tol) && (b - a < tol);
  endfunction

  // pushes seen during one ray
  int   got_idx[$];
  real  got_w[$];
  always @(posedge clk) if (push) begin
    got_idx.push_back(int'(push_entry.idx));
    got_w.push_back(fix2r(push_entry.weight));
  end

  int  exp_idx[$];
  real exp_w[$];
  int  setup = -1;
  int  n_left = 0, n_right = 0, n_centre = 0, n_out = 0;

  // real-valued traversal of one ray, same conventions as the design
  task automatic reference(input real dix, input real diy, input real rx, input real ry);
    real r, c0, cc, len, s_lo, t_hi, o, w, ax, ay;
    int m;
    logic vert;
    exp_idx.delete();
    exp_w.delete();
    ax = -(real'(N) - 1.0) / 2.0;
    ay = (real'(N) - 1.0) / 2.0;
    vert = (ry < 0 ? -ry : ry) > (rx < 0 ? -rx : rx);
    r    = vert ? rx / ry : ry / rx;
    c0   = vert ? (dix - ax) + (ay - diy) * r : (ay - diy) + (dix - ax) * r;
    len  = $sqrt(1.0 + r * r);
    s_lo = (1.0 - (r < 0 ? -r : r)) / 2.0;
    t_hi = (1.0 + (r < 0 ? -r : r)) / 2.0;
    for (int k = 0; k < N; k++) begin
      cc = c0 - real'(k) * r;
      m  = $rtoi($floor(cc + 0.5));
      o  = cc - real'(m);
      if (m < 0 || m >= N) begin
        n_out++;
        continue;
      end
      if (o < -s_lo) begin
        n_left++;
        w = (o + t_hi) / (t_hi - s_lo) * len;
        exp_idx.push_back(vert ? k * N + m : m * N + k);
        exp_w.push_back(w);
        if (m > 0) begin
          exp_idx.push_back(vert ? k * N + m - 1 : (m - 1) * N + k);
          exp_w.push_back(len - w);
        end
      end else if (o > s_lo) begin
        n_right++;
        w = (o - s_lo) / (t_hi - s_lo) * len;
        exp_idx.push_back(vert ? k * N + m : m * N + k);
        exp_w.push_back(len - w);
        if (m < N - 1) begin
          exp_idx.push_back(vert ? k * N + m + 1 : (m + 1) * N + k);
          exp_w.push_back(w);
        end
      end else begin
        n_centre++;
        exp_idx.push_back(vert ? k * N + m : m * N + k);
        exp_w.push_back(len);
      end
    end
  endtask

  task automatic run(input real dix, input real diy, input real rx, input real ry);
    int lat;
    logic ok;
    orient   <= '{ry: r2fix(ry), rx: r2fix(rx), diy: r2fix(diy), dix: r2fix(dix),
                  vertical: ((ry < 0 ? -ry : ry) > (rx < 0 ? -rx : rx))};
    got_idx.delete();
    got_w.delete();
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
    reference(fix2r(r2fix(dix)), fix2r(r2fix(diy)), fix2r(r2fix(rx)), fix2r(r2fix(ry)));
    @(posedge clk);
    #1;
    check(got_idx.size() == exp_idx.size(),
          $sformatf("entry count %0d, expected %0d", got_idx.size(), exp_idx.size()));
    ok = 1'b1;
    for (int e = 0; e < exp_idx.size() && e < got_idx.size(); e++)
      if (got_idx[e] != exp_idx[e] || !near(got_w[e], exp_w[e], 2e-5)) begin
        ok = 1'b0;
        if (failures < 10)
          $display("  entry %0d: got (%0d, %f) expected (%0d, %f)", e, got_idx[e], got_w[e],
                   exp_idx[e], exp_w[e]);
      end
    check(ok, "entries match the reference traversal");
    // one cycle per step plus one per neighbour entry (= entries - steps inside)
    if (setup < 0) setup = lat - N - (exp_idx.size() - (N - count_outside(dix, diy, rx, ry))) ;
    check(lat == setup + N + (exp_idx.size() - (N - count_outside(dix, diy, rx, ry))),
          $sformatf("cycle count %0d not set-up %0d + steps + neighbours", lat, setup));
  endtask

  function automatic int count_outside(input real dix, input real diy, input real rx, input real ry);
    real r, c0, cc, ax, ay;
    int m, n;
    logic vert;
    ax = -(real'(N) - 1.0) / 2.0;
    ay = (real'(N) - 1.0) / 2.0;
    dix = fix2r(r2fix(dix)); diy = fix2r(r2fix(diy));
    rx = fix2r(r2fix(rx)); ry = fix2r(r2fix(ry));
    vert = (ry < 0 ? -ry : ry) > (rx < 0 ? -rx : rx);
    r    = vert ? rx / ry : ry / rx;
    c0   = vert ? (dix - ax) + (ay - diy) * r : (ay - diy) + (dix - ax) * r;
    n = 0;
    for (int k = 0; k < N; k++) begin
      cc = c0 - real'(k) * r;
      m  = $rtoi($floor(cc + 0.5));
      if (m < 0 || m >= N) n++;
    end
    return n;
  endfunction

  initial begin
    ap_start = 1'b0;
    orient   = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);

    // 1. the timing-example ray: vertical, Rx/Ry = 0.996490836, c0 = 194.6826
    run(194.6826171875 - 255.5, 255.5, -996.490836143494, -1000.0);
    check(near(fix2r(u_dut.ratio), 0.996490836, 1e-7), "example ratio Rx/Ry");
    check(near(fix2r(u_dut.delta), -0.996490836, 1e-7), "example delta");
    check(near(fix2r(u_dut.s_lo), 0.00175458192825317, 1e-7), "example S");
    check(near(fix2r(u_dut.t_hi), 0.998245418071747, 1e-7), "example T");
    check(near(fix2r(u_dut.len), 1.41173434257507, 1e-6), "example length per row");
    check(near(fix2r(u_dut.inv), 1.4167058467865, 1e-6), "example length / (T - S)");

    // 2. random rays of the reference geometry
    for (int n = 0; n < 60; n++) begin
      real th, s, c, d0, dx, dy, cx, cy;
      int i;
      th = PI * real'($urandom) / 4294967296.0;
      i  = $urandom_range(N_DET - 1);
      s = $sin(th);
      c = $cos(th);
      d0 = -real'(N_DET) / 2.0;
      dx = d0 * c - 500.0 * s;
      dy = d0 * s + 500.0 * c;
      cx = dx + (real'(i) + 0.5) * c;
      cy = dy + (real'(i) + 0.5) * s;
      run(cx, cy, 500.0 * s - cx, -500.0 * c - cy);
    end
    $display("left %0d right %0d centre %0d outside %0d", n_left, n_right, n_centre, n_out);
    check(n_left > 0 && n_right > 0 && n_centre > 0 && n_out > 0, "all step cases seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (500000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
