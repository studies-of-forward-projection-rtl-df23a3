// tb_fp_cordic: checks the CORDIC sine/cosine unit.
// Directed angles (0, pi/6, pi/3 as in the classic cos 60 / sin 60 example,
// pi/2, 2pi/3, pi) and random angles over 0..pi are compared with $cos/$sin
// to within 1e-8; the latency from accepted ap_start to ap_done must be
// ITER + 1 = 33 clock edges after the accepting edge, ap_done must last one cycle and ap_idle must be low
// while busy.
module tb_fp_cordic;
  import fp_pkg::*;
  import tb_fp_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic ap_start, ap_done, ap_idle, ap_ready;
  fix_t theta, cos_o, sin_o;
  int checks = 0, failures = 0;

  fp_cordic u_dut (.ap_clk(clk), .ap_rst_n(rst_n), .ap_start, .ap_done, .ap_idle,
                   .ap_ready, .theta, .cos_o, .sin_o);

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  task automatic run(input real th);
    int lat;
    real ec, es;
    theta    <= r2fix(th);
    ap_start <= 1'b1;
    @(posedge clk);               // accepted here
    lat = 0;
    #1;
    check(!ap_idle, "ap_idle low while busy");
    while (!ap_done) begin
      @(posedge clk);
      #1;
      lat++;
    end
    ap_start <= 1'b0;
    check(lat == 33, $sformatf("latency %0d, expected 33", lat));
    check(ap_ready, "ap_ready with ap_done");
    ec = fix2r(cos_o) - $cos(th);
    es = fix2r(sin_o) - $sin(th);
    check(ec < 1e-8 && ec > -1e-8, $sformatf("cos(%f): got %.10f", th, fix2r(cos_o)));
    check(es < 1e-8 && es > -1e-8, $sformatf("sin(%f): got %.10f", th, fix2r(sin_o)));
    @(posedge clk);
    #1;
    check(!ap_done && ap_idle, "single-cycle ap_done, then idle");
  endtask

  initial begin
    ap_start = 1'b0;
    theta    = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    run(0.0);
    run(PI / 6.0);
    run(PI / 3.0);
    run(PI / 2.0);
    run(2.0 * PI / 3.0);
    run(PI);
    for (int n = 0; n < 300; n++) run(PI * real'($urandom) / 4294967296.0);
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
