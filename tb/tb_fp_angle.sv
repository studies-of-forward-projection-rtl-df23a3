// tb_fp_angle: checks the count-to-angle unit at the full 1000 views.
// Every count 0..999 must give k*pi/1000 within 1e-6 rad, one cycle after
// ap_start is accepted, with a single-cycle ap_done/ap_ready pulse.
module tb_fp_angle;
  import fp_pkg::*;
  import tb_fp_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic ap_start, ap_done, ap_idle, ap_ready;
  logic [31:0] count;
  fix_t angle;
  int checks = 0, failures = 0;

  fp_angle u_dut (.ap_clk(clk), .ap_rst_n(rst_n), .ap_start, .ap_done, .ap_idle,
                  .ap_ready, .count, .angle);

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    ap_start = 1'b0;
    count    = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    #1;
    check(ap_idle, "idle after reset");
    for (int k = 0; k < int'(N_VIEWS); k++) begin
      real e;
      count    <= 32'(k);
      ap_start <= 1'b1;
      @(posedge clk);
      #1;
      check(ap_done && ap_ready && !ap_idle, "done one cycle after start");
      e = fix2r(angle) - real'(k) * PI / real'(N_VIEWS);
      check(e < 1e-6 && e > -1e-6, $sformatf("count %0d: angle %.9f", k, fix2r(angle)));
      ap_start <= 1'b0;
      @(posedge clk);
      #1;
      check(!ap_done && ap_idle, "single-cycle done");
    end
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
