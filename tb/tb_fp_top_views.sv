// tb_fp_top_views: the forward projector at its default (full) geometry,
// checked over the first views of a run.
//
// fp_top is instantiated without a parameter list: 512 x 512 FOV, 1000
// detector pixels, 1000 views, source and detector 500 from the centre. A
// complete sinogram takes about 2.8e9 clock cycles, far more than a
// simulation can afford, so this bench starts one complete operation, lets it
// write the first CHECK_VIEWS sinogram rows to the external memory model and
// compares every one of those samples with the real-valued reference
// projector of tb_fp_pkg (same tolerance as tb_fp_top). It also checks that
// ap_idle stays low, that nothing is written outside the sinogram area and
// that the stack never overflows. The reduced-size bench tb_fp_top covers a
// complete run and the end of the handshake.
module tb_fp_top_views;
  import fp_pkg::*;
  import tb_fp_pkg::*;

  localparam int CHECK_VIEWS = 3;
  localparam int WORDS = FOV_N * FOV_N + N_VIEWS * N_DET;
  localparam longint WATCHDOG = 64'd40_000_000;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic ap_start, ap_done, ap_idle, ap_ready, ovf;
  logic mem_req, mem_we, mem_gnt, mem_rvalid;
  logic [31:0] mem_addr, mem_wdata, mem_rdata;

  fp_top u_dut (
    .ap_clk(clk), .ap_rst_n(rst_n), .ap_start, .ap_done, .ap_idle, .ap_ready,
    .mem_req, .mem_we, .mem_addr, .mem_wdata, .mem_gnt, .mem_rvalid, .mem_rdata,
    .stack_overflow(ovf)
  );

  ext_ram_model #(.WORDS(WORDS), .STALL_PCT(20)) u_mem (
    .clk, .req(mem_req), .we(mem_we), .addr(mem_addr), .wdata(mem_wdata),
    .gnt(mem_gnt), .rvalid(mem_rvalid), .rdata(mem_rdata)
  );

  int checks = 0, failures = 0;
  longint cycles = 0;
  int n_idle_busy = 0, n_low_writes = 0, n_high_writes = 0;
  logic busy = 1'b0;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  always @(posedge clk) if (rst_n) begin
    cycles++;
    if (busy && ap_idle) n_idle_busy++;
    if (mem_req && mem_gnt && mem_we) begin
      if (mem_addr < 32'(FOV_N * FOV_N)) n_low_writes++;
      if (mem_addr >= 32'(FOV_N * FOV_N + CHECK_VIEWS * N_DET)) n_high_writes++;
    end
  end

  real ph[];
  real ref_v, got, tol;
  ref_stats_t st;

  initial begin
    ap_start = 1'b0;
    ph = new[FOV_N * FOV_N];
    for (int r = 0; r < FOV_N; r++)
      for (int c = 0; c < FOV_N; c++) begin
        u_mem.mem[r * FOV_N + c] = phantom_word(FOV_N, r, c);
        ph[r * FOV_N + c]        = f2r(u_mem.mem[r * FOV_N + c]);
      end
    for (int a = FOV_N * FOV_N; a < WORDS; a++) u_mem.mem[a] = 32'hDEADBEEF;

    repeat (4) @(posedge clk);
    rst_n <= 1'b1;
    repeat (2) @(posedge clk);
    check(ap_idle == 1'b1, "ap_idle high after reset");

    ap_start <= 1'b1;
    @(posedge clk);
    busy <= 1'b1;
    while (u_mem.n_writes < CHECK_VIEWS * N_DET) @(posedge clk);
    repeat (2) @(posedge clk);
    $display("first %0d views took %0d cycles (%0d reads, %0d refused requests)",
             CHECK_VIEWS, cycles, u_mem.n_reads, u_mem.n_stalls);

    check(n_idle_busy == 0, "ap_idle low while the run is busy");
    check(ap_done == 1'b0, "no ap_done before the last view");
    check(u_mem.n_bad == 0, "no access outside memory");
    check(n_low_writes == 0, "no write into the phantom area");
    check(n_high_writes == 0, "rows written in view order");
    check(ovf == 1'b0, "stack did not overflow");

    for (int k = 0; k < CHECK_VIEWS; k++)
      for (int i = 0; i < N_DET; i++) begin
        ref_v = ref_ray(ph, FOV_N, N_DET, N_VIEWS, real'(SRC_DIST), real'(DET_DIST), k, i, st);
        got   = f2r(u_mem.mem[FOV_N * FOV_N + k * N_DET + i]);
        tol   = 1.0e-4 + 1.0e-5 * (ref_v < 0 ? -ref_v : ref_v);
        check((got - ref_v) <= tol && (ref_v - got) <= tol,
              $sformatf("view %0d det %0d: got %f expected %f", k, i, got, ref_v));
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wait (cycles >= WATCHDOG);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
