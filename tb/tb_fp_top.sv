// tb_fp_top: end-to-end test of the forward projector at a reduced geometry.
//
// Loads a modified Shepp-Logan phantom (single precision) into the external
// memory model, runs one complete projection and compares every sinogram
// sample with the real-valued reference projector of tb_fp_pkg. It also
// checks the ap_ctrl handshake (ap_idle low while busy, a one-cycle
// ap_done/ap_ready pulse), the memory traffic (one write per sinogram sample,
// no access outside memory, no stack overflow) and counts how often each
// mechanism of the design occurred: vertical and horizontal rays, the left /
// right / centre pixel cases, steps outside the FOV, neighbours dropped at the
// FOV edge, the quarter-turn reduction in the CORDIC and refused memory
// requests on reads and on writes. A mechanism that never occurred counts as
// a failure.
module tb_fp_top;
  import fp_pkg::*;
  import tb_fp_pkg::*;

  localparam int N     = 32;    // FOV pixels per side
  localparam int NDET  = 64;    // detector pixels
  localparam int NV    = 24;    // views over 0..pi
  localparam int DS    = 40;    // source distance
  localparam int DD    = 40;    // detector distance
  localparam int WORDS = N * N + NV * NDET;
  localparam longint WATCHDOG = 64'd20_000_000;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic ap_start, ap_done, ap_idle, ap_ready, ovf;
  logic mem_req, mem_we, mem_gnt, mem_rvalid;
  logic [31:0] mem_addr, mem_wdata, mem_rdata;

  fp_top #(
    .FOV_N_P(N), .N_DET_P(NDET), .N_VIEWS_P(NV), .SRC_DIST_P(DS), .DET_DIST_P(DD),
    .PH_BASE(32'h0), .SINO_BASE(32'(N * N))
  ) u_dut (
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

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  // ---------------- mechanism counters (probing the design) ----------------
  int n_vert = 0, n_horz = 0, n_left = 0, n_right = 0, n_centre = 0;
  int n_outside = 0, n_edge = 0, n_quad = 0, n_done_pulses = 0, n_busy_idle = 0;
  logic busy;
  localparam logic [2:0] LOOP_STEP = 3'd4;   // fp_loop state S_STEP

  always @(posedge clk) if (rst_n) begin
    cycles++;
    if (u_dut.u_orient.ap_done) begin
      if (u_dut.u_orient.orient.vertical) n_vert++;
      else                                n_horz++;
    end
    if (u_dut.u_loop.state == LOOP_STEP) begin
      if (!u_dut.u_loop.in_fov) n_outside++;
      else if (u_dut.u_loop.is_left) begin
        n_left++;
        if (!u_dut.u_loop.has_prev) n_edge++;
      end else if (u_dut.u_loop.is_right) begin
        n_right++;
        if (!u_dut.u_loop.has_next) n_edge++;
      end else n_centre++;
    end
    if (u_dut.u_coords.u_cordic.ap_done && u_dut.u_coords.u_cordic.quad) n_quad++;
    if (ap_done) n_done_pulses++;
    if (busy && ap_idle) n_busy_idle++;
  end

  // ---------------- stimulus and checking ----------------
  real ph[];
  real ref_v, got, tol;
  ref_stats_t st;
  longint t0, t1;

  initial begin
    ap_start = 1'b0;
    busy     = 1'b0;
    ph = new[N * N];
    for (int r = 0; r < N; r++)
      for (int c = 0; c < N; c++) begin
        u_mem.mem[r * N + c] = phantom_word(N, r, c);
        ph[r * N + c]        = f2r(u_mem.mem[r * N + c]);
      end
    for (int a = N * N; a < WORDS; a++) u_mem.mem[a] = 32'hDEADBEEF;

    repeat (4) @(posedge clk);
    rst_n <= 1'b1;
    repeat (2) @(posedge clk);
    check(ap_idle == 1'b1, "ap_idle high after reset");

    // start and hold until ap_ready
    ap_start <= 1'b1;
    busy     <= 1'b1;
    t0 = cycles;
    @(posedge clk);
    while (!ap_ready) @(posedge clk);
    ap_start <= 1'b0;
    busy     <= 1'b0;
    t1 = cycles;
    @(posedge clk);
    @(posedge clk);
    check(ap_done == 1'b0, "ap_done is a single-cycle pulse");
    check(ap_idle == 1'b1, "ap_idle high again after the run");
    check(n_done_pulses == 1, "exactly one ap_done pulse");
    // the only idle cycle seen while busy is the one in which ap_start is taken
    check(n_busy_idle == 1, "ap_idle low while the run is busy");
    check(u_mem.n_bad == 0, "no access outside memory");
    check(u_mem.n_writes == NV * NDET, "one memory write per sinogram sample");
    check(ovf == 1'b0, "stack did not overflow");
    $display("run took %0d cycles for %0d rays (%0d reads, %0d refused requests)",
             t1 - t0, NV * NDET, u_mem.n_reads, u_mem.n_stalls);

    // sinogram against the reference projector
    for (int k = 0; k < NV; k++)
      for (int i = 0; i < NDET; i++) begin
        ref_v = ref_ray(ph, N, NDET, NV, real'(DS), real'(DD), k, i, st);
        got   = f2r(u_mem.mem[N * N + k * NDET + i]);
        tol   = 1.0e-4 + 1.0e-5 * (ref_v < 0 ? -ref_v : ref_v);
        check((got - ref_v) <= tol && (ref_v - got) <= tol,
              $sformatf("view %0d det %0d: got %f expected %f", k, i, got, ref_v));
      end

    // every mechanism must have happened
    $display("vertical %0d horizontal %0d left %0d right %0d centre %0d outside %0d edge %0d quadrant %0d read-stall %0d write-stall %0d",
             n_vert, n_horz, n_left, n_right, n_centre, n_outside, n_edge, n_quad,
             u_mem.n_read_stalls, u_mem.n_write_stalls);
    check(n_vert > 0,   "vertical rays occurred");
    check(n_horz > 0,   "horizontal rays occurred");
    check(n_left > 0,   "left-of-centre case occurred");
    check(n_right > 0,  "right-of-centre case occurred");
    check(n_centre > 0, "centre case occurred");
    check(n_outside > 0, "steps outside the FOV occurred");
    check(n_edge > 0,   "neighbour dropped at the FOV edge occurred");
    check(n_quad > 0,   "CORDIC quarter-turn reduction occurred");
    check(u_mem.n_read_stalls > 0,  "refused read requests occurred");
    check(u_mem.n_write_stalls > 0, "refused write requests occurred");
    check(n_vert == st.vertical && n_horz == st.horizontal,
          "ray orientation counts agree with the reference");

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
