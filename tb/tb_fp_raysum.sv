// tb_fp_raysum: checks the weighted accumulation of one ray.
// A model stack (registered read, like fp_stack) holds random entries; the
// external memory model holds a phantom of random single-precision samples
// and refuses 30 % of requests. The sum must match the real-valued
// sum of weight * sample within 1e-6, the phantom must be read at
// PH_BASE + index once per entry, and without refused requests a ray of n
// entries must take 2n + 1 cycles from accepted ap_start to ap_done
// (2 per entry and 1 for the first stack read).
module tb_fp_raysum;
  import fp_pkg::*;
  import tb_fp_pkg::*;

  localparam int DEPTH = 2 * FOV_N;
  localparam int WORDS = 4096;
  localparam logic [31:0] BASE = 32'd100;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic ap_start, ap_done, ap_idle, ap_ready;
  logic [$clog2(DEPTH):0] count;
  logic [$clog2(DEPTH)-1:0] raddr;
  stack_entry_t rdata;
  stack_entry_t stk [DEPTH];
  logic rd_req, rd_gnt, rd_rvalid;
  logic [31:0] rd_addr, rd_rdata;
  fix_t sum;
  int checks = 0, failures = 0;

  fp_raysum #(.DEPTH(DEPTH), .PH_BASE(BASE)) u_dut (
    .ap_clk(clk), .ap_rst_n(rst_n), .ap_start, .ap_done, .ap_idle, .ap_ready,
    .count, .raddr, .rdata, .rd_req, .rd_addr, .rd_gnt, .rd_rvalid, .rd_rdata, .sum
  );

  always_ff @(posedge clk) rdata <= stk[raddr];

  logic [31:0] dummy_wdata = '0;
  ext_ram_model #(.WORDS(WORDS), .STALL_PCT(0)) u_mem (
    .clk, .req(rd_req), .we(1'b0), .addr(rd_addr), .wdata(dummy_wdata),
    .gnt(rd_gnt), .rvalid(rd_rvalid), .rdata(rd_rdata)
  );

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  task automatic run(input int n, input int stall_pct);
    real want, e;
    int lat, reads0;
    want = 0.0;
    for (int k = 0; k < n; k++) begin
      stk[k].idx    = IDX_W'($urandom_range(WORDS - 1 - int'(BASE)));
      stk[k].weight = r2fix(1.5 * real'($urandom) / 4294967296.0);
      want += fix2r(stk[k].weight) * f2r(u_mem.mem[BASE + 32'(stk[k].idx)]);
    end
    reads0 = u_mem.n_reads;
    u_mem.stall_pct_rt = stall_pct;
    count    <= ($clog2(DEPTH)+1)'(n);
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
    e = fix2r(sum) - want;
    check(e < 1e-6 && e > -1e-6, $sformatf("sum %f expected %f (n=%0d)", fix2r(sum), want, n));
    check(u_mem.n_reads - reads0 == n, "one phantom read per entry");
    if (stall_pct == 0)
      check(lat == 2 * n + ((n == 0) ? 0 : 1), $sformatf("latency %0d for %0d entries", lat, n));
    @(posedge clk);
  endtask

  initial begin
    ap_start = 1'b0;
    count    = '0;
    for (int a = 0; a < WORDS; a++) u_mem.mem[a] = r2f(real'($urandom) / 4294967296.0);
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    run(1, 0);
    run(0, 0);
    run(DEPTH, 0);
    for (int n = 0; n < 20; n++) run($urandom_range(DEPTH), 0);
    for (int n = 0; n < 20; n++) run($urandom_range(DEPTH), 30);
    check(u_mem.n_bad == 0, "all reads inside memory");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
