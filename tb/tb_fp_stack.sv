// tb_fp_stack: checks the index/weight stack at its full depth (1024).
// Rays of random length are pushed (with idle cycles between pushes), the
// count is checked, every entry is read back with the one-cycle latency,
// and a full stack must set overflow and drop the extra entry. clear must
// empty the stack and reset overflow.
module tb_fp_stack;
  import fp_pkg::*;

  localparam int DEPTH = 2 * FOV_N;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic clear, push, overflow;
  stack_entry_t push_entry, rdata;
  logic [$clog2(DEPTH)-1:0] raddr;
  logic [$clog2(DEPTH):0] count;
  stack_entry_t model[$];
  int checks = 0, failures = 0;

  fp_stack u_dut (.clk, .rst_n, .clear, .push, .push_entry, .raddr, .rdata, .count, .overflow);

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  task automatic fill(input int n);
    model.delete();
    clear <= 1'b1;
    @(posedge clk);
    #1;
    clear <= 1'b0;
    check(count == 0 && !overflow, "cleared");
    for (int e = 0; e < n; e++) begin
      stack_entry_t v;
      v.idx    = IDX_W'($urandom);
      v.weight = fix_t'({$urandom, $urandom});
      push       = 1'b1;
      push_entry = v;
      if (e < DEPTH) model.push_back(v);
      @(posedge clk);
      #1;
      push = 1'b0;
      if ($urandom_range(3) == 0) begin
        @(posedge clk);
        #1;
      end
    end
    #1;
    check(32'(count) == ((n < DEPTH) ? n : DEPTH), $sformatf("count %0d after %0d pushes", count, n));
    check(overflow == (n > DEPTH), "overflow flag");
    foreach (model[e]) begin
      raddr <= $clog2(DEPTH)'(e);
      @(posedge clk);
      #1;
      check(rdata == model[e], $sformatf("entry %0d read back", e));
    end
  endtask

  initial begin
    clear = 1'b0; push = 1'b0; push_entry = '0; raddr = '0;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    fill(37);
    fill(0);
    fill(DEPTH);
    fill(DEPTH + 3);
    for (int n = 0; n < 5; n++) fill($urandom_range(DEPTH - 1));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
