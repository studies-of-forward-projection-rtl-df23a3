// tb_fp_view_buf: checks the one-view block RAM at its full depth of 1000
// words: a pattern is written to every address in random order, read back with
// the one-cycle read latency, then part of it is overwritten and read again.
module tb_fp_view_buf;
  import fp_pkg::*;

  localparam int DEPTH = N_DET;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic we;
  logic [$clog2(DEPTH)-1:0] waddr, raddr;
  logic [31:0] wdata, rdata;
  logic [31:0] model [DEPTH];
  int checks = 0, failures = 0;

  fp_view_buf u_dut (.clk, .we, .waddr, .wdata, .raddr, .rdata);

  task automatic read_all;
    for (int a = 0; a < DEPTH; a++) begin
      raddr <= $clog2(DEPTH)'(a);
      @(posedge clk);
      #1;
      checks++;
      if (rdata !== model[a]) begin
        failures++;
        if (failures < 10) $display("FAIL: addr %0d got %h want %h", a, rdata, model[a]);
      end
    end
  endtask

  initial begin
    int order[DEPTH];
    we = 1'b0; waddr = '0; wdata = '0; raddr = '0;
    for (int a = 0; a < DEPTH; a++) order[a] = a;
    order.shuffle();
    @(posedge clk);
    foreach (order[n]) begin
      we    <= 1'b1;
      waddr <= $clog2(DEPTH)'(order[n]);
      wdata <= $urandom;
      @(posedge clk);
      model[order[n]] = wdata;
    end
    we <= 1'b0;
    read_all();
    for (int n = 0; n < 300; n++) begin
      int a;
      a = $urandom_range(DEPTH - 1);
      we    <= 1'b1;
      waddr <= $clog2(DEPTH)'(a);
      wdata <= $urandom;
      @(posedge clk);
      model[a] = wdata;
    end
    we <= 1'b0;
    read_all();
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
