// fp_stack: block RAM stack of (phantom index, weight) pairs for one ray.
//
// fp_loop pushes the pixels one ray crosses; fp_raysum then reads them back by
// position 0..count-1. A ray crosses at most two pixels per step, so DEPTH =
// 2*N entries hold the longest ray. clear empties the stack (count = 0) at the
// start of each ray. The array is written as plain RAM with a registered read
// port so that it maps to one block RAM.
//
// Interface: clear and push (with push_entry) on the write side; raddr in and
// rdata out one cycle later on the read side; count is the number of entries
// pushed since the last clear. A push beyond DEPTH is dropped and sets
// overflow until the next clear.
module fp_stack
  import fp_pkg::*;
#(
  parameter int unsigned DEPTH = 2 * FOV_N
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     clear,
  input  logic                     push,
  input  stack_entry_t             push_entry,
  input  logic [$clog2(DEPTH)-1:0] raddr,
  output stack_entry_t             rdata,
  output logic [$clog2(DEPTH):0]   count,
  output logic                     overflow
);

  stack_entry_t mem [DEPTH];

  always_ff @(posedge clk) begin
    if (push && !clear && 32'(count) < DEPTH)
      mem[count[$clog2(DEPTH)-1:0]] <= push_entry;
    rdata <= mem[raddr];
  end

  always_ff @(posedge clk) begin
    if (!rst_n || clear) begin
      count    <= '0;
      overflow <= 1'b0;
    end else if (push) begin
      if (32'(count) < DEPTH) count <= count + 1'b1;
      else                    overflow <= 1'b1;
    end
  end

endmodule
