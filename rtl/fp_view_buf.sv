// fp_view_buf: block RAM holding one sinogram row (one view).
//
// N_DET single-precision words, one per detector pixel (4 KB for 1000
// pixels). The projector writes each ray sum here as it is finished and copies
// the whole row to external memory once the view is complete, so external
// memory sees one burst of writes per view.
//
// Interface: synchronous write port (we, waddr, wdata) and a read port with
// one cycle of latency (raddr in, rdata out on the next cycle).
module fp_view_buf
  import fp_pkg::*;
#(
  parameter int unsigned DEPTH = N_DET
) (
  input  logic                     clk,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] waddr,
  input  logic [31:0]              wdata,
  input  logic [$clog2(DEPTH)-1:0] raddr,
  output logic [31:0]              rdata
);

  logic [31:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end

endmodule
