// ext_ram_model: behavioural model of the projector's external memory.
//
// Stands in for the board DDR memory behind its controller: a word array with
// the projector's request/grant port. Each cycle a request may be refused
// (mem_gnt low) with probability STALL_PCT percent (stall_pct_rt at run time), so the requester has to
// hold it; a granted read returns its word with rvalid on the next cycle.
// Counters report reads, writes, refused cycles and out-of-range accesses.
module ext_ram_model #(
  parameter int unsigned WORDS     = 1024,
  parameter int unsigned STALL_PCT = 20
) (
  input  logic        clk,
  input  logic        req,
  input  logic        we,
  input  logic [31:0] addr,
  input  logic [31:0] wdata,
  output logic        gnt,
  output logic        rvalid,
  output logic [31:0] rdata
);

  logic [31:0] mem [WORDS];
  logic        stall = 1'b0;
  int          stall_pct_rt = STALL_PCT;   // may be changed by a testbench
  int          n_reads = 0, n_writes = 0, n_stalls = 0, n_bad = 0;
  int          n_read_stalls = 0, n_write_stalls = 0;

  initial rvalid = 1'b0;
  initial rdata  = '0;

  assign gnt = req && !stall;

  always @(posedge clk) begin
    stall  <= ($urandom_range(99) < stall_pct_rt);
    rvalid <= 1'b0;
    if (req && stall) begin
      n_stalls++;
      if (we) n_write_stalls++;
      else    n_read_stalls++;
    end
    if (gnt) begin
      if (addr >= WORDS) begin
        n_bad++;
        if (!we) begin
          rdata  <= 32'h0;
          rvalid <= 1'b1;
        end
      end else if (we) begin
        mem[addr] <= wdata;
        n_writes++;
      end else begin
        rdata  <= mem[addr];
        rvalid <= 1'b1;
        n_reads++;
      end
    end
  end

endmodule
