// fp_raysum: weighted accumulation of one ray from the index/weight stack.
//
// For each stack entry 0..count-1 it reads the entry, fetches the phantom
// sample at PH_BASE + index from external memory, converts it from IEEE-754
// single precision to fixed point and adds weight * sample to the ray sum.
// The entries are processed one at a time: the read is issued, the unit waits
// for the sample, then accumulates (no overlap between entries), which is the
// sequential order of the reference design; only the stack read of the next
// entry overlaps the current one.
//
// Interface: ap_ctrl handshake; count sampled at the accepted ap_start.
// Stack side: raddr out, rdata in one cycle later. Memory side: a read
// request channel (rd_req with rd_addr, held until rd_gnt) and an in-order
// response (rd_rvalid with rd_rdata); one read is outstanding at a time.
// sum is valid from ap_done until the next start.
// Timing: with every request granted at once, ap_done rises 2n+1 clock edges
// after the edge that accepts ap_start for n > 0 entries (for n = 0 it is high
// right after that edge); each refused request cycle adds one.
// The upper bits of rd_addr are those of PH_BASE and the lower ones the
// stack index unchanged, so a netlist shows them as constant or as inputs.
module fp_raysum
  import fp_pkg::*;
#(
  parameter int unsigned DEPTH   = 2 * FOV_N,
  parameter logic [31:0] PH_BASE = 32'h0
) (
  input  logic                     ap_clk,
  input  logic                     ap_rst_n,
  input  logic                     ap_start,
  output logic                     ap_done,
  output logic                     ap_idle,
  output logic                     ap_ready,
  input  logic [$clog2(DEPTH):0]   count,
  output logic [$clog2(DEPTH)-1:0] raddr,
  input  stack_entry_t             rdata,
  output logic                     rd_req,
  output logic [31:0]              rd_addr,
  input  logic                     rd_gnt,
  input  logic                     rd_rvalid,
  input  logic [31:0]              rd_rdata,
  output fix_t                     sum
);

  typedef enum logic [2:0] {S_IDLE, S_FETCH, S_REQ, S_RESP, S_DONE} state_e;
  state_e state;

  logic [$clog2(DEPTH):0] n, e;
  fix_t sample;

  f32_to_fix u_cvt (.f(rd_rdata), .x(sample));

  // the next entry is read while the current one completes, so only the
  // first entry pays the stack read latency
  assign raddr   = (state == S_RESP && rd_rvalid) ? e[$clog2(DEPTH)-1:0] + 1'b1
                                                  : e[$clog2(DEPTH)-1:0];
  assign rd_req  = (state == S_REQ);
  assign rd_addr = PH_BASE + 32'(rdata.idx);

  always_ff @(posedge ap_clk) begin
    if (!ap_rst_n) begin
      state <= S_IDLE;
      n <= '0; e <= '0; sum <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (ap_start) begin
          n     <= count;
          e     <= '0;
          sum   <= '0;
          state <= (count == '0) ? S_DONE : S_FETCH;
        end
        S_FETCH: state <= S_REQ;               // stack read latency
        S_REQ:   if (rd_gnt) state <= S_RESP;
        S_RESP:  if (rd_rvalid) begin
          sum <= sum + fix_mul(rdata.weight, sample);
          e   <= e + 1'b1;
          state <= (e + 1'b1 == n) ? S_DONE : S_REQ;
        end
        S_DONE: state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  assign ap_done  = (state == S_DONE);
  assign ap_ready = (state == S_DONE);
  assign ap_idle  = (state == S_IDLE);

endmodule
