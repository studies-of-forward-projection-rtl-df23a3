// fp_sqrt: sequential fixed-point square root, r = sqrt(x) for x >= 0.
//
// Digit-by-digit (restoring) square root of x * 2^FIX_F, two radicand bits and
// one root bit per cycle; the root of that integer is sqrt(x) in the fix_t
// format, truncated. A negative x is treated as zero.
//
// Interface: start (one-cycle pulse, accepted when not busy), x sampled with
// it; done pulses for one cycle when r is valid, r holds until the next start.
// Timing: done (FIX_W + FIX_F)/2 + 1 cycles after start.
// The root has (FIX_W + FIX_F)/2 = 40 bits, so the top 8 bits of r are
// always zero.
module fp_sqrt
  import fp_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  input  fix_t x,
  output logic busy,
  output logic done,
  output fix_t r
);

  localparam int unsigned RW = FIX_W + FIX_F;   // radicand width (even)
  localparam int unsigned QW = RW / 2;          // root width

  logic [RW-1:0]   rad;
  logic [QW-1:0]   root;
  logic [QW+2:0]   rem;
  logic [$clog2(QW+1)-1:0] cnt;

  logic [QW+2:0] rem_sh, trial;
  assign rem_sh = {rem[QW:0], rad[RW-1 -: 2]};
  assign trial  = {1'b0, root, 2'b01};

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy <= 1'b0; done <= 1'b0; r <= '0;
      rad <= '0; root <= '0; rem <= '0; cnt <= '0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        rad  <= x[FIX_W-1] ? '0 : (RW'(x) << FIX_F);
        root <= '0;
        rem  <= '0;
        cnt  <= '0;
        busy <= 1'b1;
      end else if (busy) begin
        if (32'(cnt) < QW) begin
          if (rem_sh >= trial) begin
            rem  <= rem_sh - trial;
            root <= {root[QW-2:0], 1'b1};
          end else begin
            rem  <= rem_sh;
            root <= {root[QW-2:0], 1'b0};
          end
          rad <= rad << 2;
          cnt <= cnt + 1'b1;
        end else begin
          busy <= 1'b0;
          done <= 1'b1;
          r    <= fix_t'(root);
        end
      end
    end
  end

endmodule
