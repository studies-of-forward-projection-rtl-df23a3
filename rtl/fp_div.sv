// fp_div: sequential signed fixed-point divider, q = a / b.
//
// Restoring radix-2 division of |a| * 2^FIX_F by |b|, one quotient bit per
// cycle, followed by the sign correction. A quotient beyond the fix_t range,
// including division by zero, saturates to the largest magnitude of the
// right sign. The quotient is truncated toward zero.
//
// Interface: start (one-cycle pulse, accepted when not busy), a and b sampled
// with it; done pulses for one cycle when q is valid, q holds until the next
// start. Timing: done FIX_W + FIX_F + 1 cycles after start.
module fp_div
  import fp_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  input  fix_t a,
  input  fix_t b,
  output logic busy,
  output logic done,
  output fix_t q
);

  localparam int unsigned NW = FIX_W + FIX_F;   // dividend / quotient width

  logic [NW-1:0]    num;      // shifts out dividend bits, shifts in quotient bits
  logic [FIX_W:0]   rem;
  logic [FIX_W-1:0] den;
  logic             neg;
  logic [$clog2(NW+1)-1:0] cnt;

  logic [FIX_W:0] rem_sh;
  assign rem_sh = {rem[FIX_W-1:0], num[NW-1]};

  logic [NW-1:0] qmag;
  assign qmag = num;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy <= 1'b0; done <= 1'b0; q <= '0;
      num <= '0; rem <= '0; den <= '0; neg <= 1'b0; cnt <= '0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        num  <= NW'(fix_abs(a)) << FIX_F;
        den  <= fix_abs(b);
        rem  <= '0;
        neg  <= a[FIX_W-1] ^ b[FIX_W-1];
        cnt  <= '0;
        busy <= 1'b1;
      end else if (busy) begin
        if (32'(cnt) < NW) begin
          if (rem_sh >= {1'b0, den}) begin
            rem <= rem_sh - {1'b0, den};
            num <= {num[NW-2:0], 1'b1};
          end else begin
            rem <= rem_sh;
            num <= {num[NW-2:0], 1'b0};
          end
          cnt <= cnt + 1'b1;
        end else begin
          busy <= 1'b0;
          done <= 1'b1;
          if (den == '0 || qmag > NW'(FIX_MAX))
            q <= neg ? -FIX_MAX : FIX_MAX;
          else
            q <= neg ? -fix_t'(qmag) : fix_t'(qmag);
        end
      end
    end
  end

endmodule
