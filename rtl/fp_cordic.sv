// fp_cordic: iterative CORDIC that returns cos(theta) and sin(theta).
//
// Rotation-mode CORDIC: the vector (K, 0) is rotated by +/- atan(2^-i) in
// iteration i, choosing the direction that drives the residual angle z to
// zero, so that each step is a shift and an add:
//   x' = x -/+ (y >>> i),  y' = y +/- (x >>> i),  z' = z -/+ atan(2^-i).
// K = prod 1/sqrt(1 + 2^-2i) pre-compensates the CORDIC gain. Rotation mode
// only converges for |theta| < ~1.74 rad, so an angle above pi/2 is first
// reduced by pi/2 and the result rotated back by a quarter turn
// (cos t = -sin(t - pi/2), sin t = cos(t - pi/2)); this covers the 0..pi
// range the projector uses.
//
// The arctangent constants for i >= 11 equal 2^(32-i) in Q16.32 to within
// rounding, so only the first eleven are tabulated.
//
// Interface: ap_ctrl handshake (ap_start sampled while idle; ap_done and
// ap_ready pulse together for one cycle when cos_o/sin_o are valid; the
// outputs hold until the next start). theta in Q16.32 radians, 0..pi.
// Timing: ap_done rises ITER + 1 clock edges after the edge that accepts
// ap_start; the master drops ap_start on the ap_done/ap_ready pulse.
// The iteration count is this implementation's choice (the reference build
// used a vendor CORDIC core whose iteration count is internal to it).
module fp_cordic
  import fp_pkg::*;
#(
  parameter int unsigned ITER = 32
) (
  input  logic ap_clk,
  input  logic ap_rst_n,
  input  logic ap_start,
  output logic ap_done,
  output logic ap_idle,
  output logic ap_ready,
  input  fix_t theta,
  output fix_t cos_o,
  output fix_t sin_o
);

  // K = 0.607252935 in Q16.32
  localparam fix_t CORDIC_K = fix_t'(48'sd2608131496);

  function automatic fix_t atan_tab(input int unsigned i);
    case (i)
      0:  return fix_t'(48'sd3373259426);
      1:  return fix_t'(48'sd1991351318);
      2:  return fix_t'(48'sd1052175346);
      3:  return fix_t'(48'sd534100635);
      4:  return fix_t'(48'sd268086748);
      5:  return fix_t'(48'sd134174063);
      6:  return fix_t'(48'sd67103403);
      7:  return fix_t'(48'sd33553749);
      8:  return fix_t'(48'sd16777131);
      9:  return fix_t'(48'sd8388597);
      10: return fix_t'(48'sd4194303);
      default: return (i > 32) ? '0 : fix_t'(64'sd1 <<< (32 - i));
    endcase
  endfunction

  op_state_e state;
  fix_t x, y, z;
  logic quad;                        // angle was reduced by pi/2
  logic [$clog2(ITER+1)-1:0] iter;

  always_ff @(posedge ap_clk) begin
    if (!ap_rst_n) begin
      state <= OP_IDLE;
      x <= '0; y <= '0; z <= '0; quad <= 1'b0; iter <= '0;
      cos_o <= '0; sin_o <= '0;
    end else begin
      unique case (state)
        OP_IDLE: if (ap_start) begin
          quad  <= (theta > FIX_HALF_PI);
          z     <= (theta > FIX_HALF_PI) ? theta - FIX_HALF_PI : theta;
          x     <= CORDIC_K;
          y     <= '0;
          iter  <= '0;
          state <= OP_BUSY;
        end
        OP_BUSY: begin
          if (!z[FIX_W-1]) begin
            x <= x - (y >>> iter);
            y <= y + (x >>> iter);
            z <= z - atan_tab(32'(iter));
          end else begin
            x <= x + (y >>> iter);
            y <= y - (x >>> iter);
            z <= z + atan_tab(32'(iter));
          end
          iter <= iter + 1'b1;
          if (32'(iter) == ITER - 1) state <= OP_FIN;
        end
        OP_FIN: begin
          cos_o <= quad ? -y : x;
          sin_o <= quad ?  x : y;
          state <= OP_DONE;
        end
        OP_DONE: state <= OP_IDLE;
        default: state <= OP_IDLE;
      endcase
    end
  end

  assign ap_done  = (state == OP_DONE);
  assign ap_ready = (state == OP_DONE);
  assign ap_idle  = (state == OP_IDLE);

endmodule
