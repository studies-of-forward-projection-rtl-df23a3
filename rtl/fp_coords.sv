// fp_coords: angle-to-coordinates step of the projector.
//
// For a view angle theta it computes, with s = sin(theta), c = cos(theta):
//   source           Sx  =  Ds*s,            Sy  = -Ds*c
//   detector start   Dx  =  D*c - Dd*s,      Dy  =  D*s + Dd*c
//   detector step    dDx =  Dw*c,            dDy =  Dw*s
// where Ds is the source distance, Dd the detector distance, Dw the detector
// pixel width and D = -Dc*Dw/2 the start of a row of Dc pixels. These are the
// reference formulas of the ray-driven projector. sin and cos come from the
// fp_cordic instance; all the distances are whole millimetres, so each
// product is a constant multiplication of a Q16.32 value.
//
// Interface: ap_ctrl handshake; theta in, the six coordinates out as a
// coords_t record, valid from ap_done until the next start.
// Timing: ap_done rises 35 clock edges after the edge that accepts ap_start
// (CORDIC latency + 2; the reference floating-point module needed 30 cycles).
module fp_coords
  import fp_pkg::*;
#(
  parameter int unsigned N_DET_P    = N_DET,     // Dc
  parameter int signed   SRC_DIST_P = SRC_DIST,  // Ds, mm
  parameter int signed   DET_DIST_P = DET_DIST,  // Dd, mm
  parameter int signed   DET_W_P    = 1          // Dw, mm
) (
  input  logic    ap_clk,
  input  logic    ap_rst_n,
  input  logic    ap_start,
  output logic    ap_done,
  output logic    ap_idle,
  output logic    ap_ready,
  input  fix_t    theta,
  output coords_t coords
);

  // D = -Dc*Dw/2, exact in fixed point also for odd products
  localparam fix_t DET_START = fix_t'(-(64'sd1 * N_DET_P * DET_W_P) <<< (FIX_F - 1));

  typedef enum logic [1:0] {S_IDLE, S_TRIG, S_WAIT, S_DONE} state_e;
  state_e state;

  logic cs_start, cs_done;
  fix_t cs_cos, cs_sin;

  fp_cordic u_cordic (
    .ap_clk  (ap_clk),
    .ap_rst_n(ap_rst_n),
    .ap_start(cs_start),
    .ap_done (cs_done),
    .ap_idle (),
    .ap_ready(),
    .theta   (theta),
    .cos_o   (cs_cos),
    .sin_o   (cs_sin)
  );

  assign cs_start = (state == S_TRIG);

  // integer times fixed point
  function automatic fix_t imul(input int signed k, input fix_t v);
    return fix_t'(64'(k) * 64'(v));
  endfunction

  always_ff @(posedge ap_clk) begin
    if (!ap_rst_n) begin
      state  <= S_IDLE;
      coords <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (ap_start) state <= S_TRIG;
        S_TRIG: state <= S_WAIT;   // cordic accepts its start here
        S_WAIT: if (cs_done) begin
          coords.sx  <= imul(SRC_DIST_P, cs_sin);
          coords.sy  <= -imul(SRC_DIST_P, cs_cos);
          coords.dx  <= fix_mul(DET_START, cs_cos) - imul(DET_DIST_P, cs_sin);
          coords.dy  <= fix_mul(DET_START, cs_sin) + imul(DET_DIST_P, cs_cos);
          coords.ddx <= imul(DET_W_P, cs_cos);
          coords.ddy <= imul(DET_W_P, cs_sin);
          state      <= S_DONE;
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
