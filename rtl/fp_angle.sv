// fp_angle: count-to-angle step of the projector.
//
// Turns the integer view count k into the source/detector rotation angle
// theta = k * pi / N_VIEWS in radians, so that N_VIEWS views cover 0..pi.
// The angle step pi / N_VIEWS is a constant rounded to Q16.32 at elaboration,
// so the conversion is one constant multiplication; the error after 1000
// views is below 3e-7 rad.
//
// Interface: ap_ctrl handshake with a 32-bit unsigned count in and a Q16.32
// angle out, as in the reference module (which produced a single-precision
// float instead). Timing: ap_done/ap_ready are high in the cycle right after
// the edge that accepts ap_start (the reference floating-point core needed 9
// cycles);
// the angle holds until the next start.
module fp_angle
  import fp_pkg::*;
#(
  parameter int unsigned N_VIEWS_P = N_VIEWS
) (
  input  logic        ap_clk,
  input  logic        ap_rst_n,
  input  logic        ap_start,
  output logic        ap_done,
  output logic        ap_idle,
  output logic        ap_ready,
  input  logic [31:0] count,
  output fix_t        angle
);

  localparam fix_t STEP = fix_t'((64'(FIX_PI) + 64'(N_VIEWS_P / 2)) / 64'(N_VIEWS_P));

  op_state_e state;

  always_ff @(posedge ap_clk) begin
    if (!ap_rst_n) begin
      state <= OP_IDLE;
      angle <= '0;
    end else begin
      unique case (state)
        OP_IDLE: if (ap_start) begin
          angle <= fix_t'($signed({1'b0, count}) * STEP);
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
