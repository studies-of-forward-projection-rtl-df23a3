// fp_orient: coordinate-to-orientation step of the projector.
//
// For detector pixel i of the current view it computes the pixel centre
//   Dix = Dx + (i + 0.5)*dDx,   Diy = Dy + (i + 0.5)*dDy,
// the displacement from that centre to the source
//   Rx = Sx - Dix,              Ry = Sy - Diy,
// and classifies the ray as vertical when |Ry| > |Rx| (otherwise horizontal).
// (i + 0.5)*d is formed as ((2i + 1)*d) >>> 1, so it is exact. The absolute
// values only clear the sign, as the reference does on IEEE-754 values.
//
// Interface: ap_ctrl handshake; coords (one view) and the detector index in,
// an orient_t record out (ry, rx, centre y, centre x, vertical flag: the
// field order of the reference 160-bit result word), valid from ap_done
// until the next start. Timing: ap_done rises one clock edge after the edge
// that accepts ap_start (the reference floating-point module needed 26 cycles).
module fp_orient
  import fp_pkg::*;
#(
  parameter int unsigned N_DET_P = N_DET
) (
  input  logic                       ap_clk,
  input  logic                       ap_rst_n,
  input  logic                       ap_start,
  output logic                       ap_done,
  output logic                       ap_idle,
  output logic                       ap_ready,
  input  coords_t                    coords,
  input  logic [$clog2(N_DET_P)-1:0] det_idx,
  output orient_t                    orient
);

  typedef enum logic [1:0] {S_IDLE, S_DISP, S_DONE} state_e;
  state_e state;

  fix_t dix, diy;
  fix_t rx_n, ry_n;
  logic signed [31:0] twoi1;

  assign twoi1 = 32'(2 * det_idx + 1);
  assign rx_n  = coords.sx - dix;
  assign ry_n  = coords.sy - diy;

  always_ff @(posedge ap_clk) begin
    if (!ap_rst_n) begin
      state  <= S_IDLE;
      dix    <= '0;
      diy    <= '0;
      orient <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (ap_start) begin
          dix   <= coords.dx + fix_t'((64'(twoi1) * 64'(coords.ddx)) >>> 1);
          diy   <= coords.dy + fix_t'((64'(twoi1) * 64'(coords.ddy)) >>> 1);
          state <= S_DISP;
        end
        S_DISP: begin
          orient.dix      <= dix;
          orient.diy      <= diy;
          orient.rx       <= rx_n;
          orient.ry       <= ry_n;
          orient.vertical <= fix_abs(ry_n) > fix_abs(rx_n);
          state           <= S_DONE;
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
