// fp_loop: per-ray loop calculation of the ray-driven projector.
//
// Given one ray (detector pixel centre Di, source displacement R = S - Di and
// the vertical flag) it lists every FOV pixel the ray crosses with the length
// of the ray inside it, and pushes the (pixel index, weight) pairs into the
// stack that fp_raysum later consumes.
//
// Set-up (pixel side 1 mm, row 0 at the top, column 0 at the left, pixel
// centres offset by A = (-(N-1)/2, +(N-1)/2)):
//   vertical ray (|Ry| > |Rx|), one step per row:
//     ratio = Rx/Ry,  c0 = (Dix - Ax) + (Ay - Diy)*ratio   (column at row 0)
//   horizontal ray, one step per column:
//     ratio = Ry/Rx,  c0 = (Ay - Diy) + (Dix - Ax)*ratio   (row at column 0)
//   delta = -ratio                    (minor-axis change per step)
//   L     = sqrt(1 + ratio^2)         (ray length per step)
//   S     = (1 - |ratio|)/2,  T = (1 + |ratio|)/2
//   inv   = L / (T - S) = L / |ratio|
// Traversal, for each of the N steps k with c advancing by delta:
//   m = floor(c + 0.5), o = c - m (o in [-0.5, 0.5));
//   m outside 0..N-1: the step adds nothing;
//   o < -S (ray left of centre):  w = (o + T)*inv, pixel m gets w and the
//                                 pixel before it (m-1) gets L - w;
//   o >  S (ray right of centre): w = (o - S)*inv, pixel m gets L - w and the
//                                 pixel after it (m+1) gets w;
//   otherwise (centre):           pixel m gets L.
// Neighbours outside the FOV are dropped. Weights are clamped to 0..L so the
// fixed-point saturation of inv for nearly axis-parallel rays stays harmless.
// The index of pixel (row, col) is row*N + col, the row-major order the
// phantom has in memory.
//
// Interface: ap_ctrl handshake; orient sampled at the accepted ap_start;
// push/push_entry deliver one stack entry per cycle while busy.
// Timing: set-up takes two divisions and a square root (about 210 cycles),
// then one cycle per step plus one per neighbour entry, at most 2N cycles.
module fp_loop
  import fp_pkg::*;
#(
  parameter int unsigned FOV_N_P = FOV_N
) (
  input  logic         ap_clk,
  input  logic         ap_rst_n,
  input  logic         ap_start,
  output logic         ap_done,
  output logic         ap_idle,
  output logic         ap_ready,
  input  orient_t      orient,
  output logic         push,
  output stack_entry_t push_entry
);

  localparam int unsigned IW = $clog2(FOV_N_P*FOV_N_P);
  // pixel-centre adjust values: Ax = -(N-1)/2, Ay = +(N-1)/2
  localparam fix_t ADJ_Y = fix_t'(64'sd1 * 64'(FOV_N_P - 1)) <<< (FIX_F - 1);
  localparam fix_t ADJ_X = -ADJ_Y;

  typedef enum logic [2:0] {
    S_IDLE, S_RATIO, S_LEN, S_INV, S_STEP, S_STEP2, S_DONE
  } state_e;
  state_e state;

  orient_t ray;
  fix_t ratio, c, delta, len, s_lo, t_hi, inv;
  logic [$clog2(FOV_N_P+1)-1:0] k;

  // ---------------- arithmetic helpers ----------------
  logic div_start, div_done;
  fix_t div_a, div_b, div_q;
  logic sq_start, sq_done;
  fix_t sq_x, sq_r;

  fp_div u_div (
    .clk(ap_clk), .rst_n(ap_rst_n), .start(div_start), .a(div_a), .b(div_b),
    .busy(), .done(div_done), .q(div_q)
  );
  fp_sqrt u_sqrt (
    .clk(ap_clk), .rst_n(ap_rst_n), .start(sq_start), .x(sq_x),
    .busy(), .done(sq_done), .r(sq_r)
  );

  // first division: the ratio (operands from the live input at start)
  always_comb begin
    if (state == S_IDLE) begin
      div_a = orient.vertical ? orient.rx : orient.ry;
      div_b = orient.vertical ? orient.ry : orient.rx;
    end else begin
      div_a = sq_r;                // second division: L / |ratio|
      div_b = fix_abs(ratio);
    end
  end
  assign div_start = (state == S_IDLE && ap_start) || (state == S_LEN && sq_done);
  assign sq_start  = (state == S_RATIO && div_done);
  assign sq_x      = FIX_ONE + fix_mul(div_q, div_q);

  // ---------------- per-step combinational decisions ----------------
  fix_t u_off, v_off;              // Dix - Ax, Ay - Diy
  assign u_off = ray.dix - ADJ_X;
  assign v_off = ADJ_Y - ray.diy;

  fix_t cr;                        // c + 0.5
  int signed m;
  fix_t o, w_left, w_right;
  logic in_fov, is_left, is_right, has_prev, has_next;

  function automatic fix_t clamp_w(input fix_t w, input fix_t lim);
    if (w[FIX_W-1]) return '0;
    if (w > lim)    return lim;
    return w;
  endfunction

  assign cr       = c + FIX_HALF;
  assign m        = int'(cr >>> FIX_F);
  assign o        = c - int2fix(m);
  assign in_fov   = (m >= 0) && (m < int'(FOV_N_P));
  assign is_left  = (o < -s_lo);
  assign is_right = !is_left && (o > s_lo);
  assign has_prev = (m > 0);
  assign has_next = (m < int'(FOV_N_P) - 1);
  assign w_left   = clamp_w(fix_mul(o + t_hi, inv), len);
  assign w_right  = clamp_w(fix_mul(o - s_lo, inv), len);

  // flattened index of minor position mm at the current step
  function automatic logic [IW-1:0] pix_idx(input int signed mm, input logic vert,
                                            input logic [$clog2(FOV_N_P+1)-1:0] kk);
    if (vert) return IW'(32'(kk) * FOV_N_P + 32'(mm));
    else      return IW'(32'(mm) * FOV_N_P + 32'(kk));
  endfunction

  stack_entry_t second;            // neighbour entry pushed in S_STEP2
  logic last_step;
  assign last_step = (32'(k) == FOV_N_P - 1);

  always_ff @(posedge ap_clk) begin
    if (!ap_rst_n) begin
      state <= S_IDLE;
      ray <= '0; ratio <= '0; c <= '0; delta <= '0; len <= '0;
      s_lo <= '0; t_hi <= '0; inv <= '0; k <= '0;
      push <= 1'b0; push_entry <= '0; second <= '0;
    end else begin
      push <= 1'b0;
      unique case (state)
        S_IDLE: if (ap_start) begin
          ray   <= orient;
          state <= S_RATIO;
        end
        S_RATIO: if (div_done) begin
          ratio <= div_q;
          delta <= -div_q;
          c     <= ray.vertical ? u_off + fix_mul(v_off, div_q)
                                : v_off + fix_mul(u_off, div_q);
          s_lo  <= (FIX_ONE - fix_abs(div_q)) >>> 1;
          t_hi  <= (FIX_ONE + fix_abs(div_q)) >>> 1;
          state <= S_LEN;
        end
        S_LEN: if (sq_done) begin
          len   <= sq_r;
          state <= S_INV;
        end
        S_INV: if (div_done) begin
          inv   <= div_q;
          k     <= '0;
          state <= S_STEP;
        end
        S_STEP: begin
          logic need2;
          need2 = 1'b0;
          if (in_fov) begin
            push <= 1'b1;
            push_entry.idx <= IDX_W'(pix_idx(m, ray.vertical, k));
            if (is_left) begin
              push_entry.weight <= w_left;
              second.idx        <= IDX_W'(pix_idx(m - 1, ray.vertical, k));
              second.weight     <= len - w_left;
              need2 = has_prev;
            end else if (is_right) begin
              push_entry.weight <= len - w_right;
              second.idx        <= IDX_W'(pix_idx(m + 1, ray.vertical, k));
              second.weight     <= w_right;
              need2 = has_next;
            end else begin
              push_entry.weight <= len;
            end
          end
          if (need2) begin
            state <= S_STEP2;
          end else begin
            c <= c + delta;
            k <= k + 1'b1;
            if (last_step) state <= S_DONE;
          end
        end
        S_STEP2: begin
          push       <= 1'b1;
          push_entry <= second;
          c <= c + delta;
          k <= k + 1'b1;
          state <= last_step ? S_DONE : S_STEP;
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
