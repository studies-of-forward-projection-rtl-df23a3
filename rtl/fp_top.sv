// fp_top: ray-driven forward projector (main state machine).
//
// One run computes the whole sinogram of the phantom held in external memory.
// For every view k = 0..N_VIEWS-1 the state machine
//   1. turns k into the angle theta = k*pi/N_VIEWS          (fp_angle)
//   2. computes source, detector start and detector step    (fp_coords)
//   3. for every detector pixel i = 0..N_DET-1:
//        a. pixel centre, source displacement, orientation  (fp_orient)
//        b. clears the stack and lists the crossed pixels
//           with their weights                              (fp_loop, fp_stack)
//        c. fetches those phantom samples, sums
//           weight*sample and stores the sum as an IEEE-754
//           single in the view buffer                       (fp_raysum, fix_to_f32,
//                                                            fp_view_buf)
//   4. copies the view buffer to sinogram row k in external memory.
// Every step is a sub-module with an ap_ctrl handshake: the state machine
// holds ap_start while it waits in that step and moves on at ap_done.
//
// External memory: one word-addressed port shared by the phantom reads (step
// 3c) and the sinogram writes (step 4), never used by both at once. The
// phantom is a row-major FOV_N x FOV_N array of singles at PH_BASE; sinogram
// sample (view k, pixel i) is written to SINO_BASE + k*N_DET + i. A request
// (mem_req, mem_we, mem_addr, mem_wdata) is held until mem_gnt; a read returns
// its data with mem_rvalid, in order; a write is complete at mem_gnt.
//
// Control: ap_ctrl handshake with active-low reset. ap_idle is high while the
// projector waits; ap_start starts a run and must be held until ap_ready;
// ap_done and ap_ready are high together for one cycle when the last sinogram
// row has been written. stack_overflow is a sticky error flag.
//
// The geometry defaults are the reference ones (512 x 512 FOV of 1 mm pixels,
// 1000 detector pixels of 1 mm, 1000 views over 0..pi, source and detector
// 500 mm from the centre). The memory port, its handshake and the base
// addresses are this implementation's choices; the reference design reached
// its DDR memory through a soft processor's bus.
module fp_top
  import fp_pkg::*;
#(
  parameter int unsigned FOV_N_P    = FOV_N,
  parameter int unsigned N_DET_P    = N_DET,
  parameter int unsigned N_VIEWS_P  = N_VIEWS,
  parameter int signed   SRC_DIST_P = SRC_DIST,
  parameter int signed   DET_DIST_P = DET_DIST,
  parameter logic [31:0] PH_BASE    = 32'h0,
  parameter logic [31:0] SINO_BASE  = 32'(FOV_N_P * FOV_N_P)
) (
  input  logic        ap_clk,
  input  logic        ap_rst_n,
  input  logic        ap_start,
  output logic        ap_done,
  output logic        ap_idle,
  output logic        ap_ready,
  // external memory
  output logic        mem_req,
  output logic        mem_we,
  output logic [31:0] mem_addr,
  output logic [31:0] mem_wdata,
  input  logic        mem_gnt,
  input  logic        mem_rvalid,
  input  logic [31:0] mem_rdata,
  // status
  output logic        stack_overflow
);

  localparam int unsigned DEPTH = 2 * FOV_N_P;
  localparam int unsigned DW    = $clog2(N_DET_P);

  typedef enum logic [3:0] {
    T_IDLE, T_ANGLE, T_COORD, T_ORIENT, T_LOOP, T_SUM, T_WB_RD, T_WB_WR, T_DONE
  } state_e;
  state_e state;

  logic [31:0]   view;
  logic [DW-1:0] det;

  // ---------------- step 1: count to angle ----------------
  logic an_done;
  fix_t angle;
  fp_angle #(.N_VIEWS_P(N_VIEWS_P)) u_angle (
    .ap_clk, .ap_rst_n, .ap_start(state == T_ANGLE),
    .ap_done(an_done), .ap_idle(), .ap_ready(),
    .count(view), .angle(angle)
  );

  // ---------------- step 2: angle to coordinates ----------------
  logic co_done;
  coords_t coords;
  fp_coords #(
    .N_DET_P(N_DET_P), .SRC_DIST_P(SRC_DIST_P), .DET_DIST_P(DET_DIST_P), .DET_W_P(1)
  ) u_coords (
    .ap_clk, .ap_rst_n, .ap_start(state == T_COORD),
    .ap_done(co_done), .ap_idle(), .ap_ready(),
    .theta(angle), .coords(coords)
  );

  // ---------------- step 3a: orientation ----------------
  logic or_done;
  orient_t orient;
  fp_orient #(.N_DET_P(N_DET_P)) u_orient (
    .ap_clk, .ap_rst_n, .ap_start(state == T_ORIENT),
    .ap_done(or_done), .ap_idle(), .ap_ready(),
    .coords(coords), .det_idx(det), .orient(orient)
  );

  // ---------------- step 3b: ray loop and stack ----------------
  logic lp_done;
  logic push;
  stack_entry_t push_entry;
  fp_loop #(.FOV_N_P(FOV_N_P)) u_loop (
    .ap_clk, .ap_rst_n, .ap_start(state == T_LOOP),
    .ap_done(lp_done), .ap_idle(), .ap_ready(),
    .orient(orient), .push(push), .push_entry(push_entry)
  );

  logic [$clog2(DEPTH)-1:0] st_raddr;
  stack_entry_t             st_rdata;
  logic [$clog2(DEPTH):0]   st_count;
  fp_stack #(.DEPTH(DEPTH)) u_stack (
    .clk(ap_clk), .rst_n(ap_rst_n), .clear(state == T_ORIENT),
    .push(push), .push_entry(push_entry),
    .raddr(st_raddr), .rdata(st_rdata), .count(st_count),
    .overflow(stack_overflow)
  );

  // ---------------- step 3c: weighted sum ----------------
  logic rs_done;
  logic rs_req, rs_gnt;
  logic [31:0] rs_addr;
  fix_t ray_sum;
  fp_raysum #(.DEPTH(DEPTH), .PH_BASE(PH_BASE)) u_raysum (
    .ap_clk, .ap_rst_n, .ap_start(state == T_SUM),
    .ap_done(rs_done), .ap_idle(), .ap_ready(),
    .count(st_count), .raddr(st_raddr), .rdata(st_rdata),
    .rd_req(rs_req), .rd_addr(rs_addr), .rd_gnt(rs_gnt),
    .rd_rvalid(mem_rvalid), .rd_rdata(mem_rdata), .sum(ray_sum)
  );

  logic [31:0] ray_sum_f;
  fix_to_f32 u_tofloat (.x(ray_sum), .f(ray_sum_f));

  // ---------------- view buffer ----------------
  logic [31:0] vb_rdata;
  fp_view_buf #(.DEPTH(N_DET_P)) u_view_buf (
    .clk(ap_clk), .we(state == T_SUM && rs_done), .waddr(det), .wdata(ray_sum_f),
    .raddr(det), .rdata(vb_rdata)
  );

  // ---------------- external memory port ----------------
  always_comb begin
    mem_req   = 1'b0;
    mem_we    = 1'b0;
    mem_addr  = rs_addr;
    mem_wdata = vb_rdata;
    if (state == T_SUM) begin
      mem_req = rs_req;
    end else if (state == T_WB_WR) begin
      mem_req  = 1'b1;
      mem_we   = 1'b1;
      mem_addr = SINO_BASE + view * N_DET_P + 32'(det);
    end
  end
  assign rs_gnt = mem_gnt && (state == T_SUM);

  // ---------------- main state machine ----------------
  logic last_det, last_view;
  assign last_det  = (32'(det) == N_DET_P - 1);
  assign last_view = (view == N_VIEWS_P - 1);

  always_ff @(posedge ap_clk) begin
    if (!ap_rst_n) begin
      state <= T_IDLE;
      view  <= '0;
      det   <= '0;
    end else begin
      unique case (state)
        T_IDLE:   if (ap_start) begin
          view  <= '0;
          det   <= '0;
          state <= T_ANGLE;
        end
        T_ANGLE:  if (an_done) state <= T_COORD;
        T_COORD:  if (co_done) begin
          det   <= '0;
          state <= T_ORIENT;
        end
        T_ORIENT: if (or_done) state <= T_LOOP;
        T_LOOP:   if (lp_done) state <= T_SUM;
        T_SUM:    if (rs_done) begin
          if (last_det) begin
            det   <= '0;
            state <= T_WB_RD;
          end else begin
            det   <= det + 1'b1;
            state <= T_ORIENT;
          end
        end
        T_WB_RD:  state <= T_WB_WR;              // view buffer read latency
        T_WB_WR:  if (mem_gnt) begin
          if (last_det) begin
            det <= '0;
            if (last_view) state <= T_DONE;
            else begin
              view  <= view + 1'b1;
              state <= T_ANGLE;
            end
          end else begin
            det   <= det + 1'b1;
            state <= T_WB_RD;
          end
        end
        T_DONE:   state <= T_IDLE;
        default:  state <= T_IDLE;
      endcase
    end
  end

  assign ap_done  = (state == T_DONE);
  assign ap_ready = (state == T_DONE);
  assign ap_idle  = (state == T_IDLE);

  // ---------------- protocol checks ----------------
  // a request is held, unchanged, until it is granted
  property p_req_held;
    @(posedge ap_clk) disable iff (!ap_rst_n)
      mem_req && !mem_gnt |=> mem_req && $stable(mem_addr) && $stable(mem_we);
  endproperty
  a_req_held: assert property (p_req_held);

  // the stack never loses an entry
  a_no_overflow: assert property (@(posedge ap_clk) disable iff (!ap_rst_n) !stack_overflow);

endmodule
