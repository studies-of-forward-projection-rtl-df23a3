// fp_pkg: geometry constants, number formats and shared types of the
// ray-driven forward projector.
//
// Geometry (all lengths in mm, equal to FOV pixels): a 512 x 512 field of view
// of 1 mm pixels centred on the origin, a point source 500 mm from the centre,
// a flat detector row of 1000 pixels of 1 mm whose centre is 500 mm from the
// FOV centre on the opposite side, and 1000 views spread over 0..pi. These
// numbers are the reference geometry of the projector; as in the original
// FPGA build they are fixed at elaboration and need a rebuild to change.
//
// Arithmetic: the phantom and sinogram are IEEE-754 single precision in
// external memory, as the reference design keeps them. Inside the datapath
// this implementation uses signed fixed point (FIX_W bits, FIX_F fractional,
// Q16.32 by default) instead of floating point cores; the converters
// f32_to_fix and fix_to_f32 sit at the memory boundary.
package fp_pkg;

  // ---------------- number format ----------------
  localparam int unsigned FIX_W = 48;   // total width
  localparam int unsigned FIX_F = 32;   // fractional bits
  typedef logic signed [FIX_W-1:0] fix_t;

  localparam fix_t FIX_ONE  = fix_t'(64'sd1 <<< FIX_F);
  localparam fix_t FIX_HALF = fix_t'(64'sd1 <<< (FIX_F-1));
  localparam fix_t FIX_MAX  = {1'b0, {(FIX_W-1){1'b1}}};
  localparam fix_t FIX_MIN  = {1'b1, {(FIX_W-1){1'b0}}};

  // integer (may be negative) to fixed point
  function automatic fix_t int2fix(input int signed v);
    return fix_t'(longint'(v) <<< FIX_F);
  endfunction

  // fixed-point product, truncated toward minus infinity
  function automatic fix_t fix_mul(input fix_t a, input fix_t b);
    logic signed [2*FIX_W-1:0] p;
    p = (2*FIX_W)'(a) * (2*FIX_W)'(b);
    return fix_t'(p >>> FIX_F);
  endfunction

  function automatic fix_t fix_abs(input fix_t a);
    return a[FIX_W-1] ? -a : a;
  endfunction

  // ---------------- geometry (defaults of the reference geometry) ----------------
  localparam int unsigned N_VIEWS   = 1000;  // source angles over 0..pi
  localparam int unsigned N_DET     = 1000;  // detector pixels per row
  localparam int unsigned FOV_N     = 512;   // FOV pixels per side
  localparam int signed   SRC_DIST  = 500;   // D_s, source to FOV centre
  localparam int signed   DET_DIST  = 500;   // D_d, detector row to FOV centre

  // pi in Q16.32: round(pi * 2^32)
  localparam fix_t FIX_PI      = fix_t'(48'sd13493037705);
  localparam fix_t FIX_HALF_PI = fix_t'(48'sd6746518852);

  // ---------------- ap_ctrl style operation states ----------------
  typedef enum logic [1:0] {OP_IDLE, OP_BUSY, OP_FIN, OP_DONE} op_state_e;

  // Source, detector start and detector step for one view (Sec. "coordinates")
  typedef struct packed {
    fix_t sx;   // source x
    fix_t sy;   // source y
    fix_t dx;   // detector start x
    fix_t dy;   // detector start y
    fix_t ddx;  // detector increment x
    fix_t ddy;  // detector increment y
  } coords_t;

  // Result of the orientation step for one detector pixel. Field order follows
  // the reference 160-bit record (ry | rx | centre y | centre x | flag word),
  // with every number widened to FIX_W bits.
  typedef struct packed {
    fix_t ry;        // source y - pixel centre y
    fix_t rx;        // source x - pixel centre x
    fix_t diy;       // detector pixel centre y
    fix_t dix;       // detector pixel centre x
    logic vertical;  // |ry| > |rx|
  } orient_t;

  // One stack entry: flattened phantom index (row * FOV_N + col) and weight
  localparam int unsigned IDX_W = $clog2(FOV_N*FOV_N);
  typedef struct packed {
    logic [IDX_W-1:0] idx;
    fix_t             weight;
  } stack_entry_t;

endpackage
