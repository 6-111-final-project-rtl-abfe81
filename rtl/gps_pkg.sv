// gps_pkg: types and constants shared by the GPS data logger and the
// visualization system.
//
// fix_t is the 129-bit position fix handed from the log decoder through the
// fix queue to the visualizations (EOF flag, then latitude, longitude,
// altitude and velocity, 32 bits each, most significant first).
// cmd_t is the 136-bit rendering command that travels down the rendering
// pipeline. It carries one 3-bit operation per pipeline participant
// (rendering manager, transform stage, drawing stage, coloring stage), four
// 24-bit value slots and a colour with a 4-bit alpha. The 136-bit width and the
// 3-bit-per-stage opcodes follow the proposal; the field order, the manager
// opcode field, the opcode values beyond those the proposal suggests and the
// value/colour split are this design's own choices.
package gps_pkg;

  // ---------------- position fixes ----------------
  typedef struct packed {
    logic        eof;   // 1: the previous fix was the last one recorded
    logic [31:0] lat;
    logic [31:0] lon;
    logic [31:0] alt;
    logic [31:0] vel;
  } fix_t;

  localparam int FIX_W = $bits(fix_t);  // 129

  // Log record magic numbers (first word of the init and termination records)
  localparam logic [31:0] LOG_START_MAGIC = 32'h47505331;  // "GPS1"
  localparam logic [31:0] LOG_END_MAGIC   = 32'h454E4421;  // "END!"

  // ---------------- screen / VRAM ----------------
  localparam int H_RES   = 640;
  localparam int V_RES   = 480;
  localparam int X_W     = 10;
  localparam int Y_W     = 9;
  localparam int VADDR_W = X_W + Y_W;  // 19: 512K words, one ZBT RAM
  localparam int VDATA_W = 36;         // ZBT word, RGB in bits 23:0

  // ---------------- rendering commands ----------------
  typedef enum logic [2:0] {
    MGR_NONE     = 3'd0,
    MGR_RERENDER = 3'd1,  // visualization wants to start a new frame
    MGR_COMPLETE = 3'd2   // visualization has issued the whole frame
  } mgr_op_e;

  typedef enum logic [2:0] {
    XF_NULL       = 3'd0,  // bypass: values are already screen coordinates
    XF_2D_POINTS  = 3'd1,  // v0..v3 = two world points (x0,y0,x1,y1)
    XF_3D_POINTS  = 3'd2,  // v0..v3 hold six 16-bit values x0,y0,z0,x1,y1,z1
    XF_2D_RECT    = 3'd3,  // v0,v1 world point; v2,v3 world width/height
    XF_2D_SETVIEW = 3'd4,  // v0,v1 world origin; v2 = {SX, SY}; v3 = {SH, X0, Y0}
    XF_3D_SETROW0 = 3'd5,  // first projection row, three Q2.14 coefficients
    XF_3D_SETROW1 = 3'd6,  // second projection row
    XF_3D_SETVIEW = 3'd7   // v0,v1 screen centre; v2[3:0] extra right shift
  } xf_op_e;

  typedef enum logic [2:0] {
    DR_NONE = 3'd0,  // nothing to draw (view-setting, manager commands)
    DR_TEXT = 3'd1,  // v0,v1 position; v2,v3 six ASCII characters
    DR_RECT = 3'd2,  // v0,v1 corner; v2,v3 width, height
    DR_LINE = 3'd3   // v0,v1 -> v2,v3
  } draw_op_e;

  typedef enum logic [2:0] {
    CO_NONE      = 3'd0,
    CO_OVERWRITE = 3'd1,
    CO_ALPHA     = 3'd2
  } color_op_e;

  typedef struct packed {
    mgr_op_e           mgr;
    xf_op_e            xf;
    draw_op_e          draw;
    color_op_e         color;
    logic [3:0][23:0]  v;      // v[0] is the least significant slot
    logic [23:0]       rgb;
    logic [3:0]        alpha;  // 0..15, weight of the new colour in 16ths
  } cmd_t;

  localparam int CMD_W = $bits(cmd_t);  // 136

  localparam cmd_t CMD_NOOP = '0;

  // One pixel handed from the drawing stage to the coloring stage
  typedef struct packed {
    logic [X_W-1:0] x;
    logic [Y_W-1:0] y;
    logic [23:0]    rgb;
    logic [3:0]     alpha;
    logic           blend;
  } pixel_t;

  // Pack six signed 16-bit values into the four 24-bit slots (3D commands)
  function automatic logic [95:0] pack6(input logic [15:0] a, b, c, d, e, f);
    return {a, b, c, d, e, f};
  endfunction

endpackage
