// vis_plot: a visualization module. Each instance draws one kind of plot of
// the logged track, selected by MODE:
//   MODE 0  altitude against time (fix number), 2D transform
//   MODE 1  2D position (longitude, latitude), velocity shown as colour
//   MODE 2  3D position plus altitude, rotatable, 3D transform
// It renders only while the 4-bit `active` input equals ID.
//
// A frame is a fixed procession of states, one rendering command each unless
// noted: re-render request; view setup (the transform's view commands);
// background (full-screen rectangle, bypass); two axis lines (bypass); a
// translucent label panel (alpha-blended rectangle) and the plot's name
// (text); then one line command per pair of consecutive fixes, read from
// the fix queue until a fix with the EOF flag arrives; finally render
// complete. A command is held on `cmd` with `cmd_valid` until `cmd_taken`.
// The first fix of each frame becomes the reference point: coordinates are
// sent relative to it (24-bit for the 2D transform, scaled down by 16 to
// 16 bits for the 3D transform).
// Mouse, while active: left button + movement pans; the wheel zooms (one
// step = a factor of two); right button + horizontal movement rotates the 3D
// view in 22.5 degree steps. Any such change starts a new frame, as does
// becoming active.
// The list of plots, the procession of states, the use of mouse packets for
// pan/zoom/rotate and the re-render/complete handshake are the proposal's;
// the scales, colours, labels and mouse bindings are this design's.
module vis_plot
  import gps_pkg::*;
#(
  parameter int         MODE = 1,
  parameter logic [3:0] ID   = 4'd1
) (
  input  logic       clk,
  input  logic       rst,
  input  logic [3:0] active,
  // mouse packets
  input  logic       m_avail,
  input  logic [2:0] m_lmr,
  input  logic [7:0] m_x,
  input  logic [7:0] m_y,
  input  logic [7:0] m_z,
  // fixes (from the fix queue, through the rendering manager)
  input  fix_t       fix,
  input  logic       fix_empty,
  output logic       fix_rd,
  // commands to the rendering manager
  output cmd_t       cmd,
  output logic       cmd_valid,
  input  logic       cmd_taken,
  output logic [15:0] plotted     // line commands issued in the last frame
);
  typedef enum logic [3:0] {
    IDLE, RERENDER, VIEW0, VIEW1, VIEW2, BG, AXIS_X, AXIS_Y, PANEL, LABEL,
    FIRST, DATA, COMPLETE
  } state_e;
  state_e state;

  logic signed [23:0] pan_x, pan_y;
  logic        [3:0]  zoom, angle;
  logic               dirty, was_active;
  logic signed [31:0] ref_a, ref_b, ref_c;   // reference fix
  logic signed [23:0] px, py, pz;            // previous point (relative)
  logic        [15:0] idx;

  wire me = (active == ID);

  // ---- default zoom per mode (shift in the transform) ----
  localparam logic [3:0] ZOOM0 = (MODE == 0) ? 4'd0 : (MODE == 1) ? 4'd8 : 4'd4;

  // ---- sine table, Q2.14, for k * 22.5 degrees ----
  function automatic logic signed [15:0] sin16(input logic [3:0] k);
    logic signed [15:0] q [5];
    q[0] = 16'sd0; q[1] = 16'sd6270; q[2] = 16'sd11585; q[3] = 16'sd15137; q[4] = 16'sd16384;
    unique case (k[3:2])
      2'd0: return q[k[1:0]];
      2'd1: return q[3'd4 - 3'(k[1:0])];
      2'd2: return -q[k[1:0]];
      default: return -q[3'd4 - 3'(k[1:0])];
    endcase
  endfunction

  logic signed [15:0] s_t, c_t;
  always_comb begin
    s_t = sin16(angle);
    c_t = sin16(angle + 4'd4);
  end

  // ---- current fix, relative to the reference, per mode ----
  logic signed [31:0] ra, rb, rc;
  logic signed [23:0] nx, ny, nz;
  logic        [23:0] colour;
  logic        [15:0] sog;
  always_comb begin
    ra  = signed'(fix.lon) - ref_a;
    rb  = signed'(fix.lat) - ref_b;
    rc  = signed'(fix.alt) - ref_c;
    sog = fix.vel[31:16];
    unique case (MODE)
      0:       begin nx = 24'(idx);  ny = 24'(rc); nz = '0; end
      1:       begin nx = 24'(ra);   ny = 24'(rb); nz = '0; end
      default: begin nx = 24'(ra >>> 4); ny = 24'(rb >>> 4); nz = 24'(rc >>> 4); end
    endcase
    // speed colour: red rises and green falls with speed over ground
    colour = (sog[15:11] != 0) ? 24'hFF0040 : {sog[10:3], ~sog[10:3], 8'h40};
    if (MODE != 1) colour = 24'hFFFF00;
  end

  // ---- the command of each state ----
  always_comb begin
    cmd = CMD_NOOP;
    unique case (state)
      RERENDER: cmd.mgr = MGR_RERENDER;
      VIEW0: if (MODE == 2) begin
        cmd.xf = XF_3D_SETROW0;
        cmd.v  = pack6(c_t, -s_t, 16'sd0, 16'sd0, 16'sd0, 16'sd0);
      end else begin
        cmd.xf   = XF_2D_SETVIEW;
        cmd.v[0] = pan_x;
        cmd.v[1] = pan_y;
        cmd.v[2] = (MODE == 0) ? {12'sd256, -12'sd5} : {12'sd256, -12'sd256};
        cmd.v[3] = {zoom, 10'd40, 10'd440};
      end
      VIEW1: begin
        cmd.xf = XF_3D_SETROW1;
        cmd.v  = pack6(-(s_t >>> 1), -(c_t >>> 1), -16'sd14189, 16'sd0, 16'sd0, 16'sd0);
      end
      VIEW2: begin
        cmd.xf   = XF_3D_SETVIEW;
        cmd.v[0] = 24'sd320 - pan_x;
        cmd.v[1] = 24'sd240 - pan_y;
        cmd.v[2] = 24'(zoom);
      end
      BG: begin
        cmd.draw = DR_RECT; cmd.color = CO_OVERWRITE;
        cmd.v = {24'd480, 24'd640, 24'd0, 24'd0};
        cmd.rgb = 24'h000020;
      end
      AXIS_X: begin
        cmd.draw = DR_LINE; cmd.color = CO_OVERWRITE;
        cmd.v = {24'd440, 24'd630, 24'd440, 24'd40};
        cmd.rgb = 24'hC0C0C0;
      end
      AXIS_Y: begin
        cmd.draw = DR_LINE; cmd.color = CO_OVERWRITE;
        cmd.v = {24'd10, 24'd40, 24'd440, 24'd40};
        cmd.rgb = 24'hC0C0C0;
      end
      PANEL: begin
        cmd.draw = DR_RECT; cmd.color = CO_ALPHA; cmd.alpha = 4'd7;
        cmd.v = {24'd12, 24'd44, 24'd8, 24'd560};
        cmd.rgb = 24'h404080;
      end
      LABEL: begin
        cmd.draw = DR_TEXT; cmd.color = CO_OVERWRITE;
        cmd.v[0] = 24'd564; cmd.v[1] = 24'd11;
        {cmd.v[3], cmd.v[2]} = (MODE == 0) ? "ALT-T " : (MODE == 1) ? "POS-V " : "3D POS";
        cmd.rgb = 24'hFFFFFF;
      end
      DATA: begin
        cmd.draw = DR_LINE; cmd.color = CO_OVERWRITE; cmd.rgb = colour;
        if (MODE == 2) begin
          cmd.xf = XF_3D_POINTS;
          cmd.v  = pack6(16'(px), 16'(py), 16'(pz), 16'(nx), 16'(ny), 16'(nz));
        end else begin
          cmd.xf = XF_2D_POINTS;
          cmd.v  = {ny, nx, py, px};
        end
      end
      COMPLETE: cmd.mgr = MGR_COMPLETE;
      default: ;
    endcase
  end

  assign cmd_valid = me && (state != IDLE) && (state != FIRST) &&
                     !(state == DATA && (fix_empty || fix.eof));
  // pop the first fix once captured, and each later fix once its line is taken
  assign fix_rd = me && !fix_empty && !fix.eof &&
                  ((state == FIRST) || (state == DATA && cmd_taken));

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= IDLE; pan_x <= '0; pan_y <= '0; zoom <= ZOOM0; angle <= 4'd2;
      dirty <= 1'b0; was_active <= 1'b0; ref_a <= '0; ref_b <= '0; ref_c <= '0;
      px <= '0; py <= '0; pz <= '0; idx <= '0; plotted <= '0;
    end else begin
      was_active <= me;
      // mouse: pan, zoom, rotate
      if (me && m_avail) begin
        if (m_lmr[2] && (m_x != 0 || m_y != 0)) begin
          pan_x <= pan_x - (24'(signed'(m_x)) <<< zoom);
          pan_y <= pan_y + (24'(signed'(m_y)) <<< zoom);
          dirty <= 1'b1;
        end
        if (m_z != 0) begin
          if (m_z[7] && zoom != 0)       begin zoom <= zoom - 1'b1; dirty <= 1'b1; end
          else if (!m_z[7] && zoom != 15) begin zoom <= zoom + 1'b1; dirty <= 1'b1; end
        end
        if (m_lmr[0] && m_x != 0 && MODE == 2) begin
          angle <= m_x[7] ? angle - 1'b1 : angle + 1'b1;
          dirty <= 1'b1;
        end
      end
      unique case (state)
        IDLE: if (me && (dirty || !was_active)) begin
          state <= RERENDER;
          dirty <= 1'b0;
        end
        RERENDER: if (cmd_taken) state <= (MODE == 2) ? VIEW0 : VIEW0;
        VIEW0:    if (cmd_taken) state <= (MODE == 2) ? VIEW1 : BG;
        VIEW1:    if (cmd_taken) state <= VIEW2;
        VIEW2:    if (cmd_taken) state <= BG;
        BG:       if (cmd_taken) state <= AXIS_X;
        AXIS_X:   if (cmd_taken) state <= AXIS_Y;
        AXIS_Y:   if (cmd_taken) state <= PANEL;
        PANEL:    if (cmd_taken) state <= LABEL;
        LABEL:    if (cmd_taken) begin state <= FIRST; idx <= '0; plotted <= '0; end
        FIRST: if (!fix_empty) begin
          if (fix.eof) state <= COMPLETE;
          else begin
            ref_a <= signed'(fix.lon);
            ref_b <= signed'(fix.lat);
            ref_c <= signed'(fix.alt);
            px <= '0; py <= '0; pz <= '0;
            idx   <= 16'd1;
            state <= DATA;
          end
        end
        DATA: if (!fix_empty && fix.eof) state <= COMPLETE;
              else if (cmd_taken) begin
                px <= nx; py <= ny; pz <= nz;
                idx <= idx + 1'b1;
                plotted <= plotted + 1'b1;
              end
        COMPLETE: if (cmd_taken) state <= IDLE;
        default: state <= IDLE;
      endcase
      if (!me && state != IDLE && state != COMPLETE) state <= IDLE;  // deselected mid-frame
    end
  end
endmodule
