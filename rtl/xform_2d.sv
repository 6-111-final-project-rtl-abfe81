// xform_2d: 2D transform of the rendering pipeline's transformation stage.
//
// Maps world coordinates (latitude/longitude/altitude/time, reduced by the
// visualization to 24-bit signed values) to screen pixels:
//   x' = X0 + (((x - OX) * SX) >>> (8 + SH))
//   y' = Y0 + (((y - OY) * SY) >>> (8 + SH))
// with SX, SY signed 12-bit scales (a negative SY turns "north up" into the
// screen's downward y axis).
// Commands it claims (transform opcode):
//   XF_2D_SETVIEW  v0 = OX, v1 = OY, v2 = {SX, SY}, v3 = {SH[3:0], X0[9:0], Y0[9:0]};
//                  the view is updated and the command ends here (NOOP out).
//   XF_2D_POINTS   v0..v3 = (x0, y0, x1, y1); all four values transformed.
//   XF_2D_RECT     v0..v3 = (x, y, w, h); both corners transformed and the
//                  result put back as top-left corner, width and height.
// Timing: single-cycle. On each `advance` the stage registers its result; a
// command it does not claim gives a NOOP, so the three transform outputs can
// be ORed. `adv_out` is always high. Setting the view by command and
// transforming four values at once are the proposal's; the fixed-point
// formula and encodings are this design's.
module xform_2d
  import gps_pkg::*;
(
  input  logic clk,
  input  logic rst,
  input  logic advance,
  output logic adv_out,
  input  cmd_t cmd_in,
  output cmd_t cmd_out
);
  logic signed [23:0] ox, oy;
  logic signed [11:0] sx, sy;
  logic        [3:0]  sh;
  logic        [9:0]  x0;
  logic        [8:0]  y0;

  assign adv_out = 1'b1;

  function automatic logic signed [23:0] map(input logic signed [23:0] v, input logic signed [23:0] o,
                                             input logic signed [11:0] s, input logic [9:0] base,
                                             input logic [3:0] shift);
    logic signed [24:0] d;
    logic signed [37:0] p;
    d = 25'(v) - 25'(o);
    p = 38'(d) * 38'(s);
    p = p >>> (8 + shift);
    return 24'(p) + 24'(base);
  endfunction

  function automatic logic signed [23:0] absd(input logic signed [23:0] a, input logic signed [23:0] b);
    return (a > b) ? a - b : b - a;
  endfunction

  cmd_t               r;
  logic signed [23:0] ax, ay, bx, by;

  always_comb begin
    ax = map(cmd_in.v[0], ox, sx, x0, sh);
    ay = map(cmd_in.v[1], oy, sy, 10'(y0), sh);
    if (cmd_in.xf == XF_2D_RECT) begin
      bx = map(cmd_in.v[0] + cmd_in.v[2], ox, sx, x0, sh);
      by = map(cmd_in.v[1] + cmd_in.v[3], oy, sy, 10'(y0), sh);
    end else begin
      bx = map(cmd_in.v[2], ox, sx, x0, sh);
      by = map(cmd_in.v[3], oy, sy, 10'(y0), sh);
    end
    r = cmd_in;
    r.xf = XF_NULL;
    if (cmd_in.xf == XF_2D_RECT) begin
      r.v[0] = (ax < bx) ? ax : bx;
      r.v[1] = (ay < by) ? ay : by;
      r.v[2] = absd(ax, bx);
      r.v[3] = absd(ay, by);
    end else begin
      r.v[0] = ax; r.v[1] = ay; r.v[2] = bx; r.v[3] = by;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      cmd_out <= CMD_NOOP;
      ox <= '0; oy <= '0; sx <= 12'sd256; sy <= 12'sd256; sh <= '0; x0 <= '0; y0 <= '0;
    end else if (advance) begin
      cmd_out <= CMD_NOOP;
      unique case (cmd_in.xf)
        XF_2D_SETVIEW: begin
          ox <= cmd_in.v[0];
          oy <= cmd_in.v[1];
          {sx, sy} <= cmd_in.v[2];
          sh <= cmd_in.v[3][23:20];
          x0 <= cmd_in.v[3][19:10];
          y0 <= cmd_in.v[3][8:0];
        end
        XF_2D_POINTS, XF_2D_RECT: cmd_out <= r;
        default: ;
      endcase
    end
  end
endmodule
