// xform_3d: 3D transform of the rendering pipeline's transformation stage.
//
// Projects two 3D points onto the screen with a 2x3 matrix:
//   x' = CX + ((R0 . p) >>> (14 + SH)),   y' = CY + ((R1 . p) >>> (14 + SH))
// R0 and R1 are rows of three signed Q2.14 coefficients, so rotation about
// any axis followed by an orthographic projection can be expressed; the
// visualization computes the rows from its view angles.
// Commands it claims (transform opcode):
//   XF_3D_SETROW0 / XF_3D_SETROW1  v holds six 16-bit fields, the first three
//                  are the row's coefficients (pack6 order); NOOP out.
//   XF_3D_SETVIEW  v0 = CX, v1 = CY, v2[3:0] = SH; NOOP out.
//   XF_3D_POINTS   v holds x0, y0, z0, x1, y1, z1 (signed 16-bit); the output
//                  is a bypass command with v0..v3 = x0', y0', x1', y1'.
// Timing: a single multiplier does one product per cycle, so a point pair
// takes 12 cycles. While it works `adv_out` is low, which halts the whole
// pipeline through the shared advance signal; the result appears on
// `cmd_out` before `adv_out` rises. Transforming six values and the use of
// advance are the proposal's; the matrix form, the fixed-point formats and the
// one-multiplier schedule are this design's.
module xform_3d
  import gps_pkg::*;
(
  input  logic clk,
  input  logic rst,
  input  logic advance,
  output logic adv_out,
  input  cmd_t cmd_in,
  output cmd_t cmd_out
);
  logic signed [15:0] r0 [3];
  logic signed [15:0] r1 [3];
  logic signed [23:0] cx, cy;
  logic        [3:0]  sh;

  logic               busy;
  cmd_t               held;
  logic signed [15:0] p [6];
  logic        [3:0]  step;        // 0..11: point, row, coordinate
  logic signed [35:0] acc;
  logic signed [23:0] res [4];

  assign adv_out = !busy;

  // operands of the current step: point k = step/6, row = (step/3)%2, axis = step%3
  logic signed [15:0] coef, coord;
  logic        [1:0]  axis;
  logic               row, pt;
  always_comb begin
    pt    = (step >= 6);
    row   = ((step % 6) >= 3);
    axis  = 2'(step % 3);
    coef  = row ? r1[axis] : r0[axis];
    coord = p[pt ? 3 + axis : axis];
  end

  wire [95:0] vflat = cmd_in.v;

  wire signed [35:0] prod = 36'(coef) * 36'(coord);
  wire signed [35:0] sum  = acc + prod;
  wire signed [35:0] scaled = sum >>> (14 + sh);

  always_ff @(posedge clk) begin
    if (rst) begin
      cmd_out <= CMD_NOOP; busy <= 1'b0; held <= CMD_NOOP; step <= '0; acc <= '0;
      cx <= '0; cy <= '0; sh <= '0;
      for (int i = 0; i < 3; i++) begin r0[i] <= '0; r1[i] <= '0; end
      for (int i = 0; i < 6; i++) p[i] <= '0;
      for (int i = 0; i < 4; i++) res[i] <= '0;
    end else if (busy) begin
      if (axis == 2'd2) begin
        acc <= '0;
        res[{pt, row}] <= 24'(scaled) + (row ? cy : cx);
      end else acc <= sum;
      if (step == 4'd11) begin
        busy    <= 1'b0;
        cmd_out <= held;
        cmd_out.xf <= XF_NULL;
        cmd_out.v  <= {24'(scaled) + cy, res[2], res[1], res[0]};
      end else step <= step + 1'b1;
    end else if (advance) begin
      cmd_out <= CMD_NOOP;
      unique case (cmd_in.xf)
        XF_3D_SETROW0: {r0[0], r0[1], r0[2]} <= vflat[95:48];
        XF_3D_SETROW1: {r1[0], r1[1], r1[2]} <= vflat[95:48];
        XF_3D_SETVIEW: begin cx <= cmd_in.v[0]; cy <= cmd_in.v[1]; sh <= cmd_in.v[2][3:0]; end
        XF_3D_POINTS: begin
          {p[0], p[1], p[2], p[3], p[4], p[5]} <= vflat;
          held <= cmd_in;
          busy <= 1'b1;
          step <= '0;
          acc  <= '0;
        end
        default: ;
      endcase
    end
  end
endmodule
