// line_draw: line drawing module of the drawing stage.
//
// Claims commands with draw opcode DR_LINE (and a colour operation other than
// CO_NONE) and rasterises the line from (v0, v1) to (v2, v3), both end points
// included, with Bresenham's integer algorithm: one step per cycle, moving
// in x, in y or in both according to the sign of a running error term.
// End points are first saturated to the signed 12-bit range -2048..2047,
// which bounds a line to 4096 steps. Points off the 640x480 screen are
// stepped over without a pixel; points on it are sent to the pixel fill
// module, a step waiting while `pix_ready` is low. While it works, `adv_out`
// is low and holds the rest of the pipeline. An on-screen line of n pixels
// takes n cycles.
// Drawing a coloured line between two pixel coordinates is the proposal's,
// which leaves the rasterisation open; Bresenham and the 12-bit saturation are
// this design's.
module line_draw
  import gps_pkg::*;
(
  input  logic   clk,
  input  logic   rst,
  input  logic   advance,
  output logic   adv_out,
  input  cmd_t   cmd_in,
  output logic   pix_valid,
  output pixel_t pix,
  input  logic   pix_ready
);
  logic               busy;
  logic signed [13:0] x, y, x1, y1, dx, dy, err;
  logic               sx, sy;   // 1: step negative
  logic [23:0]        rgb;
  logic [3:0]         alpha;
  logic               blend;

  function automatic logic signed [13:0] sat(input logic [23:0] v);
    logic signed [23:0] s;
    s = signed'(v);
    if (s > 24'sd2047)  return 14'sd2047;
    if (s < -24'sd2048) return -14'sd2048;
    return 14'(s);
  endfunction

  wire onscreen = (x >= 0) && (x < H_RES) && (y >= 0) && (y < V_RES);
  wire last     = (x == x1) && (y == y1);
  wire signed [14:0] e2 = {err, 1'b0};

  assign adv_out   = !busy;
  assign pix_valid = busy && onscreen;
  assign pix       = '{x: X_W'(x), y: Y_W'(y), rgb: rgb, alpha: alpha, blend: blend};

  logic signed [13:0] ax, ay, bx, by;
  always_comb begin
    ax = sat(cmd_in.v[0]);
    ay = sat(cmd_in.v[1]);
    bx = sat(cmd_in.v[2]);
    by = sat(cmd_in.v[3]);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      busy <= 1'b0; x <= '0; y <= '0; x1 <= '0; y1 <= '0; dx <= '0; dy <= '0;
      err <= '0; sx <= 1'b0; sy <= 1'b0; rgb <= '0; alpha <= '0; blend <= 1'b0;
    end else if (busy) begin
      if (pix_ready || !onscreen) begin
        if (last) busy <= 1'b0;
        else begin
          if (e2 >= 15'(dy) && e2 <= 15'(dx)) begin
            err <= err + dy + dx;
            x   <= sx ? x - 1'b1 : x + 1'b1;
            y   <= sy ? y - 1'b1 : y + 1'b1;
          end else if (e2 >= 15'(dy)) begin
            err <= err + dy;
            x   <= sx ? x - 1'b1 : x + 1'b1;
          end else if (e2 <= 15'(dx)) begin
            err <= err + dx;
            y   <= sy ? y - 1'b1 : y + 1'b1;
          end
        end
      end
    end else if (advance && cmd_in.draw == DR_LINE && cmd_in.color != CO_NONE) begin
      busy  <= 1'b1;
      x     <= ax;
      y     <= ay;
      x1    <= bx;
      y1    <= by;
      sx    <= (bx < ax);
      sy    <= (by < ay);
      dx    <= (bx < ax) ? ax - bx : bx - ax;            // |dx|
      dy    <= (by < ay) ? by - ay : ay - by;            // -|dy|
      err   <= ((bx < ax) ? ax - bx : bx - ax) + ((by < ay) ? by - ay : ay - by);
      rgb   <= cmd_in.rgb;
      alpha <= cmd_in.alpha;
      blend <= (cmd_in.color == CO_ALPHA);
    end
  end
endmodule
