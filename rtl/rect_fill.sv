// rect_fill: rectangle fill module of the drawing stage.
//
// Claims commands with draw opcode DR_RECT (and a colour operation other than
// CO_NONE): v0, v1 = top-left corner, v2, v3 = width and height in pixels,
// all signed 24-bit. The rectangle is clipped to the 640x480 screen and
// every pixel of it is sent to the pixel fill module, row by row, one pixel
// per cycle while `pix_ready` is high. While it works, `adv_out` is low and
// holds the rest of the pipeline. A command taken on `advance` starts the
// next cycle; a w x h rectangle fully on screen takes w*h cycles.
// Issuing pixel fill commands for a rectangle is the proposal's; clipping and
// the scan order are this design's.
module rect_fill
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
  logic           busy;
  logic [X_W-1:0] x, xs, xe;
  logic [Y_W-1:0] y, ye;
  logic [23:0]    rgb;
  logic [3:0]     alpha;
  logic           blend;

  assign adv_out   = !busy;
  assign pix_valid = busy;
  assign pix       = '{x: x, y: y, rgb: rgb, alpha: alpha, blend: blend};

  // clipped bounds of the incoming command
  logic signed [25:0] cx0, cy0, cx1, cy1;   // inclusive
  always_comb begin
    cx0 = 26'(signed'(cmd_in.v[0]));
    cy0 = 26'(signed'(cmd_in.v[1]));
    cx1 = cx0 + 26'(signed'(cmd_in.v[2])) - 26'sd1;
    cy1 = cy0 + 26'(signed'(cmd_in.v[3])) - 26'sd1;
    if (cx0 < 0) cx0 = 0;
    if (cy0 < 0) cy0 = 0;
    if (cx1 > H_RES - 1) cx1 = H_RES - 1;
    if (cy1 > V_RES - 1) cy1 = V_RES - 1;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      busy <= 1'b0; x <= '0; xs <= '0; xe <= '0; y <= '0; ye <= '0;
      rgb <= '0; alpha <= '0; blend <= 1'b0;
    end else if (busy) begin
      if (pix_ready) begin
        if (x == xe) begin
          x <= xs;
          if (y == ye) busy <= 1'b0;
          else y <= y + 1'b1;
        end else x <= x + 1'b1;
      end
    end else if (advance && cmd_in.draw == DR_RECT && cmd_in.color != CO_NONE &&
                 cx0 <= cx1 && cy0 <= cy1) begin
      busy  <= 1'b1;
      x     <= X_W'(cx0);
      xs    <= X_W'(cx0);
      xe    <= X_W'(cx1);
      y     <= Y_W'(cy0);
      ye    <= Y_W'(cy1);
      rgb   <= cmd_in.rgb;
      alpha <= cmd_in.alpha;
      blend <= (cmd_in.color == CO_ALPHA);
    end
  end
endmodule
