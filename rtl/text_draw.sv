// text_draw: text drawing module of the drawing stage.
//
// Claims commands with draw opcode DR_TEXT (and a colour operation other than
// CO_NONE): v0, v1 = top-left pixel of the string, {v3, v2} = up to six ASCII
// characters, first character in the top byte, a zero byte ending the string
// early. Each character is a 5x7 glyph looked up in an internal ROM
// (font8x8.hex: 64 glyphs for ASCII 20h..5Fh, eight rows each, bit 7 the
// leftmost pixel; lower-case letters are drawn as capitals, other codes as a
// blank). Characters are 6 pixels apart. The module walks the 6x7 cell of
// each character one position per cycle and sends a pixel wherever the glyph
// bit is set and the position is on screen, waiting while `pix_ready` is low.
// While it works, `adv_out` is low and holds the rest of the pipeline: a
// string of n characters takes at least 42*n cycles.
// Drawing a string through an internal character ROM is the proposal's; the
// glyph format, the string encoding and the cell size are this design's.
module text_draw
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
  logic [7:0] font [512];
  initial $readmemh("rtl/font8x8.hex", font);

  logic               busy;
  logic [47:0]        str;
  logic [2:0]         ch;      // character index 0..5
  logic [2:0]         col;     // 0..5
  logic [2:0]         row;     // 0..6
  logic signed [25:0] bx, by;  // top-left of the string
  logic [23:0]        rgb;
  logic [3:0]         alpha;
  logic               blend;

  logic [7:0]  code;
  logic [5:0]  glyph;
  logic [7:0]  bits;
  logic signed [25:0] px, py;
  always_comb begin
    code  = str[47 - 8*ch -: 8];
    if (code >= 8'h60)      glyph = 6'(code - 8'h40);    // lower case -> capitals
    else if (code >= 8'h20) glyph = 6'(code - 8'h20);
    else                    glyph = 6'd0;                // blank
    bits  = font[{glyph, row}];
    px    = bx + 26'(6 * ch) + 26'(col);
    py    = by + 26'(row);
  end

  wire lit      = (col < 5) && bits[3'd7 - col];
  wire onscreen = (px >= 0) && (px < H_RES) && (py >= 0) && (py < V_RES);
  wire endch    = (code == 8'h00);

  assign adv_out   = !busy;
  assign pix_valid = busy && !endch && lit && onscreen;
  assign pix       = '{x: X_W'(px), y: Y_W'(py), rgb: rgb, alpha: alpha, blend: blend};

  always_ff @(posedge clk) begin
    if (rst) begin
      busy <= 1'b0; str <= '0; ch <= '0; col <= '0; row <= '0; bx <= '0; by <= '0;
      rgb <= '0; alpha <= '0; blend <= 1'b0;
    end else if (busy) begin
      if (endch) busy <= 1'b0;
      else if (pix_ready || !pix_valid) begin
        if (col == 3'd5) begin
          col <= '0;
          if (row == 3'd6) begin
            row <= '0;
            if (ch == 3'd5) busy <= 1'b0;
            else ch <= ch + 1'b1;
          end else row <= row + 1'b1;
        end else col <= col + 1'b1;
      end
    end else if (advance && cmd_in.draw == DR_TEXT && cmd_in.color != CO_NONE) begin
      busy  <= 1'b1;
      str   <= {cmd_in.v[3], cmd_in.v[2]};
      ch    <= '0; col <= '0; row <= '0;
      bx    <= 26'(signed'(cmd_in.v[0]));
      by    <= 26'(signed'(cmd_in.v[1]));
      rgb   <= cmd_in.rgb;
      alpha <= cmd_in.alpha;
      blend <= (cmd_in.color == CO_ALPHA);
    end
  end
endmodule
