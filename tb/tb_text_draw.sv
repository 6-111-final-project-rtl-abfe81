// tb_text_draw: self-checking testbench for text_draw.
// Draws strings (capitals, digits, punctuation, lower case, a string cut short
// by a zero byte, and one partly off screen) and compares the drawn pixels with
// the glyph bitmaps read here from the same font file: glyph row r of a
// character is at y + r, bit 7 - c at x + 6*i + c.
module tb_text_draw;
  import gps_pkg::*;
  logic clk = 0, rst = 1, advance = 0, adv_out, pix_valid, pix_ready = 1;
  cmd_t cmd_in = CMD_NOOP;
  pixel_t pix;
  int checks = 0, failures = 0;
  bit seen [int];
  int dup = 0;
  logic [7:0] font [512];

  text_draw dut (.clk, .rst, .advance, .adv_out, .cmd_in, .pix_valid, .pix, .pix_ready);
  always #5 clk = ~clk;

  always @(posedge clk) if (pix_valid && pix_ready) begin
    automatic int key = int'(pix.y) * 1024 + int'(pix.x);
    if (seen.exists(key)) dup++;
    seen[key] = 1;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [47:0] strs [6];
    int xs [6], ys [6];
    $readmemh("rtl/font8x8.hex", font);
    strs[0] = "ALT-T "; strs[1] = "012345"; strs[2] = "6789:."; strs[3] = "pos v/";
    strs[4] = {"AB", 8'h00, "CDE"}; strs[5] = "WXYZ Q";
    xs = '{10, 100, 200, 300, 400, 636}; ys = '{10, 50, 100, 150, 200, 476};
    repeat (3) @(posedge clk); rst = 0; @(posedge clk);
    for (int k = 0; k < 6; k++) begin
      cmd_t c;
      automatic int nexp = 0, miss = 0;
      c = CMD_NOOP; c.draw = DR_TEXT; c.color = CO_OVERWRITE; c.rgb = 24'hFFFFFF;
      c.v[0] = 24'(xs[k]); c.v[1] = 24'(ys[k]); {c.v[3], c.v[2]} = strs[k];
      seen.delete(); dup = 0;
      pix_ready = 1;
      cmd_in <= c; advance <= 1; @(posedge clk); advance <= 0; cmd_in <= CMD_NOOP;
      @(posedge clk);
      while (!adv_out) begin pix_ready = ($urandom_range(0, 3) != 0); @(posedge clk); end
      pix_ready = 1;
      for (int i = 0; i < 6; i++) begin
        automatic int ch = strs[k][47 - 8*i -: 8];
        if (ch == 0) break;
        if (ch >= 8'h60) ch -= 8'h20;
        for (int r = 0; r < 7; r++)
          for (int col = 0; col < 5; col++) begin
            automatic int x = xs[k] + 6 * i + col, y = ys[k] + r;
            if (font[(ch - 8'h20) * 8 + r][7 - col] && x < 640 && y < 480) begin
              nexp++;
              if (!seen.exists(y * 1024 + x)) miss++;
            end
          end
      end
      check(nexp > 0 && miss == 0 && dup == 0 && seen.size() == nexp,
            $sformatf("string %0d: %0d pixels drawn, %0d expected, %0d missing", k, seen.size(), nexp, miss));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
