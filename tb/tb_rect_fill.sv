// tb_rect_fill: self-checking testbench for rect_fill.
// Random rectangles, some partly or wholly off screen, are drawn into a
// pixel sink with random back-pressure. Each must produce exactly the pixels
// of its on-screen part, each once, with the command's colour and mode; with
// no back-pressure a w x h rectangle must take w*h cycles, and `adv_out` must
// be low while it is being filled.
module tb_rect_fill;
  import gps_pkg::*;
  logic clk = 0, rst = 1, advance = 0, adv_out, pix_valid, pix_ready = 1;
  cmd_t cmd_in = CMD_NOOP;
  pixel_t pix;
  int checks = 0, failures = 0, npix = 0, bad = 0, stall_ok = 1;
  bit seen [int];
  logic [23:0] want_rgb;
  logic want_blend;

  rect_fill dut (.clk, .rst, .advance, .adv_out, .cmd_in, .pix_valid, .pix, .pix_ready);
  always #5 clk = ~clk;

  always @(posedge clk) if (pix_valid && pix_ready) begin
    automatic int key = int'(pix.y) * 1024 + int'(pix.x);
    if (seen.exists(key) || pix.rgb != want_rgb || pix.blend != want_blend) bad++;
    seen[key] = 1; npix++;
    if (adv_out) stall_ok = 0;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (3) @(posedge clk); rst = 0; @(posedge clk);
    for (int k = 0; k < 60; k++) begin
      int x, y, w, h, cyc, expect_n, all_in;
      cmd_t c;
      x = $urandom_range(0, 760) - 60; y = $urandom_range(0, 560) - 40;
      w = $urandom_range(0, 70); h = $urandom_range(0, 50);
      if (k == 0) begin x = 0; y = 0; w = 640; h = 4; end
      c = CMD_NOOP; c.draw = DR_RECT; c.color = (k % 3 == 0) ? CO_ALPHA : CO_OVERWRITE;
      c.v[0] = 24'(x); c.v[1] = 24'(y); c.v[2] = 24'(w); c.v[3] = 24'(h);
      c.rgb = 24'($urandom); c.alpha = 4'($urandom);
      want_rgb = c.rgb; want_blend = (c.color == CO_ALPHA);
      seen.delete(); npix = 0; bad = 0;
      pix_ready = (k % 2 == 0);
      cmd_in <= c; advance <= 1; @(posedge clk); advance <= 0; cmd_in <= CMD_NOOP;
      cyc = 0;
      @(posedge clk);
      while (!adv_out) begin
        if (k % 2 == 1) pix_ready = ($urandom_range(0, 2) != 0);
        @(posedge clk); cyc++;
      end
      pix_ready = 1;
      expect_n = 0; all_in = 1;
      for (int yy = y; yy < y + h; yy++)
        for (int xx = x; xx < x + w; xx++)
          if (xx >= 0 && xx < 640 && yy >= 0 && yy < 480) begin
            expect_n++;
            if (!seen.exists(yy * 1024 + xx)) all_in = 0;
          end
      check(npix == expect_n && all_in && bad == 0, $sformatf("rect %0d: %0d pixels, expected %0d", k, npix, expect_n));
      if (k % 2 == 0) check(cyc == expect_n, $sformatf("rect %0d took %0d cycles for %0d pixels", k, cyc, expect_n));
    end
    check(stall_ok == 1, "adv_out low while filling");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
