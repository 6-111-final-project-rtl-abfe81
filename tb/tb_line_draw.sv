// tb_line_draw: self-checking testbench for line_draw.
// Draws random lines in all octants (some leaving the screen) into a pixel
// sink with random back-pressure, and checks properties of a correct
// rasterisation rather than a second copy of the algorithm: for a line fully
// on screen both end points are drawn, there are max(|dx|,|dy|)+1 pixels,
// consecutive pixels are 8-neighbours stepping one unit along the major axis,
// and every pixel lies within half a pixel of the ideal line along the minor
// axis. Lines crossing the screen edge must draw only on-screen pixels. With
// no back-pressure an on-screen line of n pixels takes n cycles.
module tb_line_draw;
  import gps_pkg::*;
  logic clk = 0, rst = 1, advance = 0, adv_out, pix_valid, pix_ready = 1;
  cmd_t cmd_in = CMD_NOOP;
  pixel_t pix;
  int checks = 0, failures = 0;
  int px [$], py [$];

  line_draw dut (.clk, .rst, .advance, .adv_out, .cmd_in, .pix_valid, .pix, .pix_ready);
  always #5 clk = ~clk;

  always @(posedge clk) if (pix_valid && pix_ready) begin
    px.push_back(int'(pix.x)); py.push_back(int'(pix.y));
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic int iabs(input int a); return a < 0 ? -a : a; endfunction

  initial begin
    repeat (400000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (3) @(posedge clk); rst = 0; @(posedge clk);
    for (int k = 0; k < 200; k++) begin
      int x0, y0, x1, y1, dx, dy, n, cyc, ok_pts, ok_steps, ok_err, onscreen;
      cmd_t c;
      onscreen = (k % 4 != 3);
      if (onscreen) begin
        x0 = $urandom_range(0, 639); y0 = $urandom_range(0, 479);
        x1 = $urandom_range(0, 639); y1 = $urandom_range(0, 479);
      end else begin
        x0 = $urandom_range(0, 1200) - 300; y0 = $urandom_range(0, 1000) - 250;
        x1 = $urandom_range(0, 1200) - 300; y1 = $urandom_range(0, 1000) - 250;
      end
      if (k == 0) begin x0 = 5; y0 = 5; x1 = 5; y1 = 5; end
      c = CMD_NOOP; c.draw = DR_LINE; c.color = CO_OVERWRITE;
      c.v[0] = 24'(x0); c.v[1] = 24'(y0); c.v[2] = 24'(x1); c.v[3] = 24'(y1);
      px.delete(); py.delete();
      cmd_in <= c; advance <= 1; @(posedge clk); advance <= 0; cmd_in <= CMD_NOOP;
      @(posedge clk);
      cyc = 0;
      while (!adv_out) begin
        pix_ready = (k % 2 == 0) ? 1'b1 : ($urandom_range(0, 2) != 0);
        @(posedge clk); cyc++;
      end
      pix_ready = 1;
      dx = x1 - x0; dy = y1 - y0;
      n = (iabs(dx) > iabs(dy) ? iabs(dx) : iabs(dy)) + 1;
      ok_steps = 1; ok_err = 1; ok_pts = 1;
      for (int i = 0; i < px.size(); i++) begin
        automatic int crs = (py[i] - y0) * dx - (px[i] - x0) * dy;
        if (2 * iabs(crs) > (iabs(dx) > iabs(dy) ? iabs(dx) : iabs(dy))) ok_err = 0;
        if (px[i] < 0 || px[i] >= 640 || py[i] < 0 || py[i] >= 480) ok_pts = 0;
        if (i > 0 && onscreen && (iabs(px[i] - px[i-1]) > 1 || iabs(py[i] - py[i-1]) > 1 ||
                                 (px[i] == px[i-1] && py[i] == py[i-1]))) ok_steps = 0;
      end
      if (onscreen) begin
        check(px.size() == n, $sformatf("line %0d: %0d pixels, expected %0d", k, px.size(), n));
        check(px.size() > 0 && px[0] == x0 && py[0] == y0 && px[$] == x1 && py[$] == y1, "end points drawn");
        check(ok_steps, "8-connected steps");
        if (k % 2 == 0) check(cyc == n, $sformatf("line of %0d pixels took %0d cycles", n, cyc));
      end
      check(ok_err, $sformatf("line %0d: pixels within half a pixel of the ideal line", k));
      check(ok_pts, "only on-screen pixels");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
