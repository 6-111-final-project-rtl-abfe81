// tb_render_pipeline: self-checking testbench for render_pipeline.
// A stand-in video RAM (two-cycle read latency, write data two cycles after
// the address, as behind the VRAM manager) receives the pipeline's pixels.
// The testbench sends random bypass rectangles (overwrite and alpha blended),
// horizontal and vertical lines through each of the three transforms, 2D
// transformed rectangles and a text string, and keeps its own reference
// image: rectangle fills with the blend rule, straight lines, the 2D and 3D
// transform formulas and the glyphs read from the font file. After the
// pipeline reports idle the RAM must equal the reference. Also checks that
// NOOPs write nothing and that 3D commands stall `advance`.
module tb_render_pipeline;
  import gps_pkg::*;
  logic clk = 0, rst = 1, adv_in = 1, advance, idle;
  cmd_t cmd_in = CMD_NOOP;
  logic [VADDR_W-1:0] v_addr;
  logic v_we, v_re;
  logic [VDATA_W-1:0] v_wdata, v_rdata;
  int checks = 0, failures = 0, writes = 0, stalls = 0;
  logic [23:0] ram [int];
  logic [23:0] ref_img [int];
  logic [7:0] font [512];

  render_pipeline dut (.clk, .rst, .cmd_in, .adv_in, .advance, .idle,
                       .v_addr, .v_we, .v_re, .v_wdata, .v_rdata);
  always #5 clk = ~clk;

  logic [VADDR_W-1:0] ra1, ra2, wa1, wa2;
  logic [23:0] wd1, wd2, rd2;
  logic we1 = 0, we2 = 0;
  always @(posedge clk) begin
    ra1 <= v_addr; ra2 <= ra1;
    we1 <= v_we; wa1 <= v_addr; wd1 <= v_wdata[23:0];
    we2 <= we1;  wa2 <= wa1;    wd2 <= wd1;
    if (we2) ram[int'(wa2)] = wd2;
    if (v_we && !rst) writes++;
    if (!advance && !rst) stalls++;
  end
  assign v_rdata = {12'h0, ram.exists(int'(ra2)) ? ram[int'(ra2)] : 24'h0};

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // send one command; called at a falling edge, it is taken at the first
  // rising edge with advance high and returns at the falling edge after it
  task automatic send(input cmd_t c);
    cmd_in = c;
    while (!advance) @(negedge clk);
    @(negedge clk);
    cmd_in = CMD_NOOP;
  endtask

  function automatic logic [7:0] mixref(input int n, input int o, input int a);
    return 8'((n * (a + 1) + o * (15 - a)) / 16);
  endfunction
  function automatic logic [23:0] get_ref(input int x, input int y);
    return ref_img.exists(y * 1024 + x) ? ref_img[y * 1024 + x] : 24'h0;
  endfunction
  task automatic put(input int x, input int y, input logic [23:0] rgb, input bit blend, input int a);
    logic [23:0] o;
    if (x < 0 || x >= 640 || y < 0 || y >= 480) return;
    o = get_ref(x, y);
    ref_img[y * 1024 + x] = blend ? {mixref(rgb[23:16], o[23:16], a), mixref(rgb[15:8], o[15:8], a),
                                     mixref(rgb[7:0], o[7:0], a)} : rgb;
  endtask
  task automatic ref_rect(input int x, input int y, input int w, input int h, input logic [23:0] rgb,
                          input bit blend, input int a);
    for (int yy = y; yy < y + h; yy++) for (int xx = x; xx < x + w; xx++) put(xx, yy, rgb, blend, a);
  endtask
  task automatic ref_hv(input int x0, input int y0, input int x1, input int y1, input logic [23:0] rgb);
    if (y0 == y1) for (int x = (x0 < x1 ? x0 : x1); x <= (x0 < x1 ? x1 : x0); x++) put(x, y0, rgb, 0, 0);
    else          for (int y = (y0 < y1 ? y0 : y1); y <= (y0 < y1 ? y1 : y0); y++) put(x0, y, rgb, 0, 0);
  endtask

  initial begin
    repeat (2000000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    cmd_t c;
    int st0;
    $readmemh("rtl/font8x8.hex", font);
    repeat (3) @(posedge clk); rst = 0;
    @(negedge clk);
    repeat (40) send(CMD_NOOP);
    repeat (5) @(negedge clk);
    check(writes == 0 && idle, "NOOPs write nothing");
    // bypass rectangles
    for (int k = 0; k < 40; k++) begin
      automatic int x = $urandom_range(0, 700) - 30, y = $urandom_range(0, 520) - 20;
      automatic int w = $urandom_range(1, 40), h = $urandom_range(1, 30);
      c = CMD_NOOP; c.draw = DR_RECT; c.color = (k % 2) ? CO_ALPHA : CO_OVERWRITE;
      c.v[0] = 24'(x); c.v[1] = 24'(y); c.v[2] = 24'(w); c.v[3] = 24'(h);
      c.rgb = 24'($urandom); c.alpha = 4'($urandom);
      send(c);
      ref_rect(x, y, w, h, c.rgb, k % 2, c.alpha);
    end
    // bypass lines
    for (int k = 0; k < 20; k++) begin
      automatic int x0 = $urandom_range(0, 639), y0 = $urandom_range(0, 479), l = $urandom_range(0, 80);
      automatic int x1 = (k % 2) ? x0 : x0 + l - 40, y1 = (k % 2) ? y0 + l - 40 : y0;
      c = CMD_NOOP; c.draw = DR_LINE; c.color = CO_OVERWRITE; c.rgb = 24'($urandom);
      c.v[0] = 24'(x0); c.v[1] = 24'(y0); c.v[2] = 24'(x1); c.v[3] = 24'(y1);
      send(c);
      ref_hv(x0, y0, x1, y1, c.rgb);
    end
    // 2D view: scale 1/2 in x, -1 in y, origin (1000, 2000) -> screen (300, 400)
    c = CMD_NOOP; c.xf = XF_2D_SETVIEW;
    c.v[0] = 24'd1000; c.v[1] = 24'd2000; c.v[2] = {12'sd128, -12'sd256}; c.v[3] = {4'd0, 10'd300, 10'd400};
    send(c);
    for (int k = 0; k < 10; k++) begin
      automatic int dx = 2 * $urandom_range(0, 100), dy = $urandom_range(0, 100), l = 2 * $urandom_range(1, 30);
      c = CMD_NOOP; c.xf = XF_2D_POINTS; c.draw = DR_LINE; c.color = CO_OVERWRITE; c.rgb = 24'($urandom);
      c.v[0] = 24'(1000 + dx); c.v[1] = 24'(2000 + dy); c.v[2] = 24'(1000 + dx + l); c.v[3] = 24'(2000 + dy);
      send(c);
      ref_hv(300 + dx / 2, 400 - dy, 300 + (dx + l) / 2, 400 - dy, c.rgb);
    end
    c = CMD_NOOP; c.xf = XF_2D_RECT; c.draw = DR_RECT; c.color = CO_OVERWRITE; c.rgb = 24'h123456;
    c.v[0] = 24'd1020; c.v[1] = 24'd2010; c.v[2] = 24'd40; c.v[3] = 24'd30;   // (1020..1059, 2010..2039)
    send(c);
    ref_rect(310, 400 - 40, 20, 30, c.rgb, 0, 0);
    // 3D view: rows (1,0,0) and (0,0,-1), centre (320, 240)
    c = CMD_NOOP; c.xf = XF_3D_SETROW0; c.v = pack6(16'sd16384, 16'sd0, 16'sd0, 16'sd0, 16'sd0, 16'sd0); send(c);
    c = CMD_NOOP; c.xf = XF_3D_SETROW1; c.v = pack6(16'sd0, 16'sd0, -16'sd16384, 16'sd0, 16'sd0, 16'sd0); send(c);
    c = CMD_NOOP; c.xf = XF_3D_SETVIEW; c.v[0] = 24'd320; c.v[1] = 24'd240; c.v[2] = 24'd0; send(c);
    st0 = stalls;
    for (int k = 0; k < 10; k++) begin
      automatic int x = $urandom_range(0, 200) - 100, y = $urandom_range(0, 200) - 100, z = $urandom_range(0, 200) - 100;
      automatic int l = $urandom_range(0, 40);
      c = CMD_NOOP; c.xf = XF_3D_POINTS; c.draw = DR_LINE; c.color = CO_OVERWRITE; c.rgb = 24'($urandom);
      c.v = pack6(16'(x), 16'(y), 16'(z), 16'(x), 16'(y + 7), 16'(z + l));
      send(c);
      ref_hv(320 + x, 240 - z, 320 + x, 240 - z - l, c.rgb);
    end
    // text
    c = CMD_NOOP; c.draw = DR_TEXT; c.color = CO_OVERWRITE; c.rgb = 24'hFFFFFF;
    c.v[0] = 24'd50; c.v[1] = 24'd60; {c.v[3], c.v[2]} = "GPS 42";
    send(c);
    for (int i = 0; i < 6; i++) begin
      automatic int ch = c.v[3 - i / 3][23 - 8 * (i % 3) -: 8];
      for (int r = 0; r < 7; r++)
        for (int col = 0; col < 5; col++)
          if (font[(ch - 32) * 8 + r][7 - col]) put(50 + 6 * i + col, 60 + r, 24'hFFFFFF, 0, 0);
    end
    send(CMD_NOOP);
    while (!idle) @(posedge clk);
    repeat (3) @(posedge clk);
    check(stalls - st0 >= 10 * 12, $sformatf("3D commands stalled advance for %0d cycles", stalls - st0));
    begin
      automatic int bad = 0, n = 0;
      foreach (ref_img[k]) begin
        n++;
        if (!ram.exists(k) || ram[k] != ref_img[k]) begin
          bad++;
          if (bad < 5) $display("pixel (%0d,%0d) = %06h, expected %06h", k % 1024, k / 1024,
                                ram.exists(k) ? ram[k] : 24'h0, ref_img[k]);
        end
      end
      foreach (ram[k]) if (!ref_img.exists(k) && ram[k] != 0) bad++;
      check(bad == 0 && n > 5000, $sformatf("%0d of %0d reference pixels wrong", bad, n));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
