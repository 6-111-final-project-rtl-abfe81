// tb_xform_2d: self-checking testbench for xform_2d.
// Sets random views and sends random point and rectangle commands; the
// expected screen values are computed here with plain integer arithmetic
// (x0 + floor((x - ox) * sx / 2^(8+sh))). Also checks that view commands and
// commands for other transforms give NOOPs, that nothing changes while
// `advance` is low, and the one-cycle latency.
module tb_xform_2d;
  import gps_pkg::*;
  logic clk = 0, rst = 1, advance = 0, adv_out;
  cmd_t cmd_in = CMD_NOOP, cmd_out;
  int checks = 0, failures = 0;

  xform_2d dut (.clk, .rst, .advance, .adv_out, .cmd_in, .cmd_out);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic longint fdiv(input longint a, input int sh);  // floor(a / 2^sh)
    longint d = longint'(1) << sh;
    if (a >= 0) return a / d;
    return -((-a + d - 1) / d);
  endfunction

  task automatic send(input cmd_t c);
    cmd_in <= c; advance <= 1; @(posedge clk); advance <= 0; cmd_in <= CMD_NOOP; #1;
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (3) @(posedge clk); rst = 0; @(posedge clk);
    check(adv_out, "never stalls");
    for (int k = 0; k < 200; k++) begin
      int ox, oy, sx, sy, sh, x0, y0;
      cmd_t c;
      longint e [4];
      int vals [4];
      ox = $urandom_range(0, 2000000) - 1000000; oy = $urandom_range(0, 2000000) - 1000000;
      sx = $urandom_range(0, 4000) - 2000; sy = $urandom_range(0, 4000) - 2000;
      sh = $urandom_range(4, 15); x0 = $urandom_range(0, 639); y0 = $urandom_range(0, 479);
      c = CMD_NOOP; c.xf = XF_2D_SETVIEW;
      c.v[0] = 24'(ox); c.v[1] = 24'(oy); c.v[2] = {12'(sx), 12'(sy)}; c.v[3] = {4'(sh), 10'(x0), 10'(y0)};
      send(c);
      check(cmd_out == CMD_NOOP, "view command gives a NOOP");
      foreach (vals[i]) vals[i] = $urandom_range(0, 4000000) - 2000000;
      c = CMD_NOOP; c.xf = XF_2D_POINTS; c.draw = DR_LINE; c.color = CO_OVERWRITE; c.rgb = 24'($urandom);
      foreach (vals[i]) c.v[i] = 24'(vals[i]);
      send(c);
      e[0] = x0 + fdiv(longint'(vals[0] - ox) * sx, 8 + sh);
      e[1] = y0 + fdiv(longint'(vals[1] - oy) * sy, 8 + sh);
      e[2] = x0 + fdiv(longint'(vals[2] - ox) * sx, 8 + sh);
      e[3] = y0 + fdiv(longint'(vals[3] - oy) * sy, 8 + sh);
      for (int i = 0; i < 4; i++) check(cmd_out.v[i] == 24'(e[i]), $sformatf("point value %0d", i));
      check(cmd_out.draw == DR_LINE && cmd_out.rgb == c.rgb && cmd_out.xf == XF_NULL, "other fields kept");
      // nothing moves while advance is low
      cmd_in <= CMD_NOOP; repeat (3) @(posedge clk); #1;
      check(cmd_out.v[0] == 24'(e[0]), "output held while advance is low");
      // rectangle: both corners, then top-left + size
      vals[2] = $urandom_range(0, 100000); vals[3] = $urandom_range(0, 100000);
      c.xf = XF_2D_RECT; c.draw = DR_RECT;
      foreach (vals[i]) c.v[i] = 24'(vals[i]);
      send(c);
      begin
        longint ax, ay, bx, by;
        ax = x0 + fdiv(longint'(vals[0] - ox) * sx, 8 + sh);
        ay = y0 + fdiv(longint'(vals[1] - oy) * sy, 8 + sh);
        bx = x0 + fdiv(longint'(vals[0] + vals[2] - ox) * sx, 8 + sh);
        by = y0 + fdiv(longint'(vals[1] + vals[3] - oy) * sy, 8 + sh);
        check(cmd_out.v[0] == 24'(ax < bx ? ax : bx) && cmd_out.v[1] == 24'(ay < by ? ay : by), "rect corner");
        check(cmd_out.v[2] == 24'(ax < bx ? bx - ax : ax - bx) && cmd_out.v[3] == 24'(ay < by ? by - ay : ay - by), "rect size");
      end
      c.xf = XF_NULL; send(c);
      check(cmd_out == CMD_NOOP, "bypass command not claimed");
      c.xf = XF_3D_POINTS; send(c);
      check(cmd_out == CMD_NOOP, "3D command not claimed");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
