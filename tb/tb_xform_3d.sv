// tb_xform_3d: self-checking testbench for xform_3d.
// Loads random projection rows and view, sends random 3D point pairs, and
// compares with x' = cx + floor(R0.p / 2^(14+sh)) computed here. Checks that
// `adv_out` is low for exactly the 12 multiply cycles and that the result is
// in place when it rises.
module tb_xform_3d;
  import gps_pkg::*;
  logic clk = 0, rst = 1, advance = 0, adv_out;
  cmd_t cmd_in = CMD_NOOP, cmd_out;
  int checks = 0, failures = 0;

  xform_3d dut (.clk, .rst, .advance, .adv_out, .cmd_in, .cmd_out);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic longint fdiv(input longint a, input int sh);
    longint d = longint'(1) << sh;
    if (a >= 0) return a / d;
    return -((-a + d - 1) / d);
  endfunction

  task automatic send(input cmd_t c);
    cmd_in <= c; advance <= 1; @(posedge clk); advance <= 0; cmd_in <= CMD_NOOP; #1;
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (3) @(posedge clk); rst = 0; @(posedge clk);
    for (int k = 0; k < 100; k++) begin
      int r0 [3], r1 [3], p [6], cx, cy, sh, busy;
      cmd_t c;
      longint e [4];
      foreach (r0[i]) begin r0[i] = $urandom_range(0, 65535) - 32768; r1[i] = $urandom_range(0, 65535) - 32768; end
      foreach (p[i]) p[i] = $urandom_range(0, 65535) - 32768;
      cx = $urandom_range(0, 639); cy = $urandom_range(0, 479); sh = $urandom_range(0, 8);
      c = CMD_NOOP; c.xf = XF_3D_SETROW0; c.v = pack6(16'(r0[0]), 16'(r0[1]), 16'(r0[2]), 0, 0, 0); send(c);
      check(cmd_out == CMD_NOOP, "row command gives a NOOP");
      c.xf = XF_3D_SETROW1; c.v = pack6(16'(r1[0]), 16'(r1[1]), 16'(r1[2]), 0, 0, 0); send(c);
      c = CMD_NOOP; c.xf = XF_3D_SETVIEW; c.v[0] = 24'(cx); c.v[1] = 24'(cy); c.v[2] = 24'(sh); send(c);
      c = CMD_NOOP; c.xf = XF_3D_POINTS; c.draw = DR_LINE; c.color = CO_ALPHA; c.rgb = 24'($urandom);
      c.v = pack6(16'(p[0]), 16'(p[1]), 16'(p[2]), 16'(p[3]), 16'(p[4]), 16'(p[5]));
      send(c);
      busy = 0;
      while (!adv_out) begin @(posedge clk); #1; busy++; end
      check(busy == 12, $sformatf("busy for %0d cycles", busy));
      for (int q = 0; q < 2; q++) begin
        e[2*q]   = cx + fdiv(longint'(r0[0]) * p[3*q] + longint'(r0[1]) * p[3*q+1] + longint'(r0[2]) * p[3*q+2], 14 + sh);
        e[2*q+1] = cy + fdiv(longint'(r1[0]) * p[3*q] + longint'(r1[1]) * p[3*q+1] + longint'(r1[2]) * p[3*q+2], 14 + sh);
      end
      for (int i = 0; i < 4; i++) check(cmd_out.v[i] == 24'(e[i]), $sformatf("value %0d: %0d expected %0d", i, signed'(cmd_out.v[i]), e[i]));
      check(cmd_out.xf == XF_NULL && cmd_out.draw == DR_LINE && cmd_out.rgb == c.rgb, "other fields kept");
      c.xf = XF_2D_POINTS; send(c);
      check(cmd_out == CMD_NOOP && adv_out, "2D command not claimed");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
