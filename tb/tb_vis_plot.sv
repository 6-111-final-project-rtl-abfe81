// tb_vis_plot: self-checking testbench for vis_plot.
// Three instances (MODE 0, 1 and 2, IDs 0..2) share a stand-in fix queue
// (after a pop, `empty` is high for two cycles before the next fix shows),
// and the testbench plays the rendering manager: it takes commands with random
// delays and rewinds the queue on a re-render request. For each frame of the
// active instance the taken commands must be: re-render, the mode's view
// commands, background rectangle, two axis lines, alpha-blended panel, text
// label, one line per pair of consecutive fixes carrying the fixes relative
// to the first one (checked for modes 1 and 0), and render complete.
// Mouse packets must start a new frame with a changed view (zoom, pan,
// rotation), and inactive instances must stay silent.
module tb_vis_plot;
  import gps_pkg::*;
  localparam int NF = 12;
  logic clk = 0, rst = 1;
  logic [3:0] active = 4'd15;
  logic m_avail = 0;
  logic [2:0] m_lmr = 0;
  logic [7:0] m_x = 0, m_y = 0, m_z = 0;
  fix_t fixes [NF + 1];
  fix_t fix;
  logic fix_empty;
  int   qpos = 0, qbusy = 0;
  logic fix_rd_i [3];
  cmd_t cmd_i [3];
  logic cmd_valid_i [3], cmd_taken_i [3];
  logic [15:0] plotted_i [3];
  logic take_rand;
  int checks = 0, failures = 0, stray = 0;
  cmd_t got [$];

  vis_plot #(.MODE(0), .ID(4'd0)) u0 (.clk, .rst, .active, .m_avail, .m_lmr, .m_x, .m_y, .m_z,
    .fix, .fix_empty, .fix_rd(fix_rd_i[0]), .cmd(cmd_i[0]), .cmd_valid(cmd_valid_i[0]),
    .cmd_taken(cmd_taken_i[0]), .plotted(plotted_i[0]));
  vis_plot #(.MODE(1), .ID(4'd1)) u1 (.clk, .rst, .active, .m_avail, .m_lmr, .m_x, .m_y, .m_z,
    .fix, .fix_empty, .fix_rd(fix_rd_i[1]), .cmd(cmd_i[1]), .cmd_valid(cmd_valid_i[1]),
    .cmd_taken(cmd_taken_i[1]), .plotted(plotted_i[1]));
  vis_plot #(.MODE(2), .ID(4'd2)) u2 (.clk, .rst, .active, .m_avail, .m_lmr, .m_x, .m_y, .m_z,
    .fix, .fix_empty, .fix_rd(fix_rd_i[2]), .cmd(cmd_i[2]), .cmd_valid(cmd_valid_i[2]),
    .cmd_taken(cmd_taken_i[2]), .plotted(plotted_i[2]));
  always #5 clk = ~clk;

  // the manager's side
  always_comb
    for (int i = 0; i < 3; i++) cmd_taken_i[i] = (active == 4'(i)) && cmd_valid_i[i] && take_rand;
  always @(negedge clk) take_rand = ($urandom_range(0, 2) != 0);

  assign fix_empty = (qbusy != 0) || (qpos > NF);
  assign fix = fixes[qpos > NF ? NF : qpos];

  always @(posedge clk) begin
    automatic logic pop = 0;
    for (int i = 0; i < 3; i++) begin
      if (active != 4'(i) && (cmd_valid_i[i] || fix_rd_i[i])) stray++;
      if (active == 4'(i) && fix_rd_i[i]) pop = 1;
      if (cmd_taken_i[i]) got.push_back(cmd_i[i]);
    end
    if (qbusy != 0) qbusy <= qbusy - 1;
    if (active < 3 && cmd_taken_i[active] && cmd_i[active].mgr == MGR_RERENDER) begin
      qpos <= 0; qbusy <= 2;
    end else if (pop) begin
      qpos <= qpos + 1; qbusy <= 2;
    end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // wait for one whole frame of the active instance and check it
  task automatic frame(input int mode, output cmd_t view, output cmd_t row);
    int n, nv, t;
    bit ok;
    got.delete();
    t = 0;
    while ((got.size() == 0 || got[$].mgr != MGR_COMPLETE) && t < 5000) begin @(posedge clk); t++; end
    #1;
    nv = (mode == 2) ? 3 : 1;
    n = got.size();
    check(n == 1 + nv + 5 + (NF - 1) + 1, $sformatf("mode %0d: %0d commands in a frame", mode, n));
    if (n < nv + 8) return;
    view = got[nv]; row = got[1];
    check(got[0].mgr == MGR_RERENDER, "frame starts with re-render");
    if (mode == 2) check(got[1].xf == XF_3D_SETROW0 && got[2].xf == XF_3D_SETROW1 && got[3].xf == XF_3D_SETVIEW, "3D view commands");
    else           check(got[1].xf == XF_2D_SETVIEW, "2D view command");
    check(got[nv+1].draw == DR_RECT && got[nv+1].color == CO_OVERWRITE && got[nv+1].xf == XF_NULL, "background rectangle");
    check(got[nv+2].draw == DR_LINE && got[nv+3].draw == DR_LINE && got[nv+2].xf == XF_NULL, "axis lines");
    check(got[nv+4].draw == DR_RECT && got[nv+4].color == CO_ALPHA, "alpha-blended panel");
    check(got[nv+5].draw == DR_TEXT, "label");
    ok = 1;
    for (int k = 1; k < NF && nv + 5 + k < n; k++) begin
      cmd_t c = got[nv + 5 + k];
      logic [23:0] e0, e1, e2, e3;
      if (c.draw != DR_LINE || c.xf != ((mode == 2) ? XF_3D_POINTS : XF_2D_POINTS)) ok = 0;
      if (mode == 1) begin
        e0 = 24'(fixes[k-1].lon - fixes[0].lon); e1 = 24'(fixes[k-1].lat - fixes[0].lat);
        e2 = 24'(fixes[k].lon - fixes[0].lon);   e3 = 24'(fixes[k].lat - fixes[0].lat);
        if (c.v != {e3, e2, e1, e0}) ok = 0;
      end
      if (mode == 0) begin
        e0 = 24'(k - 1); e1 = 24'(fixes[k-1].alt - fixes[0].alt);
        e2 = 24'(k);     e3 = 24'(fixes[k].alt - fixes[0].alt);
        if (c.v != {e3, e2, e1, e0}) ok = 0;
      end
    end
    check(ok, $sformatf("mode %0d: data lines carry consecutive fixes", mode));
    check(got[$].mgr == MGR_COMPLETE, "frame ends with render complete");
  endtask

  task automatic mouse(input logic [2:0] b, input int x, input int y, input int z);
    m_lmr <= b; m_x <= 8'(x); m_y <= 8'(y); m_z <= 8'(z); m_avail <= 1;
    @(posedge clk); m_avail <= 0;
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    cmd_t v1, v2, r1, r2;
    for (int i = 0; i < NF; i++) begin
      fixes[i].eof = 0;
      fixes[i].lat = 32'd37_000_000 + 32'($urandom_range(0, 40000)) - 32'd20000;
      fixes[i].lon = -32'sd122_000_000 + 32'($urandom_range(0, 40000));
      fixes[i].alt = 32'($urandom_range(0, 50000));
      fixes[i].vel = 32'($urandom);
    end
    fixes[NF] = '0; fixes[NF].eof = 1;
    repeat (3) @(posedge clk); rst = 0;
    repeat (50) @(posedge clk);
    check(got.size() == 0, "no commands while no instance is active");
    for (int m = 0; m < 3; m++) begin
      active = 4'(m);
      frame(m, v1, r1);
      check(plotted_i[m] == 16'(NF - 1), $sformatf("mode %0d plotted %0d lines", m, plotted_i[m]));
      got.delete();
      repeat (30) @(posedge clk);
      check(got.size() == 0, "no new frame without a change");
      // wheel: zoom changes and a new frame follows
      mouse(3'b000, 0, 0, 1);
      frame(m, v2, r2);
      if (m == 2) check(v2.v[2] != v1.v[2], "3D zoom changed");
      else        check(v2.v[3][23:20] == v1.v[3][23:20] + 1, "2D zoom one step");
      // pan with the left button
      v1 = v2;
      mouse(3'b100, 5, -3, 0);
      frame(m, v2, r2);
      if (m == 2) check(v2.v[0] != v1.v[0] && v2.v[1] != v1.v[1], "3D pan");
      else        check(v2.v[0] != v1.v[0] && v2.v[1] != v1.v[1], "2D pan");
      if (m == 2) begin
        r1 = r2;
        mouse(3'b001, 2, 0, 0);
        frame(m, v2, r2);
        check(r2.v != r1.v, "right button rotates the 3D view");
      end
    end
    active = 4'd15;
    repeat (20) @(posedge clk);
    check(stray == 0, "inactive instances stay silent");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
