// tb_render_manager: self-checking testbench for render_manager.
// Three stand-in visualization modules offer random commands (plain drawing
// commands, re-render and render-complete requests); the pipeline's
// `advance` and `pipe_idle` and the VRAM manager's `swapped` are driven
// randomly. Checks, every cycle: only the active module's plain command
// reaches the pipeline, and it is acknowledged exactly when `advance` is
// high (the pipeline takes it then); NOOPs otherwise; fix pops come only from the active module;
// re-render gives one `restart` pulse; render complete gives `swap` only when
// the pipeline is idle, and is acknowledged only after `swapped`, with one
// `frames` pulse. A middle-button press steps the active module, wrapping.
module tb_render_manager;
  import gps_pkg::*;
  logic clk = 0, rst = 1, m_avail = 0, advance = 0, pipe_idle = 0, swapped = 0;
  logic [2:0] m_lmr = 0;
  logic [3:0] active;
  cmd_t vis_cmd [3], cmd_out;
  logic vis_valid [3], vis_fix_rd [3], vis_taken [3];
  logic fix_rd, restart, swap, frames;
  int checks = 0, failures = 0;
  int n_plain = 0, n_rr = 0, n_done = 0, n_restart = 0, n_swap = 0, n_frames = 0, bad = 0;
  bit swap_pending = 0, swap_seen = 0;

  render_manager dut (.clk, .rst, .m_avail, .m_lmr, .active, .vis_cmd, .vis_valid, .vis_fix_rd,
                      .vis_taken, .advance, .pipe_idle, .cmd_out, .fix_rd, .restart, .swap,
                      .swapped, .frames);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic cmd_t rand_cmd();
    cmd_t c = CMD_NOOP;
    int r = $urandom_range(0, 19);
    c.draw = DR_LINE; c.color = CO_OVERWRITE; c.v[0] = 24'($urandom); c.rgb = 24'($urandom);
    if (r == 0) begin c = CMD_NOOP; c.mgr = MGR_RERENDER; end
    if (r == 1) begin c = CMD_NOOP; c.mgr = MGR_COMPLETE; end
    return c;
  endfunction

  // stand-in modules: hold a command until it is taken
  always @(posedge clk) begin
    for (int i = 0; i < 3; i++)
      if (rst || vis_taken[i] || !vis_valid[i]) begin
        vis_cmd[i]   <= rand_cmd();
        vis_valid[i] <= ($urandom_range(0, 3) != 0);
      end
  end
  always @(negedge clk) begin
    advance   = ($urandom_range(0, 2) != 0);
    pipe_idle = ($urandom_range(0, 3) == 0);
    for (int i = 0; i < 3; i++) vis_fix_rd[i] = ($urandom_range(0, 1) == 1);
  end

  // scoreboard, sampled just before each edge
  always @(posedge clk) if (!rst) begin
    automatic int a = int'(active);
    automatic cmd_t c = vis_cmd[a];
    for (int i = 0; i < 3; i++) if (i != a && vis_taken[i]) bad++;
    if (fix_rd != vis_fix_rd[a]) bad++;
    if (cmd_out != CMD_NOOP) begin
      if (!(vis_valid[a] && c.mgr == MGR_NONE && cmd_out == c && vis_taken[a] == advance)) bad++;
      if (advance) n_plain++;
    end else if (vis_taken[a] && c.mgr == MGR_NONE) bad++;
    if (vis_taken[a] && c.mgr == MGR_RERENDER) n_rr++;
    if (vis_taken[a] && c.mgr == MGR_COMPLETE) begin
      n_done++;
      if (!swap_seen) bad++;
      swap_seen = 0;
    end
    if (restart) n_restart++;
    if (frames) n_frames++;
    if (swap) begin n_swap++; swap_pending = 1; swap_seen = 1; end
  end
  // swap only when idle: `swap` is registered from the cycle before
  logic idle_d;
  always @(posedge clk) idle_d <= pipe_idle;
  always @(posedge clk) if (!rst && swap && !idle_d) bad++;
  // the VRAM manager answers a while later
  initial forever begin
    @(posedge clk);
    if (swap_pending) begin
      repeat ($urandom_range(1, 30)) @(posedge clk);
      swapped <= 1; @(posedge clk); swapped <= 0; swap_pending = 0;
    end
  end

  task automatic press_middle();
    m_lmr <= 3'b010; m_avail <= 1; @(posedge clk); m_avail <= 0;
    repeat (3) @(posedge clk);
    m_lmr <= 3'b000; m_avail <= 1; @(posedge clk); m_avail <= 0;
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (3) @(posedge clk); rst = 0;
    check(active == 0, "module 0 active after reset");
    for (int k = 0; k < 7; k++) begin
      logic [3:0] a0;
      repeat (3000) @(posedge clk);
      a0 = active;
      // press while the manager is in its normal state
      press_middle();
      repeat (5) @(posedge clk);
      check(active == ((a0 == 2) ? 4'd0 : a0 + 1) || active == a0, "middle button steps the module");
    end
    repeat (100) @(posedge clk);
    check(bad == 0, $sformatf("%0d protocol errors", bad));
    check(n_plain > 1000, $sformatf("%0d plain commands passed", n_plain));
    check(n_rr > 10 && n_restart == n_rr, $sformatf("%0d re-renders, %0d restarts", n_rr, n_restart));
    check(n_done > 10 && n_frames == n_done && n_swap >= n_done && n_swap <= n_done + 1,
          $sformatf("%0d completes, %0d swaps, %0d frames", n_done, n_swap, n_frames));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
