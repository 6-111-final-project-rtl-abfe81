// tb_gps_system_top: end-to-end testbench of the whole system at its real
// parameters (50 MHz logger clock, 9600 baud, 25 MHz visualizer clock,
// 640x480 VGA, 2 MB flash, 512K-word video RAMs).
//
// Logging: a stand-in GPS receiver decodes the initializer's message on
// gps_txd, then sends geodetic navigation messages at 9600 baud, among them
// one with a bad checksum and one flagged as an invalid fix; a shut-down
// request ends the log. The flash model must then hold the start record, one
// record per good fix, and the termination record.
// Visualizing: the same flash model is moved to the visualizer, which is then
// released from reset. A stand-in PS/2 mouse switches plots with the middle
// button, zooms with the wheel, pans and rotates. Two ZBT models hold the
// frames; VGA output is sampled.
// Every mechanism is counted and a failure is counted for each that never
// happens: initializer message, fix accepted, bad frame rejected, flash erase,
// page program, termination record, flash read, end of log reached, pipeline
// stall, advance, bypass, 2D and 3D transforms, rectangle, line, text,
// overwrite, alpha blend, re-render, render complete / swap, mode switch,
// mouse packets, frames shown with the background colour and the track.
module tb_gps_system_top;
  import gps_pkg::*;
  localparam real BIT_NS = 1.0e9 / 9600.0;
  localparam int  NGOOD  = 8;

  logic log_clk = 0, log_rst = 1, gps_rxd = 1, gps_txd, log_stop = 0;
  logic log_fl_cs_n, log_fl_sck, log_fl_mosi;
  logic log_init_done, log_logging, log_full, log_finished;
  logic [31:0] log_records;
  logic [15:0] log_dropped;
  logic vis_clk = 0, vis_rst = 1, vis_on = 0;
  logic vis_fl_cs_n, vis_fl_sck, vis_fl_mosi;
  logic ps2_clk = 1, ps2_data = 1;
  logic [VADDR_W-1:0] z_addr [2];
  logic z_we_n [2], z_oe [2];
  logic [VDATA_W-1:0] z_dout [2], z_din [2];
  logic hsync, vsync;
  logic [23:0] rgb;
  logic [3:0] active_vis;
  logic frame_done, displayed_ram;
  int bus_err [2];

  // one flash chip, first on the logger board, then on the visualizer board
  logic fl_clk, fl_cs_n, fl_sck, fl_mosi, fl_miso;
  assign fl_clk  = vis_on ? vis_clk     : log_clk;
  assign fl_cs_n = vis_on ? vis_fl_cs_n : log_fl_cs_n;
  assign fl_sck  = vis_on ? vis_fl_sck  : log_fl_sck;
  assign fl_mosi = vis_on ? vis_fl_mosi : log_fl_mosi;
  m25p16_model flash (.clk(fl_clk), .cs_n(fl_cs_n), .sck(fl_sck), .mosi(fl_mosi), .miso(fl_miso));

  gps_system_top dut (
    .log_clk, .log_rst, .gps_rxd, .gps_txd, .log_stop,
    .log_fl_cs_n, .log_fl_sck, .log_fl_mosi, .log_fl_miso(fl_miso),
    .log_init_done, .log_logging, .log_full, .log_finished, .log_records, .log_dropped,
    .vis_clk, .vis_rst, .vis_fl_cs_n, .vis_fl_sck, .vis_fl_mosi, .vis_fl_miso(fl_miso),
    .ps2_clk, .ps2_data, .z_addr, .z_we_n, .z_dout, .z_oe, .z_din,
    .hsync, .vsync, .rgb, .active_vis, .frame_done, .displayed_ram);

  for (genvar i = 0; i < 2; i++) begin : g_zbt
    zbt_model ram (.clk(vis_clk), .addr(z_addr[i]), .we_n(z_we_n[i]), .din(z_dout[i]),
                   .oe(z_oe[i]), .dout(z_din[i]), .bus_errors(bus_err[i]));
  end

  always #10 log_clk = ~log_clk;                 // 50 MHz
  always #20 if (vis_on) vis_clk = ~vis_clk;     // 25 MHz

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // ---------------- mechanism counters ----------------
  int n_stall, n_adv, n_bypass, n_2d, n_3d, n_rect, n_line, n_text, n_over, n_alpha;
  int n_restart, n_swap, n_frames, n_mouse, n_vsync, n_bg, n_track, n_eof, n_rdbytes;
  bit seen_mode [3];
  logic vs_p = 1;
  always @(posedge vis_clk) if (!vis_rst) begin
    if (!dut.u_vis.u_pipe.advance && !dut.u_vis.u_pipe.idle) n_stall++;
    if (dut.u_vis.u_pipe.advance) n_adv++;
    if (dut.u_vis.u_pipe.advance && dut.u_vis.u_pipe.cnull != CMD_NOOP) n_bypass++;
    if (dut.u_vis.u_pipe.advance && dut.u_vis.u_pipe.c2d != CMD_NOOP) n_2d++;
    if (dut.u_vis.u_pipe.advance && dut.u_vis.u_pipe.c3d != CMD_NOOP) n_3d++;
    if (dut.u_vis.u_pipe.vrect) n_rect++;
    if (dut.u_vis.u_pipe.vline) n_line++;
    if (dut.u_vis.u_pipe.vtext) n_text++;
    if (dut.u_vis.u_pipe.v_we && !dut.u_vis.u_pipe.u_pix.pix.blend) n_over++;
    if (dut.u_vis.u_pipe.v_we && dut.u_vis.u_pipe.u_pix.state != 0) n_alpha++;
    if (dut.u_vis.restart) n_restart++;
    if (dut.u_vis.swapped) n_swap++;
    if (frame_done) n_frames++;
    if (dut.u_vis.m_avail) n_mouse++;
    if (dut.u_vis.eof_queued && !$past(dut.u_vis.eof_queued)) n_eof++;
    if (dut.u_vis.rd_avail && dut.u_vis.rd_next) n_rdbytes++;
    if (active_vis < 3) seen_mode[active_vis] = 1;
    if (vs_p && !vsync) n_vsync++;
    vs_p = vsync;
    if (rgb == 24'h000020) n_bg++;
    if (rgb == 24'hFFFF00 || (rgb[7:0] == 8'h40 && rgb != 24'h000020)) n_track++;
  end

  // ---------------- GPS receiver stand-in ----------------
  logic [7:0] from_logger [$];
  initial forever begin
    logic [7:0] b;
    @(negedge gps_txd);
    #(BIT_NS * 1.5);
    for (int i = 0; i < 8; i++) begin b[i] = gps_txd; #(BIT_NS); end
    from_logger.push_back(b);
  end

  task automatic uart_byte(input logic [7:0] b);
    gps_rxd = 0; #(BIT_NS);
    for (int i = 0; i < 8; i++) begin gps_rxd = b[i]; #(BIT_NS); end
    gps_rxd = 1; #(BIT_NS);
  endtask

  logic [31:0] f_lat [NGOOD], f_lon [NGOOD], f_alt [NGOOD], f_vel [NGOOD], f_tow [NGOOD];
  task automatic nav_msg(input int k, input bit bad_ck, input bit invalid);
    logic [7:0] p [91];
    int s = 0;
    foreach (p[i]) p[i] = 8'h00;
    p[0] = 8'd41;
    if (invalid) p[2] = 8'h04;
    for (int i = 0; i < 4; i++) begin
      p[7 + i]  = f_tow[k][31 - 8*i -: 8];
      p[23 + i] = f_lat[k][31 - 8*i -: 8];
      p[27 + i] = f_lon[k][31 - 8*i -: 8];
      p[35 + i] = f_alt[k][31 - 8*i -: 8];
      p[40 + i] = f_vel[k][31 - 8*i -: 8];
    end
    uart_byte(8'hA0); uart_byte(8'hA2); uart_byte(8'h00); uart_byte(8'd91);
    foreach (p[i]) begin uart_byte(p[i]); s += p[i]; end
    s = (s & 32'h7FFF) ^ (bad_ck ? 1 : 0);
    uart_byte(8'(s >> 8)); uart_byte(8'(s)); uart_byte(8'hB0); uart_byte(8'hB3);
  endtask

  // ---------------- PS/2 mouse stand-in ----------------
  task automatic ps2_byte(input logic [7:0] b);
    logic [10:0] fr = {1'b1, ~^b, b, 1'b0};
    for (int i = 0; i < 11; i++) begin
      ps2_data = fr[i]; #20us; ps2_clk = 0; #20us; ps2_clk = 1;
    end
    #100us;
  endtask
  // buttons {L, M, R}; standard IntelliMouse packet
  task automatic mouse(input logic [2:0] lmr, input int dx, input int dy, input int dz);
    ps2_byte({2'b00, dy < 0, dx < 0, 1'b1, lmr[1], lmr[0], lmr[2]});
    ps2_byte(8'(dx)); ps2_byte(8'(dy)); ps2_byte(8'(dz));
  endtask
  task automatic click_middle();
    mouse(3'b010, 0, 0, 0); mouse(3'b000, 0, 0, 0);
  endtask

  function automatic logic [31:0] flash_word(input int a);
    return {flash.mem[a], flash.mem[a+1], flash.mem[a+2], flash.mem[a+3]};
  endfunction

  task automatic wait_frames(input int n);
    int f0 = n_frames, t = 0;
    while (n_frames < f0 + n && t < 10000) begin #10us; t++; end
    check(n_frames >= f0 + n, "a frame was rendered and shown");
  endtask

  initial begin
    #2s;
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int k = 0; k < NGOOD; k++) begin
      f_tow[k] = 32'd360000 + 32'(k * 1000);
      f_lat[k] = 32'd423600000 + 32'(k * 3000) + 32'($urandom_range(0, 500));
      f_lon[k] = -32'sd710900000 + 32'(k * k * 400) + 32'($urandom_range(0, 500));
      f_alt[k] = 32'd2000 + 32'(k * 150) + 32'($urandom_range(0, 90));
      f_vel[k] = {16'(k * 120), 16'($urandom_range(0, 36000))};
    end
    // ---------------- logging ----------------
    repeat (5) @(posedge log_clk); log_rst = 0;
    wait (log_init_done);
    #(BIT_NS * 20);
    check(from_logger.size() == 16, $sformatf("initializer message of %0d bytes", from_logger.size()));
    check(from_logger.size() >= 5 && from_logger[0] == 8'hA0 && from_logger[1] == 8'hA2 &&
          from_logger[4] == 8'hA6, "initializer message is a SiRF frame with id 166");
    for (int k = 0; k < NGOOD; k++) begin
      nav_msg(k, 0, 0);
      if (k == 2) nav_msg(k, 1, 0);       // bad checksum
      if (k == 4) nav_msg(k, 0, 1);       // invalid fix
      #(BIT_NS * 5);
    end
    #1ms;
    check(log_records == NGOOD, $sformatf("%0d records logged", log_records));
    check(log_dropped == 0 && log_logging, "logging without drops");
    @(posedge log_clk) log_stop <= 1; @(posedge log_clk) log_stop <= 0;
    begin
      automatic int t = 0;
      while (!log_finished && t < 10000) begin @(posedge log_clk); t++; end
    end
    check(log_finished, "log finished after shut-down");
    check(flash.erases >= 1, "flash erased before logging");
    check(flash.programs == 16 * (NGOOD + 2), $sformatf("%0d bytes programmed", flash.programs));
    check(flash_word(0) == LOG_START_MAGIC && flash_word(4) == f_tow[0], "start record");
    begin
      automatic bit ok = 1;
      for (int k = 0; k < NGOOD; k++)
        if (flash_word(16 * (k + 1)) != f_lat[k] || flash_word(16 * (k + 1) + 4) != f_lon[k] ||
            flash_word(16 * (k + 1) + 8) != f_alt[k] || flash_word(16 * (k + 1) + 12) != f_vel[k]) ok = 0;
      check(ok, "data records hold the accepted fixes in order");
    end
    check(flash_word(16 * (NGOOD + 1)) == LOG_END_MAGIC && flash_word(16 * (NGOOD + 1) + 4) == 0 &&
          flash_word(16 * (NGOOD + 1) + 8) == 0 && flash_word(16 * (NGOOD + 1) + 12) == 0, "termination record");
    check(flash_word(16 * (NGOOD + 2)) == 32'hFFFFFFFF, "nothing written after the termination record");
    // ---------------- visualizing ----------------
    vis_on = 1;
    repeat (5) @(posedge vis_clk); vis_rst = 0;
    wait_frames(1);
    check(active_vis == 0 && dut.u_vis.plotted[0] == 16'(NGOOD - 1),
          $sformatf("altitude plot: %0d lines", dut.u_vis.plotted[0]));
    click_middle();
    wait_frames(1);
    check(active_vis == 1 && dut.u_vis.plotted[1] == 16'(NGOOD - 1),
          $sformatf("position plot: %0d lines", dut.u_vis.plotted[1]));
    mouse(3'b000, 0, 0, 1);                 // zoom
    wait_frames(1);
    mouse(3'b100, 20, -10, 0);              // pan
    wait_frames(1);
    click_middle();
    wait_frames(1);
    mouse(3'b001, 3, 0, 0);                 // rotate
    wait_frames(1);
    check(active_vis == 2 && dut.u_vis.plotted[2] == 16'(NGOOD - 1),
          $sformatf("3D plot: %0d lines", dut.u_vis.plotted[2]));
    click_middle();
    wait_frames(1);
    check(active_vis == 0, "mode wraps to the first plot");
    begin
      automatic int f0 = n_frames;
      #40ms;
      check(n_frames == f0, "no new frame without a change");
    end
    // ---------------- mechanisms ----------------
    check(n_stall > 0, "pipeline stall");
    check(n_adv > 0, "pipeline advance");
    check(n_bypass > 0, "bypass transform");
    check(n_2d > 0, "2D transform");
    check(n_3d > 0, "3D transform");
    check(n_rect > 0, "rectangle fill");
    check(n_line > 0, "line draw");
    check(n_text > 0, "text draw");
    check(n_over > 0, "overwrite pixels");
    check(n_alpha > 0, "alpha-blended pixels");
    check(n_restart == 7, $sformatf("%0d re-renders", n_restart));
    check(n_swap == 7 && n_swap == n_frames, $sformatf("%0d swaps, %0d frames", n_swap, n_frames));
    check(seen_mode[0] && seen_mode[1] && seen_mode[2], "mode switch through all plots");
    check(n_mouse == 9, $sformatf("%0d mouse packets", n_mouse));
    check(n_eof >= 7, $sformatf("end of log reached %0d times", n_eof));
    check(n_rdbytes >= 16 * (NGOOD + 2), $sformatf("%0d bytes read from flash", n_rdbytes));
    check(n_vsync >= 8, $sformatf("%0d VGA frames", n_vsync));
    check(n_bg > 200000, $sformatf("%0d background pixels shown", n_bg));
    check(n_track > 20, $sformatf("%0d track pixels shown", n_track));
    check(bus_err[0] == 0 && bus_err[1] == 0, "ZBT data buses driven correctly");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
