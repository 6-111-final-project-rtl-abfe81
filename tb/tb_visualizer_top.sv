// tb_visualizer_top: testbench of the visualizer half with a 4-entry fix
// queue (so reading the log stalls on a full queue) and a short PS/2 timeout.
// The flash model is loaded with a log (start record, NREC data records,
// termination record). The testbench checks that the first frame plots
// NREC - 1 lines and is shown on the VGA output (background colour, panel,
// track), that a middle click selects the next plot, that a wheel step
// re-renders, and that after the log in flash is extended and its
// termination record erased (erased flash also ends a log) a re-render plots
// the longer track. The ZBT models check the data-bus timing.
module tb_visualizer_top;
  import gps_pkg::*;
  localparam int NREC = 10;
  logic clk = 0, rst = 1;
  logic fl_cs_n, fl_sck, fl_mosi, fl_miso;
  logic ps2_clk = 1, ps2_data = 1;
  logic [VADDR_W-1:0] z_addr [2];
  logic z_we_n [2], z_oe [2];
  logic [VDATA_W-1:0] z_dout [2], z_din [2];
  logic hsync, vsync;
  logic [23:0] rgb;
  logic [3:0] active_vis;
  logic frame_done, displayed_ram;
  int bus_err [2];
  int checks = 0, failures = 0, n_frames = 0, n_bg = 0, n_panel = 0, n_track = 0, n_restart = 0;

  visualizer_top #(.QUEUE(4), .PS2_TIMEOUT(5000)) dut (
    .clk, .rst, .fl_cs_n, .fl_sck, .fl_mosi, .fl_miso, .ps2_clk, .ps2_data,
    .z_addr, .z_we_n, .z_dout, .z_oe, .z_din, .hsync, .vsync, .rgb,
    .active_vis, .frame_done, .displayed_ram);
  m25p16_model #(.SIZE(4096)) flash (.clk, .cs_n(fl_cs_n), .sck(fl_sck), .mosi(fl_mosi), .miso(fl_miso));
  for (genvar i = 0; i < 2; i++) begin : g_zbt
    zbt_model ram (.clk, .addr(z_addr[i]), .we_n(z_we_n[i]), .din(z_dout[i]),
                   .oe(z_oe[i]), .dout(z_din[i]), .bus_errors(bus_err[i]));
  end
  always #20 clk = ~clk;

  always @(posedge clk) if (!rst) begin
    if (frame_done) n_frames++;
    if (dut.restart) n_restart++;
    if (rgb == 24'h000020) n_bg++;
    if (rgb == 24'h202050 || rgb == 24'h202051) n_panel++;
    if (rgb == 24'hFFFF00) n_track++;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic put_word(input int a, input logic [31:0] w);
    for (int i = 0; i < 4; i++) flash.mem[a + i] = w[31 - 8*i -: 8];
  endtask
  task automatic put_rec(input int r, input int k);
    put_word(16 * r,      32'd423600000 + 32'(k * 2000));
    put_word(16 * r + 4,  -32'sd710900000 + 32'(k * 1500));
    put_word(16 * r + 8,  32'd1000 + 32'(k * 37 % 300));
    put_word(16 * r + 12, {16'(k * 100), 16'd0});
  endtask

  task automatic ps2_byte(input logic [7:0] b);
    logic [10:0] fr = {1'b1, ~^b, b, 1'b0};
    for (int i = 0; i < 11; i++) begin
      ps2_data = fr[i]; #20us; ps2_clk = 0; #20us; ps2_clk = 1;
    end
    #50us;
  endtask
  task automatic mouse(input logic [2:0] lmr, input int dx, input int dy, input int dz);
    ps2_byte({2'b00, dy < 0, dx < 0, 1'b1, lmr[1], lmr[0], lmr[2]});
    ps2_byte(8'(dx)); ps2_byte(8'(dy)); ps2_byte(8'(dz));
  endtask

  task automatic wait_frame();
    automatic int f0 = n_frames, t = 0;
    while (n_frames == f0 && t < 10000) begin #10us; t++; end
    check(n_frames > f0, "a frame was rendered and shown");
  endtask

  initial begin
    #1s;
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    put_word(0, LOG_START_MAGIC); put_word(4, 32'd1234); put_word(8, 0); put_word(12, 0);
    for (int k = 0; k < NREC; k++) put_rec(k + 1, k);
    put_word(16 * (NREC + 1), LOG_END_MAGIC);
    for (int i = 4; i < 16; i++) flash.mem[16 * (NREC + 1) + i] = 8'h00;
    repeat (5) @(posedge clk); rst = 0;
    wait_frame();
    check(active_vis == 0 && dut.plotted[0] == 16'(NREC - 1), $sformatf("first plot: %0d lines", dut.plotted[0]));
    // watch one whole displayed frame
    n_bg = 0; n_panel = 0; n_track = 0;
    #17ms;
    check(n_bg > 250000, $sformatf("%0d background pixels", n_bg));
    check(n_track > 5, $sformatf("%0d track pixels", n_track));
    check(n_panel > 400, $sformatf("%0d alpha-blended panel pixels", n_panel));
    // middle click
    mouse(3'b010, 0, 0, 0); mouse(3'b000, 0, 0, 0);
    wait_frame();
    check(active_vis == 1 && dut.plotted[1] == 16'(NREC - 1), $sformatf("second plot: %0d lines", dut.plotted[1]));
    // extend the log; its end is now erased flash
    for (int k = NREC; k < NREC + 3; k++) put_rec(k + 1, k);
    for (int i = 0; i < 16; i++) flash.mem[16 * (NREC + 4) + i] = 8'hFF;
    mouse(3'b000, 0, 0, 8'hFF);            // wheel: zoom out, re-render
    wait_frame();
    check(dut.plotted[1] == 16'(NREC + 2), $sformatf("longer log: %0d lines", dut.plotted[1]));
    check(n_restart == 3 && n_frames == 3, $sformatf("%0d re-renders, %0d frames", n_restart, n_frames));
    check(bus_err[0] == 0 && bus_err[1] == 0, "ZBT data bus timing");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
