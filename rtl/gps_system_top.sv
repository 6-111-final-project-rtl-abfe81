// gps_system_top: the complete GPS data logger and visualization system.
//
// The two halves run on separate boards and share no wires: the logger
// (logger_top) records fixes into a removable serial flash, and the
// visualizer (visualizer_top) later reads that flash and draws the track.
// They stand side by side here, each with its own clock, reset and flash
// pins; moving the flash from one to the other happens outside the design.
module gps_system_top
  import gps_pkg::*;
(
  // ---- logger board ----
  input  logic               log_clk,
  input  logic               log_rst,
  input  logic               gps_rxd,
  output logic               gps_txd,
  input  logic               log_stop,
  output logic               log_fl_cs_n,
  output logic               log_fl_sck,
  output logic               log_fl_mosi,
  input  logic               log_fl_miso,
  output logic               log_init_done,
  output logic               log_logging,
  output logic               log_full,
  output logic               log_finished,
  output logic [31:0]        log_records,
  output logic [15:0]        log_dropped,
  // ---- visualizer board ----
  input  logic               vis_clk,
  input  logic               vis_rst,
  output logic               vis_fl_cs_n,
  output logic               vis_fl_sck,
  output logic               vis_fl_mosi,
  input  logic               vis_fl_miso,
  input  logic               ps2_clk,
  input  logic               ps2_data,
  output logic [VADDR_W-1:0] z_addr [2],
  output logic               z_we_n [2],
  output logic [VDATA_W-1:0] z_dout [2],
  output logic               z_oe   [2],
  input  logic [VDATA_W-1:0] z_din  [2],
  output logic               hsync,
  output logic               vsync,
  output logic [23:0]        rgb,
  output logic [3:0]         active_vis,
  output logic               frame_done,
  output logic               displayed_ram
);
  logger_top u_logger (
    .clk(log_clk), .rst(log_rst), .gps_rxd, .gps_txd, .stop(log_stop),
    .fl_cs_n(log_fl_cs_n), .fl_sck(log_fl_sck), .fl_mosi(log_fl_mosi), .fl_miso(log_fl_miso),
    .init_done(log_init_done), .logging(log_logging), .full(log_full),
    .finished(log_finished), .records(log_records), .dropped(log_dropped));

  visualizer_top u_vis (
    .clk(vis_clk), .rst(vis_rst),
    .fl_cs_n(vis_fl_cs_n), .fl_sck(vis_fl_sck), .fl_mosi(vis_fl_mosi), .fl_miso(vis_fl_miso),
    .ps2_clk, .ps2_data, .z_addr, .z_we_n, .z_dout, .z_oe, .z_din,
    .hsync, .vsync, .rgb, .active_vis, .frame_done, .displayed_ram);
endmodule
