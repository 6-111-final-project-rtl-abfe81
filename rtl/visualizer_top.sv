// visualizer_top: the GPS track visualization system.
//
// Fix path: M25P16 serial flash -> flash_reader (bytes) -> log_decoder
// (129-bit fixes) -> fix_queue (FIFO) -> the active visualization module.
// Each of the three vis_plot instances (ID 0: altitude against time, ID 1:
// position with velocity colour, ID 2: rotatable 3D position) turns the fixes
// into rendering commands; render_manager passes the active one's commands
// into render_pipeline (transform, draw, pixel fill), restarts fix reading
// on a re-render request and asks vram_manager to swap the two video RAMs
// when a frame is complete. vga_out scans the displayed RAM; its vsync tells
// the VRAM manager when it may swap. ps2_mouse supplies pan, zoom, rotate and
// module-selection input. The structure is the proposal's; the decoder's EOF
// fix is queued only once per pass, which is this design's choice.
module visualizer_top
  import gps_pkg::*;
#(
  parameter int SPI_HALF   = 1,
  parameter int QUEUE      = 128,
  parameter int PS2_TIMEOUT = 50_000
) (
  input  logic               clk,
  input  logic               rst,
  // serial flash
  output logic               fl_cs_n,
  output logic               fl_sck,
  output logic               fl_mosi,
  input  logic               fl_miso,
  // PS/2 mouse
  input  logic               ps2_clk,
  input  logic               ps2_data,
  // ZBT video RAMs 0 and 1
  output logic [VADDR_W-1:0] z_addr [2],
  output logic               z_we_n [2],
  output logic [VDATA_W-1:0] z_dout [2],
  output logic               z_oe   [2],
  input  logic [VDATA_W-1:0] z_din  [2],
  // VGA
  output logic               hsync,
  output logic               vsync,
  output logic [23:0]        rgb,
  // status
  output logic [3:0]         active_vis,
  output logic               frame_done,
  output logic               displayed_ram
);
  localparam int N_VIS = 3;

  // ---- fixes ----
  logic       rd_avail, rd_next, rd_restart, dec_avail, dec_next, restart;
  logic [7:0] rd_data;
  fix_t       dec_fix, q_fix;
  logic       q_full, q_empty, q_rd, eof_queued;

  flash_reader #(.HALF(SPI_HALF)) u_rd (
    .clk, .rst, .restart(rd_restart), .next(rd_next), .available(rd_avail), .data(rd_data),
    .cs_n(fl_cs_n), .sck(fl_sck), .mosi(fl_mosi), .miso(fl_miso));

  log_decoder u_dec (
    .clk, .rst, .restart, .fix_next(dec_next), .fix_avail(dec_avail), .fix(dec_fix),
    .rd_avail, .rd_data, .rd_next, .rd_restart);

  assign dec_next = dec_avail && !q_full && !eof_queued && !restart;

  always_ff @(posedge clk) begin
    if (rst || restart)                eof_queued <= 1'b0;
    else if (dec_next && dec_fix.eof)  eof_queued <= 1'b1;
  end

  fix_queue #(.DEPTH(QUEUE)) u_q (
    .clk, .rst, .clear(restart), .wr(dec_next), .fix_in(dec_fix), .full(q_full),
    .rd(q_rd), .empty(q_empty), .fix(q_fix));

  // ---- mouse ----
  logic       m_avail;
  logic [2:0] m_lmr;
  logic [7:0] m_x, m_y, m_z;

  ps2_mouse #(.TIMEOUT(PS2_TIMEOUT)) u_mouse (
    .clk, .rst, .ps2_clk, .ps2_data, .available(m_avail), .lmr(m_lmr), .x(m_x), .y(m_y), .z(m_z));

  // ---- visualizations and manager ----
  cmd_t        vis_cmd   [N_VIS];
  logic        vis_valid [N_VIS];
  logic        vis_fix_rd[N_VIS];
  logic        vis_taken [N_VIS];
  logic [15:0] plotted   [N_VIS];

  for (genvar i = 0; i < N_VIS; i++) begin : g_vis
    vis_plot #(.MODE(i), .ID(4'(i))) u_vis (
      .clk, .rst, .active(active_vis), .m_avail, .m_lmr, .m_x, .m_y, .m_z,
      .fix(q_fix), .fix_empty(q_empty), .fix_rd(vis_fix_rd[i]),
      .cmd(vis_cmd[i]), .cmd_valid(vis_valid[i]), .cmd_taken(vis_taken[i]),
      .plotted(plotted[i]));
  end

  cmd_t pipe_cmd;
  logic advance, pipe_idle, swap, swapped;

  render_manager #(.N_VIS(N_VIS)) u_mgr (
    .clk, .rst, .m_avail, .m_lmr, .active(active_vis),
    .vis_cmd, .vis_valid, .vis_fix_rd, .vis_taken,
    .advance, .pipe_idle, .cmd_out(pipe_cmd), .fix_rd(q_rd), .restart, .swap, .swapped,
    .frames(frame_done));

  // ---- rendering pipeline and video memory ----
  logic [VADDR_W-1:0] p_addr, g_addr;
  logic               p_we, p_re;
  logic [VDATA_W-1:0] p_wdata, p_rdata, g_rdata;

  render_pipeline u_pipe (
    .clk, .rst, .cmd_in(pipe_cmd), .adv_in(1'b1), .advance, .idle(pipe_idle),
    .v_addr(p_addr), .v_we(p_we), .v_re(p_re), .v_wdata(p_wdata), .v_rdata(p_rdata));

  vram_manager u_vram (
    .clk, .rst, .swap, .vsync, .swapped, .active(displayed_ram),
    .p_addr, .p_we, .p_re, .p_wdata, .p_rdata, .g_addr, .g_rdata,
    .z_addr, .z_we_n, .z_dout, .z_oe, .z_din);

  logic frame_start;
  vga_out u_vga (
    .clk, .rst, .addr(g_addr), .rdata(g_rdata), .hsync, .vsync, .rgb, .frame_start);
endmodule
