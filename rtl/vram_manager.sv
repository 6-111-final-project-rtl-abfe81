// vram_manager: double-buffered video RAM manager for two ZBT SRAMs.
//
// One RAM is active and serves the VGA output's reads; the other is
// inactive and serves the rendering pipeline's reads and writes. A pulse on
// `swap` is remembered until `vsync` is low (the vertical sync pulse, inside
// the blanking interval); then the roles are exchanged and `swapped` pulses
// for one cycle. `active` tells which RAM (0 or 1) is displayed.
// ZBT side: address, active-low write enable and a data bus split into
// dout/din with a drive enable `oe` for the pads. The RAMs are pipelined
// ("zero bus turnaround"): data for a write is driven two cycles after the
// write address, and read data returns two cycles after the read address.
// The manager keeps that two-cycle write-data delay for each RAM, so its
// pipeline port takes address and data in the same cycle. Read data to either
// user is selected with the role the RAMs had when the read was issued.
// Swapping on `swap` once `vsync` is low and pulsing `swapped` are the
// proposal's; the port signals and the handling of the ZBT latency are this
// design's.
module vram_manager
  import gps_pkg::*;
(
  input  logic               clk,
  input  logic               rst,
  input  logic               swap,
  input  logic               vsync,
  output logic               swapped,
  output logic               active,
  // rendering pipeline port (inactive RAM)
  input  logic [VADDR_W-1:0] p_addr,
  input  logic               p_we,
  input  logic               p_re,
  input  logic [VDATA_W-1:0] p_wdata,
  output logic [VDATA_W-1:0] p_rdata,
  // VGA port (active RAM), read every cycle
  input  logic [VADDR_W-1:0] g_addr,
  output logic [VDATA_W-1:0] g_rdata,
  // ZBT RAM 0 and 1
  output logic [VADDR_W-1:0] z_addr [2],
  output logic               z_we_n [2],
  output logic [VDATA_W-1:0] z_dout [2],
  output logic               z_oe   [2],
  input  logic [VDATA_W-1:0] z_din  [2]
);
  logic               pending;
  logic [1:0]         act_d;              // `active` one and two cycles ago
  logic [VDATA_W-1:0] wd1 [2], wd2 [2];   // write data on its way to each RAM
  logic [1:0]         we1, we2;

  always_comb begin
    for (int i = 0; i < 2; i++) begin
      if (active == 1'(i)) begin
        z_addr[i] = g_addr;
        z_we_n[i] = 1'b1;
      end else begin
        z_addr[i] = p_addr;
        z_we_n[i] = !p_we;
      end
      z_dout[i] = wd2[i];
      z_oe[i]   = we2[i];
    end
  end

  assign p_rdata = act_d[1] ? z_din[0] : z_din[1];
  assign g_rdata = act_d[1] ? z_din[1] : z_din[0];

  always_ff @(posedge clk) begin
    if (rst) begin
      pending <= 1'b0; active <= 1'b0; swapped <= 1'b0; act_d <= '0;
      we1 <= '0; we2 <= '0;
      for (int i = 0; i < 2; i++) begin wd1[i] <= '0; wd2[i] <= '0; end
    end else begin
      swapped <= 1'b0;
      act_d   <= {act_d[0], active};
      if (swap) pending <= 1'b1;
      if ((pending || swap) && !vsync) begin
        active  <= !active;
        pending <= 1'b0;
        swapped <= 1'b1;
      end
      for (int i = 0; i < 2; i++) begin
        we1[i] <= !z_we_n[i];
        wd1[i] <= p_wdata;
        we2[i] <= we1[i];
        wd2[i] <= wd1[i];
      end
    end
  end
endmodule
