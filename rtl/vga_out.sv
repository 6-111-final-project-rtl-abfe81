// vga_out: VGA output, 640x480 at 60 Hz (25.175 MHz pixel clock nominal).
//
// Two counters walk the 800x525 frame (640 + 16 front porch + 96 sync + 48
// back porch pixels; 480 + 10 + 2 + 33 lines). In the visible area the
// pixel address {v[8:0], h[9:0]} goes to the active video RAM; the pixel comes
// back LAT cycles later, so sync and blanking are delayed by LAT cycles to
// stay aligned with it. Sync pulses are active low, and rgb is black outside
// the visible area. Reading the active VRAM and driving hsync, vsync and a
// 24-bit rgb are the proposal's; the video mode is this design's choice.
module vga_out
  import gps_pkg::*;
#(
  parameter int H_VIS = 640, H_FP = 16, H_SYNC = 96, H_BP = 48,
  parameter int V_VIS = 480, V_FP = 10, V_SYNC = 2,  V_BP = 33,
  parameter int LAT   = 2
) (
  input  logic               clk,
  input  logic               rst,
  output logic [VADDR_W-1:0] addr,
  input  logic [VDATA_W-1:0] rdata,
  output logic               hsync,
  output logic               vsync,
  output logic [23:0]        rgb,
  output logic               frame_start   // one cycle at pixel (0,0) of each frame
);
  localparam int H_TOT = H_VIS + H_FP + H_SYNC + H_BP;
  localparam int V_TOT = V_VIS + V_FP + V_SYNC + V_BP;

  logic [10:0] h, v;
  logic [LAT-1:0] hs_d, vs_d, vis_d;

  wire hs_now  = !(h >= H_VIS + H_FP && h < H_VIS + H_FP + H_SYNC);
  wire vs_now  = !(v >= V_VIS + V_FP && v < V_VIS + V_FP + V_SYNC);
  wire vis_now = (h < H_VIS) && (v < V_VIS);

  assign addr        = {v[Y_W-1:0], h[X_W-1:0]};
  assign hsync       = hs_d[LAT-1];
  assign vsync       = vs_d[LAT-1];
  assign rgb         = vis_d[LAT-1] ? rdata[23:0] : 24'h000000;
  assign frame_start = (h == 0) && (v == 0);

  always_ff @(posedge clk) begin
    if (rst) begin
      h <= '0; v <= '0; hs_d <= '1; vs_d <= '1; vis_d <= '0;
    end else begin
      if (h == 11'(H_TOT - 1)) begin
        h <= '0;
        v <= (v == 11'(V_TOT - 1)) ? '0 : v + 1'b1;
      end else h <= h + 1'b1;
      hs_d  <= LAT'({hs_d, hs_now});
      vs_d  <= LAT'({vs_d, vs_now});
      vis_d <= LAT'({vis_d, vis_now});
    end
  end
endmodule
