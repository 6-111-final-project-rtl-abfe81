// pixel_fill: coloring stage of the rendering pipeline.
//
// Takes one pixel at a time from the drawing stage (valid/ready) and writes
// it into the rendering (inactive) video RAM through the VRAM manager's
// pipeline port. Address = {y[8:0], x[9:0]}; the colour goes in bits 23:0 of
// the 36-bit word.
//   overwrite: the pixel is written in the cycle it is offered; one pixel per
//              cycle.
//   alpha:     the old colour is read first; RD_LAT cycles later, when it
//              returns, each channel is replaced by
//              (w*new + (16-w)*old) / 16 with w = alpha + 1, and written back.
//              `pix_ready` is low meanwhile, so a blended pixel takes
//              RD_LAT + 1 cycles.
// `adv_out` joins the pipeline's advance signal and is low while a blend is
// in progress. `idle` is high when nothing is in progress and no write was
// issued in the last two cycles (the VRAM manager delays write data by two
// cycles), so the frame is complete in memory when it is high.
// Overwrite and alpha modes and direct access to the rendering RAM are the
// proposal's; the address map, the blend weights and the read-modify-write
// sequence are this design's.
module pixel_fill
  import gps_pkg::*;
#(
  parameter int RD_LAT = 2
) (
  input  logic               clk,
  input  logic               rst,
  output logic               adv_out,
  input  logic               pix_valid,
  input  pixel_t             pix,
  output logic               pix_ready,
  output logic               idle,
  // VRAM manager pipeline port
  output logic [VADDR_W-1:0] v_addr,
  output logic               v_we,
  output logic               v_re,
  output logic [VDATA_W-1:0] v_wdata,
  input  logic [VDATA_W-1:0] v_rdata
);
  typedef enum logic {S_IDLE, S_WAIT} state_e;
  state_e      state;
  pixel_t      held;
  logic [2:0]  cnt;
  logic [1:0]  drain;

  function automatic logic [7:0] mix(input logic [7:0] n, input logic [7:0] o, input logic [3:0] a);
    logic [12:0] s;
    s = 13'(n) * (13'(a) + 13'd1) + 13'(o) * (13'd15 - 13'(a));
    return s[11:4];
  endfunction

  wire [23:0] old = v_rdata[23:0];
  wire [23:0] blended = {mix(held.rgb[23:16], old[23:16], held.alpha),
                         mix(held.rgb[15:8],  old[15:8],  held.alpha),
                         mix(held.rgb[7:0],   old[7:0],   held.alpha)};

  assign pix_ready = (state == S_IDLE);
  assign adv_out   = (state == S_IDLE);
  assign idle      = (state == S_IDLE) && !pix_valid && (drain == 0);

  always_comb begin
    v_addr  = {pix.y, pix.x};
    v_we    = 1'b0;
    v_re    = 1'b0;
    v_wdata = {12'h000, pix.rgb};
    if (state == S_IDLE) begin
      if (pix_valid) begin
        v_we = !pix.blend;
        v_re = pix.blend;
      end
    end else begin
      v_addr  = {held.y, held.x};
      v_wdata = {12'h000, blended};
      v_we    = (cnt == 3'(RD_LAT));
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= S_IDLE; held <= '0; cnt <= '0; drain <= '0;
    end else begin
      if (v_we)            drain <= 2'd2;
      else if (drain != 0) drain <= drain - 1'b1;
      unique case (state)
        S_IDLE: if (pix_valid && pix.blend) begin
          held  <= pix;
          cnt   <= 3'd1;
          state <= S_WAIT;
        end
        S_WAIT: begin
          if (cnt == 3'(RD_LAT)) state <= S_IDLE;
          else cnt <= cnt + 1'b1;
        end
      endcase
    end
  end
endmodule
