// log_decoder: data log decoder of the visualization system.
//
// Reads the byte stream of the flash reader and rebuilds the 129-bit fixes
// written by log_encoder. After reset or `restart` it first reads the 16-byte
// init record; if its first word is not LOG_START_MAGIC the log is treated as
// empty. It then assembles 16-byte data records. A record whose first word is
// LOG_END_MAGIC, or reads as erased flash (FFFFFFFFh, a log cut off without a
// termination record), ends the log: the decoder then offers one fix with the
// EOF bit set and its other fields zero, and keeps offering it until restart.
// Interface: `fix_avail` high means `fix` is valid; a pulse on `fix_next`
// consumes it. Towards the reader, `rd_next` is asserted combinationally in
// the same cycle a byte is taken, and `rd_restart` mirrors `restart`.
// The fix layout (EOF flag, latitude, longitude, altitude, velocity, MSB
// first) and the available/next/restart interface are the proposal's; the
// record layouts and the erased-flash rule are this design's.
module log_decoder
  import gps_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic       restart,
  input  logic       fix_next,
  output logic       fix_avail,
  output fix_t       fix,
  // flash reader side
  input  logic       rd_avail,
  input  logic [7:0] rd_data,
  output logic       rd_next,
  output logic       rd_restart
);
  typedef enum logic [1:0] {HEADER, RECORD, HAVE, ENDED} state_e;
  state_e       state;
  logic [127:0] sh;
  logic [3:0]   cnt;

  assign rd_restart = restart;
  assign rd_next    = (state == HEADER || state == RECORD) && rd_avail && !restart && !rst;
  assign fix_avail  = (state == HAVE) || (state == ENDED);

  wire [127:0] full_rec = {sh[119:0], rd_data};

  always_ff @(posedge clk) begin
    if (rst || restart) begin
      state <= HEADER; sh <= '0; cnt <= '0; fix <= '0;
    end else begin
      unique case (state)
        HEADER: if (rd_avail) begin
          sh  <= full_rec;
          cnt <= cnt + 1'b1;
          if (cnt == 4'd15) begin
            if (full_rec[127:96] == LOG_START_MAGIC) state <= RECORD;
            else begin
              state <= ENDED;
              fix   <= '{eof: 1'b1, default: '0};
            end
          end
        end
        RECORD: if (rd_avail) begin
          sh  <= full_rec;
          cnt <= cnt + 1'b1;
          if (cnt == 4'd15) begin
            if (full_rec[127:96] == LOG_END_MAGIC || full_rec[127:96] == 32'hFFFF_FFFF) begin
              state <= ENDED;
              fix   <= '{eof: 1'b1, default: '0};
            end else begin
              state <= HAVE;
              fix   <= '{eof: 1'b0, lat: full_rec[127:96], lon: full_rec[95:64],
                         alt: full_rec[63:32], vel: full_rec[31:0]};
            end
          end
        end
        HAVE: if (fix_next) state <= RECORD;
        ENDED: ;
        default: state <= HEADER;
      endcase
    end
  end
endmodule
