// log_encoder: data log encoder of the GPS logger.
//
// Log format, in 16-byte records, all words big-endian:
//   init record        LOG_START_MAGIC, time of the first fix, 8 zero bytes
//   data record        latitude, longitude, altitude, velocity
//   termination record LOG_END_MAGIC, 12 zero bytes
// After reset the encoder erases the flash through flash_writer. It then waits
// for the first fix from the parser, writes the init record, and writes one
// data record per fix. A pulse on `stop` (shut-down) makes it write the
// termination record; once its last byte is programmed `finished` goes high and
// stays high. One fix arriving
// while a record is still being written is held; a further one is dropped and
// counted in `dropped`. When only room for the termination record is left the
// encoder stops taking fixes (`full`).
// Interface timing: `fix_avail` is a one-cycle pulse with the fix values
// valid in the same cycle; the flash side is the ready/erase/write/data
// interface of flash_writer. The erase-at-start, the three record kinds and
// the 16-byte data record are the proposal's; the magic values, the init and
// termination record layouts and the overflow handling are this design's.
module log_encoder
  import gps_pkg::*;
#(
  parameter int CAPACITY_BYTES = 2097152   // 16 Mbit
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        fix_avail,
  input  logic [31:0] lat,
  input  logic [31:0] lon,
  input  logic [31:0] alt,
  input  logic [31:0] vel,
  input  logic [31:0] time_ms,
  input  logic        stop,
  // flash_writer side
  input  logic        fl_ready,
  input  logic [23:0] fl_addr,
  output logic        fl_erase,
  output logic        fl_write,
  output logic [7:0]  fl_data,
  // status
  output logic        logging,
  output logic        full,
  output logic        finished,
  output logic [15:0] dropped,
  output logic [31:0] records
);
  typedef enum logic [2:0] {ERASE, ERASE_WAIT, WAIT_FIRST, IDLE, WRITE, DONE} state_e;
  state_e       state;
  logic [127:0] rec;
  logic [3:0]   bytes_left;   // bytes of `rec` still to write, minus one
  logic         writing_end;
  logic         pend;         // a fix is held
  logic [127:0] pend_rec;
  logic         stop_req;
  logic         need_data;    // after the init record, the first fix's data record
  logic [127:0] first_rec;
  logic         issued;       // command given, wait for ready to drop

  assign logging = (state == IDLE) || (state == WRITE);
  assign full    = (int'(fl_addr) + 32 > CAPACITY_BYTES);

  always_comb begin
    fl_erase = 1'b0;
    fl_write = 1'b0;
    fl_data  = rec[127:120];
    if (!issued && fl_ready) begin
      if (state == ERASE) fl_erase = 1'b1;
      if (state == WRITE) fl_write = 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= ERASE; rec <= '0; bytes_left <= '0; writing_end <= 1'b0;
      pend <= 1'b0; pend_rec <= '0; stop_req <= 1'b0; need_data <= 1'b0;
      first_rec <= '0; issued <= 1'b0; finished <= 1'b0; dropped <= '0;
      records <= '0;
    end else begin
      if (issued && !fl_ready) issued <= 1'b0;
      if (stop) stop_req <= 1'b1;
      unique case (state)
        ERASE: if (fl_ready && !issued) begin
          issued <= 1'b1;
          state  <= ERASE_WAIT;
        end
        ERASE_WAIT: if (fl_ready && !issued) state <= WAIT_FIRST;
        WAIT_FIRST: if (stop_req) begin
          rec <= {LOG_START_MAGIC, 96'h0};     // empty log: init then end
          bytes_left <= 4'd15;
          state <= WRITE;
          writing_end <= 1'b0;
          need_data <= 1'b0;
        end else if (fix_avail) begin
          rec        <= {LOG_START_MAGIC, time_ms, 64'h0};
          first_rec  <= {lat, lon, alt, vel};
          need_data  <= 1'b1;
          bytes_left <= 4'd15;
          state      <= WRITE;
        end
        IDLE: begin
          if (need_data) begin
            rec <= first_rec; need_data <= 1'b0; bytes_left <= 4'd15; state <= WRITE;
            records <= records + 1'b1;
          end else if (pend) begin
            rec <= pend_rec; pend <= 1'b0; bytes_left <= 4'd15; state <= WRITE;
            records <= records + 1'b1;
          end else if (stop_req) begin
            rec <= {LOG_END_MAGIC, 96'h0}; bytes_left <= 4'd15; state <= WRITE;
            writing_end <= 1'b1;
          end
        end
        WRITE: if (fl_ready && !issued) begin
          issued <= 1'b1;
          rec    <= {rec[119:0], 8'h00};
          if (bytes_left == 0) state <= writing_end ? DONE : IDLE;
          else bytes_left <= bytes_left - 1'b1;
        end
        DONE: if (fl_ready) finished <= 1'b1;   // last byte programmed
        default: state <= IDLE;
      endcase
      // every fix after the first goes through the one-entry hold register
      if (fix_avail && (state == IDLE || state == WRITE) && !full && !writing_end) begin
        if (!pend || (state == IDLE && !need_data)) begin
          pend     <= 1'b1;
          pend_rec <= {lat, lon, alt, vel};
        end else dropped <= dropped + 1'b1;
      end
    end
  end
endmodule
