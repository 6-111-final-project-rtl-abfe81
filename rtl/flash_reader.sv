// flash_reader: Flash ROM input controller for an M25P16 serial flash.
//
// After reset, and whenever `restart` is pulsed, it drops chip select and
// sends READ DATA BYTES (03h) with address 0, then reads the first byte.
// A byte is shown on `data` with `available` high; a pulse on `next` while
// `available` is high reads the following byte, keeping chip select low so
// the flash streams consecutive addresses. `available` is low while a byte is
// being fetched (16*HALF cycles). The available/data/next/restart interface is
// the proposal's; the continuous-read instruction comes from the M25P16's
// instruction set. The chip-select output is this design's addition.
module flash_reader #(
  parameter int HALF   = 1,
  parameter int CS_GAP = 5
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       restart,
  input  logic       next,
  output logic       available,
  output logic [7:0] data,
  output logic       cs_n,
  output logic       sck,
  output logic       mosi,
  input  logic       miso
);
  typedef enum logic [2:0] {GAP, CMD, READ, HAVE} state_e;
  state_e     state;
  logic [1:0] pos;
  logic [$clog2(CS_GAP+1)-1:0] gap;
  logic       start, busy, done;
  logic [7:0] tx, rx;

  spi_byte #(.HALF(HALF)) u_spi (
    .clk, .rst, .start, .tx, .busy, .done, .rx, .sck, .mosi, .miso);

  assign available = (state == HAVE);

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= GAP; pos <= '0; gap <= '0; start <= 1'b0; tx <= '0;
      cs_n <= 1'b1; data <= '0;
    end else if (restart) begin
      state <= GAP; gap <= '0; cs_n <= 1'b1; start <= 1'b0;
    end else begin
      start <= 1'b0;
      unique case (state)
        GAP: if (!busy) begin
          if (gap == CS_GAP) begin
            cs_n  <= 1'b0;
            tx    <= 8'h03;          // READ DATA BYTES
            start <= 1'b1;
            pos   <= '0;
            state <= CMD;
          end else gap <= gap + 1'b1;
        end
        CMD: if (done) begin          // instruction and three address bytes
          pos   <= pos + 1'b1;
          tx    <= 8'h00;
          start <= 1'b1;
          if (pos == 2'd3) state <= READ;
        end
        READ: if (done) begin
          data  <= rx;
          state <= HAVE;
        end
        HAVE: if (next) begin
          tx    <= 8'h00;
          start <= 1'b1;
          state <= READ;
        end
        default: state <= GAP;
      endcase
    end
  end
endmodule
