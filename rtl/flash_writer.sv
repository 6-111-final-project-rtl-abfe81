// flash_writer: Flash ROM output controller for an M25P16 serial flash.
//
// Commands: with `ready` high, `erase` erases the whole chip and `write`
// programs the byte on `data` at the next address (0, 1, 2, ... restarting at
// 0 after an erase). `ready` drops the cycle after a command is taken and
// rises again once the flash reports that the operation has finished.
// How it works: every operation is WRITE ENABLE (06h), then either BULK ERASE
// (C7h) or PAGE PROGRAM (02h, three address bytes, the data byte), then READ
// STATUS (05h) repeated until the write-in-progress bit clears. Chip select is
// raised for at least CS_GAP cycles between instructions.
// The ready/erase/write/data interface and the auto-incrementing address are
// the proposal's; the instruction sequence follows the M25P16's instruction
// set. The proposal's optional write caching and power-save mode are not
// built: each byte is programmed on its own. The proposal lists only clock,
// serial-in and serial-out; the chip also needs its chip-select input, which
// is brought out as `cs_n`.
module flash_writer #(
  parameter int HALF   = 1,   // SPI half period in clock cycles
  parameter int CS_GAP = 5    // chip-select high time between instructions
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       erase,
  input  logic       write,
  input  logic [7:0] data,
  output logic       ready,
  output logic [23:0] addr,   // next address to be written
  output logic       cs_n,
  output logic       sck,
  output logic       mosi,
  input  logic       miso
);
  typedef enum logic [2:0] {IDLE, GAP, SEND, POLL_CMD, POLL_RD} state_e;
  state_e      state, after_gap;
  logic [7:0]  seq [5];
  logic [2:0]  nseq, pos;
  logic        phase;        // 0: WREN sent next, 1: main instruction next
  logic        is_erase;
  logic [7:0]  wdata;
  logic [$clog2(CS_GAP+1)-1:0] gap;
  logic        start, busy, done;
  logic [7:0]  tx, rx;

  spi_byte #(.HALF(HALF)) u_spi (
    .clk, .rst, .start, .tx, .busy, .done, .rx, .sck, .mosi, .miso);

  assign ready = (state == IDLE);

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= IDLE; after_gap <= IDLE; cs_n <= 1'b1; addr <= '0;
      nseq <= '0; pos <= '0; phase <= 1'b0; is_erase <= 1'b0; wdata <= '0;
      gap <= '0; start <= 1'b0; tx <= '0;
      for (int i = 0; i < 5; i++) seq[i] <= '0;
    end else begin
      start <= 1'b0;
      unique case (state)
        IDLE: if (erase || write) begin
          is_erase <= erase;
          wdata    <= data;
          seq[0]   <= 8'h06;          // WRITE ENABLE
          nseq     <= 3'd1;
          phase    <= 1'b0;
          state    <= GAP;
          after_gap <= SEND;
          gap      <= '0;
        end
        GAP: begin
          cs_n <= 1'b1;
          if (gap == CS_GAP) begin
            cs_n  <= 1'b0;
            pos   <= '0;
            state <= after_gap;
            if (after_gap == SEND) begin tx <= seq[0]; start <= 1'b1; end
            else begin tx <= 8'h05; start <= 1'b1; end
          end else gap <= gap + 1'b1;
        end
        SEND: if (done) begin
          if (pos + 1'b1 == nseq) begin
            gap <= '0;
            state <= GAP;
            if (!phase) begin
              phase <= 1'b1;
              after_gap <= SEND;
              if (is_erase) begin
                seq[0] <= 8'hC7;      // BULK ERASE
                nseq   <= 3'd1;
              end else begin
                seq[0] <= 8'h02;      // PAGE PROGRAM
                seq[1] <= addr[23:16];
                seq[2] <= addr[15:8];
                seq[3] <= addr[7:0];
                seq[4] <= wdata;
                nseq   <= 3'd5;
              end
            end else begin
              after_gap <= POLL_CMD;
            end
          end else begin
            pos   <= pos + 1'b1;
            tx    <= seq[pos + 1'b1];
            start <= 1'b1;
          end
        end
        POLL_CMD: if (done) begin     // status instruction sent, read a byte
          tx    <= 8'h00;
          start <= 1'b1;
          state <= POLL_RD;
        end
        POLL_RD: if (done) begin
          if (rx[0]) begin            // write in progress: read status again
            tx    <= 8'h00;
            start <= 1'b1;
          end else begin
            cs_n  <= 1'b1;
            state <= IDLE;
            addr  <= is_erase ? '0 : addr + 1'b1;
          end
        end
        default: state <= IDLE;
      endcase
    end
  end
endmodule
