// m25p16_model: behavioural model of an M25P16 16 Mbit SPI serial flash, for
// testbenches only (not synthesizable).
//
// SPI mode 0. Implements WRITE ENABLE (06h), WRITE DISABLE (04h), READ STATUS
// (05h: bit 1 write-enable latch, bit 0 write in progress), READ DATA (03h,
// streaming through the array), PAGE PROGRAM (02h, bytes AND-ed into the
// array, address wrapping inside the 256-byte page) and BULK ERASE (C7h, the
// whole array to FFh). Program and erase need the write-enable latch, clear it
// when chip select rises and keep "write in progress" set for PP_CYC and
// BE_CYC cycles of `clk`. `clk` only times those busy periods.
module m25p16_model #(
  parameter int SIZE   = 2097152,
  parameter int PP_CYC = 20,
  parameter int BE_CYC = 200
) (
  input  logic clk,
  input  logic cs_n,
  input  logic sck,
  input  logic mosi,
  output logic miso
);
  logic [7:0] mem [SIZE];
  logic [7:0] sr, cmd;
  logic [23:0] addr;
  int   bitcnt, nbytes, busy, programmed;
  logic wel;
  int   erases, programs;

  initial begin
    for (int i = 0; i < SIZE; i++) mem[i] = 8'hFF;
    wel = 0; busy = 0; bitcnt = 0; nbytes = 0; cmd = 0; addr = 0; miso = 0;
    erases = 0; programs = 0; programmed = 0;
  end

  always @(posedge clk) if (busy > 0) busy <= busy - 1;

  always @(negedge cs_n) begin
    bitcnt = 0; nbytes = 0; cmd = 0; programmed = 0;
  end

  always @(posedge cs_n) begin
    if (nbytes >= 1) begin
      if (cmd == 8'h06 && busy == 0) wel = 1;
      if (cmd == 8'h04) wel = 0;
      if (cmd == 8'hC7 && wel && busy == 0) begin
        for (int i = 0; i < SIZE; i++) mem[i] = 8'hFF;
        wel = 0; busy = BE_CYC; erases++;
      end
      if (cmd == 8'h02 && programmed > 0) begin
        wel = 0; busy = PP_CYC; programs++;
      end
    end
  end

  always @(posedge sck) if (!cs_n) begin
    sr = {sr[6:0], mosi};
    bitcnt++;
    if (bitcnt % 8 == 0) begin
      nbytes++;
      if (nbytes == 1) cmd = sr;
      else if ((cmd == 8'h02 || cmd == 8'h03) && nbytes <= 4) addr = {addr[15:0], sr};
      else if (cmd == 8'h02 && wel && busy == 0) begin
        mem[int'(addr) % SIZE] = mem[int'(addr) % SIZE] & sr;
        addr[7:0] = addr[7:0] + 1;
        programmed++;
      end
    end
  end

  always @(negedge sck) if (!cs_n) begin
    if (cmd == 8'h05 && nbytes >= 1)
      miso = (7 - bitcnt % 8 == 1) ? wel : (7 - bitcnt % 8 == 0) ? (busy != 0) : 1'b0;
    else if (cmd == 8'h03 && nbytes >= 4)
      miso = mem[(int'(addr) + nbytes - 4) % SIZE][7 - bitcnt % 8];
  end
endmodule
