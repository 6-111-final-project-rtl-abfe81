// spi_byte: one-byte SPI master shifter, mode 0 (clock idles low, data
// sampled on the rising edge), most significant bit first.
//
// A pulse on `start` shifts `tx` out on `mosi` while shifting `miso` into
// `rx`. Each SPI clock phase lasts HALF system clock cycles, so a byte takes
// 16*HALF cycles; `done` pulses for one cycle at the end. Chip select is left
// to the user. Helper of the flash controllers; its timing is this design's
// choice (the proposal only gives the SPI link and its 50 MHz limit).
module spi_byte #(
  parameter int HALF = 1
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       start,
  input  logic [7:0] tx,
  output logic       busy,
  output logic       done,
  output logic [7:0] rx,
  output logic       sck,
  output logic       mosi,
  input  logic       miso
);
  logic [7:0]                   sh;
  logic [3:0]                   nbit;
  logic [$clog2(HALF+1)-1:0]    ph;

  assign mosi = sh[7];

  always_ff @(posedge clk) begin
    if (rst) begin
      busy <= 1'b0; done <= 1'b0; rx <= '0; sck <= 1'b0;
      sh <= '0; nbit <= '0; ph <= '0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        sck <= 1'b0;
        if (start) begin
          busy <= 1'b1;
          sh   <= tx;
          nbit <= 4'd8;
          ph   <= '0;
        end
      end else if (ph != $bits(ph)'(HALF - 1)) begin
        ph <= ph + 1'b1;
      end else begin
        ph <= '0;
        if (!sck) begin
          sck <= 1'b1;               // rising edge: sample
          rx  <= {rx[6:0], miso};
        end else begin
          sck  <= 1'b0;              // falling edge: next bit out
          sh   <= {sh[6:0], 1'b0};
          nbit <= nbit - 1'b1;
          if (nbit == 1) begin
            busy <= 1'b0;
            done <= 1'b1;
          end
        end
      end
    end
  end
endmodule
