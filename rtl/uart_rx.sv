// uart_rx: RS232 input, 8 data bits, no parity, one stop bit (8N1).
//
// The line is synchronised with two flip-flops. A falling edge starts a
// frame; the start bit is re-checked half a bit later and each data bit is
// sampled in the middle of its bit time, least significant bit first.
// Interface: every cycle the 9-bit output `rx_out` = {valid, byte}; valid is
// high for exactly one clock cycle when a byte with a correct stop bit has
// arrived. The 9-bit {valid, byte} output and the 9600 baud rate follow the
// proposal; the 8N1 framing, mid-bit sampling and the discarding of bytes with
// a bad stop bit are this design's choices.
module uart_rx #(
  parameter int CLK_HZ = 50_000_000,
  parameter int BAUD   = 9600
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       rxd,
  output logic [8:0] rx_out
);
  localparam int DIV = CLK_HZ / BAUD;
  localparam int CW  = $clog2(DIV + 1);

  typedef enum logic [1:0] {IDLE, START, DATA, STOP} state_e;
  state_e          state;
  logic [1:0]      sync;
  logic [CW-1:0]   cnt;
  logic [2:0]      bitn;
  logic [7:0]      sh;

  always_ff @(posedge clk) begin
    if (rst) begin
      sync   <= 2'b11;
      state  <= IDLE;
      cnt    <= '0;
      bitn   <= '0;
      sh     <= '0;
      rx_out <= '0;
    end else begin
      sync      <= {sync[0], rxd};
      rx_out[8] <= 1'b0;
      unique case (state)
        IDLE: if (!sync[1]) begin
          state <= START;
          cnt   <= CW'(DIV / 2);
        end
        START: if (cnt == 0) begin
          if (!sync[1]) begin
            state <= DATA;
            cnt   <= CW'(DIV - 1);
            bitn  <= '0;
          end else state <= IDLE;  // glitch, not a start bit
        end else cnt <= cnt - 1'b1;
        DATA: if (cnt == 0) begin
          sh   <= {sync[1], sh[7:1]};
          cnt  <= CW'(DIV - 1);
          bitn <= bitn + 1'b1;
          if (bitn == 3'd7) state <= STOP;
        end else cnt <= cnt - 1'b1;
        STOP: if (cnt == 0) begin
          state <= IDLE;
          if (sync[1]) rx_out <= {1'b1, sh};
        end else cnt <= cnt - 1'b1;
      endcase
    end
  end
endmodule
