// sirf_init: StarIII initializer.
//
// After reset it waits START_DELAY cycles, then sends one SiRF binary message
// through the RS232 output: start sequence A0 A2, 15-bit payload length, the
// payload, a 15-bit checksum (sum of the payload bytes, modulo 2^15) and the
// end sequence B0 B3. `done` goes high once the last byte has been handed to
// the transmitter and stays high until the next reset.
// Interface: drives the 9-bit {send, byte} input of uart_tx and waits for its
// `ready` before each byte. The proposal only says that the initializer
// configures update period and communication mode after reset; the framing is
// the SiRF binary protocol, and the default payload (message 166, "set
// message rate", enabling navigation message 41 once a second) is this
// design's choice.
module sirf_init #(
  parameter int                     PLEN        = 8,
  parameter logic [PLEN*8-1:0]      PAYLOAD     = 64'hA6_00_29_01_00_00_00_00,
  parameter int                     START_DELAY = 1000
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       tx_ready,
  output logic [8:0] tx_out,
  output logic       done
);
  localparam int NBYTES = PLEN + 8;

  logic [$clog2(START_DELAY+2)-1:0] wait_cnt;
  logic [$clog2(NBYTES+1)-1:0]      idx;
  logic [14:0]                      cksum;
  logic                             sent;  // byte handed over last cycle
  logic [7:0]                       cur;

  // checksum over the constant payload
  always_comb begin
    cksum = '0;
    for (int i = 0; i < PLEN; i++)
      cksum = cksum + 15'(PAYLOAD[(PLEN-1-i)*8 +: 8]);
  end

  always_comb begin
    if (idx == 0)                 cur = 8'hA0;
    else if (idx == 1)            cur = 8'hA2;
    else if (idx == 2)            cur = 8'(PLEN >> 8) & 8'h7F;
    else if (idx == 3)            cur = 8'(PLEN);
    else if (idx < PLEN + 4)      cur = PAYLOAD[(PLEN-1-(int'(idx)-4))*8 +: 8];
    else if (idx == PLEN + 4)     cur = {1'b0, cksum[14:8]};
    else if (idx == PLEN + 5)     cur = cksum[7:0];
    else if (idx == PLEN + 6)     cur = 8'hB0;
    else                          cur = 8'hB3;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      wait_cnt <= '0;
      idx      <= '0;
      done     <= 1'b0;
      sent     <= 1'b0;
      tx_out   <= '0;
    end else begin
      tx_out <= '0;
      sent   <= 1'b0;
      if (wait_cnt != START_DELAY) wait_cnt <= wait_cnt + 1'b1;
      else if (!done && tx_ready && !sent && !tx_out[8]) begin
        tx_out <= {1'b1, cur};
        sent   <= 1'b1;
        if (idx == NBYTES - 1) done <= 1'b1;
        else idx <= idx + 1'b1;
      end
    end
  end
endmodule
