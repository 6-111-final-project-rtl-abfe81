// uart_tx: RS232 output, 8N1.
//
// Interface: the 9-bit input `tx_in` = {send, byte}. When send is high while
// `ready` is high the byte is taken and shifted out: a start bit, eight data
// bits LSB first and a stop bit, each CLK_HZ/BAUD cycles long. `ready` is low
// from the cycle after a byte is taken until its stop bit has ended. The
// 9-bit input, the ready output and 9600 baud follow the proposal; the 8N1
// framing is this design's choice.
module uart_tx #(
  parameter int CLK_HZ = 50_000_000,
  parameter int BAUD   = 9600
) (
  input  logic       clk,
  input  logic       rst,
  input  logic [8:0] tx_in,
  output logic       ready,
  output logic       txd
);
  localparam int DIV = CLK_HZ / BAUD;
  localparam int CW  = $clog2(DIV + 1);

  logic [9:0]    sh;    // stop, data[7:0], start
  logic [3:0]    left;  // bits still to send
  logic [CW-1:0] cnt;

  assign ready = (left == 0);

  always_ff @(posedge clk) begin
    if (rst) begin
      sh   <= '1;
      left <= '0;
      cnt  <= '0;
      txd  <= 1'b1;
    end else if (left == 0) begin
      txd <= 1'b1;
      if (tx_in[8]) begin
        sh   <= {1'b1, tx_in[7:0], 1'b0};
        left <= 4'd11;  // ten bits plus the end of the stop bit
        cnt  <= '0;
      end
    end else if (cnt == 0) begin
      txd  <= sh[0];
      sh   <= {1'b1, sh[9:1]};
      cnt  <= CW'(DIV - 1);
      left <= left - 1'b1;
    end else begin
      cnt <= cnt - 1'b1;
    end
  end
endmodule
