// logger_top: the mobile GPS data logger.
//
// Data path: GPS receiver serial line -> uart_rx -> sirf_parser (navigation
// fixes) -> log_encoder (log records) -> flash_writer -> M25P16 serial flash.
// Configuration path: after reset sirf_init sends the receiver its set-up
// message through uart_tx. The encoder erases the flash right after reset,
// logs one 16-byte record per fix (one per second from the receiver) and
// writes the termination record when `stop` is pulsed before power-down.
// Status outputs report logging, a full flash, a finished log, the number
// of data records and of fixes dropped. The chain of modules is the
// proposal's; the clock rate default (50 MHz) is this design's choice.
module logger_top #(
  parameter int CLK_HZ      = 50_000_000,
  parameter int BAUD        = 9600,
  parameter int START_DELAY = 1000,
  parameter int SPI_HALF    = 1,
  parameter int CAPACITY    = 2097152
) (
  input  logic        clk,
  input  logic        rst,
  // GPS receiver serial port
  input  logic        gps_rxd,
  output logic        gps_txd,
  // shut-down request
  input  logic        stop,
  // serial flash
  output logic        fl_cs_n,
  output logic        fl_sck,
  output logic        fl_mosi,
  input  logic        fl_miso,
  // status
  output logic        init_done,
  output logic        logging,
  output logic        full,
  output logic        finished,
  output logic [31:0] records,
  output logic [15:0] dropped
);
  logic [8:0]  rx, tx;
  logic        tx_ready;
  logic        fix_avail;
  logic [31:0] lat, lon, alt, time_ms, vel;
  logic        fw_ready, fw_erase, fw_write;
  logic [7:0]  fw_data;
  logic [23:0] fw_addr;

  uart_rx #(.CLK_HZ(CLK_HZ), .BAUD(BAUD)) u_rx (.clk, .rst, .rxd(gps_rxd), .rx_out(rx));
  uart_tx #(.CLK_HZ(CLK_HZ), .BAUD(BAUD)) u_tx (.clk, .rst, .tx_in(tx), .ready(tx_ready), .txd(gps_txd));

  sirf_init #(.START_DELAY(START_DELAY)) u_init (
    .clk, .rst, .tx_ready, .tx_out(tx), .done(init_done));

  sirf_parser u_parse (
    .clk, .rst, .rx_in(rx), .available(fix_avail), .lat, .lon, .alt, .time_ms, .vel);

  log_encoder #(.CAPACITY_BYTES(CAPACITY)) u_enc (
    .clk, .rst, .fix_avail, .lat, .lon, .alt, .vel, .time_ms, .stop,
    .fl_ready(fw_ready), .fl_addr(fw_addr), .fl_erase(fw_erase), .fl_write(fw_write),
    .fl_data(fw_data), .logging, .full, .finished, .dropped, .records);

  flash_writer #(.HALF(SPI_HALF)) u_fw (
    .clk, .rst, .erase(fw_erase), .write(fw_write), .data(fw_data), .ready(fw_ready),
    .addr(fw_addr), .cs_n(fl_cs_n), .sck(fl_sck), .mosi(fl_mosi), .miso(fl_miso));
endmodule
