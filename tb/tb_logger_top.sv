// tb_logger_top: testbench of the logger half at reduced speed parameters
// (10 MHz clock, 50 kbaud, a 128-byte log capacity) so that filling the log can
// be tested. A stand-in GPS receiver checks the initializer frame, then sends
// navigation messages, including a bad-checksum frame and an invalid fix.
// The flash model must hold the start record, the accepted fixes up to the
// capacity (six records: 128 bytes less the start and termination records),
// and the termination record written on shut-down; `full`, `records` and
// `finished` must agree.
module tb_logger_top;
  import gps_pkg::*;
  localparam int  CLK_HZ = 10_000_000, BAUD = 50_000, CAP = 128, NFIX = 9;
  localparam real BIT_NS = 1.0e9 / BAUD;
  logic clk = 0, rst = 1, gps_rxd = 1, gps_txd, stop = 0;
  logic fl_cs_n, fl_sck, fl_mosi, fl_miso;
  logic init_done, logging, full, finished;
  logic [31:0] records;
  logic [15:0] dropped;
  int checks = 0, failures = 0;

  logger_top #(.CLK_HZ(CLK_HZ), .BAUD(BAUD), .START_DELAY(100), .CAPACITY(CAP)) dut (
    .clk, .rst, .gps_rxd, .gps_txd, .stop, .fl_cs_n, .fl_sck, .fl_mosi, .fl_miso,
    .init_done, .logging, .full, .finished, .records, .dropped);
  m25p16_model #(.SIZE(4096)) flash (.clk, .cs_n(fl_cs_n), .sck(fl_sck), .mosi(fl_mosi), .miso(fl_miso));
  always #50 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic [7:0] from_logger [$];
  initial forever begin
    logic [7:0] b;
    @(negedge gps_txd);
    #(BIT_NS * 1.5);
    for (int i = 0; i < 8; i++) begin b[i] = gps_txd; #(BIT_NS); end
    from_logger.push_back(b);
  end

  task automatic uart_byte(input logic [7:0] b);
    gps_rxd = 0; #(BIT_NS);
    for (int i = 0; i < 8; i++) begin gps_rxd = b[i]; #(BIT_NS); end
    gps_rxd = 1; #(BIT_NS);
  endtask

  logic [31:0] f_lat [NFIX], f_lon [NFIX], f_alt [NFIX], f_vel [NFIX], f_tow [NFIX];
  task automatic nav_msg(input int k, input bit bad_ck, input bit invalid);
    logic [7:0] p [91];
    int s = 0;
    foreach (p[i]) p[i] = 8'($urandom);
    p[0] = 8'd41; p[1] = 8'h00; p[2] = invalid ? 8'h01 : 8'h00;
    for (int i = 0; i < 4; i++) begin
      p[7 + i]  = f_tow[k][31 - 8*i -: 8];
      p[23 + i] = f_lat[k][31 - 8*i -: 8];
      p[27 + i] = f_lon[k][31 - 8*i -: 8];
      p[35 + i] = f_alt[k][31 - 8*i -: 8];
      p[40 + i] = f_vel[k][31 - 8*i -: 8];
    end
    uart_byte(8'hA0); uart_byte(8'hA2); uart_byte(8'h00); uart_byte(8'd91);
    foreach (p[i]) begin uart_byte(p[i]); s += p[i]; end
    s = (s & 32'h7FFF) ^ (bad_ck ? 4 : 0);
    uart_byte(8'(s >> 8)); uart_byte(8'(s)); uart_byte(8'hB0); uart_byte(8'hB3);
  endtask

  function automatic logic [31:0] word(input int a);
    return {flash.mem[a], flash.mem[a+1], flash.mem[a+2], flash.mem[a+3]};
  endfunction

  initial begin
    #2s;
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int k = 0; k < NFIX; k++) begin
      f_lat[k] = $urandom; f_lon[k] = $urandom; f_alt[k] = $urandom; f_tow[k] = $urandom;
      f_vel[k] = $urandom;
    end
    repeat (5) @(posedge clk); rst = 0;
    wait (init_done);
    #(BIT_NS * 20);
    check(from_logger.size() == 16 && from_logger[0] == 8'hA0 && from_logger[1] == 8'hA2 &&
          from_logger[3] == 8'd8 && from_logger[4] == 8'hA6 && from_logger[14] == 8'hB0 &&
          from_logger[15] == 8'hB3, "initializer frame");
    check(flash.erases == 1, "flash erased once");
    check(!logging && records == 0, "nothing logged before the first fix");
    for (int k = 0; k < NFIX; k++) begin
      nav_msg(k, 0, 0);
      if (k == 1) nav_msg(k, 1, 0);
      if (k == 3) nav_msg(k, 0, 1);
      #(BIT_NS * 30);
      if (k < 6) check(records == k + 1 && full == (k == 5), $sformatf("%0d records after %0d fixes", records, k + 1));
    end
    check(records == 6 && full && dropped == 0, $sformatf("log full at %0d records", records));
    @(posedge clk) stop <= 1;
    @(posedge clk) stop <= 0;
    begin
      automatic int t = 0;
      while (!finished && t < 100000) begin @(posedge clk); t++; end
    end
    check(finished, "finished after shut-down");
    check(word(0) == LOG_START_MAGIC && word(4) == f_tow[0] && word(8) == 0 && word(12) == 0, "start record");
    begin
      automatic bit ok = 1;
      for (int k = 0; k < 6; k++)
        if (word(16 * (k + 1)) != f_lat[k] || word(16 * (k + 1) + 4) != f_lon[k] ||
            word(16 * (k + 1) + 8) != f_alt[k] || word(16 * (k + 1) + 12) != f_vel[k]) ok = 0;
      check(ok, "data records");
    end
    check(word(112) == LOG_END_MAGIC && word(116) == 0 && word(120) == 0 && word(124) == 0, "termination record");
    check(word(128) == 32'hFFFFFFFF, "nothing written past the capacity");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
