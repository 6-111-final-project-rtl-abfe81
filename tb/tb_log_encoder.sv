// tb_log_encoder: self-checking testbench for log_encoder.
// A stand-in flash controller records every erase and byte write (it is busy
// for a random few cycles after each). The test sends fixes, some of them
// back to back while a record is being written, then `stop`, and checks the
// erase, the init record (start magic and first time stamp), one 16-byte
// data record per fix in order, the termination record, and the drop count
// when fixes arrive faster than records can be written.
module tb_log_encoder;
  import gps_pkg::*;
  logic clk = 0, rst = 1, fix_avail = 0, stop = 0;
  logic [31:0] lat = 0, lon = 0, alt = 0, vel = 0, time_ms = 0;
  logic fl_ready, fl_erase, fl_write, logging, full, finished;
  logic [7:0] fl_data;
  logic [23:0] fl_addr = '0;
  logic [15:0] dropped;
  logic [31:0] records;
  int checks = 0, failures = 0, busy = 0, erases = 0;
  logic [7:0] bytes [$];

  log_encoder dut (.clk, .rst, .fix_avail, .lat, .lon, .alt, .vel, .time_ms, .stop,
                   .fl_ready, .fl_addr, .fl_erase, .fl_write, .fl_data, .logging, .full,
                   .finished, .dropped, .records);
  always #5 clk = ~clk;

  assign fl_ready = (busy == 0);
  always @(posedge clk) begin
    if (busy > 0) busy <= busy - 1;
    if (!rst && fl_erase && fl_ready) begin erases++; busy <= 50; bytes.delete(); fl_addr <= '0; end
    if (!rst && fl_write && fl_ready) begin bytes.push_back(fl_data); busy <= $urandom_range(2, 6); fl_addr <= fl_addr + 1; end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic logic [31:0] word(input int i);
    return {bytes[i], bytes[i+1], bytes[i+2], bytes[i+3]};
  endfunction

  task automatic give(input logic [31:0] a, b, c, d, t);
    lat <= a; lon <= b; alt <= c; vel <= d; time_ms <= t; fix_avail <= 1;
    @(posedge clk); fix_avail <= 0;
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [31:0] f [10][4];
    int n;
    repeat (3) @(posedge clk); rst = 0;
    repeat (80) @(posedge clk);
    check(erases == 1, "flash erased after reset");
    foreach (f[i, j]) f[i][j] = $urandom;
    give(f[0][0], f[0][1], f[0][2], f[0][3], 32'h0001_0000);
    for (int i = 1; i < 8; i++) begin repeat (400) @(posedge clk); give(f[i][0], f[i][1], f[i][2], f[i][3], 32'h0001_0000 + i); end
    repeat (400) @(posedge clk);
    // two fixes back to back: the first is held, the second is written later
    give(f[8][0], f[8][1], f[8][2], f[8][3], 0);
    give(f[9][0], f[9][1], f[9][2], f[9][3], 0);
    repeat (400) @(posedge clk);
    // three in a row while busy: one must be dropped
    give(1, 2, 3, 4, 0); give(5, 6, 7, 8, 0); @(posedge clk); give(9, 10, 11, 12, 0);
    repeat (600) @(posedge clk);
    stop <= 1; @(posedge clk); stop <= 0;
    while (!finished) @(posedge clk);
    n = bytes.size();
    check(n == 16 * (1 + 12 + 1), $sformatf("%0d bytes written", n));
    check(word(0) == LOG_START_MAGIC && word(4) == 32'h0001_0000, "init record");
    for (int i = 0; i < 10; i++)
      for (int j = 0; j < 4; j++)
        check(word(16 * (i + 1) + 4 * j) == f[i][j], $sformatf("record %0d word %0d", i, j));
    check(word(16 * 11) == 1 && word(16 * 12) == 5, "held fix written, dropped fix skipped");
    check(dropped == 1, $sformatf("dropped = %0d", dropped));
    check(records == 12, "record count");
    check(word(n - 16) == LOG_END_MAGIC, "termination record");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
