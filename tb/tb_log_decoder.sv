// tb_log_decoder: self-checking testbench for log_decoder.
// A stand-in byte reader serves a log image (init record, random data records,
// termination record) with random delays. Checks every fix, the EOF fix that
// follows the last record, restart from the beginning, a log cut off in
// erased flash, and a flash without a valid init record.
module tb_log_decoder;
  import gps_pkg::*;
  logic clk = 0, rst = 1, restart = 0, fix_next = 0, fix_avail, rd_avail, rd_next, rd_restart;
  logic [7:0] rd_data;
  fix_t fix;
  int checks = 0, failures = 0, pos = 0, wait_c = 0;
  logic [7:0] img [512];

  log_decoder dut (.clk, .rst, .restart, .fix_next, .fix_avail, .fix,
                   .rd_avail, .rd_data, .rd_next, .rd_restart);
  always #5 clk = ~clk;

  // byte reader stand-in
  assign rd_avail = (wait_c == 0);
  assign rd_data  = img[pos % 512];
  always @(posedge clk) begin
    if (rd_restart) begin pos <= 0; wait_c <= 3; end
    else if (rd_next) begin pos <= pos + 1; wait_c <= $urandom_range(0, 4); end
    else if (wait_c > 0) wait_c <= wait_c - 1;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s  fix=%h", what, fix); end
  endtask

  task automatic put32(input int at, input logic [31:0] v);
    for (int i = 0; i < 4; i++) img[at + i] = v[31 - 8*i -: 8];
  endtask

  task automatic take(output fix_t f);
    while (!fix_avail) @(posedge clk);
    f = fix;
    fix_next <= 1; @(posedge clk); fix_next <= 0; @(posedge clk);
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [31:0] w [20][4];
    fix_t f;
    foreach (img[i]) img[i] = 8'hFF;
    put32(0, LOG_START_MAGIC); put32(4, 32'h1234); put32(8, 0); put32(12, 0);
    foreach (w[i, j]) begin w[i][j] = $urandom; if (j == 0) w[i][j][31:28] = 4'h1; end
    for (int i = 0; i < 20; i++) for (int j = 0; j < 4; j++) put32(16 * (i + 1) + 4 * j, w[i][j]);
    put32(16 * 21, LOG_END_MAGIC);
    for (int a = 16 * 21 + 4; a < 16 * 22; a++) img[a] = 0;
    repeat (3) @(posedge clk); rst = 0;
    for (int pass = 0; pass < 2; pass++) begin
      for (int i = 0; i < 20; i++) begin
        take(f);
        check(!f.eof && f.lat == w[i][0] && f.lon == w[i][1] && f.alt == w[i][2] && f.vel == w[i][3],
              $sformatf("pass %0d fix %0d", pass, i));
      end
      take(f); check(f.eof, "EOF after the termination record");
      repeat (5) @(posedge clk);
      check(fix_avail && fix.eof, "EOF stays until restart");
      restart <= 1; @(posedge clk); restart <= 0; @(posedge clk);
    end
    // cut-off log: no termination record, erased flash after record 4
    for (int a = 16 * 5; a < 512; a++) img[a] = 8'hFF;
    restart <= 1; @(posedge clk); restart <= 0; @(posedge clk);
    for (int i = 0; i < 4; i++) begin take(f); check(!f.eof && f.lat == w[i][0], "cut-off log data"); end
    take(f); check(f.eof, "erased flash ends the log");
    // no init record at all
    img[0] = 8'h00;
    restart <= 1; @(posedge clk); restart <= 0; @(posedge clk);
    take(f); check(f.eof, "missing init record means an empty log");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
