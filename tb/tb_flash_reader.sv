// tb_flash_reader: self-checking testbench for flash_reader against the
// M25P16 model, preloaded with random bytes. Reads a stretch of bytes with
// random gaps before `next`, restarts in the middle, and checks every byte
// against the array and the per-byte fetch time (16 SPI half periods).
module tb_flash_reader;
  logic clk = 0, rst = 1, restart = 0, next = 0, available, cs_n, sck, mosi, miso;
  logic [7:0] data;
  int checks = 0, failures = 0;

  flash_reader #(.HALF(2), .CS_GAP(3)) dut (.clk, .rst, .restart, .next, .available, .data,
                                            .cs_n, .sck, .mosi, .miso);
  m25p16_model #(.SIZE(1024)) flash (.clk, .cs_n, .sck, .mosi, .miso);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic read_run(input int n);
    for (int i = 0; i < n; i++) begin
      automatic int t = 0;
      while (!available) begin @(posedge clk); t++; end
      check(data == flash.mem[i], $sformatf("byte %0d = %02h, expected %02h", i, data, flash.mem[i]));
      if (i > 0) check(t >= 30 && t <= 34, $sformatf("byte fetch took %0d cycles", t));
      repeat ($urandom_range(0, 3)) @(posedge clk);
      check(available, "byte stays available until next");
      next <= 1; @(posedge clk); next <= 0; @(posedge clk);
    end
  endtask

  initial begin
    for (int i = 0; i < 1024; i++) flash.mem[i] = 8'($urandom);
    repeat (3) @(posedge clk); rst = 0;
    read_run(100);
    restart <= 1; @(posedge clk); restart <= 0;
    read_run(40);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
