// tb_flash_writer: self-checking testbench for flash_writer against the
// M25P16 model. Programs a pattern, erases, programs again, and checks the
// model's array byte by byte, the address counter, that `ready` stays low
// while the flash is busy, and the cycle cost of one byte (six instructions'
// worth of SPI bytes plus the busy time).
module tb_flash_writer;
  logic clk = 0, rst = 1, erase = 0, write = 0, ready, cs_n, sck, mosi, miso;
  logic [7:0] data = '0;
  logic [23:0] addr;
  int checks = 0, failures = 0;

  flash_writer #(.HALF(1), .CS_GAP(3)) dut (.clk, .rst, .erase, .write, .data, .ready, .addr,
                                            .cs_n, .sck, .mosi, .miso);
  m25p16_model #(.SIZE(4096), .PP_CYC(40), .BE_CYC(300)) flash (.clk, .cs_n, .sck, .mosi, .miso);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic cmd(input bit e, input logic [7:0] d, output int cycles);
    while (!ready) @(posedge clk);
    erase <= e; write <= !e; data <= d; @(posedge clk);
    erase <= 0; write <= 0;
    cycles = 1;
    @(posedge clk); cycles++;
    while (!ready) begin @(posedge clk); cycles++; end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int cyc;
    logic [7:0] pat [300];
    repeat (3) @(posedge clk); rst = 0;
    cmd(1, 0, cyc);
    check(flash.erases == 1, "bulk erase reached the flash");
    check(cyc > 300, $sformatf("erase waits for the flash (%0d cycles)", cyc));
    check(addr == 0, "address 0 after erase");
    foreach (pat[i]) pat[i] = 8'($urandom);
    for (int i = 0; i < 300; i++) begin
      cmd(0, pat[i], cyc);
      if (i == 0) check(cyc >= 40 + 6*16 && cyc < 40 + 12*16 + 60, $sformatf("one byte takes %0d cycles", cyc));
    end
    check(addr == 300, "address counts bytes");
    for (int i = 0; i < 300; i++) check(flash.mem[i] == pat[i], $sformatf("byte %0d", i));
    check(flash.mem[300] == 8'hFF, "nothing written past the end");
    cmd(1, 0, cyc);
    check(flash.mem[5] == 8'hFF && addr == 0, "second erase clears the array");
    cmd(0, 8'h5A, cyc);
    check(flash.mem[0] == 8'h5A, "write after erase starts at address 0");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
