// tb_uart_tx: self-checking testbench for uart_tx.
// Sends random bytes, decodes the serial line independently by sampling the
// middle of each bit, and checks data, start/stop bits, the bit time
// (CLK_HZ/BAUD cycles), the frame length of ten bit times and `ready`.
module tb_uart_tx;
  localparam int DIV = 12;
  logic clk = 0, rst = 1, ready, txd;
  logic [8:0] tx_in = '0;
  int checks = 0, failures = 0;

  uart_tx #(.CLK_HZ(12000), .BAUD(1000)) dut (.clk, .rst, .tx_in, .ready, .txd);
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

  initial begin
    repeat (4) @(posedge clk); rst = 0; @(posedge clk);
    for (int k = 0; k < 30; k++) begin
      logic [7:0] b, got;
      int t0, t1;
      b = (k == 0) ? 8'h00 : (k == 1) ? 8'hFF : 8'($urandom);
      while (!ready) @(posedge clk);
      check(txd == 1'b1, "line idle high");
      tx_in <= {1'b1, b}; @(posedge clk); tx_in <= '0;
      // wait for the start bit edge
      t0 = 0;
      while (txd) begin @(posedge clk); t0++; end
      check(t0 <= 3, "start bit begins promptly");
      repeat (DIV/2) @(posedge clk);
      check(txd == 1'b0, "start bit");
      for (int i = 0; i < 8; i++) begin repeat (DIV) @(posedge clk); got[i] = txd; end
      repeat (DIV) @(posedge clk);
      check(txd == 1'b1, "stop bit");
      check(got == b, $sformatf("data %02h got %02h", b, got));
      // ready must come back at the end of the stop bit, not before
      t1 = 0;
      while (!ready) begin @(posedge clk); t1++; end
      check(t1 >= DIV/2 - 2 && t1 <= DIV/2 + 2, $sformatf("ready after frame (%0d)", t1));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
