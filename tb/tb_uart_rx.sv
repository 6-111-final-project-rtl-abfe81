// tb_uart_rx: self-checking testbench for uart_rx.
// Sends bytes as 8N1 frames at CLK_HZ/BAUD = 16 cycles per bit, including a
// frame with a broken stop bit and a short glitch, and checks that each good
// byte appears once on {valid, byte}, with valid high for a single cycle.
module tb_uart_rx;
  localparam int DIV = 16;
  logic clk = 0, rst = 1, rxd = 1;
  logic [8:0] rx_out;
  int checks = 0, failures = 0, got = 0;
  logic [7:0] exp_q [$];

  uart_rx #(.CLK_HZ(16000), .BAUD(1000)) dut (.clk, .rst, .rxd, .rx_out);
  always #5 clk = ~clk;

  task automatic send(input logic [7:0] b, input logic stop_ok = 1'b1);
    rxd = 0; repeat (DIV) @(posedge clk);
    for (int i = 0; i < 8; i++) begin rxd = b[i]; repeat (DIV) @(posedge clk); end
    rxd = stop_ok; repeat (DIV) @(posedge clk);
    rxd = 1; repeat (DIV) @(posedge clk);
  endtask

  always @(posedge clk) if (!rst && rx_out[8]) begin
    checks++; got++;
    if (exp_q.size() == 0 || rx_out[7:0] != exp_q[0]) begin
      failures++; $display("FAIL: unexpected byte %02h", rx_out[7:0]);
    end
    if (exp_q.size() != 0) void'(exp_q.pop_front());
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (4) @(posedge clk); rst = 0; repeat (4) @(posedge clk);
    exp_q = {8'h55, 8'hA0, 8'h00, 8'hFF, 8'h3C};
    send(8'h55); send(8'hA0); send(8'h00); send(8'hFF);
    send(8'h99, 1'b0);                       // framing error: dropped
    rxd = 0; repeat (3) @(posedge clk); rxd = 1; repeat (3*DIV) @(posedge clk);  // glitch
    send(8'h3C);
    for (int k = 0; k < 20; k++) begin
      automatic logic [7:0] b = 8'($urandom);
      exp_q.push_back(b); send(b);
    end
    repeat (4*DIV) @(posedge clk);
    checks++;
    if (got != 25 || exp_q.size() != 0) begin
      failures++; $display("FAIL: got %0d bytes, %0d missing", got, exp_q.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
