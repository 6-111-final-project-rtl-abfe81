// tb_sirf_init: self-checking testbench for sirf_init.
// A stand-in transmitter accepts a byte whenever `tx_ready` is high and then
// stays busy for a few cycles. The captured bytes must form one SiRF frame:
// A0 A2, length 0008, the payload, the checksum computed here independently,
// B0 B3; nothing may be sent before START_DELAY and nothing after.
module tb_sirf_init;
  logic clk = 0, rst = 1, tx_ready, done;
  logic [8:0] tx_out;
  int checks = 0, failures = 0, busy = 0, first_cycle = -1, cyc = 0;
  logic [7:0] got [$];
  logic [7:0] payload [8] = '{8'hA6, 8'h00, 8'h29, 8'h01, 8'h00, 8'h00, 8'h00, 8'h00};

  sirf_init #(.START_DELAY(50)) dut (.clk, .rst, .tx_ready, .tx_out, .done);
  always #5 clk = ~clk;

  assign tx_ready = (busy == 0);
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (busy > 0) busy <= busy - 1;
    if (tx_out[8]) begin
      if (!tx_ready) begin failures++; $display("FAIL: byte offered while busy"); end
      got.push_back(tx_out[7:0]);
      if (first_cycle < 0) first_cycle <= cyc;
      busy <= 7;
    end
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    automatic int sum = 0;
    logic [7:0] exp [$];
    repeat (3) @(posedge clk); rst = 0;
    while (!done) @(posedge clk);
    repeat (100) @(posedge clk);
    foreach (payload[i]) sum += payload[i];
    sum &= 16'h7FFF;
    exp = {8'hA0, 8'hA2, 8'h00, 8'h08};
    foreach (payload[i]) exp.push_back(payload[i]);
    exp.push_back(8'(sum >> 8)); exp.push_back(8'(sum)); exp.push_back(8'hB0); exp.push_back(8'hB3);
    checks++;
    if (got.size() != exp.size()) begin
      failures++; $display("FAIL: %0d bytes sent, expected %0d", got.size(), exp.size());
    end
    for (int i = 0; i < exp.size() && i < got.size(); i++) begin
      checks++;
      if (got[i] != exp[i]) begin failures++; $display("FAIL: byte %0d = %02h, expected %02h", i, got[i], exp[i]); end
    end
    checks++;
    if (first_cycle < 50) begin failures++; $display("FAIL: sent at cycle %0d, before the start delay", first_cycle); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
