// tb_fix_queue: self-checking testbench for fix_queue at its full depth of
// 128 fixes. Random pushes and pops are compared with a reference queue;
// the test also fills the queue completely (checking `full` at exactly 128
// entries and that a push then is ignored), drains it, and clears it.
module tb_fix_queue;
  import gps_pkg::*;
  logic clk = 0, rst = 1, clear = 0, wr = 0, rd = 0, full, empty;
  fix_t fix_in = '0, fix;
  int checks = 0, failures = 0;
  fix_t model [$];

  fix_queue dut (.clk, .rst, .clear, .wr, .fix_in, .full, .rd, .empty, .fix);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic fix_t rnd();
    return {1'($urandom), 32'($urandom), 32'($urandom), 32'($urandom), 32'($urandom)};
  endfunction

  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  always @(posedge clk) if (!rst) begin
    if (wr && !full) model.push_back(fix_in);
    if (rd && !empty) begin
      checks++;
      if (model.size() == 0 || fix != model[0]) begin failures++; $display("FAIL: popped wrong fix"); end
      if (model.size() != 0) void'(model.pop_front());
    end
    if (clear) model.delete();
  end

  initial begin
    repeat (3) @(posedge clk); rst = 0;
    for (int i = 0; i < 3000; i++) begin
      wr <= ($urandom_range(0, 9) < 5); fix_in <= rnd();
      rd <= ($urandom_range(0, 9) < 4) && !empty;
      @(posedge clk);
    end
    wr <= 0; rd <= 0;
    // fill completely
    for (int i = 0; i < 200; i++) begin
      wr <= 1; fix_in <= rnd(); @(posedge clk);
    end
    wr <= 0; @(posedge clk);
    check(full, "full after filling");
    check(model.size() == 128, $sformatf("holds %0d fixes", model.size()));
    // drain
    while (model.size() > 0) begin
      while (empty) @(posedge clk);
      rd <= 1; @(posedge clk); rd <= 0; @(posedge clk);
    end
    repeat (5) @(posedge clk);
    check(empty && !full, "empty after draining");
    for (int i = 0; i < 10; i++) begin wr <= 1; fix_in <= rnd(); @(posedge clk); end
    wr <= 0; clear <= 1; @(posedge clk); clear <= 0; repeat (5) @(posedge clk);
    check(empty, "empty after clear");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
