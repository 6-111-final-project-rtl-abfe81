// tb_xform_null: self-checking testbench for xform_null.
// Bypass commands with something to draw must come out unchanged one advance
// later; commands for the other transforms and bypass commands with nothing
// to draw must give NOOPs; the output must hold while `advance` is low.
module tb_xform_null;
  import gps_pkg::*;
  logic clk = 0, rst = 1, advance = 0, adv_out;
  cmd_t cmd_in = CMD_NOOP, cmd_out;
  int checks = 0, failures = 0;

  xform_null dut (.clk, .rst, .advance, .adv_out, .cmd_in, .cmd_out);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (3) @(posedge clk); rst = 0; @(posedge clk);
    for (int k = 0; k < 500; k++) begin
      cmd_t c, prev;
      c = {12'($urandom), 32'($urandom), 32'($urandom), 32'($urandom), 32'($urandom), 28'($urandom)};
      c.mgr = MGR_NONE;
      if (k % 2 == 0) begin c.xf = XF_NULL; c.draw = DR_LINE; end
      prev = cmd_out;
      cmd_in <= c; advance <= ($urandom_range(0, 3) != 0); @(posedge clk); #1;
      checks++;
      if (!advance) begin
        if (cmd_out != prev) begin failures++; $display("FAIL: changed without advance"); end
      end else if (c.xf == XF_NULL && c.draw != DR_NONE) begin
        if (cmd_out != c) begin failures++; $display("FAIL: bypass command altered"); end
      end else if (cmd_out != CMD_NOOP) begin
        failures++; $display("FAIL: command not for the null transform passed");
      end
    end
    check(adv_out, "never stalls");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
