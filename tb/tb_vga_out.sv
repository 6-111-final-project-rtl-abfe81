// tb_vga_out: self-checking testbench for vga_out at its default 640x480
// timing. A stand-in RAM returns a value derived from each address two cycles
// after it is presented. Counting from each falling edge of vsync, the testbench
// works out which pixel should be on the screen and checks rgb against it (and
// black in blanking), the hsync period (800) and pulse (96), the vsync period
// (525 lines) and pulse (2 lines), and the position of frame_start.
module tb_vga_out;
  import gps_pkg::*;
  logic clk = 0, rst = 1;
  logic [VADDR_W-1:0] addr;
  logic [VDATA_W-1:0] rdata;
  logic hsync, vsync, frame_start;
  logic [23:0] rgb;
  logic [VADDR_W-1:0] a1, a2;
  int checks = 0, failures = 0;

  vga_out dut (.clk, .rst, .addr, .rdata, .hsync, .vsync, .rgb, .frame_start);
  always #5 clk = ~clk;

  function automatic logic [23:0] pat(input logic [VADDR_W-1:0] a);
    return {5'b0, a} ^ 24'hA5_0000;
  endfunction
  always @(posedge clk) begin a1 <= addr; a2 <= a1; end
  assign rdata = {12'h0, pat(a2)};

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (2000000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  int t = -1, hs_last = -1, vs_last = -1, hs_fall = 0, vs_fall = 0, hs_low = 0, vs_low = 0;
  int pix_ok = 0, pix_bad = 0, fs_bad = 0, fs_seen = 0, lit = 0;
  logic hs_p = 1, vs_p = 1;
  initial begin
    repeat (3) @(posedge clk); rst = 0;
    repeat (1000) begin
      @(posedge clk); #1;
    end
    for (int n = 0; n < 2 * 800 * 525 + 1000; n++) begin
      @(posedge clk); #1;
      if (hs_p && !hsync) begin
        if (hs_last >= 0) check(n - hs_last == 800, $sformatf("hsync period %0d", n - hs_last));
        hs_last = n; hs_fall++;
      end
      if (!hs_p && hsync && hs_last >= 0) begin
        hs_low++;
        if (n - hs_last != 96) begin failures++; checks++; $display("FAIL: hsync pulse %0d", n - hs_last); end
      end
      if (vs_p && !vsync) begin
        if (vs_last >= 0) check(n - vs_last == 800 * 525, $sformatf("vsync period %0d", n - vs_last));
        vs_last = n; vs_fall++;
      end
      if (!vs_p && vsync && vs_last >= 0) check(n - vs_last == 1600, $sformatf("vsync pulse %0d", n - vs_last));
      hs_p = hsync; vs_p = vsync;
      if (vs_last >= 0) begin
        automatic int tt = n - vs_last;
        automatic int x = tt % 800, y = tt / 800 - 35;
        if (x < 640 && y >= 0 && y < 480) begin
          if (rgb == pat({y[8:0], x[9:0]})) pix_ok++; else pix_bad++;
          lit++;
        end else if (rgb != 0) pix_bad++;
        if (frame_start) begin
          fs_seen++;
          if (tt != 35 * 800 - 2) fs_bad++;
        end
      end
    end
    check(vs_fall == 2 && hs_fall >= 1049, $sformatf("%0d vsync and %0d hsync pulses", vs_fall, hs_fall));
    check(hs_low > 1000, "hsync pulses end");
    check(pix_bad == 0 && pix_ok > 480 * 640, $sformatf("%0d pixels right, %0d wrong", pix_ok, pix_bad));
    check(fs_seen >= 1 && fs_bad == 0, "frame_start at the first visible pixel");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
