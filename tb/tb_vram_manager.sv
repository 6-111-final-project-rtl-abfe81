// tb_vram_manager: self-checking testbench for vram_manager with two ZBT
// models. Each round the "pipeline" fills a block of the inactive RAM with
// fresh data and reads part of it back (two-cycle latency), while the "VGA"
// port reads the same block from the active RAM and must still see the
// previous round's data. Then a swap is requested while vsync is high; it must
// wait for vsync low, pulse `swapped` once and flip `active`, after which the
// VGA port must see the new data. The ZBT models count bus-drive errors.
module tb_vram_manager;
  import gps_pkg::*;
  logic clk = 0, rst = 1, swap = 0, vsync = 1, swapped, active;
  logic [VADDR_W-1:0] p_addr = 0, g_addr = 0;
  logic p_we = 0, p_re = 0;
  logic [VDATA_W-1:0] p_wdata = 0, p_rdata, g_rdata;
  logic [VADDR_W-1:0] z_addr [2];
  logic z_we_n [2], z_oe [2];
  logic [VDATA_W-1:0] z_dout [2], z_din [2];
  int bus_err [2];
  int checks = 0, failures = 0, n_swapped = 0;

  vram_manager dut (.clk, .rst, .swap, .vsync, .swapped, .active, .p_addr, .p_we, .p_re,
                    .p_wdata, .p_rdata, .g_addr, .g_rdata, .z_addr, .z_we_n, .z_dout, .z_oe, .z_din);
  for (genvar i = 0; i < 2; i++) begin : g_ram
    zbt_model #(.DEPTH(4096)) ram (.clk, .addr(z_addr[i]), .we_n(z_we_n[i]), .din(z_dout[i]),
                                   .oe(z_oe[i]), .dout(z_din[i]), .bus_errors(bus_err[i]));
  end
  always #5 clk = ~clk;
  always @(posedge clk) if (swapped) n_swapped++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic logic [VDATA_W-1:0] val(input int round, input int i);
    return VDATA_W'({round[7:0], 16'(i * 7919), 12'(i)});
  endfunction

  initial begin
    repeat (300000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (3) @(posedge clk); rst = 0; @(posedge clk);
    for (int round = 1; round <= 6; round++) begin
      automatic int bad_p = 0, bad_g = 0, wait_cyc = 0, sw0;
      logic act0;
      // pipeline writes, VGA reads the same addresses at the same time
      for (int i = 0; i < 1200; i++) begin
        p_addr <= VADDR_W'(i); p_we <= 1; p_re <= 0; p_wdata <= val(round, i); g_addr <= VADDR_W'(i);
        @(posedge clk); #1;
        if (i >= 3 && round > 1 && g_rdata != val(round - 1, i - 1)) bad_g++;
      end
      p_we <= 0;
      // pipeline reads back, interleaved with single writes
      for (int i = 0; i < 600; i++) begin
        p_addr <= VADDR_W'(i); p_re <= 1; g_addr <= VADDR_W'(i + 1);
        @(posedge clk); #1;
        if (i >= 2 && p_rdata != val(round, i - 1)) bad_p++;
      end
      p_re <= 0;
      check(bad_p == 0, $sformatf("round %0d: %0d wrong pipeline reads", round, bad_p));
      if (round > 1) check(bad_g == 0, $sformatf("round %0d: %0d wrong VGA reads of the shown frame", round, bad_g));
      // swap request while vsync is high
      act0 = active; sw0 = n_swapped;
      swap <= 1; @(posedge clk); swap <= 0;
      repeat ($urandom_range(5, 40)) @(posedge clk);
      check(active == act0 && n_swapped == sw0, "no swap while vsync is high");
      vsync <= 0;
      while (n_swapped == sw0 && wait_cyc < 10) begin @(posedge clk); wait_cyc++; end
      repeat (3) @(posedge clk);
      vsync <= 1;
      check(active != act0 && n_swapped == sw0 + 1, $sformatf("round %0d: one swap in vsync", round));
      // the new frame is now shown
      bad_g = 0;
      for (int i = 0; i < 300; i++) begin
        g_addr <= VADDR_W'(i); @(posedge clk); #1;
        if (i >= 2 && g_rdata != val(round, i - 1)) bad_g++;
      end
      check(bad_g == 0, $sformatf("round %0d: VGA sees the new frame after the swap", round));
    end
    // vsync low without a request: no swap
    begin
      automatic int sw0 = n_swapped; vsync <= 0; repeat (20) @(posedge clk); vsync <= 1;
      check(n_swapped == sw0, "no swap without a request");
    end
    check(bus_err[0] == 0 && bus_err[1] == 0, "ZBT data bus driven only in write-data cycles");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
