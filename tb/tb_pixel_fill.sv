// tb_pixel_fill: self-checking testbench for pixel_fill.
// A behavioural RAM with a two-cycle read latency and a two-cycle write-data
// delay (as behind the VRAM manager) stands in for video memory. Random
// overwrite and alpha-blended pixels are sent; the RAM's final contents must
// equal a reference image updated here with
//   new = (rgb * (alpha + 1) + old * (15 - alpha)) / 16 per channel.
// Also checks one overwrite per cycle, RD_LAT + 1 cycles per blend, and `idle`.
module tb_pixel_fill;
  import gps_pkg::*;
  logic clk = 0, rst = 1, adv_out, pix_valid = 0, pix_ready, idle;
  pixel_t pix = '0;
  logic [VADDR_W-1:0] v_addr;
  logic v_we, v_re;
  logic [VDATA_W-1:0] v_wdata, v_rdata;
  int checks = 0, failures = 0;
  logic [23:0] ram [4096];
  logic [23:0] ref_img [4096];
  logic [11:0] ra1, ra2;

  pixel_fill dut (.clk, .rst, .adv_out, .pix_valid, .pix, .pix_ready, .idle,
                  .v_addr, .v_we, .v_re, .v_wdata, .v_rdata);
  always #5 clk = ~clk;

  // small RAM: addresses folded to 12 bits ({y[5:0], x[5:0]})
  function automatic logic [11:0] fold(input logic [18:0] a); return {a[15:10], a[5:0]}; endfunction
  logic [11:0] wa1, wa2; logic [23:0] wd1, wd2; logic we1 = 0, we2 = 0;
  always @(posedge clk) begin
    ra1 <= fold(v_addr); ra2 <= ra1;
    we1 <= v_we; wa1 <= fold(v_addr); wd1 <= v_wdata[23:0];
    we2 <= we1;  wa2 <= wa1;          wd2 <= wd1;
    if (we2) ram[wa2] <= wd2;
  end
  assign v_rdata = {12'h0, ram[ra2]};

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic logic [7:0] mixref(input int n, input int o, input int a);
    return 8'((n * (a + 1) + o * (15 - a)) / 16);
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int i = 0; i < 4096; i++) begin ram[i] = 24'($urandom); ref_img[i] = ram[i]; end
    repeat (3) @(posedge clk); rst = 0; @(posedge clk);
    check(idle, "idle at start");
    for (int k = 0; k < 3000; k++) begin
      pixel_t p;
      automatic int cyc = 0;
      p.x = 10'($urandom_range(0, 63)); p.y = 9'($urandom_range(0, 63));
      if (k < 100) begin p.x = 10'(k % 8); p.y = 9'd0; end   // reuse of the same pixels
      p.rgb = 24'($urandom); p.alpha = 4'($urandom); p.blend = ($urandom_range(0, 1) == 1);
      // pix_ready is high here, so the pixel is taken at the next edge
      pix <= p; pix_valid <= 1;
      @(posedge clk);
      pix_valid <= 0;
      #1;
      while (!pix_ready) begin @(posedge clk); #1; cyc++; end
      if (p.blend) check(cyc == 2, $sformatf("blend busy for %0d more cycles", cyc));
      else         check(cyc == 0, "overwrite takes one cycle");
      begin
        automatic logic [11:0] a = {p.y[5:0], p.x[5:0]};
        automatic logic [23:0] o = ref_img[a];
        if (p.blend)
          ref_img[a] = {mixref(p.rgb[23:16], o[23:16], p.alpha), mixref(p.rgb[15:8], o[15:8], p.alpha),
                        mixref(p.rgb[7:0], o[7:0], p.alpha)};
        else ref_img[a] = p.rgb;
      end
      if (k % 7 == 0) @(posedge clk);
    end
    repeat (4) @(posedge clk);
    check(idle, "idle after the last pixel");
    for (int i = 0; i < 4096; i++) check(ram[i] == ref_img[i], $sformatf("pixel %0d = %06h, expected %06h", i, ram[i], ref_img[i]));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
