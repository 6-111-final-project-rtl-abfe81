// tb_ps2_mouse: self-checking testbench for ps2_mouse.
// Acts as an IntelliMouse: sends 4-byte packets as PS/2 frames (clock period
// 40 system cycles), including a frame with a parity error and a stalled
// partial packet. Checks buttons and movement of each good packet.
module tb_ps2_mouse;
  logic clk = 0, rst = 1, ps2_clk = 1, ps2_data = 1, available;
  logic [2:0] lmr;
  logic [7:0] x, y, z;
  int checks = 0, failures = 0, npk = 0;
  logic [26:0] last;

  ps2_mouse #(.TIMEOUT(500)) dut (.clk, .rst, .ps2_clk, .ps2_data, .available, .lmr, .x, .y, .z);
  always #5 clk = ~clk;

  always @(posedge clk) if (available) begin npk++; last <= {lmr, x, y, z}; end

  task automatic byte_out(input logic [7:0] b, input bit bad_parity = 0);
    logic [10:0] fr;
    fr = {1'b1, ~^b ^ bad_parity, b, 1'b0};
    for (int i = 0; i < 11; i++) begin
      ps2_data = fr[i]; repeat (20) @(posedge clk);
      ps2_clk = 0; repeat (20) @(posedge clk); ps2_clk = 1;
    end
    repeat (30) @(posedge clk);
  endtask

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (3) @(posedge clk); rst = 0;
    for (int k = 0; k < 12; k++) begin
      logic [2:0] btn; logic [7:0] dx, dy, dz; int n0;
      btn = 3'($urandom); dx = 8'($urandom); dy = 8'($urandom); dz = 8'($urandom);
      n0 = npk;
      byte_out({dy[7], dx[7], dy[7], dx[7], 1'b1, btn[1], btn[0], btn[2]});  // {.., M, R, L}
      byte_out(dx); byte_out(dy); byte_out(dz);
      repeat (5) @(posedge clk);
      check(npk == n0 + 1, "one packet per four bytes");
      check(last == {btn, dx, dy, dz}, $sformatf("packet %0d contents", k));
      if (k == 4) begin
        // corrupted byte then resynchronisation
        byte_out(8'h08); byte_out(8'h11, 1);
        repeat (700) @(posedge clk);
        check(npk == n0 + 1, "bad frame gives no packet");
      end
      if (k == 7) begin
        byte_out(8'h09); byte_out(8'h22);     // half a packet, then silence
        repeat (700) @(posedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
