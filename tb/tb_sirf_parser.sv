// tb_sirf_parser: self-checking testbench for sirf_parser.
// Builds SiRF frames byte by byte: geodetic navigation messages (id 41,
// 91-byte payload) with random positions, a frame with a wrong checksum, a
// frame with another id, a message flagged as an invalid fix and some line
// noise. Only the good navigation messages may raise `available`, and the
// outputs must hold the fields at their SiRF byte offsets.
module tb_sirf_parser;
  logic clk = 0, rst = 1;
  logic [8:0] rx_in = '0;
  logic available;
  logic [31:0] lat, lon, alt, time_ms, vel;
  int checks = 0, failures = 0, navail = 0;

  sirf_parser dut (.clk, .rst, .rx_in, .available, .lat, .lon, .alt, .time_ms, .vel);
  always #5 clk = ~clk;

  always @(posedge clk) if (available) navail++;

  task automatic put(input logic [7:0] b);
    rx_in <= {1'b1, b}; @(posedge clk); rx_in <= '0; repeat (3) @(posedge clk);
  endtask

  task automatic frame(input logic [7:0] p [], input bit bad_ck);
    automatic int s = 0;
    put(8'hA0); put(8'hA2); put(8'(p.size() >> 8)); put(8'(p.size()));
    foreach (p[i]) begin put(p[i]); s += p[i]; end
    s = (s & 16'h7FFF) ^ (bad_ck ? 1 : 0);
    put(8'(s >> 8)); put(8'(s)); put(8'hB0); put(8'hB3);
  endtask

  function automatic void put32(ref logic [7:0] p [], input int ofs, input logic [31:0] v);
    for (int i = 0; i < 4; i++) p[ofs + i] = v[31 - 8*i -: 8];
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [7:0] p [];
    repeat (3) @(posedge clk); rst = 0;
    for (int k = 0; k < 8; k++) begin
      logic [31:0] la, lo, al, tw; logic [15:0] sog, cog;
      int nb0;
      la = $urandom; lo = $urandom; al = $urandom; tw = $urandom; sog = 16'($urandom); cog = 16'($urandom);
      p = new[91];
      foreach (p[i]) p[i] = 8'($urandom);
      p[0] = 8'd41; p[1] = 0; p[2] = 0;
      put32(p, 7, tw); put32(p, 23, la); put32(p, 27, lo); put32(p, 35, al);
      p[40] = sog[15:8]; p[41] = sog[7:0]; p[42] = cog[15:8]; p[43] = cog[7:0];
      if (k == 2) put(8'hA0);                     // stray start byte
      nb0 = navail;
      frame(p, 1'b0);
      repeat (3) @(posedge clk);
      check(navail == nb0 + 1, "good message gives one fix");
      check(lat == la && lon == lo && alt == al && time_ms == tw, "position and time fields");
      check(vel == {sog, cog}, "velocity field");
      // the same message with a bad checksum, another id, or invalid fix flag
      nb0 = navail;
      frame(p, 1'b1);
      p[0] = 8'd2;  frame(p, 1'b0);
      p[0] = 8'd41; p[2] = 8'h01; frame(p, 1'b0);
      put(8'h12); put(8'hB3);
      repeat (3) @(posedge clk);
      check(navail == nb0, "bad frames ignored");
      check(lat == la, "outputs held");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
