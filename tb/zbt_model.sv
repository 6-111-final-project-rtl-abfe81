// zbt_model: behavioural model of a pipelined ZBT SRAM, for testbenches only.
//
// A command (address, active-low write enable) is registered on each rising
// clock edge. Write data must be on `din` two cycles after the write command
// and is stored at the end of that cycle; read data for a read command
// appears on `dout` two cycles after it. `oe` (the controller's bus drive
// enable) is checked against the expected write-data cycle.
module zbt_model #(
  parameter int AW    = 19,
  parameter int DW    = 36,
  parameter int DEPTH = 1 << 19
) (
  input  logic          clk,
  input  logic [AW-1:0] addr,
  input  logic          we_n,
  input  logic [DW-1:0] din,
  input  logic          oe,
  output logic [DW-1:0] dout,
  output int            bus_errors
);
  logic [DW-1:0] mem [DEPTH];
  logic [AW-1:0] a1, a2;
  logic          w1, w2;
  int            edges;   // the controller's registers settle during its reset

  initial begin
    for (int i = 0; i < DEPTH; i++) mem[i] = '0;
    a1 = 0; a2 = 0; w1 = 0; w2 = 0; bus_errors = 0; edges = 0;
  end

  assign dout = w2 ? '0 : mem[int'(a2) % DEPTH];

  always @(posedge clk) begin
    if (oe != w2 && edges > 3) bus_errors <= bus_errors + 1;
    if (edges < 4) edges <= edges + 1;
    if (w2) mem[int'(a2) % DEPTH] <= din;
    a1 <= addr; w1 <= !we_n;
    a2 <= a1;   w2 <= w1;
  end
endmodule
