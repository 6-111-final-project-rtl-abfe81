// fix_queue: FIFO of position fixes between the log decoder and the
// visualizations.
//
// A DEPTH-entry circular buffer held in one memory array (a block RAM on an
// FPGA) with read-first, registered output. Write side: `wr` with `fix_in`
// stores a fix when `full` is low. Read side: `empty` is low when `fix`
// holds the oldest fix; a pulse on `rd` pops it and the next one appears on
// `fix` two cycles later (one cycle of RAM read, one of output register).
// `clear` empties the queue (used when reading restarts). The fix width, the
// 128-entry depth and the empty/read/fix interface are the proposal's; the
// write-side interface, the `full` flag and `clear` are this design's.
module fix_queue
  import gps_pkg::*;
#(
  parameter int DEPTH = 128
) (
  input  logic clk,
  input  logic rst,
  input  logic clear,
  input  logic wr,
  input  fix_t fix_in,
  output logic full,
  input  logic rd,
  output logic empty,
  output fix_t fix
);
  localparam int AW = $clog2(DEPTH);

  fix_t          mem [DEPTH];
  logic [AW:0]   wptr, rptr;     // extra bit tells full from empty
  logic          out_valid;      // `fix` holds the entry at rptr
  logic          loading;        // RAM read of rptr under way

  wire [AW:0] count = wptr - rptr;
  assign full  = (count == (AW+1)'(DEPTH));
  assign empty = !out_valid;

  always_ff @(posedge clk) begin
    if (wr && !full) mem[wptr[AW-1:0]] <= fix_in;
  end

  always_ff @(posedge clk) begin
    if (rst || clear) begin
      wptr <= '0; rptr <= '0; out_valid <= 1'b0; loading <= 1'b0; fix <= '0;
    end else begin
      if (wr && !full) wptr <= wptr + 1'b1;
      if (loading) begin
        fix       <= mem[rptr[AW-1:0]];
        out_valid <= 1'b1;
        loading   <= 1'b0;
      end else if (out_valid && rd) begin
        out_valid <= 1'b0;
        rptr      <= rptr + 1'b1;
      end else if (!out_valid && count != 0) begin
        loading <= 1'b1;
      end
    end
  end
endmodule
