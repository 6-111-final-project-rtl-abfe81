// xform_null: null transform of the rendering pipeline's transformation stage.
//
// Claims the commands whose transform opcode is XF_NULL (bypass) and carries
// them unchanged to the drawing stage one `advance` later, so that a
// visualization can draw at absolute pixel positions. Commands it does not
// claim, and commands with nothing to draw, leave a NOOP on its output, so the
// three transform outputs can be ORed. `adv_out` is always high. The bypass
// function is the proposal's; the registering on `advance` is this design's.
module xform_null
  import gps_pkg::*;
(
  input  logic clk,
  input  logic rst,
  input  logic advance,
  output logic adv_out,
  input  cmd_t cmd_in,
  output cmd_t cmd_out
);
  assign adv_out = 1'b1;

  always_ff @(posedge clk) begin
    if (rst) cmd_out <= CMD_NOOP;
    else if (advance)
      cmd_out <= (cmd_in.xf == XF_NULL && cmd_in.draw != DR_NONE) ? cmd_in : CMD_NOOP;
  end
endmodule
