// render_pipeline: the three-stage rendering pipeline (transformation,
// drawing, coloring).
//
// Transformation: xform_2d, xform_null and xform_3d all see every command;
// each claims the transform opcodes it handles and leaves a NOOP otherwise,
// so their outputs are ORed into the 136-bit command that enters the drawing
// stage. Drawing: rect_fill, line_draw and text_draw likewise claim their draw
// opcodes and turn a command into pixels; at most one of them is busy at a
// time, so their pixel outputs are ORed too. Coloring: pixel_fill writes the
// pixels to the rendering RAM.
// Flow control follows the proposal's `advance` signal: every component
// drives an advance output, the outputs are ANDed (with `adv_in` from the
// rendering manager) and the result goes back to all of them; a command moves
// one stage on every cycle in which `advance` is high, and any component can
// halt the whole pipeline by pulling its output low (the 3D transform while it
// multiplies, a draw module while it emits pixels, pixel fill while it
// blends). The pixels a draw module emits while the pipeline is halted travel
// to pixel fill over a separate valid/ready link, which is this design's
// addition: with one shared advance signal alone, the draw module could not
// both halt the pipeline and feed the coloring stage.
// `advance` is also an output so the command source knows when `cmd_in` has
// been taken. `idle` is high when no command is inside the pipeline and the
// last pixel has reached memory.
module render_pipeline
  import gps_pkg::*;
#(
  parameter int RD_LAT = 2
) (
  input  logic               clk,
  input  logic               rst,
  input  cmd_t               cmd_in,
  input  logic               adv_in,
  output logic               advance,
  output logic               idle,
  output logic [VADDR_W-1:0] v_addr,
  output logic               v_we,
  output logic               v_re,
  output logic [VDATA_W-1:0] v_wdata,
  input  logic [VDATA_W-1:0] v_rdata
);
  logic a2d, anull, a3d, arect, aline, atext, apix;
  cmd_t c2d, cnull, c3d, xf_out;

  xform_2d   u_x2d  (.clk, .rst, .advance, .adv_out(a2d),   .cmd_in, .cmd_out(c2d));
  xform_null u_xnul (.clk, .rst, .advance, .adv_out(anull), .cmd_in, .cmd_out(cnull));
  xform_3d   u_x3d  (.clk, .rst, .advance, .adv_out(a3d),   .cmd_in, .cmd_out(c3d));

  assign xf_out = c2d | cnull | c3d;

  logic   vrect, vline, vtext, pix_valid, pix_ready, pf_idle;
  pixel_t prect, pline, ptext, pix;

  rect_fill u_rect (.clk, .rst, .advance, .adv_out(arect), .cmd_in(xf_out),
                    .pix_valid(vrect), .pix(prect), .pix_ready);
  line_draw u_line (.clk, .rst, .advance, .adv_out(aline), .cmd_in(xf_out),
                    .pix_valid(vline), .pix(pline), .pix_ready);
  text_draw u_text (.clk, .rst, .advance, .adv_out(atext), .cmd_in(xf_out),
                    .pix_valid(vtext), .pix(ptext), .pix_ready);

  assign pix_valid = vrect | vline | vtext;
  assign pix       = (vrect ? prect : '0) | (vline ? pline : '0) | (vtext ? ptext : '0);

  pixel_fill #(.RD_LAT(RD_LAT)) u_pix (
    .clk, .rst, .adv_out(apix), .pix_valid, .pix, .pix_ready, .idle(pf_idle),
    .v_addr, .v_we, .v_re, .v_wdata, .v_rdata);

  assign advance = adv_in & a2d & anull & a3d & arect & aline & atext & apix;
  assign idle    = (xf_out == CMD_NOOP) && a3d && arect && aline && atext && pf_idle;

  // at most one draw module emits pixels at a time
  assert property (@(posedge clk) disable iff (rst) $onehot0({vrect, vline, vtext}));
endmodule
