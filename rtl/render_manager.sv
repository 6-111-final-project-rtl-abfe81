// render_manager: rendering manager, the switch between the visualization
// modules and the rendering pipeline.
//
// `active` (4 bits) selects one of N_VIS visualization modules; a press of the
// middle mouse button steps it to the next one (wrapping after N_VIS - 1).
// The active module's commands go to the pipeline: an ordinary command is
// handed over, and acknowledged with `vis_taken`, in a cycle in which the
// pipeline's `advance` is high; NOOPs are sent otherwise. The active
// module's fix-queue pops are routed to the queue. The manager answers two
// commands itself:
//   MGR_RERENDER  pulses `restart` so fix reading starts again at the
//                 beginning of the log; acknowledged at once.
//   MGR_COMPLETE  waits until the pipeline is idle, pulses `swap` to the VRAM
//                 manager and waits for `swapped`; only then is the command
//                 acknowledged, so the module cannot start its next frame in
//                 a RAM that is still being displayed.
// Routing, selection by mouse, restart on re-render and swap on render
// complete are the proposal's; the middle-button rule and the wait for an
// idle pipeline are this design's.
module render_manager
  import gps_pkg::*;
#(
  parameter int N_VIS = 3
) (
  input  logic       clk,
  input  logic       rst,
  // mouse (for module selection)
  input  logic       m_avail,
  input  logic [2:0] m_lmr,
  output logic [3:0] active,
  // visualization modules
  input  cmd_t       vis_cmd   [N_VIS],
  input  logic       vis_valid [N_VIS],
  input  logic       vis_fix_rd[N_VIS],
  output logic       vis_taken [N_VIS],
  // pipeline, fix reading, VRAM
  input  logic       advance,
  input  logic       pipe_idle,
  output cmd_t       cmd_out,
  output logic       fix_rd,
  output logic       restart,
  output logic       swap,
  input  logic       swapped,
  output logic       frames       // pulses once per displayed frame
);
  typedef enum logic [1:0] {RUN, DRAIN, WAIT_SWAP, ACK} state_e;
  state_e state;
  logic   mid_prev;
  cmd_t   cur;
  logic   cur_valid;

  always_comb begin
    cur       = CMD_NOOP;
    cur_valid = 1'b0;
    fix_rd    = 1'b0;
    for (int i = 0; i < N_VIS; i++)
      if (active == 4'(i)) begin
        cur       = vis_cmd[i];
        cur_valid = vis_valid[i];
        fix_rd    = vis_fix_rd[i];
      end
  end

  wire is_plain = cur_valid && cur.mgr == MGR_NONE;

  assign cmd_out = (state == RUN && is_plain) ? cur : CMD_NOOP;

  always_comb begin
    for (int i = 0; i < N_VIS; i++) begin
      vis_taken[i] = 1'b0;
      if (active == 4'(i) && cur_valid) begin
        if (state == RUN && cur.mgr == MGR_NONE)     vis_taken[i] = advance;
        if (state == RUN && cur.mgr == MGR_RERENDER) vis_taken[i] = 1'b1;
        if (state == ACK)                            vis_taken[i] = 1'b1;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= RUN; active <= '0; mid_prev <= 1'b0; restart <= 1'b0; swap <= 1'b0;
      frames <= 1'b0;
    end else begin
      restart <= 1'b0;
      swap    <= 1'b0;
      frames  <= 1'b0;
      if (m_avail) begin
        mid_prev <= m_lmr[1];
        // switch only between frames
        if (m_lmr[1] && !mid_prev && state == RUN)
          active <= (active == 4'(N_VIS - 1)) ? '0 : active + 1'b1;
      end
      unique case (state)
        RUN: if (cur_valid) begin
          if (cur.mgr == MGR_RERENDER) restart <= 1'b1;
          if (cur.mgr == MGR_COMPLETE) state <= DRAIN;
        end
        DRAIN: if (pipe_idle) begin
          swap  <= 1'b1;
          state <= WAIT_SWAP;
        end
        WAIT_SWAP: if (swapped) begin
          frames <= 1'b1;
          state  <= ACK;
        end
        ACK: state <= RUN;
      endcase
    end
  end
endmodule
