// ps2_mouse: IMPS/2 (IntelliMouse PS/2) packet decoder, receive side.
//
// PS/2 clock and data are synchronised and a falling edge of the PS/2 clock
// samples the data line. Each 11-bit device frame (start 0, eight data bits
// LSB first, odd parity, stop 1) yields one byte; a frame with bad start,
// parity or stop bits is dropped and resynchronises the packet. Four bytes
// make an IntelliMouse packet: buttons and signs, X, Y, wheel Z. When the
// fourth byte arrives, `available` pulses for one cycle with `lmr` (left,
// middle, right buttons) and the 8-bit movements `x`, `y`, `z`. If no clock
// edge arrives for TIMEOUT cycles in the middle of a frame or packet, the
// receiver resynchronises.
// The outputs are the proposal's. The host-to-mouse commands that switch a
// mouse into IntelliMouse mode (sample-rate sequence 200, 100, 80) are not
// built here: the decoder expects a mouse already sending 4-byte packets.
module ps2_mouse #(
  parameter int TIMEOUT = 50_000
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       ps2_clk,
  input  logic       ps2_data,
  output logic       available,
  output logic [2:0] lmr,
  output logic [7:0] x,
  output logic [7:0] y,
  output logic [7:0] z
);
  logic [2:0]  cs, ds;        // synchronisers, cs[2] is the previous sample
  logic [10:0] frame;
  logic [3:0]  nbits;
  logic [1:0]  nbyte;
  logic [7:0]  b0, b1, b2;
  logic [$clog2(TIMEOUT+1)-1:0] idle;

  wire fall = cs[2] && !cs[1];

  always_ff @(posedge clk) begin
    if (rst) begin
      cs <= '1; ds <= '1; frame <= '0; nbits <= '0; nbyte <= '0;
      b0 <= '0; b1 <= '0; b2 <= '0; idle <= '0;
      available <= 1'b0; lmr <= '0; x <= '0; y <= '0; z <= '0;
    end else begin
      cs <= {cs[1:0], ps2_clk};
      ds <= {ds[1:0], ps2_data};
      available <= 1'b0;
      if (fall) begin
        idle  <= '0;
        frame <= {ds[1], frame[10:1]};
        if (nbits == 4'd10) begin
          nbits <= '0;
          // frame[10:1] holds start..parity after this shift; ds[1] is stop
          if (!frame[1] && ds[1] && (^frame[10:2]) == 1'b1) begin
            nbyte <= nbyte + 1'b1;
            unique case (nbyte)
              2'd0: b0 <= frame[9:2];
              2'd1: b1 <= frame[9:2];
              2'd2: b2 <= frame[9:2];
              2'd3: begin
                available <= 1'b1;
                lmr <= {b0[0], b0[2], b0[1]};
                x   <= b1;
                y   <= b2;
                z   <= frame[9:2];
              end
            endcase
          end else nbyte <= '0;
        end else nbits <= nbits + 1'b1;
      end else if (nbits != 0 || nbyte != 0) begin
        if (idle == TIMEOUT) begin
          nbits <= '0;
          nbyte <= '0;
          idle  <= '0;
        end else idle <= idle + 1'b1;
      end
    end
  end
endmodule
