// sirf_parser: SiRF binary message parser.
//
// Consumes the {valid, byte} stream of uart_rx and follows the SiRF binary
// framing: A0 A2, 15-bit length, payload, 15-bit checksum, B0 B3. While the
// payload streams past, the fields of the geodetic navigation message
// (message id NAV_MID) are captured at fixed byte offsets, big-endian. When a
// whole frame has arrived with the right id, the right checksum and a
// "navigation valid" word of zero, `available` pulses for one cycle and the
// fix outputs are updated; they hold until the next good fix. Frames of any
// other id are skipped.
// Outputs (proposal: longitude, latitude, altitude, timestamp, velocity):
// lat/lon in 1e-7 degree, alt = altitude above mean sea level in cm, time =
// GPS time of week in ms, vel = {speed over ground (cm/s), course over ground
// (0.01 degree)}. The proposal names these outputs; the choice of message 41,
// its byte offsets and units come from the SiRF binary protocol and are this
// design's own.
module sirf_parser #(
  parameter logic [7:0] NAV_MID  = 8'd41,
  parameter int         OFS_TOW  = 7,
  parameter int         OFS_LAT  = 23,
  parameter int         OFS_LON  = 27,
  parameter int         OFS_ALT  = 35,
  parameter int         OFS_SOG  = 40,
  parameter int         OFS_COG  = 42
) (
  input  logic        clk,
  input  logic        rst,
  input  logic [8:0]  rx_in,
  output logic        available,
  output logic [31:0] lat,
  output logic [31:0] lon,
  output logic [31:0] alt,
  output logic [31:0] time_ms,
  output logic [31:0] vel
);
  typedef enum logic [3:0] {S_A0, S_A2, S_LEN1, S_LEN2, S_PAY, S_CK1, S_CK2, S_B0, S_B3} state_e;
  state_e      state;
  logic [14:0] len, cnt, sum;
  logic [14:0] ck;
  logic [7:0]  mid;
  logic [15:0] navvalid;
  logic [31:0] c_lat, c_lon, c_alt, c_tow;
  logic [15:0] c_sog, c_cog;

  wire       v = rx_in[8];
  wire [7:0] b = rx_in[7:0];

  // shift a byte into a big-endian field when the offset is inside it
  function automatic logic [31:0] grab32(input logic [31:0] f, input logic [14:0] pos,
                                         input int ofs, input logic [7:0] by);
    if (int'(pos) >= ofs && int'(pos) < ofs + 4) return {f[23:0], by};
    return f;
  endfunction

  always_ff @(posedge clk) begin
    if (rst) begin
      state     <= S_A0;
      available <= 1'b0;
      {lat, lon, alt, time_ms, vel} <= '0;
      {len, cnt, sum, ck, mid, navvalid} <= '0;
      {c_lat, c_lon, c_alt, c_tow, c_sog, c_cog} <= '0;
    end else begin
      available <= 1'b0;
      if (v) begin
        unique case (state)
          S_A0:   state <= (b == 8'hA0) ? S_A2 : S_A0;
          S_A2:   state <= (b == 8'hA2) ? S_LEN1 : (b == 8'hA0 ? S_A2 : S_A0);
          S_LEN1: begin len[14:8] <= b[6:0]; state <= S_LEN2; end
          S_LEN2: begin
            len[7:0] <= b;
            cnt      <= '0;
            sum      <= '0;
            state    <= ({len[14:8], b} == 0) ? S_CK1 : S_PAY;
          end
          S_PAY: begin
            sum <= sum + 15'(b);
            cnt <= cnt + 1'b1;
            if (cnt == 0) mid <= b;
            if (cnt == 1 || cnt == 2) navvalid <= {navvalid[7:0], b};
            c_tow <= grab32(c_tow, cnt, OFS_TOW, b);
            c_lat <= grab32(c_lat, cnt, OFS_LAT, b);
            c_lon <= grab32(c_lon, cnt, OFS_LON, b);
            c_alt <= grab32(c_alt, cnt, OFS_ALT, b);
            if (int'(cnt) == OFS_SOG || int'(cnt) == OFS_SOG + 1) c_sog <= {c_sog[7:0], b};
            if (int'(cnt) == OFS_COG || int'(cnt) == OFS_COG + 1) c_cog <= {c_cog[7:0], b};
            if (cnt == len - 1'b1) state <= S_CK1;
          end
          S_CK1: begin ck[14:8] <= b[6:0]; state <= S_CK2; end
          S_CK2: begin ck[7:0] <= b; state <= S_B0; end
          S_B0:  state <= (b == 8'hB0) ? S_B3 : S_A0;
          S_B3: begin
            state <= S_A0;
            if (b == 8'hB3 && ck == sum && mid == NAV_MID && navvalid == 0 &&
                int'(len) >= OFS_COG + 2) begin
              available <= 1'b1;
              lat       <= c_lat;
              lon       <= c_lon;
              alt       <= c_alt;
              time_ms   <= c_tow;
              vel       <= {c_sog, c_cog};
            end
          end
          default: state <= S_A0;
        endcase
      end
    end
  end
endmodule
