// tx_pulse_gen: transmit pulse generator with delay-and-sum transmit beam steering.
//
// Writing a steer angle (0..180 degrees) to the single WishBone register (address 0)
// starts one transmission. A delay lookup table with 181 entries gives the delay D
// between adjacent elements, in transmit samples, for that angle:
// D = round(d*|cos(theta)|/c * fs_dac) (radar_pkg::tx_steer_delay, 0..18 samples). For
// angles below 90 degrees channel 5 leads and channel k is delayed by (5-k)*D; from 90
// degrees up channel 0 leads and channel k is delayed by k*D. Six pulse ROMs with the same
// content (104 samples of the 24-bit radar pulse) are then read, each at its own delayed
// address, and the six channel samples are output together with dout_valid, one set per
// clock, for TX_PULSE_LEN + 5*D clocks. Outside its delayed window a channel outputs 0.
// The downstream DAC FIFOs (256 deep) absorb the burst and pace it to the DAC rate.
//
// Timing: the write is acknowledged one clock after stb; the first valid output comes
// three clocks after the acknowledge (table read, ROM read). Writes that arrive while
// a pulse is being output are acknowledged and stored but do not restart it; reading
// address 0 returns the stored angle. Angles above 180 are treated as 180.
//
// The register, the 181-entry lookup table, the six ROMs and the leading-channel rule
// follow the design; the one-sample-per-clock output burst, the zero fill outside each
// channel's window and the element spacing used to fill the table are this design's.
module tx_pulse_gen
  import radar_pkg::*;
(
  input  logic               clk,
  input  logic               rst,
  input  wb_req_t            wb_i,
  output wb_rsp_t            wb_o,
  output logic signed [23:0] dout [NCH],
  output logic               dout_valid,
  output logic               busy
);

  localparam int TLEN_W = 9;

  typedef logic [4:0] lut_t [MAX_ANGLE + 1];
  typedef logic signed [23:0] rom_t [TX_PULSE_LEN];

  function automatic lut_t make_lut();
    lut_t l;
    for (int a = 0; a <= MAX_ANGLE; a++) l[a] = 5'(tx_steer_delay(a));
    return l;
  endfunction
  function automatic rom_t make_rom();
    rom_t r;
    for (int i = 0; i < TX_PULSE_LEN; i++) r[i] = tx_pulse_sample(i);
    return r;
  endfunction

  localparam lut_t DELAY_LUT = make_lut();
  localparam rom_t PULSE_ROM = make_rom();

  // ---------------- WishBone slave ----------------
  logic [7:0] steer_angle_reg;
  logic       trigger;

  always_ff @(posedge clk) begin
    if (rst) begin
      wb_o            <= '0;
      steer_angle_reg <= '0;
      trigger         <= 1'b0;
    end else begin
      wb_o.ack <= wb_i.cyc && wb_i.stb && !wb_o.ack;
      wb_o.dat <= steer_angle_reg;
      trigger  <= 1'b0;
      if (wb_i.cyc && wb_i.stb && !wb_o.ack && wb_i.we && wb_i.adr == 8'h00) begin
        steer_angle_reg <= (wb_i.dat > 8'(MAX_ANGLE)) ? 8'(MAX_ANGLE) : wb_i.dat;
        trigger         <= 1'b1;
      end
    end
  end

  // ---------------- FSM ----------------
  typedef enum logic [1:0] {S_IDLE, S_LOOKUP, S_PLAY} state_e;
  state_e state;

  logic [4:0]        dly;              // delay per element for the current angle
  logic              lead_ch0;         // channel 0 leads (angle >= 90)
  logic [TLEN_W-1:0] t, t_end;
  logic [TLEN_W-1:0] ch_delay [NCH];

  always_comb
    for (int k = 0; k < NCH; k++)
      ch_delay[k] = lead_ch0 ? TLEN_W'(k * dly) : TLEN_W'((NCH - 1 - k) * dly);

  always_ff @(posedge clk) begin
    if (rst) begin
      state    <= S_IDLE;
      dly      <= '0;
      lead_ch0 <= 1'b0;
      t        <= '0;
      t_end    <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (trigger) begin
          dly      <= DELAY_LUT[steer_angle_reg];
          lead_ch0 <= (steer_angle_reg >= 8'd90);
          state    <= S_LOOKUP;
        end
        S_LOOKUP: begin
          t     <= '0;
          t_end <= TLEN_W'(TX_PULSE_LEN - 1) + TLEN_W'((NCH - 1) * dly);
          state <= S_PLAY;
        end
        S_PLAY: begin
          t <= t + 1'b1;
          if (t == t_end) state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy = (state != S_IDLE);

  // ---------------- six pulse ROMs ----------------
  logic [NCH-1:0] in_window;

  always_ff @(posedge clk) begin
    if (rst) begin
      in_window  <= '0;
      dout_valid <= 1'b0;
    end else begin
      dout_valid <= (state == S_PLAY);
      for (int k = 0; k < NCH; k++)
        in_window[k] <= (state == S_PLAY) && (t >= ch_delay[k]) &&
                        (t - ch_delay[k] < TLEN_W'(TX_PULSE_LEN));
    end
  end

  for (genvar k = 0; k < NCH; k++) begin : g_rom
    logic [TLEN_W-1:0] addr;
    logic signed [23:0] rom_q;
    assign addr = t - ch_delay[k];
    always_ff @(posedge clk)
      rom_q <= PULSE_ROM[7'((addr < TLEN_W'(TX_PULSE_LEN)) ? addr : '0)];
    assign dout[k] = in_window[k] ? rom_q : '0;
  end

endmodule
