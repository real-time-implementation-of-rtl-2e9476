// rx_beamformer: receive delay-and-sum beamformer with per-channel phase calibration and
// accumulation over several captures.
//
// The beamformer output is y[n] = sum over the six channels of x_i[n - delta_i]. The
// delays are applied by discarding samples at the head of the lagging channels' FIFOs,
// after which the six FIFOs are read in lock step and summed. A write to the steer
// angle register (address 0x06) starts one capture:
//   1. perform calibration: discard cal[c] samples from channel c (registers 0x00..0x05,
//      set by the user from experiment);
//   2. update channel delays (two clocks): read the 181-entry delay lookup table,
//      D = round(d*|cos(theta)|/c * 250 kHz) (radar_pkg::rx_steer_delay, up to 87 samples).
//      Below 90 degrees channel 0 hears an echo first, so channel c lags by c*D; from
//      90 degrees up channel 5 leads and channel c lags by (5-c)*D;
//   3. adjust channels: discard that many samples from each channel;
//   4. for each of CAPTURE_LEN output samples: read one sample from all six FIFOs and
//      sum them (read_from_fifo), read the previous value at the same BRAM address
//      (rd_old_from_bram), and write back previous + sum (wr_new_to_bram).
// Because step 4 adds to what is already in the BRAM, running the module again without
// clearing the BRAM sums the beams of several captures. Samples are stored from address
// LEAD_ZEROS (499) on; the addresses below stay zero for the correlator.
//
// Interface: WishBone slave (8-bit registers; 0x07 reads the status, 0x00 = idle or busy,
// 0x01 = done), six FIFO read ports with first-word-fall-through data, and a BRAM
// request/response port (read data one clock after the request). Each output sample
// costs three clocks once all six FIFOs hold data, so at 100 MHz the module keeps up
// with the 250 kSPS input with a wide margin.
//
// The register map, the state sequence, the sample dropping and the accumulation
// follow the design. The 181-entry table (the text mentions 180 entries for this table
// and 181 for the transmit one; both cover 0..180 degrees here), the leading-channel rule
// for receive and the element spacing behind the table are this design's reading.
module rx_beamformer
  import radar_pkg::*;
#(
  parameter int CAPTURE_LEN = 14112,
  parameter int LEAD_ZEROS  = RX_PULSE_LEN - 1
) (
  input  logic               clk,
  input  logic               rst,
  input  wb_req_t            wb_i,
  output wb_rsp_t            wb_o,
  // channel FIFO read interface
  input  logic [NCH-1:0]     fifo_empty,
  output logic [NCH-1:0]     fifo_rd_en,
  input  logic signed [15:0] fifo_dout [NCH],
  // receive BRAM interface
  output bram_req_t          bram_req,
  input  logic [BRAM_DW-1:0] bram_dout
);

  typedef logic [6:0] lut_t [MAX_ANGLE + 1];
  function automatic lut_t make_lut();
    lut_t l;
    for (int a = 0; a <= MAX_ANGLE; a++) l[a] = 7'(rx_steer_delay(a));
    return l;
  endfunction
  localparam lut_t DELAY_LUT = make_lut();

  // ---------------- registers ----------------
  logic [7:0] cal_reg [NCH];
  logic [7:0] steer_angle_reg;
  logic [7:0] status_reg;
  logic       trigger;
  logic       wb_hit;

  assign wb_hit = wb_i.cyc && wb_i.stb && !wb_o.ack;

  typedef enum logic [2:0] {
    S_WAIT, S_CAL, S_UPD1, S_UPD2, S_ADJ, S_RD, S_RDOLD, S_WR
  } state_e;
  state_e state;

  always_ff @(posedge clk) begin
    if (rst) begin
      wb_o            <= '0;
      steer_angle_reg <= '0;
      trigger         <= 1'b0;
      for (int c = 0; c < NCH; c++) cal_reg[c] <= '0;
    end else begin
      wb_o.ack <= wb_hit;
      trigger  <= 1'b0;
      unique case (wb_i.adr)
        8'h06:   wb_o.dat <= steer_angle_reg;
        8'h07:   wb_o.dat <= status_reg;
        default: wb_o.dat <= (wb_i.adr < 8'(NCH)) ? cal_reg[wb_i.adr[2:0]] : 8'h00;
      endcase
      if (wb_hit && wb_i.we) begin
        if (wb_i.adr < 8'(NCH)) cal_reg[wb_i.adr[2:0]] <= wb_i.dat;
        if (wb_i.adr == 8'h06) begin
          steer_angle_reg <= (wb_i.dat > 8'(MAX_ANGLE)) ? 8'(MAX_ANGLE) : wb_i.dat;
          trigger         <= (state == S_WAIT);
        end
      end
    end
  end

  // ---------------- beamforming FSM ----------------
  logic [8:0]             drop [NCH];
  logic [6:0]             dly;
  logic [BRAM_AW-1:0]     n;
  logic signed [BRAM_DW-1:0] beam, accum;
  logic                   all_ready, dropping_done;
  logic [NCH-1:0]         drop_rd;

  assign all_ready = (fifo_empty == '0);

  always_comb begin
    dropping_done = 1'b1;
    for (int c = 0; c < NCH; c++) begin
      drop_rd[c] = (drop[c] != '0) && !fifo_empty[c];
      if (drop[c] != '0) dropping_done = 1'b0;
    end
  end

  always_comb begin
    fifo_rd_en = '0;
    if (state == S_CAL || state == S_ADJ) fifo_rd_en = drop_rd;
    else if (state == S_RD && all_ready)  fifo_rd_en = '1;
  end

  logic signed [BRAM_DW-1:0] lane_sum;
  always_comb begin
    lane_sum = '0;
    for (int c = 0; c < NCH; c++) lane_sum += BRAM_DW'(fifo_dout[c]);
  end

  always_comb begin
    bram_req      = '0;
    bram_req.addr = BRAM_AW'(LEAD_ZEROS) + n;
    bram_req.din  = accum;
    if (state == S_RD && all_ready) bram_req.en = 1'b1;          // read old value
    if (state == S_WR) begin
      bram_req.en = 1'b1;
      bram_req.we = 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state      <= S_WAIT;
      status_reg <= STATUS_IDLE;
      dly        <= '0;
      n          <= '0;
      beam       <= '0;
      accum      <= '0;
      for (int c = 0; c < NCH; c++) drop[c] <= '0;
    end else begin
      unique case (state)
        S_WAIT: if (trigger) begin
          status_reg <= STATUS_IDLE;
          for (int c = 0; c < NCH; c++) drop[c] <= 9'(cal_reg[c]);
          state <= S_CAL;
        end
        S_CAL, S_ADJ: begin
          for (int c = 0; c < NCH; c++) if (drop_rd[c]) drop[c] <= drop[c] - 9'd1;
          if (dropping_done) state <= (state == S_CAL) ? S_UPD1 : S_RD;
          n <= '0;
        end
        S_UPD1: begin
          dly   <= DELAY_LUT[steer_angle_reg];
          state <= S_UPD2;
        end
        S_UPD2: begin
          for (int c = 0; c < NCH; c++)
            drop[c] <= (steer_angle_reg < 8'd90) ? 9'(c * dly) : 9'((NCH - 1 - c) * dly);
          state <= S_ADJ;
        end
        S_RD: if (all_ready) begin
          beam  <= lane_sum;
          state <= S_RDOLD;
        end
        S_RDOLD: begin
          accum <= $signed(bram_dout) + beam;
          state <= S_WR;
        end
        S_WR: begin
          if (n == BRAM_AW'(CAPTURE_LEN - 1)) begin
            status_reg <= STATUS_DONE;
            state      <= S_WAIT;
          end else begin
            n     <= n + 1'b1;
            state <= S_RD;
          end
        end
        default: state <= S_WAIT;
      endcase
    end
  end

  // A slave only acknowledges a cycle the master is still holding.
  a_ack_in_cycle: assert property (@(posedge clk) disable iff (rst)
    wb_o.ack |-> wb_i.cyc && wb_i.stb);

endmodule
