// radar_ctrl: the acoustic radar system controller.
//
// One state machine runs the whole radar in three phases.
//  Observation: after reset the receive BRAM is cleared; then the controller alternates
//    between checking the command register and polling the Ethernet controller for a
//    register-access packet from the host (first payload byte = register address, the
//    following bytes = value, most significant byte first).
//  Transmit-receive: trigger the transmit pulse generator with the steer angle, keep
//    the channel FIFOs in reset for the initial system delay and then for the silence
//    time (the pulse itself), release them and start the receive beamformer (calibration
//    registers first, then the steer angle), and wait until it reports done. This repeats
//    number_of_captures times, the beamformer summing the captures in the BRAM. Unless
//    the command is "capture beamformer out", the correlator is then started with the
//    decimation factor and, when done, its peak index and value are read.
//  Data feed: the Ethernet controller is armed and sent either the whole correlation
//    range of the BRAM (4 bytes per word, bits 31:0, most significant first) for the
//    two capture commands, or, for "run radar", 9 bytes: angle, peak index (32 bits) and
//    peak value (32 bits). The BRAM is then cleared. A capture command returns to
//    observation (and the command register is set back to idle); in radar mode the
//    controller serves register writes until the host writes the acknowledge register,
//    then steps the angle by the step size (wrapping from the end angle back to the
//    start angle) and runs the next transmit-receive phase, or stops if the command has
//    been set to idle.
//
// System registers (host addresses): 0x00 cmd (0 idle, 1 capture beamformer out,
// 2 capture correlator out, 3 run radar), 0x01 ack, 0x02 steer angle, 0x03 start angle,
// 0x04 end angle, 0x05 angle step, 0x06 initial system delay and 0x07 silence time (in
// clock cycles), 0x08 number of captures per angle, 0x09 correlator decimation factor,
// 0x0A..0x0F channel 0..5 calibration offsets.
//
// The controller is a WishBone master to four slaves (transmit pulse generator,
// beamformer, correlator, Ethernet controller); every register access waits for the
// slave's acknowledge. It owns the receive BRAM port select and the channel FIFO reset.
//
// The phases, their states, the registers and the BRAM sharing follow the design; the
// register addresses and encodings, time units, reset values (1.6 ms initial delay and
// 2 ms silence as measured in the design), the packet layouts, the angle wrap, and the
// return of cmd to idle after a capture command are this design's choices.
module radar_ctrl
  import radar_pkg::*;
#(
  parameter int CAPTURE_LEN = 14112,
  parameter int CORR_LEN    = RX_PULSE_LEN + CAPTURE_LEN,
  parameter int BRAM_DEPTH  = 2**BRAM_AW
) (
  input  logic               clk,
  input  logic               rst,
  // WishBone master, one request/response pair per slave
  output wb_req_t            txpg_req,
  input  wb_rsp_t            txpg_rsp,
  output wb_req_t            rxbf_req,
  input  wb_rsp_t            rxbf_rsp,
  output wb_req_t            corr_req,
  input  wb_rsp_t            corr_rsp,
  output wb_req_t            eth_req,
  input  wb_rsp_t            eth_rsp,
  // receive BRAM
  output bram_sel_e          bram_sel,
  output bram_req_t          bram_req,
  input  logic [BRAM_DW-1:0] bram_dout,
  // channel FIFO reset (high = receive path ignored)
  output logic               chfifo_rst
);

  typedef enum logic [7:0] {
    CMD_IDLE     = 8'd0,
    CMD_CAP_BF   = 8'd1,
    CMD_CAP_CORR = 8'd2,
    CMD_RADAR    = 8'd3
  } cmd_e;

  typedef enum logic [1:0] {T_TXPG, T_RXBF, T_CORR, T_ETH} tgt_e;

  typedef enum logic [5:0] {
    // WishBone access in progress
    S_WB,
    // part I: observation
    ST00_RESET, ST01_INIT_CLEAR_BRAM, ST02_CHECK_CMD, ST03_READ_FROM_ETH,
    S_ETH_STAT, S_ETH_BYTE,
    // part II: transmit-receive
    ST_TRIGGER_TX_PULSE_GEN, ST_WAIT_INITIAL_SYSTEM_DELAY, ST_WAIT_SILENCE_TIME,
    ST_TRIGGER_RXBF, ST_WAIT_RXBF_DONE, S_RXBF_STATUS,
    ST_TRIGGER_CORRELATOR, ST_WAIT_CORRELATOR_DONE, S_CORR_STATUS, S_CORR_RESULT,
    // part III: data feed
    ST_TRIGGER_ETH_CTRL, ST_BRAM_TO_ETH, S_B2E_LATCH, S_B2E_BYTES,
    ST_CURR_RADAR_CYCLE_INFO_TO_ETH, ST_CLEAR_RECEIVE_BRAM, ST_READ_FROM_ETH,
    ST_CHECK_ACK_REG
  } state_e;

  // ---------------- system registers ----------------
  cmd_e        cmd_reg;
  logic        ack_reg;
  logic [7:0]  steer_angle_reg, start_angle_reg, end_angle_reg, angle_step_size_reg;
  logic [31:0] init_system_delay_reg, silence_time_reg;
  logic [7:0]  number_of_captures_per_angle_reg, corr_dec_factor_reg;
  logic [7:0]  ch_calibration_reg [NCH];

  // ---------------- working state ----------------
  state_e      state, ret_state, eth_ret;
  tgt_e        m_tgt;
  wb_req_t     m_req;
  wb_rsp_t     m_rsp;
  logic [7:0]  m_rdata;
  logic [31:0] timer;
  logic [7:0]  cur_angle, captures_done;
  logic [3:0]  idx;
  logic [BRAM_AW:0] addr;
  logic [31:0] word;
  logic [15:0] corr_index;
  logic [31:0] corr_value;
  logic        eth_first, eth_last;
  logic [7:0]  eth_addr;
  logic [31:0] eth_val;

  assign txpg_req = (m_tgt == T_TXPG) ? m_req : '0;
  assign rxbf_req = (m_tgt == T_RXBF) ? m_req : '0;
  assign corr_req = (m_tgt == T_CORR) ? m_req : '0;
  assign eth_req  = (m_tgt == T_ETH)  ? m_req : '0;

  always_comb begin
    unique case (m_tgt)
      T_TXPG: m_rsp = txpg_rsp;
      T_RXBF: m_rsp = rxbf_rsp;
      T_CORR: m_rsp = corr_rsp;
      default: m_rsp = eth_rsp;
    endcase
  end

  // BRAM port of the controller: clearing and reading out
  always_comb begin
    bram_req      = '0;
    bram_req.addr = BRAM_AW'(addr);
    if (state == ST01_INIT_CLEAR_BRAM || state == ST_CLEAR_RECEIVE_BRAM) begin
      bram_req.en = 1'b1;
      bram_req.we = 1'b1;
    end else if (state == ST_BRAM_TO_ETH) begin
      bram_req.en = 1'b1;
    end
  end

  function automatic logic [31:0] sat32(logic [BRAM_DW-1:0] v);
    logic signed [BRAM_DW-1:0] s;
    s = $signed(v);
    if (s > 36'sh07fffffff)       return 32'h7fffffff;
    else if (s < -36'sh080000000) return 32'h80000000;
    else                          return v[31:0];
  endfunction

  // Start one WishBone access; the FSM continues in `ret` once it is acknowledged.
  task automatic wb_call(input tgt_e tgt, input logic [7:0] adr, input logic [7:0] dat,
                         input logic we, input state_e ret);
    m_tgt     <= tgt;
    m_req     <= '{cyc: 1'b1, stb: 1'b1, we: we, adr: adr, dat: dat};
    ret_state <= ret;
    state     <= S_WB;
  endtask

  always_ff @(posedge clk) begin
    if (rst) begin
      cmd_reg                          <= CMD_IDLE;
      ack_reg                          <= 1'b0;
      steer_angle_reg                  <= 8'd90;
      start_angle_reg                  <= 8'd30;
      end_angle_reg                    <= 8'd150;
      angle_step_size_reg              <= 8'd10;
      init_system_delay_reg            <= 32'd160_000;   // 1.6 ms at 100 MHz
      silence_time_reg                 <= 32'd200_000;   // 2 ms at 100 MHz
      number_of_captures_per_angle_reg <= 8'd1;
      corr_dec_factor_reg              <= 8'd1;
      for (int c = 0; c < NCH; c++) ch_calibration_reg[c] <= '0;
      state         <= ST00_RESET;
      ret_state     <= ST00_RESET;
      eth_ret       <= ST02_CHECK_CMD;
      m_tgt         <= T_TXPG;
      m_req         <= '0;
      m_rdata       <= '0;
      timer         <= '0;
      cur_angle     <= '0;
      captures_done <= '0;
      idx           <= '0;
      addr          <= '0;
      word          <= '0;
      corr_index    <= '0;
      corr_value    <= '0;
      eth_first     <= 1'b0;
      eth_last      <= 1'b0;
      eth_addr      <= '0;
      eth_val       <= '0;
      bram_sel      <= BRAM_SEL_CTRL;
      chfifo_rst    <= 1'b1;
    end else begin
      unique case (state)
        S_WB: if (m_rsp.ack) begin
          m_rdata <= m_rsp.dat;
          m_req   <= '0;
          state   <= ret_state;
        end

        // ---------------- part I: observation ----------------
        ST00_RESET: begin
          addr     <= '0;
          bram_sel <= BRAM_SEL_CTRL;
          state    <= ST01_INIT_CLEAR_BRAM;
        end
        ST01_INIT_CLEAR_BRAM: begin
          addr <= addr + 1'b1;
          if (addr == (BRAM_AW+1)'(BRAM_DEPTH - 1)) state <= ST02_CHECK_CMD;
        end
        ST02_CHECK_CMD: begin
          if (cmd_reg == CMD_IDLE) begin
            eth_ret <= ST02_CHECK_CMD;
            state   <= ST03_READ_FROM_ETH;
          end else begin
            cur_angle     <= (cmd_reg == CMD_RADAR) ? start_angle_reg : steer_angle_reg;
            captures_done <= '0;
            state         <= ST_TRIGGER_TX_PULSE_GEN;
          end
        end
        ST03_READ_FROM_ETH, ST_READ_FROM_ETH: begin
          eth_first <= 1'b1;
          eth_val   <= '0;
          wb_call(T_ETH, 8'h41, 8'h00, 1'b0, S_ETH_STAT);
        end
        S_ETH_STAT: begin                    // m_rdata = {last, available}
          if (m_rdata[0]) begin
            eth_last <= m_rdata[1];
            wb_call(T_ETH, 8'h40, 8'h00, 1'b0, S_ETH_BYTE);
          end else state <= eth_ret;
        end
        S_ETH_BYTE: begin
          if (eth_first) eth_addr <= m_rdata;
          else           eth_val  <= {eth_val[23:0], m_rdata};
          eth_first <= 1'b0;
          if (eth_last) begin
            write_sysreg(eth_first ? m_rdata : eth_addr,
                         eth_first ? eth_val : {eth_val[23:0], m_rdata});
            state <= eth_ret;
          end else wb_call(T_ETH, 8'h41, 8'h00, 1'b0, S_ETH_STAT);
        end

        // ---------------- part II: transmit-receive ----------------
        ST_TRIGGER_TX_PULSE_GEN: begin
          chfifo_rst <= 1'b1;
          timer      <= init_system_delay_reg;
          wb_call(T_TXPG, 8'h00, cur_angle, 1'b1, ST_WAIT_INITIAL_SYSTEM_DELAY);
        end
        ST_WAIT_INITIAL_SYSTEM_DELAY: begin
          if (timer == '0) begin
            timer <= silence_time_reg;
            state <= ST_WAIT_SILENCE_TIME;
          end else timer <= timer - 1'b1;
        end
        ST_WAIT_SILENCE_TIME: begin
          if (timer == '0) begin
            idx   <= '0;
            state <= ST_TRIGGER_RXBF;
          end else timer <= timer - 1'b1;
        end
        ST_TRIGGER_RXBF: begin
          chfifo_rst <= 1'b0;
          bram_sel   <= BRAM_SEL_RXBF;
          idx        <= idx + 1'b1;
          if (idx < 4'(NCH))
            wb_call(T_RXBF, 8'(idx), ch_calibration_reg[idx[2:0]], 1'b1, ST_TRIGGER_RXBF);
          else
            wb_call(T_RXBF, 8'h06, cur_angle, 1'b1, ST_WAIT_RXBF_DONE);
        end
        ST_WAIT_RXBF_DONE: wb_call(T_RXBF, 8'h07, 8'h00, 1'b0, S_RXBF_STATUS);
        S_RXBF_STATUS: begin
          if (m_rdata != STATUS_DONE) state <= ST_WAIT_RXBF_DONE;
          else begin
            chfifo_rst    <= 1'b1;
            captures_done <= captures_done + 1'b1;
            if (captures_done + 8'd1 < number_of_captures_per_angle_reg)
              state <= ST_TRIGGER_TX_PULSE_GEN;
            else if (cmd_reg == CMD_CAP_BF) begin
              idx   <= '0;
              state <= ST_TRIGGER_ETH_CTRL;
            end
            else
              state <= ST_TRIGGER_CORRELATOR;
          end
        end
        ST_TRIGGER_CORRELATOR: begin
          bram_sel <= BRAM_SEL_CORR;
          wb_call(T_CORR, 8'h00, corr_dec_factor_reg, 1'b1, ST_WAIT_CORRELATOR_DONE);
        end
        ST_WAIT_CORRELATOR_DONE: wb_call(T_CORR, 8'h01, 8'h00, 1'b0, S_CORR_STATUS);
        S_CORR_STATUS: begin
          if (m_rdata != STATUS_DONE) state <= ST_WAIT_CORRELATOR_DONE;
          else begin
            idx <= 4'd2;
            wb_call(T_CORR, 8'h02, 8'h00, 1'b0, S_CORR_RESULT);
          end
        end
        S_CORR_RESULT: begin                 // registers 0x02..0x07, most significant first
          if (idx < 4'd4) corr_index <= {corr_index[7:0], m_rdata};
          else            corr_value <= {corr_value[23:0], m_rdata};
          idx <= idx + 1'b1;
          if (idx == 4'd7) begin
            idx   <= '0;
            state <= ST_TRIGGER_ETH_CTRL;
          end
          else wb_call(T_CORR, 8'(idx + 4'd1), 8'h00, 1'b0, S_CORR_RESULT);
        end

        // ---------------- part III: data feed ----------------
        ST_TRIGGER_ETH_CTRL: begin           // length high, length low, send instruction
          bram_sel <= BRAM_SEL_CTRL;
          addr     <= '0;
          idx      <= idx + 1'b1;
          if (idx == 4'd0) begin
            idx <= 4'd1;
            wb_call(T_ETH, 8'h30, (cmd_reg == CMD_RADAR) ? 8'd0 : 8'((CORR_LEN * 4) >> 8),
                    1'b1, ST_TRIGGER_ETH_CTRL);
          end else if (idx == 4'd1)
            wb_call(T_ETH, 8'h31, (cmd_reg == CMD_RADAR) ? 8'd9 : 8'(CORR_LEN * 4),
                    1'b1, ST_TRIGGER_ETH_CTRL);
          else begin
            idx <= '0;
            wb_call(T_ETH, 8'h32, 8'h01, 1'b1,
                    (cmd_reg == CMD_RADAR) ? ST_CURR_RADAR_CYCLE_INFO_TO_ETH : ST_BRAM_TO_ETH);
          end
        end
        ST_BRAM_TO_ETH: state <= S_B2E_LATCH;   // read issued this cycle
        S_B2E_LATCH: begin
          word  <= sat32(bram_dout);
          idx   <= '0;
          state <= S_B2E_BYTES;
        end
        S_B2E_BYTES: begin
          if (idx < 4'd4) begin
            idx  <= idx + 1'b1;
            word <= {word[23:0], 8'h00};
            wb_call(T_ETH, 8'h33, word[31:24], 1'b1, S_B2E_BYTES);
          end else if (addr == (BRAM_AW+1)'(CORR_LEN - 1)) begin
            addr  <= '0;
            state <= ST_CLEAR_RECEIVE_BRAM;
          end else begin
            addr  <= addr + 1'b1;
            state <= ST_BRAM_TO_ETH;
          end
        end
        ST_CURR_RADAR_CYCLE_INFO_TO_ETH: begin
          idx <= idx + 1'b1;
          unique case (idx)
            4'd0: wb_call(T_ETH, 8'h33, cur_angle, 1'b1, ST_CURR_RADAR_CYCLE_INFO_TO_ETH);
            4'd1, 4'd2: wb_call(T_ETH, 8'h33, 8'h00, 1'b1, ST_CURR_RADAR_CYCLE_INFO_TO_ETH);
            4'd3: wb_call(T_ETH, 8'h33, corr_index[15:8], 1'b1, ST_CURR_RADAR_CYCLE_INFO_TO_ETH);
            4'd4: wb_call(T_ETH, 8'h33, corr_index[7:0], 1'b1, ST_CURR_RADAR_CYCLE_INFO_TO_ETH);
            4'd5: wb_call(T_ETH, 8'h33, corr_value[31:24], 1'b1, ST_CURR_RADAR_CYCLE_INFO_TO_ETH);
            4'd6: wb_call(T_ETH, 8'h33, corr_value[23:16], 1'b1, ST_CURR_RADAR_CYCLE_INFO_TO_ETH);
            4'd7: wb_call(T_ETH, 8'h33, corr_value[15:8], 1'b1, ST_CURR_RADAR_CYCLE_INFO_TO_ETH);
            4'd8: wb_call(T_ETH, 8'h33, corr_value[7:0], 1'b1, ST_CURR_RADAR_CYCLE_INFO_TO_ETH);
            default: begin
              idx   <= '0;
              addr  <= '0;
              state <= ST_CLEAR_RECEIVE_BRAM;
            end
          endcase
        end
        ST_CLEAR_RECEIVE_BRAM: begin
          addr <= addr + 1'b1;
          if (addr == (BRAM_AW+1)'(BRAM_DEPTH - 1)) begin
            addr <= '0;
            if (cmd_reg == CMD_RADAR) begin
              eth_ret <= ST_CHECK_ACK_REG;
              state   <= ST_READ_FROM_ETH;
            end else begin
              cmd_reg <= CMD_IDLE;
              state   <= ST02_CHECK_CMD;
            end
          end
        end
        ST_CHECK_ACK_REG: begin
          if (cmd_reg == CMD_IDLE) state <= ST02_CHECK_CMD;
          else if (ack_reg) begin
            ack_reg       <= 1'b0;
            captures_done <= '0;
            cur_angle     <= (cur_angle + angle_step_size_reg > end_angle_reg ||
                              cur_angle + angle_step_size_reg < cur_angle)
                             ? start_angle_reg : cur_angle + angle_step_size_reg;
            state         <= ST_TRIGGER_TX_PULSE_GEN;
          end else state <= ST_READ_FROM_ETH;
        end
        default: state <= ST00_RESET;
      endcase
    end
  end

  task automatic write_sysreg(input logic [7:0] a, input logic [31:0] v);
    unique case (a)
      8'h00: cmd_reg <= (v[7:0] <= 8'd3) ? cmd_e'(v[7:0]) : CMD_IDLE;
      8'h01: ack_reg <= (v != '0);
      8'h02: steer_angle_reg     <= v[7:0];
      8'h03: start_angle_reg     <= v[7:0];
      8'h04: end_angle_reg       <= v[7:0];
      8'h05: angle_step_size_reg <= v[7:0];
      8'h06: init_system_delay_reg <= v;
      8'h07: silence_time_reg      <= v;
      8'h08: number_of_captures_per_angle_reg <= (v[7:0] == 8'd0) ? 8'd1 : v[7:0];
      8'h09: corr_dec_factor_reg <= v[7:0];
      8'h0A, 8'h0B, 8'h0C, 8'h0D, 8'h0E, 8'h0F: ch_calibration_reg[3'(a - 8'h0A)] <= v[7:0];
      default: ;
    endcase
  endtask

endmodule
