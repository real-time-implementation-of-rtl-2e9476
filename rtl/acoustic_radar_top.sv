// acoustic_radar_top: the complete acoustic radar, from the board clock and reset to the
// ADC, DAC and Ethernet MAC pins.
//
// Transmit path: the system controller starts the transmit pulse generator, whose six
// delayed copies of the Gaussian-windowed pulse go through the DAC controller's FIFOs to
// the PCM1602 serial port. Receive path: the ADC controller reads the six ADS8364
// channels at 250 kSPS; each channel passes a DC offset remover, the six share one
// low-pass FIR filter, and each filtered channel enters its own dual-clock FIFO, which
// the controller holds in reset except while a capture is wanted. The receive
// beamformer aligns and sums the six channels into the receive BRAM, the correlator
// matches the sum against the pulse in place and finds its peak, and the Ethernet
// controller carries the host's register writes in and the results out as UDP packets.
// The BRAM arbiter gives the BRAM port to whichever module the controller selects.
//
// Clocks: clock_gen turns the 100 MHz board clock into the 100 MHz system clock
// (controller, pulse generator, beamformer, BRAM, correlator, Ethernet controller, FIFO
// read sides), 20 MHz (DAC system clock) and 5 MHz (ADC controller, DC removers, FIR,
// channel FIFO write sides, DAC serial clock). The global reset is the inverse of the
// clock generator's lock flag, synchronised into the 100 and 5 MHz domains.
//
// Ports: clk_100mhz_from_board and rst (board reset switch, active high); the ADS8364
// pins; the PCM1602 serial audio pins; the LocalLink receive and transmit byte streams
// of the Ethernet MAC (which is outside this design); pll_locked for a status LED.
// CAPTURE_LEN (beamformer output samples per capture) sets the receive window; the
// default 14112 samples is 56.4 ms at 250 kSPS, about 9.8 m of range.
//
// The block structure and the clock assignment follow the design; the reset
// synchronisers and the brought-out MAC streams are this design's choices.
//
// Lint notes. The reset synchronisers are set asynchronously by the loss of lock and
// shift the release through synchronously, so a lint tool reports their flops as both
// synchronous and asynchronous; that is the intended circuit. Several ADC pins (ADD,
// BYTE, WR and A2..A0) are constant because cycle mode with a 16-bit bus needs no
// more. The DAC FIFO full flags, the channel FIFO full flags, the DC estimates and the
// pulse generator's busy flag are left unconnected: the FIFOs are deep enough for one
// pulse and one capture, and the controller paces itself on the status registers.
module acoustic_radar_top
  import radar_pkg::*;
#(
  parameter int CAPTURE_LEN = 14112
) (
  input  logic        clk_100mhz_from_board,
  input  logic        rst,
  output logic        pll_locked,
  // ADS8364
  output logic        adc_clk,
  output logic        adc_reset_n,
  output logic        adc_hold_a_n,
  output logic        adc_hold_b_n,
  output logic        adc_hold_c_n,
  output logic [2:0]  adc_address,
  output logic        adc_add,
  output logic        adc_byte,
  output logic        adc_rd_n,
  output logic        adc_wr_n,
  output logic        adc_cs_n,
  input  logic        adc_fdata,
  input  logic        adc_eoc_n,
  input  logic [15:0] adc_data,
  // PCM1602
  output logic        dac_lrck,
  output logic        dac_bck,
  output logic        dac_data0,
  output logic        dac_data1,
  output logic        dac_data2,
  output logic        dac_sclk,
  // Ethernet MAC LocalLink
  input  logic [7:0]  ll_rx_data,
  input  logic        ll_rx_sof_n,
  input  logic        ll_rx_eof_n,
  input  logic        ll_rx_src_rdy_n,
  output logic        ll_rx_dst_rdy_n,
  output logic [7:0]  ll_tx_data,
  output logic        ll_tx_sof_n,
  output logic        ll_tx_eof_n,
  output logic        ll_tx_src_rdy_n,
  input  logic        ll_tx_dst_rdy_n
);

  localparam int CORR_LEN = RX_PULSE_LEN + CAPTURE_LEN;

  // ---------------- clocks and resets ----------------
  logic clk, clk_20m, clk_5m;
  logic rst_sys, rst_5m;
  logic [1:0] rst_sys_q, rst_5m_q;

  clock_gen u_clock_gen (
    .clk_100mhz_from_board (clk_100mhz_from_board),
    .rst                   (rst),
    .clk_100mhz            (clk),
    .clk_20mhz             (clk_20m),
    .clk_5mhz              (clk_5m),
    .pll_locked            (pll_locked)
  );

  always_ff @(posedge clk or negedge pll_locked)
    if (!pll_locked) rst_sys_q <= 2'b11;
    else             rst_sys_q <= {rst_sys_q[0], 1'b0};
  always_ff @(posedge clk_5m or negedge pll_locked)
    if (!pll_locked) rst_5m_q <= 2'b11;
    else             rst_5m_q <= {rst_5m_q[0], 1'b0};
  assign rst_sys = rst_sys_q[1];
  assign rst_5m  = rst_5m_q[1];

  // ---------------- system controller and WishBone ----------------
  wb_req_t   txpg_req, rxbf_req, corr_req, eth_req;
  wb_rsp_t   txpg_rsp, rxbf_rsp, corr_rsp, eth_rsp;
  bram_sel_e bram_sel;
  bram_req_t ctrl_bram_req, rxbf_bram_req, corr_bram_req, bram_req;
  logic [BRAM_DW-1:0] bram_dout;
  logic      chfifo_rst;

  radar_ctrl #(.CAPTURE_LEN(CAPTURE_LEN), .CORR_LEN(CORR_LEN)) u_radar_ctrl (
    .clk        (clk),
    .rst        (rst_sys),
    .txpg_req   (txpg_req),
    .txpg_rsp   (txpg_rsp),
    .rxbf_req   (rxbf_req),
    .rxbf_rsp   (rxbf_rsp),
    .corr_req   (corr_req),
    .corr_rsp   (corr_rsp),
    .eth_req    (eth_req),
    .eth_rsp    (eth_rsp),
    .bram_sel   (bram_sel),
    .bram_req   (ctrl_bram_req),
    .bram_dout  (bram_dout),
    .chfifo_rst (chfifo_rst)
  );

  // ---------------- transmit path ----------------
  logic signed [23:0] tx_sample [NCH];
  logic               tx_valid, tx_busy;
  logic [NCH-1:0]     dac_full;

  tx_pulse_gen u_tx_pulse_gen (
    .clk        (clk),
    .rst        (rst_sys),
    .wb_i       (txpg_req),
    .wb_o       (txpg_rsp),
    .dout       (tx_sample),
    .dout_valid (tx_valid),
    .busy       (tx_busy)
  );

  pcm1602_dac_ctrl u_dac_ctrl (
    .clk     (clk),
    .rst     (rst_sys),
    .wr_en   ({NCH{tx_valid}}),
    .din     (tx_sample),
    .full    (dac_full),
    .bclk    (clk_5m),
    .clk_20m (clk_20m),
    .lrck    (dac_lrck),
    .bck     (dac_bck),
    .data0   (dac_data0),
    .data1   (dac_data1),
    .data2   (dac_data2),
    .sclk    (dac_sclk)
  );

  // ---------------- receive path, 5 MHz domain ----------------
  logic [NCH-1:0]     adc_we, dc_valid, fir_valid;
  logic signed [15:0] adc_x [NCH];
  logic signed [15:0] dc_x [NCH];
  logic signed [15:0] dc_offset [NCH];
  logic signed [15:0] fir_x [NCH];

  ads8364_adc_ctrl u_adc_ctrl (
    .clk      (clk_5m),
    .rst      (rst_5m),
    .adc_clk  (adc_clk),
    .reset_n  (adc_reset_n),
    .hold_a_n (adc_hold_a_n),
    .hold_b_n (adc_hold_b_n),
    .hold_c_n (adc_hold_c_n),
    .address  (adc_address),
    .add      (adc_add),
    .byte_sel (adc_byte),
    .rd_n     (adc_rd_n),
    .wr_n     (adc_wr_n),
    .cs_n     (adc_cs_n),
    .fdata    (adc_fdata),
    .eoc_n    (adc_eoc_n),
    .data     (adc_data),
    .we       (adc_we),
    .data_x   (adc_x)
  );

  for (genvar c = 0; c < NCH; c++) begin : g_dc
    dc_offset_remover u_dc (
      .clk        (clk_5m),
      .rst        (rst_5m),
      .vin        (adc_x[c]),
      .vin_valid  (adc_we[c]),
      .vout       (dc_x[c]),
      .dc_offset  (dc_offset[c]),
      .vout_valid (dc_valid[c])
    );
  end

  fir6_lpf u_fir (
    .clk        (clk_5m),
    .rst        (rst_5m),
    .din        (dc_x),
    .din_valid  (dc_valid),
    .dout       (fir_x),
    .dout_valid (fir_valid)
  );

  // ---------------- channel FIFOs into the 100 MHz domain ----------------
  logic [NCH-1:0]     ch_full, ch_empty, ch_rd_en;
  logic [15:0]        ch_q [NCH];
  logic signed [15:0] ch_dout [NCH];
  logic               ch_fifo_rst;

  assign ch_fifo_rst = rst_sys || chfifo_rst;

  for (genvar c = 0; c < NCH; c++) begin : g_chfifo
    async_fifo #(.DW(16), .AW(10)) u_chfifo (
      .rst   (ch_fifo_rst),
      .wclk  (clk_5m),
      .wr_en (fir_valid[c]),
      .din   (fir_x[c]),
      .full  (ch_full[c]),
      .rclk  (clk),
      .rd_en (ch_rd_en[c]),
      .dout  (ch_q[c]),
      .empty (ch_empty[c])
    );
    assign ch_dout[c] = $signed(ch_q[c]);
  end

  // ---------------- beamformer, BRAM, correlator ----------------
  rx_beamformer #(.CAPTURE_LEN(CAPTURE_LEN)) u_rx_beamformer (
    .clk        (clk),
    .rst        (rst_sys),
    .wb_i       (rxbf_req),
    .wb_o       (rxbf_rsp),
    .fifo_empty (ch_empty),
    .fifo_rd_en (ch_rd_en),
    .fifo_dout  (ch_dout),
    .bram_req   (rxbf_bram_req),
    .bram_dout  (bram_dout)
  );

  bram_arbiter u_bram_arbiter (
    .port_sel (bram_sel),
    .ctrl_req (ctrl_bram_req),
    .rxbf_req (rxbf_bram_req),
    .corr_req (corr_bram_req),
    .bram_req (bram_req)
  );

  rx_bram u_rx_bram (
    .clk  (clk),
    .req  (bram_req),
    .dout (bram_dout)
  );

  correlator #(.CAPTURE_LEN(CAPTURE_LEN), .CORR_LEN(CORR_LEN)) u_correlator (
    .clk       (clk),
    .rst       (rst_sys),
    .wb_i      (corr_req),
    .wb_o      (corr_rsp),
    .bram_req  (corr_bram_req),
    .bram_dout (bram_dout)
  );

  // ---------------- Ethernet controller ----------------
  eth_ctrl u_eth_ctrl (
    .clk          (clk),
    .rst          (rst_sys),
    .wb_i         (eth_req),
    .wb_o         (eth_rsp),
    .rx_data      (ll_rx_data),
    .rx_sof_n     (ll_rx_sof_n),
    .rx_eof_n     (ll_rx_eof_n),
    .rx_src_rdy_n (ll_rx_src_rdy_n),
    .rx_dst_rdy_n (ll_rx_dst_rdy_n),
    .tx_data      (ll_tx_data),
    .tx_sof_n     (ll_tx_sof_n),
    .tx_eof_n     (ll_tx_eof_n),
    .tx_src_rdy_n (ll_tx_src_rdy_n),
    .tx_dst_rdy_n (ll_tx_dst_rdy_n)
  );

endmodule
