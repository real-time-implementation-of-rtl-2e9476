// Shared body of the end-to-end testbenches of acoustic_radar_top (included by
// tb_acoustic_radar_top, tb_acoustic_radar_top_full and tb_radar_workloads, which declare
// CAPTURE_LEN, FULL, WORKLOADS and the instance of the design). With WORKLOADS set, the
// two measured scenarios run instead of the mode tour below: a target at 3.5 m in front
// of the array (90 degrees) and one at 2 m, 60 degrees, scanned from 60 to 90 degrees.
//
// A host model talks UDP to the design over the LocalLink streams, an ADS8364 model
// feeds it an echo, and the DAC serial port is watched. The echo comes from a target at
// 60 degrees: channel c hears the pulse c*D + cal[c] samples after channel 0, with
// D = round(0.12 m * cos 60 / 346.13 m/s * 250 kHz) = 43 and an extra 2-sample lag on
// channel 3 that its calibration register removes. The echo starts ECHO_AT samples after
// the channel FIFOs leave reset. The pulse is the testbench's own Gaussian-windowed
// 1417 Hz pulse (671 Hz 3 dB bandwidth) scaled to AMP, plus a little noise.

  localparam int CORR_LEN = RX_PULSE_LEN + CAPTURE_LEN;
  localparam int ECHO_AT  = 200;
  localparam int AMP      = 3000;
  localparam int TGT_D    = 43;
  localparam logic [47:0] FPGA_MAC = 48'h000A35000001;
  localparam logic [31:0] FPGA_IP  = 32'hC0A8010A;
  localparam logic [47:0] HOST_MAC = 48'h001122334455;
  localparam logic [31:0] HOST_IP  = 32'hC0A80101;

  logic        clk_100mhz_from_board = 1'b0, rst = 1'b1, pll_locked;
  logic        adc_clk, adc_reset_n, adc_hold_a_n, adc_hold_b_n, adc_hold_c_n;
  logic [2:0]  adc_address;
  logic        adc_add, adc_byte, adc_rd_n, adc_wr_n, adc_cs_n, adc_fdata, adc_eoc_n;
  logic [15:0] adc_data;
  logic        dac_lrck, dac_bck, dac_data0, dac_data1, dac_data2, dac_sclk;
  logic [7:0]  ll_rx_data = '0, ll_tx_data;
  logic        ll_rx_sof_n = 1'b1, ll_rx_eof_n = 1'b1, ll_rx_src_rdy_n = 1'b1, ll_rx_dst_rdy_n;
  logic        ll_tx_sof_n, ll_tx_eof_n, ll_tx_src_rdy_n, ll_tx_dst_rdy_n = 1'b0;
  int          checks = 0, failures = 0;

  always #5 clk_100mhz_from_board = ~clk_100mhz_from_board;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  // ---------------- ADC model and echo ----------------
  logic signed [15:0] ain [6];
  int                 conversions;
  ads8364_model chip (
    .clk (adc_clk), .reset_n (adc_reset_n), .hold_a_n (adc_hold_a_n), .hold_b_n (adc_hold_b_n),
    .hold_c_n (adc_hold_c_n), .address (adc_address), .add (adc_add), .byte_sel (adc_byte),
    .rd_n (adc_rd_n), .wr_n (adc_wr_n), .cs_n (adc_cs_n), .fdata (adc_fdata),
    .eoc_n (adc_eoc_n), .data (adc_data), .ain (ain), .conversions (conversions)
  );

  real pulse [RX_PULSE_LEN];
  int  cal_lag [NCH] = '{0, 0, 0, 2, 0, 0};
  int  m = -1;                    // ADC sample index since the FIFOs left reset
  int  echo_at = ECHO_AT;         // echo start and per-channel lag, changed by the workloads
  int  tgt_d = TGT_D;
  int  n_fifo_release = 0;
  logic fifo_rst_q = 1'b1;

  always @(negedge adc_clk) begin
    if (dut.chfifo_rst) m = -1;
    else if (!adc_hold_a_n) m++;
    for (int c = 0; c < NCH; c++) begin
      int i;
      i = m - echo_at - c * tgt_d - cal_lag[c];
      ain[c] = 16'((m >= 0 && i >= 0 && i < RX_PULSE_LEN) ? int'(AMP * pulse[i]) : 0)
               + 16'(int'($urandom_range(0, 60)) - 30);
    end
  end

  always @(posedge clk_100mhz_from_board) begin
    if (fifo_rst_q && !dut.chfifo_rst && !dut.rst_sys) n_fifo_release++;
    fifo_rst_q <= dut.chfifo_rst;
  end

  // ---------------- DAC serial port ----------------
  int dac_ones = 0;
  always @(posedge dac_bck) if (dac_data0 || dac_data1 || dac_data2) dac_ones++;

  // ---------------- host model ----------------
  typedef logic [7:0] bytes_t [$];

  function automatic bytes_t make_frame(logic [15:0] dport, bytes_t payload);
    bytes_t f;
    int ulen = payload.size() + 8;
    for (int i = 5; i >= 0; i--) f.push_back(FPGA_MAC[8*i +: 8]);
    for (int i = 5; i >= 0; i--) f.push_back(HOST_MAC[8*i +: 8]);
    f.push_back(8'h08); f.push_back(8'h00);
    f.push_back(8'h45); f.push_back(8'h00);
    f.push_back(8'((ulen + 20) >> 8)); f.push_back(8'(ulen + 20));
    f.push_back(8'h00); f.push_back(8'h01); f.push_back(8'h40); f.push_back(8'h00);
    f.push_back(8'h40); f.push_back(8'h11); f.push_back(8'h00); f.push_back(8'h00);
    for (int i = 3; i >= 0; i--) f.push_back(HOST_IP[8*i +: 8]);
    for (int i = 3; i >= 0; i--) f.push_back(FPGA_IP[8*i +: 8]);
    f.push_back(8'h13); f.push_back(8'h88);
    f.push_back(dport[15:8]); f.push_back(dport[7:0]);
    f.push_back(8'(ulen >> 8)); f.push_back(8'(ulen));
    f.push_back(8'h00); f.push_back(8'h00);
    foreach (payload[i]) f.push_back(payload[i]);
    while (f.size() < 60) f.push_back(8'h00);
    return f;
  endfunction

  task automatic send_frame(bytes_t f);
    foreach (f[i]) begin
      @(negedge clk_100mhz_from_board);
      ll_rx_src_rdy_n = 1'b0;
      ll_rx_data      = f[i];
      ll_rx_sof_n     = (i != 0);
      ll_rx_eof_n     = (i != f.size() - 1);
    end
    @(negedge clk_100mhz_from_board);
    ll_rx_src_rdy_n = 1'b1;
    ll_rx_sof_n     = 1'b1;
    ll_rx_eof_n     = 1'b1;
  endtask

  task automatic host_write(input logic [7:0] adr, input logic [31:0] val, input int nbytes);
    bytes_t p;
    p.push_back(adr);
    for (int i = nbytes - 1; i >= 0; i--) p.push_back(val[8*i +: 8]);
    send_frame(make_frame(16'd5000, p));
    repeat (200) @(posedge clk_100mhz_from_board);
  endtask

  // received UDP payloads, one entry per frame
  bytes_t rx_payloads [$];
  bytes_t cur;
  int     n_pad = 0;
  always @(negedge clk_100mhz_from_board) ll_tx_dst_rdy_n = ($urandom_range(0, 7) == 0);
  always @(posedge clk_100mhz_from_board) if (!ll_tx_src_rdy_n && !ll_tx_dst_rdy_n) begin
    if (!ll_tx_sof_n) cur.delete();
    cur.push_back(ll_tx_data);
    if (!ll_tx_eof_n) begin
      bytes_t p;
      int ulen;
      p.delete();
      ulen = {cur[38], cur[39]};
      for (int i = 42; i < 34 + ulen && i < cur.size(); i++) p.push_back(cur[i]);
      rx_payloads.push_back(p);
    end
  end

  // collect nbytes of payload from whole frames
  task automatic collect(input int nbytes, output bytes_t data, output int nframes);
    data.delete();
    nframes = 0;
    while (data.size() < nbytes) begin
      wait (rx_payloads.size() > 0);
      foreach (rx_payloads[0][i]) data.push_back(rx_payloads[0][i]);
      void'(rx_payloads.pop_front());
      nframes++;
    end
  endtask

  function automatic int word_at(bytes_t d, int a);
    return int'({d[4*a], d[4*a+1], d[4*a+2], d[4*a+3]});
  endfunction

  // ---------------- correlator reference ----------------
  longint snap [CORR_LEN + RX_PULSE_LEN];
  bit     snapped = 0;
  always @(posedge dut.clk) if (dut.u_correlator.trigger && !snapped) begin
    for (int a = 0; a < CORR_LEN + RX_PULSE_LEN; a++)
      snap[a] = (a < 2**BRAM_AW) ? longint'($signed(dut.u_rx_bram.mem[a])) : 0;
    snapped = 1;
  end

  function automatic longint corr_ref(int n, int d);
    longint acc = 0, y;
    for (int k = 0; k < RX_PULSE_LEN; k += d)
      acc += longint'($rtoi($floor(32767.0 * pulse[k] + 0.5))) * snap[n + k];
    y = acc >>> 15;
    if (y > 64'sh7fffffff) y = 64'sh7fffffff;
    if (y < -64'sh80000000) y = -64'sh80000000;
    return y;
  endfunction

  int n_accum = 0, n_dec = 0, n_mode = 0, n_frag = 0, n_wrap = 0;

  // ---------------- measured scenarios ----------------
  // A target at range_m metres and angle degrees. Acoustic time zero is taken as the end
  // of the initial system delay (the transmit-to-capture latency it stands for), and the
  // FIFOs open after the silence time, so the echo starts (2 R / c - silence) after the
  // release. Radar mode is run over the angles start..end; the reported index is turned
  // back into a range with the same relation.
  task automatic radar_scan(input int tgt_angle, input real range_m, input int a0, input int a1,
                            input int step, output int vals [$]);
    bytes_t d;
    int nf, idx, val, lo, hi, nang;
    real r, v;
    echo_at = int'((2.0 * range_m / 346.13 - 0.002) * 250000.0);
    v = 0.12 * $cos(3.14159265358979 * tgt_angle / 180.0) / 346.13 * 250000.0;
    tgt_d = int'($floor(v + 0.5));
    nang = (a1 - a0) / step + 1;
    host_write(8'h03, 32'(a0), 1);
    host_write(8'h04, 32'(a1), 1);
    host_write(8'h05, 32'(step), 1);
    host_write(8'h00, 32'd3, 1);
    n_mode++;
    vals.delete();
    for (int p = 0; p < nang; p++) begin
      collect(9, d, nf);
      idx = int'({d[1], d[2], d[3], d[4]});
      val = int'({d[5], d[6], d[7], d[8]});
      vals.push_back(val);
      check(d[0] == 8'(a0 + p * step), $sformatf("radar angle %0d", a0 + p * step));
      if (a0 + p * step == tgt_angle) begin
        lo = RX_PULSE_LEN - 1 + echo_at + 16 - 4;
        hi = RX_PULSE_LEN - 1 + echo_at + 16 + 12;
        r  = ((real'(idx) - real'(RX_PULSE_LEN - 1) - 19.0) / 250000.0 + 0.002) * 346.13 / 2.0;
        $display("INFO: target %0.2f m at %0d deg: peak index %0d (expected %0d..%0d), value %0d, range %0.3f m",
                 range_m, tgt_angle, idx, lo, hi, val, r);
        check(idx >= lo && idx <= hi, "echo index");
        check(r > range_m - 0.02 && r < range_m + 0.02, "range from the echo index");
        check(val > 1_000_000, "correlation peak of six aligned channels");
      end else
        $display("INFO: look angle %0d: index %0d value %0d", a0 + p * step, idx, val);
      if (p < nang - 1) host_write(8'h01, 32'd1, 1);
      else host_write(8'h00, 32'd0, 1);
    end
    repeat (2**BRAM_AW + 20000) @(posedge clk_100mhz_from_board);
  endtask

  task automatic run_workloads();
    int vals [$];
    host_write(8'h0D, 32'd2, 1);             // channel 3 calibration
    host_write(8'h09, 32'd1, 1);             // no decimation
    radar_scan(90, 3.5, 90, 90, 10, vals);
    radar_scan(60, 2.0, 60, 90, 30, vals);
    if (vals.size() == 2) begin
      check(vals[0] > vals[1] + vals[1] / 5, "beam towards the target gives the larger peak");
      if (vals[0] > vals[1]) n_wrap++;
    end
    check(rx_payloads.size() == 0, "no packet after radar mode stopped");
    check(n_mode == 2, "both scenarios run");
  endtask

  initial begin : main
    bytes_t d;
    int nf, peak, pidx, expect_at, v60, v70, dec;
    real sig, t;
    sig = $sqrt($ln(2.0) / 2.0) / (3.14159265358979 * 335.5);
    for (int i = 0; i < RX_PULSE_LEN; i++) begin
      t = (i - 249.5) / 250000.0;
      pulse[i] = $cos(2.0 * 3.14159265358979 * 1417.0 * t) * $exp(-t * t / (2.0 * sig * sig));
    end
    #100 rst = 1'b0;
    wait (pll_locked);
    repeat (2**BRAM_AW + 200) @(posedge clk_100mhz_from_board);
    n_fifo_release = 0;                     // count from the first command on
    if (WORKLOADS) begin
      run_workloads();
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
    // echo peak in the beam: ECHO_AT + pulse centre, plus the filter's 16-sample group
    // delay, behind the 499 leading zeros; the pipeline adds a few samples
    expect_at = RX_PULSE_LEN - 1 + ECHO_AT + 250 + 16;
    dec = FULL ? 1 : 16;

    if (!FULL) begin
      host_write(8'h06, 32'd2000, 4);        // initial system delay
      host_write(8'h07, 32'd1000, 4);        // silence time
      host_write(8'h08, 32'd2, 1);           // captures per angle
      // a frame for another port must be ignored
      send_frame(make_frame(16'd5001, '{8'h00, 8'h03}));
    end
    host_write(8'h09, 32'(dec), 1);
    host_write(8'h0D, 32'd2, 1);             // channel 3 calibration
    host_write(8'h02, 32'd60, 1);            // steer angle

    if (!FULL) begin
      // ---- capture beamformer out, two captures summed ----
      host_write(8'h00, 32'd1, 1);
      n_mode++;
      collect(4 * CORR_LEN, d, nf);
      if (nf > 1) n_frag++;
      peak = 0;
      pidx = 0;
      for (int a = 0; a < CORR_LEN; a++) begin
        if (a < RX_PULSE_LEN - 1) check(word_at(d, a) == 0, "leading zeros in the beam");
        if (word_at(d, a) > peak) begin
          peak = word_at(d, a);
          pidx = a;
        end
      end
      $display("INFO: beam peak %0d at %0d (expected about %0d at %0d), %0d frames",
               peak, pidx, int'(2 * 6 * AMP * 0.98), expect_at, nf);
      check(pidx > expect_at - 6 && pidx < expect_at + 14, "beam peak position");
      check(peak > int'(2 * 6 * AMP * 0.85) && peak < int'(2 * 6 * AMP * 1.1),
            "beam amplitude of six aligned channels summed over two captures");
      if (peak > int'(2 * 6 * AMP * 0.85)) n_accum++;
      check(n_fifo_release == 2, $sformatf("two captures (%0d FIFO releases)", n_fifo_release));
      repeat (2**BRAM_AW + 500) @(posedge clk_100mhz_from_board);
    end

    // ---- capture correlator out ----
    snapped = 0;
    host_write(8'h00, 32'd2, 1);
    n_mode++;
    collect(4 * CORR_LEN, d, nf);
    if (nf > 1) n_frag++;
    check(snapped, "correlator started");
    peak = 0;
    pidx = 0;
    for (int a = 0; a < CORR_LEN; a++) begin
      longint e;
      e = (a % dec == 0) ? corr_ref(a, dec) : 0;
      check(longint'(word_at(d, a)) == e, $sformatf("correlation %0d: %0d expected %0d", a, word_at(d, a), e));
      if (word_at(d, a) > peak) begin
        peak = word_at(d, a);
        pidx = a;
      end
    end
    $display("INFO: correlation peak %0d at %0d (D = %0d)", peak, pidx, dec);
    check(pidx % dec == 0, "peak on a decimated output");
    check(pidx > RX_PULSE_LEN - 1 + ECHO_AT + 16 - dec - 4 && pidx < RX_PULSE_LEN - 1 + ECHO_AT + 16 + dec + 12,
          "correlation peak at the echo delay");
    if (dec > 1 && pidx % dec == 0) n_dec++;
    repeat (2**BRAM_AW + 500) @(posedge clk_100mhz_from_board);

    // ---- run radar ----
    host_write(8'h08, 32'd1, 1);
    host_write(8'h03, 32'd60, 1);
    host_write(8'h04, 32'd70, 1);
    host_write(8'h05, 32'd10, 1);
    host_write(8'h00, 32'd3, 1);
    n_mode++;
    for (int p = 0; p < (FULL ? 1 : 3); p++) begin
      int ang, val;
      collect(9, d, nf);
      if (d.size() == 18) begin
        n_pad++;
        for (int i = 9; i < 18; i++) check(d[i] == 8'h00, "zero padding");
      end
      ang = d[0];
      val = int'({d[5], d[6], d[7], d[8]});
      $display("INFO: radar packet angle %0d index %0d value %0d", ang, int'({d[1], d[2], d[3], d[4]}), val);
      check(ang == ((p == 1) ? 70 : 60), "radar angle sequence");
      if (p == 0) v60 = val;
      if (p == 1) v70 = val;
      if (p == 2 && ang == 60) n_wrap++;
      if (p < (FULL ? 0 : 2)) host_write(8'h01, 32'd1, 1);
      else host_write(8'h00, 32'd0, 1);
    end
    if (!FULL) check(v60 > v70 + v70 / 5, "beam towards the target gives the larger peak");
    repeat (2**BRAM_AW + 20000) @(posedge clk_100mhz_from_board);
    check(rx_payloads.size() == 0, "no packet after radar mode stopped");
    check(dac_ones > 0, "pulse played on the DAC");
    check(conversions > 1000, "ADC converting");
    $display("INFO: modes %0d, accumulation %0d, decimation %0d, fragmentation %0d, padding %0d, wrap %0d, FIFO releases %0d, DAC bits %0d",
             n_mode, n_accum, n_dec, n_frag, n_pad, n_wrap, n_fifo_release, dac_ones);
    check(n_mode >= (FULL ? 2 : 3), "mode switches");
    check(n_frag > 0, "fragmentation happened");
    check(n_pad > 0, "padding happened");
    check(n_fifo_release > 0, "FIFO reset released");
    if (!FULL) begin
      check(n_accum > 0, "accumulation happened");
      check(n_dec > 0, "decimation happened");
      check(n_wrap > 0, "angle wrap happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
