// tb_fir6_lpf: self-checking test of the six-channel shared FIR filter.
//
// First the coefficients are checked against the filter specification: symmetric, a
// DC gain of one (they sum to 2^17 within rounding), and the response of a 33-tap
// Hamming-windowed sinc with a normalised cutoff of 0.016 at 250 kSPS, evaluated here
// by a DFT of the taps: -0.45 dB at 2 kHz, -12.5 dB at 10 kHz and below -40 dB from
// 20 kHz up (reference values worked out separately in double precision). A filter
// this short cannot make a sharp 2 kHz edge; its -3 dB point lies near 5 kHz.
//
// Then six independent random streams, including a full-scale step, are fed the way
// the ADC controller delivers them: one word per channel on consecutive even clocks, a
// new set every 20 clocks. A direct-form reference filter per channel in the testbench
// computes each output, rounded and saturated like the hardware (round half up after
// the 17-bit shift). Each channel's pipeline delay is found from the first outputs that
// match; it must be 6 or 7 sample sets (40 channel slots, so it depends on the
// channel's place in the set), and every later output must match exactly. A watchdog
// ends the run if it stalls. The six outputs of a set must be valid on the same clock.
module tb_fir6_lpf;
  import radar_pkg::*;

  logic               clk = 1'b0, rst = 1'b1;
  logic signed [15:0] din [NCH];
  logic [NCH-1:0]     din_valid = '0, dout_valid;
  logic signed [15:0] dout [NCH];
  int                 checks = 0, failures = 0;

  fir6_lpf dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    #10_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam int NSETS = 400;
  logic signed [15:0] x [NCH][NSETS];
  logic signed [15:0] y [NCH][NSETS];
  logic signed [17:0] h [FIR_TAPS];

  function automatic real gain_db(real f);
    real re = 0.0, im = 0.0;
    for (int k = 0; k < FIR_TAPS; k++) begin
      re += real'(h[k]) / 131072.0 * $cos(2.0 * PI * f / 250000.0 * k);
      im -= real'(h[k]) / 131072.0 * $sin(2.0 * PI * f / 250000.0 * k);
    end
    return 10.0 * $log10(re * re + im * im);
  endfunction

  int outs [NCH][$];
  int lag [NCH];

  always @(posedge clk) if (!rst) begin
    if (dout_valid != '0) check(dout_valid == '1, "all six outputs valid together");
    for (int c = 0; c < NCH; c++) if (dout_valid[c]) outs[c].push_back(int'(dout[c]));
  end

  initial begin
    int sum;
    longint acc;
    for (int k = 0; k < FIR_TAPS; k++) h[k] = dut.COEF[k];
    sum = 0;
    for (int k = 0; k < FIR_TAPS; k++) begin
      sum += h[k];
      check(h[k] == h[FIR_TAPS - 1 - k], "symmetric coefficients");
    end
    check(sum > 131072 - 20 && sum < 131072 + 20, $sformatf("DC gain sum %0d", sum));
    $display("INFO: gain at 2 kHz %f dB, at 10 kHz %f dB", gain_db(2000.0), gain_db(10000.0));
    check(gain_db(200.0) > -0.02, "pass band at 200 Hz");
    check(gain_db(2000.0) > -0.55 && gain_db(2000.0) < -0.35, "-0.45 dB at 2 kHz");
    check(gain_db(10000.0) > -12.8 && gain_db(10000.0) < -12.2, "-12.5 dB at 10 kHz");
    for (int f = 20000; f <= 125000; f += 5000)
      check(gain_db(real'(f)) < -40.0, $sformatf("stop band at %0d Hz", f));
    // stimulus and reference
    for (int c = 0; c < NCH; c++)
      for (int n = 0; n < NSETS; n++) begin
        x[c][n] = (n < 100) ? 16'(int'($urandom_range(0, 40000)) - 20000)
                            : 16'(int'($urandom_range(0, 65535)) - 32768);
        if (n >= 200 && n < 260) x[c][n] = 16'sh7fff;     // full-scale step
      end
    for (int c = 0; c < NCH; c++)
      for (int n = 0; n < NSETS; n++) begin
        acc = 0;
        for (int k = 0; k < FIR_TAPS; k++)
          if (n - k >= 0) acc += longint'(h[k]) * longint'(x[c][n-k]);
        acc = (acc + 65536) >>> 17;
        y[c][n] = (acc > 32767) ? 16'sh7fff : (acc < -32768) ? 16'sh8000 : 16'(acc);
      end
    for (int c = 0; c < NCH; c++) din[c] = '0;
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    for (int n = 0; n < NSETS; n++) begin
      for (int c = 0; c < NCH; c++) begin
        @(negedge clk);
        din[c] = x[c][n];
        din_valid = NCH'(1) << c;
        @(negedge clk);
        din_valid = '0;
      end
      repeat (20 - 2 * NCH) @(negedge clk);
    end
    repeat (100) @(negedge clk);
    // alignment: output i of a channel is y[i - lag]
    for (int c = 0; c < NCH; c++) begin
      lag[c] = -1;
      for (int l = 0; l <= 8 && lag[c] < 0; l++) begin
        bit ok;
        ok = 1;
        for (int i = l; i < l + 60 && i < outs[c].size(); i++)
          if (outs[c][i] != int'(y[c][i - l])) ok = 0;
        if (ok) lag[c] = l;
      end
      check(lag[c] >= 0, $sformatf("channel %0d output matches reference", c));
      check(lag[c] >= 6 && lag[c] <= 7, $sformatf("channel %0d delay %0d sets", c, lag[c]));
      check(outs[c].size() >= NSETS - 1, $sformatf("channel %0d produced %0d outputs", c, outs[c].size()));
    end
    $display("INFO: pipeline delay %0d..%0d sample sets", lag[0], lag[NCH-1]);
    for (int c = 0; c < NCH; c++)
      if (lag[c] >= 0)
        for (int i = lag[c]; i < outs[c].size() && i - lag[c] < NSETS; i++)
          check(outs[c][i] == int'(y[c][i - lag[c]]),
                $sformatf("ch %0d out %0d: %0d expected %0d", c, i, outs[c][i], y[c][i - lag[c]]));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
