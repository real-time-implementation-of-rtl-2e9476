// tb_pcm1602_dac_ctrl: self-checking test of the PCM1602 DAC controller.
//
// Bursts of random 24-bit samples for the six channels are written at 100 MHz, the way
// the transmit pulse generator delivers them, while the serial side runs on a 5 MHz
// bit clock. The testbench decodes the serial port on its own: on every rising edge of
// BCK it shifts in DATA0..2, and it closes a 24-bit word at every LRCK change, LRCK high
// being the left (even) channel. The decoded frames must show zeros before any data,
// then the written sets in order with every channel in the same frame, then zeros
// again. A partial set (five channels written, the sixth not yet) must leave the output
// silent until the sixth channel arrives. LRCK must have a period of 96 bit clocks
// (52.08 kHz), BCK half the bit clock rate, and SCLK must be the 20 MHz clock. A
// watchdog ends the run if it stalls.
module tb_pcm1602_dac_ctrl;
  import radar_pkg::*;

  logic               clk = 1'b0, rst = 1'b1, bclk = 1'b0, clk_20m = 1'b0;
  logic [NCH-1:0]     wr_en = '0, full;
  logic signed [23:0] din [NCH];
  logic               lrck, bck, data0, data1, data2, sclk;
  int                 checks = 0, failures = 0;

  pcm1602_dac_ctrl dut (.*);

  always #5   clk = ~clk;
  always #100 bclk = ~bclk;
  always #25  clk_20m = ~clk_20m;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    #20_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- serial decoder ----------------
  logic [23:0] sh [3];
  logic [23:0] frame [NCH];
  logic [23:0] frames [$][NCH];
  logic        lr_q = 1'b0;
  int          nbits = 0, bclk_n = 0, last_lr_rise = -1, bck_rises = 0;

  always @(posedge bclk) bclk_n++;

  always @(posedge bck) begin
    bck_rises++;
    if (lrck != lr_q) begin
      // word boundary: store the finished half frame
      if (nbits == 24) begin
        if (lr_q) begin                  // left half finished
          frame[0] = sh[0]; frame[2] = sh[1]; frame[4] = sh[2];
        end else begin
          frame[1] = sh[0]; frame[3] = sh[1]; frame[5] = sh[2];
          frames.push_back(frame);
        end
      end
      if (lrck) begin
        if (last_lr_rise >= 0) check(bclk_n - last_lr_rise == 96, $sformatf("LRCK period %0d", bclk_n - last_lr_rise));
        last_lr_rise = bclk_n;
      end
      nbits = 0;
      lr_q  = lrck;
    end
    sh[0] = {sh[0][22:0], data0};
    sh[1] = {sh[1][22:0], data1};
    sh[2] = {sh[2][22:0], data2};
    nbits++;
  end

  always @(posedge clk_20m) #1 check(sclk == clk_20m, "SCLK is the 20 MHz clock");

  // ---------------- stimulus ----------------
  logic [23:0] sent [$][NCH];

  task automatic burst(input int n);
    logic [23:0] s [NCH];
    for (int i = 0; i < n; i++) begin
      @(negedge clk);
      for (int c = 0; c < NCH; c++) begin
        s[c]   = 24'($urandom) | 24'h1;
        din[c] = s[c];
      end
      wr_en = '1;
      sent.push_back(s);
    end
    @(negedge clk);
    wr_en = '0;
  endtask

  function automatic bit is_zero(logic [23:0] f [NCH]);
    for (int c = 0; c < NCH; c++) if (f[c] != 0) return 0;
    return 1;
  endfunction

  initial begin
    int i, nz, partial_at;
    logic [23:0] s5 [NCH];
    for (int c = 0; c < NCH; c++) din[c] = '0;
    #330 rst = 1'b0;
    #40_000;                                // a few silent frames
    burst(30);
    #800_000;                               // 30 frames at 19.2 us
    // partial set: channels 0..4 only
    @(negedge clk);
    for (int c = 0; c < NCH; c++) begin
      s5[c]  = 24'($urandom) | 24'h1;
      din[c] = s5[c];
    end
    wr_en = 6'b011111;
    @(negedge clk);
    wr_en = '0;
    partial_at = frames.size();
    #100_000;                               // five frames: must stay silent
    @(negedge clk);
    din[5] = s5[5];
    wr_en = 6'b100000;
    @(negedge clk);
    wr_en = '0;
    sent.push_back(s5);
    #100_000;
    // check the decoded frames
    i = 0;
    nz = 0;
    while (i < frames.size() && is_zero(frames[i])) i++;
    check(i >= 1, "silent frames before data");
    for (int k = 0; k < 30; k++) begin
      check(i + k < frames.size(), "enough frames");
      if (i + k < frames.size())
        for (int c = 0; c < NCH; c++)
          check(frames[i + k][c] == sent[k][c], $sformatf("frame %0d ch %0d: %h expected %h", k, c, frames[i + k][c], sent[k][c]));
    end
    for (int k = i + 30; k < frames.size(); k++)
      if (!is_zero(frames[k])) begin
        nz++;
        for (int c = 0; c < NCH; c++)
          check(frames[k][c] == s5[c], $sformatf("completed partial set ch %0d", c));
        check(k >= partial_at + 5, "partial set held back until complete");
      end
    check(nz == 1, $sformatf("completed partial set played once (%0d)", nz));
    check(bck_rises > 0 && (bclk_n / bck_rises) == 2, "BCK = bit clock / 2");
    $display("INFO: %0d frames decoded, data from frame %0d", frames.size(), i);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
