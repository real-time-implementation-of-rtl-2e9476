// tb_ads8364_adc_ctrl: self-checking test of the ADS8364 controller against a model of
// the chip.
//
// The controller runs on a 5 MHz clock and drives the chip model. Before every
// conversion start the testbench puts six new random codes on the model's analog
// inputs and keeps its own copy of them per conversion. Each write-enable pulse of the
// controller must carry, on that channel, the code of the oldest conversion not yet
// read on it. The sample rate is checked too: HOLD must fall every 20 clocks
// (250 kSPS), each conversion must produce exactly one word per channel, and channel
// 0 of consecutive conversions must come out 20 clocks apart. The static pins (cycle-
// mode address, ADD, BYTE, WR_N) are checked once. A watchdog ends the run if it stalls.
module tb_ads8364_adc_ctrl;
  import radar_pkg::*;

  logic               clk = 1'b0, rst = 1'b1;
  logic               adc_clk, reset_n, hold_a_n, hold_b_n, hold_c_n, add, byte_sel;
  logic               rd_n, wr_n, cs_n, fdata, eoc_n;
  logic [2:0]         address;
  logic [15:0]        data;
  logic [NCH-1:0]     we;
  logic signed [15:0] data_x [NCH];
  logic signed [15:0] ain [6];
  int                 conversions;
  int                 checks = 0, failures = 0;

  ads8364_adc_ctrl dut (.*);
  ads8364_model chip (.clk(adc_clk), .*);

  always #100 clk = ~clk;                   // 5 MHz

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    #5_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic signed [15:0] expq [NCH][$];
  int  cyc = 0, last_hold = -1, last_we0 = -1, holds = 0;
  int  words [NCH] = '{0, 0, 0, 0, 0, 0};

  // new analog values each clock; the model samples them at the HOLD edge
  always @(negedge clk) for (int c = 0; c < 6; c++) ain[c] = 16'($urandom);

  always @(posedge clk) if (!rst) begin
    cyc++;
    // conversion start as the model sees it: record the sampled values
    if (chip.hold_q && !hold_a_n) begin
      for (int c = 0; c < NCH; c++) expq[c].push_back(ain[c]);
      if (last_hold >= 0) check(cyc - last_hold == 20, $sformatf("HOLD period %0d", cyc - last_hold));
      last_hold = cyc;
      holds++;
    end
    for (int c = 0; c < NCH; c++) if (we[c]) begin
      words[c]++;
      check(expq[c].size() > 0, "word without conversion");
      if (expq[c].size() > 0) begin
        logic signed [15:0] e;
        e = expq[c].pop_front();
        check(data_x[c] == e, $sformatf("ch %0d got %h expected %h", c, data_x[c], e));
      end
      if (c == 0) begin
        if (last_we0 >= 0) check(cyc - last_we0 == 20, $sformatf("output period %0d", cyc - last_we0));
        last_we0 = cyc;
      end
    end
  end

  initial begin
    for (int c = 0; c < 6; c++) ain[c] = '0;
    repeat (4) @(posedge clk);
    #1 rst = 1'b0;
    check(address == 3'b110 && !add && !byte_sel && wr_n, "static pins");
    check(hold_a_n == hold_b_n && hold_b_n == hold_c_n, "HOLD pins together");
    repeat (2000) @(posedge clk);
    #1;
    $display("INFO: %0d conversions started, %0d finished, %0d words on ch0", holds, conversions, words[0]);
    check(holds >= 99, "conversion rate 250 kSPS");
    for (int c = 0; c < NCH; c++)
      check(words[c] >= conversions - 1 && words[c] <= conversions, $sformatf("ch %0d words %0d", c, words[c]));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
