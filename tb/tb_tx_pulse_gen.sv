// tb_tx_pulse_gen: self-checking test of the transmit pulse generator.
//
// For a list of steer angles (both ends, 90 degrees, either side of it, and an
// out-of-range value that must act as 180) plus random ones, the testbench writes the
// angle over WishBone and records the output burst. Its own model gives the expected
// burst: the Gaussian-windowed 1417 Hz pulse with a 671 Hz 3 dB bandwidth, 104 samples
// at 2.5 MHz/48, scaled to 7/8 of the 24-bit range, and an element delay of
// round(0.12 m * |cos(angle)| / 346.13 m/s * fs) samples, applied from channel 5 for
// angles below 90 degrees and from channel 0 otherwise. Every sample must be within one
// LSB of the model (the model rounds separately), the burst must last 104 + 5*D clocks,
// and the first sample must follow the acknowledge by three clocks. A write during a
// burst must not restart it, and reading the register returns the stored angle. A
// watchdog ends the run if it stalls.
module tb_tx_pulse_gen;
  import radar_pkg::*;

  logic               clk = 1'b0, rst = 1'b1;
  wb_req_t            wb_i = '0;
  wb_rsp_t            wb_o;
  logic signed [23:0] dout [NCH];
  logic               dout_valid, busy;
  int                 checks = 0, failures = 0;

  tx_pulse_gen dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    #2_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // all monitoring samples just after the clock edge
  int cyc = 0;
  always @(posedge clk) #1 cyc++;

  int ack_cyc;
  task automatic wb_access(input logic we, input logic [7:0] adr, input logic [7:0] dat,
                           output logic [7:0] rdat);
    @(negedge clk);
    wb_i = '{cyc: 1'b1, stb: 1'b1, we: we, adr: adr, dat: dat};
    do begin
      @(posedge clk);
      #2;
    end while (!wb_o.ack);
    ack_cyc = cyc;
    rdat = wb_o.dat;
    @(posedge clk);                         // the master holds the cycle to the clock edge
    #1 wb_i = '0;
  endtask

  function automatic real model_pulse(int i);
    real fs, sig, t;
    fs  = 2.5e6 / 48.0;
    sig = $sqrt($ln(2.0) / 2.0) / (3.14159265358979 * 335.5);
    t   = (real'(i) - 51.5) / fs;
    return 7340032.0 * $cos(2.0 * 3.14159265358979 * 1417.0 * t) * $exp(-t * t / (2.0 * sig * sig));
  endfunction

  function automatic int model_delay(int angle);
    real v;
    v = 0.12 * $cos(3.14159265358979 * angle / 180.0) / 346.13 * (2.5e6 / 48.0);
    if (v < 0) v = -v;
    return int'($floor(v + 0.5));
  endfunction

  logic signed [23:0] got [NCH][$];
  int first_valid;
  always @(posedge clk) #2 if (dout_valid) begin
    if (got[0].size() == 0) first_valid = cyc;
    for (int k = 0; k < NCH; k++) got[k].push_back(dout[k]);
  end

  task automatic run_angle(input int angle_in);
    int angle, d, len, dk;
    logic [7:0] r;
    real e;
    angle = (angle_in > 180) ? 180 : angle_in;
    d     = model_delay(angle);
    len   = TX_PULSE_LEN + 5 * d;
    for (int k = 0; k < NCH; k++) got[k].delete();
    wb_access(1'b1, 8'h00, 8'(angle_in), r);
    wait (busy);
    // a second write during the burst is stored but must not restart it
    if (angle_in == 45) wb_access(1'b1, 8'h00, 8'd10, r);
    wait (!busy);
    repeat (4) @(posedge clk);
    check(got[0].size() == len, $sformatf("angle %0d: burst %0d clocks, expected %0d", angle_in, got[0].size(), len));
    if (angle_in != 45) check(first_valid - ack_cyc == 3, $sformatf("first sample %0d clocks after ack", first_valid - ack_cyc));
    for (int k = 0; k < NCH; k++) begin
      dk = (angle < 90) ? (NCH - 1 - k) * d : k * d;
      for (int t = 0; t < got[k].size(); t++) begin
        e = (t >= dk && t - dk < TX_PULSE_LEN) ? model_pulse(t - dk) : 0.0;
        check(real'(got[k][t]) - e <= 1.0 && e - real'(got[k][t]) <= 1.0,
              $sformatf("angle %0d ch %0d t %0d: %0d expected %f", angle_in, k, t, got[k][t], e));
      end
    end
    if (angle_in == 45) begin
      wb_access(1'b0, 8'h00, 8'h00, r);
      check(r == 8'd10, "stored angle reads back");
      @(posedge clk);
      check(!busy, "stored write did not start a burst");
    end
  endtask

  initial begin
    logic [7:0] r;
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    run_angle(90);
    run_angle(0);
    run_angle(180);
    run_angle(60);
    run_angle(120);
    run_angle(89);
    run_angle(45);
    run_angle(250);
    wb_access(1'b0, 8'h00, 8'h00, r);
    check(r == 8'd180, "out-of-range angle stored as 180");
    repeat (6) run_angle($urandom_range(0, 180));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
