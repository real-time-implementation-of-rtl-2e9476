// tb_rx_beamformer: self-checking test of the receive beamformer with a real receive
// BRAM behind it.
//
// Six first-word-fall-through FIFOs are modelled by queues. Capture 1 (steer angle 60
// degrees, random calibration offsets) finds all its input already queued, so its run
// time is measured: three clocks per output sample after the samples are dropped.
// Capture 2 (120 degrees, different offsets) gets its input a set at a time, 25 clocks
// apart, so the beamformer must wait on empty FIFOs. The testbench's own model gives the
// number of samples dropped from channel c: cal[c] plus c*D below 90 degrees or (5-c)*D
// otherwise, with D = round(0.12 m * |cos(angle)| / 346.13 m/s * 250 kHz). After both
// captures, BRAM word 499+n must equal the sum over both captures of sum_c x_c[drop_c+n]
// (captures accumulate), the words below 499 and after the capture must still be zero,
// and each capture must have consumed exactly drop_c + CAPTURE_LEN samples per channel.
// Registers read back, and the status reads done only after each capture. A watchdog
// ends the run if it stalls.
module tb_rx_beamformer;
  import radar_pkg::*;
  localparam int CAPTURE_LEN = 200;
  localparam int LEAD = RX_PULSE_LEN - 1;
  localparam int NIN = 800;

  logic               clk = 1'b0, rst = 1'b1;
  wb_req_t            wb_i = '0;
  wb_rsp_t            wb_o;
  logic [NCH-1:0]     fifo_empty, fifo_rd_en;
  logic signed [15:0] fifo_dout [NCH];
  bram_req_t          bram_req;
  logic [BRAM_DW-1:0] bram_dout;
  int                 checks = 0, failures = 0;

  rx_beamformer #(.CAPTURE_LEN(CAPTURE_LEN)) dut (.*);
  rx_bram u_bram (.clk(clk), .req(bram_req), .dout(bram_dout));

  always #5 clk = ~clk;

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

  // ---------------- FIFO models ----------------
  logic signed [15:0] q [NCH][$];
  int popped [NCH];
  always_comb
    for (int c = 0; c < NCH; c++) begin
      fifo_empty[c] = (q[c].size() == 0);
      fifo_dout[c]  = (q[c].size() == 0) ? 16'sd0 : q[c][0];
    end
  always @(posedge clk)
    for (int c = 0; c < NCH; c++)
      if (fifo_rd_en[c]) begin
        if (q[c].size() == 0) begin
          failures++;
          $display("FAIL: read from empty FIFO %0d", c);
        end else begin
          void'(q[c].pop_front());
          popped[c]++;
        end
      end

  task automatic wb_access(input logic we, input logic [7:0] adr, input logic [7:0] dat,
                           output logic [7:0] rdat);
    @(negedge clk);
    wb_i = '{cyc: 1'b1, stb: 1'b1, we: we, adr: adr, dat: dat};
    do begin
      @(posedge clk);
      #2;
    end while (!wb_o.ack);
    rdat = wb_o.dat;
    @(posedge clk);                         // the master holds the cycle to the clock edge
    #1 wb_i = '0;
  endtask

  function automatic int model_delay(int angle);
    real v;
    v = 0.12 * $cos(3.14159265358979 * angle / 180.0) / 346.13 * 250000.0;
    if (v < 0) v = -v;
    return int'($floor(v + 0.5));
  endfunction

  logic signed [15:0] x [NCH][NIN];
  longint expected [CAPTURE_LEN];

  task automatic capture(input int angle, input bit stream);
    logic [7:0] r;
    int cal [NCH];
    int drop [NCH];
    int d, t0, t1;
    d = model_delay(angle);
    for (int c = 0; c < NCH; c++) begin
      cal[c] = $urandom_range(0, 40);
      drop[c] = cal[c] + ((angle < 90) ? c * d : (NCH - 1 - c) * d);
      wb_access(1'b1, 8'(c), 8'(cal[c]), r);
      popped[c] = 0;
      for (int i = 0; i < NIN; i++) x[c][i] = 16'($urandom_range(0, 65535));
    end
    for (int c = 0; c < NCH; c++) begin
      wb_access(1'b0, 8'(c), 8'h00, r);
      check(r == 8'(cal[c]), "calibration register reads back");
    end
    for (int n = 0; n < CAPTURE_LEN; n++)
      for (int c = 0; c < NCH; c++) expected[n] += longint'(x[c][drop[c] + n]);
    if (!stream)
      for (int c = 0; c < NCH; c++) for (int i = 0; i < NIN; i++) q[c].push_back(x[c][i]);
    wb_access(1'b1, 8'h06, 8'(angle), r);
    t0 = $time / 10;
    fork
      if (stream)
        for (int i = 0; i < NIN; i++) begin
          for (int c = 0; c < NCH; c++) q[c].push_back(x[c][i]);
          repeat (25) @(posedge clk);
        end
      begin
        do wb_access(1'b0, 8'h07, 8'h00, r); while (r != STATUS_DONE);
        t1 = $time / 10;
      end
    join_any
    wait fork;
    if (!stream) begin
      int maxdrop = 0;
      for (int c = 0; c < NCH; c++) if (drop[c] > maxdrop) maxdrop = drop[c];
      $display("INFO: capture of %0d samples took %0d clocks (drop up to %0d)", CAPTURE_LEN, t1 - t0, maxdrop);
      check(t1 - t0 <= 3 * CAPTURE_LEN + maxdrop + 30, "three clocks per sample");
    end
    for (int c = 0; c < NCH; c++)
      check(popped[c] == drop[c] + CAPTURE_LEN, $sformatf("ch %0d consumed %0d expected %0d", c, popped[c], drop[c] + CAPTURE_LEN));
    wb_access(1'b0, 8'h06, 8'h00, r);
    check(r == 8'(angle), "steer angle reads back");
    for (int c = 0; c < NCH; c++) q[c].delete();
  endtask

  initial begin
    logic [7:0] r;
    for (int a = 0; a < 2**BRAM_AW; a++) u_bram.mem[a] = '0;
    for (int n = 0; n < CAPTURE_LEN; n++) expected[n] = 0;
    for (int c = 0; c < NCH; c++) popped[c] = 0;
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    wb_access(1'b0, 8'h07, 8'h00, r);
    check(r == STATUS_IDLE, "idle after reset");
    capture(60, 1'b0);
    capture(120, 1'b1);
    for (int n = 0; n < CAPTURE_LEN; n++)
      check($signed(u_bram.mem[LEAD + n]) == BRAM_DW'(expected[n]),
            $sformatf("beam %0d: %0d expected %0d", n, $signed(u_bram.mem[LEAD + n]), expected[n]));
    for (int a = 0; a < LEAD; a++) check(u_bram.mem[a] == '0, "leading zeros untouched");
    for (int a = LEAD + CAPTURE_LEN; a < LEAD + CAPTURE_LEN + 50; a++)
      check(u_bram.mem[a] == '0, "words after the capture untouched");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
