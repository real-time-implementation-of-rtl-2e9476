// tb_correlator: self-checking test of the correlator with a real receive BRAM.
//
// The BRAM is loaded with a noisy copy of the radar pulse (the echo) starting at
// address 300, inside a correlation range of 500 + CAPTURE_LEN words, then the
// correlator is run with decimation factors 1, 4 and 16 (the BRAM reloaded each time).
// The testbench computes its own pulse table (1417 Hz carrier, 671 Hz 3 dB bandwidth
// Gaussian window, 500 samples at 250 kSPS, Q1.15) and its own result: for every n that
// is a multiple of D, y[n] = (sum over k = 0, D, 2D, .. < 500 of h[k] x[n+k]) >> 15,
// saturated to 36 bits, and 0 at the other addresses. Every BRAM word of the range must
// match afterwards, the max registers must hold the largest y and its first address
// (near 300 for D = 1), and the status must read done. The run time is checked against
// one product per clock: about (500+CAPTURE_LEN) * 500 / D^2 clocks. A watchdog ends the
// run if it stalls.
module tb_correlator;
  import radar_pkg::*;
  localparam int CAPTURE_LEN = 300;
  localparam int CORR_LEN = RX_PULSE_LEN + CAPTURE_LEN;
  localparam int ECHO = 300;

  logic               clk = 1'b0, rst = 1'b1;
  wb_req_t            wb_i = '0;
  wb_rsp_t            wb_o;
  bram_req_t          bram_req;
  logic [BRAM_DW-1:0] bram_dout;
  int                 checks = 0, failures = 0;

  correlator #(.CAPTURE_LEN(CAPTURE_LEN)) dut (.*);
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
    #20_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
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
    @(posedge clk);
    #1 wb_i = '0;
  endtask

  longint h [RX_PULSE_LEN];
  longint x [2**BRAM_AW];

  function automatic longint sat36(longint v);
    if (v > 64'sh7ffffffff) return 64'sh7ffffffff;
    if (v < -64'sh800000000) return -64'sh800000000;
    return v;
  endfunction

  task automatic run(input int d);
    logic [7:0] r;
    longint y, ymax, acc, got;
    int imax, t0, t1, est;
    logic [15:0] idx;
    logic [31:0] val;
    for (int a = 0; a < 2**BRAM_AW; a++) u_bram.mem[a] = BRAM_DW'(x[a]);
    wb_access(1'b1, 8'h00, 8'(d), r);
    t0 = $time / 10;
    do wb_access(1'b0, 8'h01, 8'h00, r); while (r != STATUS_DONE);
    t1 = $time / 10;
    est = CORR_LEN / d * ((RX_PULSE_LEN + d - 1) / d);
    $display("INFO: D=%0d took %0d clocks, %0d products", d, t1 - t0, est);
    check(t1 - t0 >= est && t1 - t0 <= est + CORR_LEN / d * 6 + 2 * CORR_LEN + 50,
          $sformatf("D=%0d run time %0d clocks", d, t1 - t0));
    ymax = 0;
    imax = -1;
    for (int n = 0; n < CORR_LEN; n++) begin
      if (n % d == 0) begin
        acc = 0;
        for (int k = 0; k < RX_PULSE_LEN; k += d) acc += h[k] * x[n + k];
        y = sat36(acc >>> 15);
      end else y = 0;
      if (imax < 0 || y > ymax) begin
        ymax = y;
        imax = n;
      end
      got = longint'($signed(u_bram.mem[n]));
      check(got == y, $sformatf("D=%0d y[%0d] = %0d expected %0d", d, n, got, y));
    end
    wb_access(1'b0, 8'h02, 8'h00, r); idx[15:8] = r;
    wb_access(1'b0, 8'h03, 8'h00, r); idx[7:0]  = r;
    wb_access(1'b0, 8'h04, 8'h00, r); val[31:24] = r;
    wb_access(1'b0, 8'h05, 8'h00, r); val[23:16] = r;
    wb_access(1'b0, 8'h06, 8'h00, r); val[15:8]  = r;
    wb_access(1'b0, 8'h07, 8'h00, r); val[7:0]   = r;
    $display("INFO: D=%0d peak %0d at %0d (expected %0d at %0d)", d, $signed(val), idx, ymax, imax);
    check(idx == 16'(imax), "max index");
    check($signed(val) == 32'(ymax), "max value");
    if (d == 1) check(imax >= ECHO - 2 && imax <= ECHO + 2, "peak at the echo delay");
    wb_access(1'b0, 8'h00, 8'h00, r);
    check(r == 8'(d), "decimation register reads back");
  endtask

  initial begin
    real s, t;
    s = $sqrt($ln(2.0) / 2.0) / (3.14159265358979 * 335.5);
    for (int i = 0; i < RX_PULSE_LEN; i++) begin
      t = (i - 249.5) / 250000.0;
      h[i] = longint'($floor(32767.0 * $cos(2.0 * 3.14159265358979 * 1417.0 * t) *
                                 $exp(-t * t / (2.0 * s * s)) + 0.5));
    end
    for (int a = 0; a < 2**BRAM_AW; a++) x[a] = 0;
    for (int a = 0; a < CORR_LEN; a++) begin
      x[a] = longint'($urandom_range(0, 4000)) - 2000;
      if (a >= ECHO && a < ECHO + RX_PULSE_LEN) x[a] += h[a - ECHO] * 3;
    end
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    run(1);
    run(4);
    run(16);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
