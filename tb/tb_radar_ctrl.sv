// tb_radar_ctrl: self-checking test of the system controller against models of its four
// WishBone slaves and a real receive BRAM.
//
// The slave models acknowledge one clock after a request like the real blocks and log
// every access with its clock cycle. The Ethernet model hands out host packets byte by
// byte through its 0x41/0x40 registers and collects transmitted bytes; the beamformer
// and correlator models report done after a few status polls, and the correlator model
// returns a known peak. The test:
//  1. checks that the BRAM, filled with junk before reset, is cleared after reset;
//  2. sends register writes (short delays, 2 captures per angle, decimation 4,
//     calibrations, steer angle 60) and the "capture correlator out" command, then
//     checks the whole sequence: pulse trigger with the angle, the initial delay plus
//     silence time measured in clocks with the channel FIFOs held in reset, calibration
//     and steer writes to the beamformer with the FIFOs released, two captures, the
//     correlator started with decimation 4, its six result registers read, a data-feed
//     length of 4*(500+CAPTURE_LEN) bytes, every BRAM word sent most significant byte
//     first, the BRAM cleared afterwards, and the command returned to idle;
//  3. runs radar mode from 30 to 50 degrees in 10-degree steps, answering each 9-byte
//     result packet (angle, 32-bit index, 32-bit value) with an acknowledge packet, so
//     the angle must go 30, 40, 50 and wrap to 30, and then stops radar mode by writing
//     the idle command, after which no pulse may be triggered.
// Each mechanism (accumulated captures, decimation, mode switch, angle wrap, waiting for
// the acknowledge) is counted and must happen. A watchdog ends the run if it stalls.
module tb_radar_ctrl;
  import radar_pkg::*;
  localparam int CAPTURE_LEN = 20;
  localparam int CORR_LEN = RX_PULSE_LEN + CAPTURE_LEN;

  logic               clk = 1'b0, rst = 1'b1;
  wb_req_t            txpg_req, rxbf_req, corr_req, eth_req;
  wb_rsp_t            txpg_rsp = '0, rxbf_rsp = '0, corr_rsp = '0, eth_rsp = '0;
  bram_sel_e          bram_sel;
  bram_req_t          bram_req, mem_req;
  logic [BRAM_DW-1:0] bram_dout;
  logic               chfifo_rst;
  int                 checks = 0, failures = 0;

  radar_ctrl #(.CAPTURE_LEN(CAPTURE_LEN)) dut (.*);
  // the BRAM sees only the controller here; while another owner is selected it is idle
  assign mem_req = (bram_sel == BRAM_SEL_CTRL) ? bram_req : '0;
  rx_bram u_bram (.clk(clk), .req(mem_req), .dout(bram_dout));

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

  int cyc = 0;
  always @(posedge clk) cyc++;

  // ---------------- slave models ----------------
  typedef struct { int cyc; logic we; logic [7:0] adr; logic [7:0] dat; bit fifo_rst; } acc_t;
  acc_t txpg_log [$], rxbf_log [$], corr_log [$], eth_log [$];
  logic [7:0] rx_q [$];          // host packet bytes, bit 8 = last
  bit         rx_last [$];
  logic [7:0] tx_bytes [$];
  int         rxbf_polls = 0, corr_polls = 0;
  localparam logic [15:0] PEAK_IDX = 16'd777;
  localparam logic [31:0] PEAK_VAL = 32'h0012_3456;

  // the models ignore the bus while reset is asserted: the controller's outputs are not
  // defined before the first reset edge
  always @(posedge clk) if (rst) begin
    txpg_rsp <= '0;
    rxbf_rsp <= '0;
    corr_rsp <= '0;
    eth_rsp  <= '0;
  end else begin
    txpg_rsp.ack <= txpg_req.cyc && txpg_req.stb && !txpg_rsp.ack;
    rxbf_rsp.ack <= rxbf_req.cyc && rxbf_req.stb && !rxbf_rsp.ack;
    corr_rsp.ack <= corr_req.cyc && corr_req.stb && !corr_rsp.ack;
    eth_rsp.ack  <= eth_req.cyc  && eth_req.stb  && !eth_rsp.ack;
    if (txpg_req.cyc && txpg_req.stb && !txpg_rsp.ack)
      txpg_log.push_back('{cyc, txpg_req.we, txpg_req.adr, txpg_req.dat, chfifo_rst});
    if (rxbf_req.cyc && rxbf_req.stb && !rxbf_rsp.ack) begin
      rxbf_log.push_back('{cyc, rxbf_req.we, rxbf_req.adr, rxbf_req.dat, chfifo_rst});
      if (!rxbf_req.we && rxbf_req.adr == 8'h07) begin
        rxbf_polls++;
        rxbf_rsp.dat <= (rxbf_polls % 4 == 0) ? STATUS_DONE : STATUS_IDLE;
      end
    end
    if (corr_req.cyc && corr_req.stb && !corr_rsp.ack) begin
      corr_log.push_back('{cyc, corr_req.we, corr_req.adr, corr_req.dat, chfifo_rst});
      unique case (corr_req.adr)
        8'h01: begin
          corr_polls++;
          corr_rsp.dat <= (corr_polls % 3 == 0) ? STATUS_DONE : STATUS_IDLE;
        end
        8'h02: corr_rsp.dat <= PEAK_IDX[15:8];
        8'h03: corr_rsp.dat <= PEAK_IDX[7:0];
        8'h04: corr_rsp.dat <= PEAK_VAL[31:24];
        8'h05: corr_rsp.dat <= PEAK_VAL[23:16];
        8'h06: corr_rsp.dat <= PEAK_VAL[15:8];
        8'h07: corr_rsp.dat <= PEAK_VAL[7:0];
        default: corr_rsp.dat <= 8'h00;
      endcase
    end
    if (eth_req.cyc && eth_req.stb && !eth_rsp.ack) begin
      eth_log.push_back('{cyc, eth_req.we, eth_req.adr, eth_req.dat, chfifo_rst});
      if (eth_req.we && eth_req.adr == 8'h33) tx_bytes.push_back(eth_req.dat);
      if (!eth_req.we && eth_req.adr == 8'h41)
        eth_rsp.dat <= {6'd0, (rx_q.size() > 0) ? rx_last[0] : 1'b0, rx_q.size() > 0};
      if (!eth_req.we && eth_req.adr == 8'h40 && rx_q.size() > 0) begin
        eth_rsp.dat <= rx_q.pop_front();
        void'(rx_last.pop_front());
      end
    end
  end

  // bus rule: a slave request only while the controller holds cyc and stb
  always @(posedge clk) if (!rst) begin
    check(($countones({txpg_req.cyc, rxbf_req.cyc, corr_req.cyc, eth_req.cyc}) <= 1),
          "one slave addressed at a time");
  end

  task automatic host_write(input logic [7:0] adr, input logic [31:0] val, input int nbytes);
    rx_q.push_back(adr);
    rx_last.push_back(1'b0);
    for (int i = nbytes - 1; i >= 0; i--) begin
      rx_q.push_back(val[8*i +: 8]);
      rx_last.push_back(i == 0);
    end
  endtask

  function automatic int count_writes(acc_t l [$], logic [7:0] adr);
    int n = 0;
    foreach (l[i]) if (l[i].we && l[i].adr == adr) n++;
    return n;
  endfunction

  int n_accum = 0, n_dec = 0, n_mode = 0, n_wrap = 0, n_ackwait = 0;

  initial begin
    logic [BRAM_DW-1:0] words [CORR_LEN];
    int t_tx, t_cal, k, prev_angle;
    int angles [$];
    for (int a = 0; a < 2**BRAM_AW; a++) u_bram.mem[a] = {4'($urandom), 32'($urandom)};
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    // 1. initial clear
    repeat (2**BRAM_AW + 20) @(posedge clk);
    k = 0;
    for (int a = 0; a < 2**BRAM_AW; a++) if (u_bram.mem[a] != '0) k++;
    check(k == 0, $sformatf("BRAM cleared after reset (%0d words left)", k));
    check(chfifo_rst, "channel FIFOs held in reset while idle");
    check(txpg_log.size() == 0, "no pulse while idle");
    // 2. capture correlator out
    host_write(8'h06, 32'd100, 4);            // initial system delay
    host_write(8'h07, 32'd50, 4);             // silence time
    host_write(8'h08, 32'd2, 1);              // captures per angle
    host_write(8'h09, 32'd4, 1);              // decimation
    for (int c = 0; c < NCH; c++) host_write(8'h0A + 8'(c), 32'(c * 3 + 1), 1);
    host_write(8'h02, 32'd60, 1);             // steer angle
    // fill the BRAM while the controller works, before the data feed reads it
    for (int a = 0; a < CORR_LEN; a++) words[a] = {4'($urandom), 32'($urandom)};
    words[3] = 36'h7_0000_0000;               // saturates to 0x7fffffff
    words[4] = 36'h8_0000_0000;               // saturates to 0x80000000
    host_write(8'h00, 32'd2, 1);              // command: capture correlator out
    wait (txpg_log.size() == 1);
    for (int a = 0; a < CORR_LEN; a++) u_bram.mem[a] = words[a];
    wait (tx_bytes.size() == 4 * CORR_LEN);
    repeat (2**BRAM_AW + 100) @(posedge clk);
    check(txpg_log.size() == 2 && txpg_log[0].dat == 8'd60 && txpg_log[1].dat == 8'd60,
          "two pulses at 60 degrees");
    if (txpg_log.size() == 2) n_accum++;
    // timing of the first capture: pulse write, then delay + silence, then the beamformer
    t_tx = txpg_log[0].cyc;
    t_cal = rxbf_log[0].cyc;
    $display("INFO: pulse to beamformer start %0d clocks", t_cal - t_tx);
    check(t_cal - t_tx >= 152 && t_cal - t_tx <= 160, "initial delay + silence time");
    check(txpg_log[0].fifo_rst && txpg_log[1].fifo_rst, "FIFOs in reset when the pulse starts");
    for (int c = 0; c < NCH; c++)
      check(rxbf_log[c].we && rxbf_log[c].adr == 8'(c) && rxbf_log[c].dat == 8'(c * 3 + 1),
            $sformatf("calibration %0d written", c));
    check(rxbf_log[NCH].we && rxbf_log[NCH].adr == 8'h06 && rxbf_log[NCH].dat == 8'd60, "steer angle written");
    check(!rxbf_log[NCH].fifo_rst, "FIFOs released for the capture");
    check(count_writes(rxbf_log, 8'h06) == 2, "beamformer started twice");
    check(count_writes(corr_log, 8'h00) == 1 && corr_log[0].dat == 8'd4, "correlator started with D = 4");
    if (corr_log.size() > 0 && corr_log[0].dat == 8'd4) n_dec++;
    k = 0;
    foreach (corr_log[i]) if (!corr_log[i].we && corr_log[i].adr >= 8'h02) k++;
    check(k == 6, "six result registers read");
    check(count_writes(eth_log, 8'h30) >= 1 && count_writes(eth_log, 8'h32) >= 1, "Ethernet armed");
    foreach (eth_log[i]) begin
      if (eth_log[i].we && eth_log[i].adr == 8'h30) check(eth_log[i].dat == 8'((4 * CORR_LEN) >> 8), "length high");
      if (eth_log[i].we && eth_log[i].adr == 8'h31) check(eth_log[i].dat == 8'(4 * CORR_LEN), "length low");
    end
    for (int a = 0; a < CORR_LEN; a++) begin
      logic [31:0] w, e;
      w = {tx_bytes[4*a], tx_bytes[4*a+1], tx_bytes[4*a+2], tx_bytes[4*a+3]};
      e = ($signed(words[a]) > 36'sh07fffffff) ? 32'h7fffffff :
          ($signed(words[a]) < -36'sh080000000) ? 32'h80000000 : words[a][31:0];
      check(w == e, $sformatf("word %0d sent %h expected %h", a, w, e));
    end
    k = 0;
    for (int a = 0; a < 2**BRAM_AW; a++) if (u_bram.mem[a] != '0) k++;
    check(k == 0, "BRAM cleared after the data feed");
    check(dut.cmd_reg == 8'd0, "command back to idle");
    check(chfifo_rst, "FIFOs in reset after the capture");
    // 3. radar mode
    txpg_log.delete();
    tx_bytes.delete();
    host_write(8'h08, 32'd1, 1);
    host_write(8'h03, 32'd30, 1);
    host_write(8'h04, 32'd50, 1);
    host_write(8'h05, 32'd10, 1);
    host_write(8'h00, 32'd3, 1);
    n_mode++;
    for (int p = 0; p < 4; p++) begin
      wait (tx_bytes.size() == 9 * (p + 1));
      check(tx_bytes[9*p] == txpg_log[p].dat, "result packet carries the angle");
      check({tx_bytes[9*p+1], tx_bytes[9*p+2], tx_bytes[9*p+3], tx_bytes[9*p+4]} == 32'(PEAK_IDX), "peak index");
      check({tx_bytes[9*p+5], tx_bytes[9*p+6], tx_bytes[9*p+7], tx_bytes[9*p+8]} == PEAK_VAL, "peak value");
      repeat (2**BRAM_AW + 3000) @(posedge clk);
      check(txpg_log.size() == p + 1, "next angle waits for the acknowledge");
      n_ackwait++;
      if (p < 3) host_write(8'h01, 32'd1, 1);
      else host_write(8'h00, 32'd0, 1);      // stop radar mode
    end
    repeat (5000) @(posedge clk);
    foreach (txpg_log[i]) angles.push_back(int'(txpg_log[i].dat));
    $display("INFO: radar angles %p", angles);
    check(angles.size() == 4, "four pulses in radar mode, none after stop");
    if (angles.size() == 4) begin
      check(angles[0] == 30 && angles[1] == 40 && angles[2] == 50 && angles[3] == 30, "angle sequence with wrap");
      if (angles[3] == 30) n_wrap++;
    end
    foreach (eth_log[i]) if (eth_log[i].we && eth_log[i].adr == 8'h31 && eth_log[i].cyc > t_cal + 10000)
      check(eth_log[i].dat == 8'd9 || eth_log[i].dat == 8'(4 * CORR_LEN), "radar packet length");
    $display("INFO: accumulate %0d, decimation %0d, mode switch %0d, wrap %0d, ack wait %0d",
             n_accum, n_dec, n_mode, n_wrap, n_ackwait);
    check(n_accum > 0 && n_dec > 0 && n_mode > 0 && n_wrap > 0 && n_ackwait > 0, "all mechanisms seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
