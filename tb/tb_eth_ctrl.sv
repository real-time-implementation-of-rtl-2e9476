// tb_eth_ctrl: self-checking test of the UDP Ethernet controller.
//
// Receive: the testbench builds Ethernet/IPv4/UDP frames byte by byte and sends them on
// the LocalLink receive stream with random gaps (src_rdy_n high). Frames for the
// device's MAC, IP and port must deliver exactly their UDP payload, in order, with the
// last-byte flag on each packet's final byte; MAC padding after a short payload must be
// ignored. Frames with a wrong destination MAC, IP or port, or a TCP protocol number,
// must deliver nothing. The payload is read back over WishBone (0x41 status, 0x40 pop).
//
// Transmit: the master writes a length, the send instruction and the data bytes, while
// the MAC side accepts bytes with random back-pressure (dst_rdy_n). The monitor splits
// the stream into frames at sof/eof and checks every header byte against the testbench's
// own model (addresses, lengths, identification, TTL, protocol, and an IP header
// checksum it computes itself), and checks the payload. Three sizes are sent: 5 bytes
// (padded to 18), 100 bytes, and 3000 bytes (fragmented into 1472 + 1472 + 56). During
// the large send the MAC holds off for a while so the 256-byte transmit FIFO fills and
// the data register's acknowledge stalls. Each mechanism (padding, fragmentation,
// stall, dropped frame) is counted and must happen. A watchdog ends the run if it
// stalls.
module tb_eth_ctrl;
  import radar_pkg::*;

  localparam logic [47:0] FPGA_MAC = 48'h000A35000001;
  localparam logic [31:0] FPGA_IP  = 32'hC0A8010A;
  localparam logic [15:0] FPGA_PORT = 16'd5000;
  localparam logic [47:0] HOST_MAC = 48'h001122334455;
  localparam logic [31:0] HOST_IP  = 32'hC0A80101;
  localparam logic [15:0] HOST_PORT = 16'd5000;

  logic       clk = 1'b0, rst = 1'b1;
  wb_req_t    wb_i = '0;
  wb_rsp_t    wb_o;
  logic [7:0] rx_data = '0, tx_data;
  logic       rx_sof_n = 1'b1, rx_eof_n = 1'b1, rx_src_rdy_n = 1'b1, rx_dst_rdy_n;
  logic       tx_sof_n, tx_eof_n, tx_src_rdy_n, tx_dst_rdy_n = 1'b1;
  int         checks = 0, failures = 0;
  int         n_pad = 0, n_frag = 0, n_stall = 0, n_drop = 0;

  eth_ctrl dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    #50_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int stall_cycles;
  task automatic wb_access(input logic we, input logic [7:0] adr, input logic [7:0] dat,
                           output logic [7:0] rdat);
    int waited = 0;
    @(negedge clk);
    wb_i = '{cyc: 1'b1, stb: 1'b1, we: we, adr: adr, dat: dat};
    do begin
      @(posedge clk);
      #2;
      waited++;
    end while (!wb_o.ack);
    if (waited > 3) stall_cycles += waited;
    rdat = wb_o.dat;
    @(posedge clk);
    #1 wb_i = '0;
  endtask

  // ---------------- receive side ----------------
  typedef logic [7:0] bytes_t [$];

  function automatic bytes_t make_frame(logic [47:0] dmac, logic [31:0] dip, logic [15:0] dport,
                                        logic [7:0] proto, bytes_t payload);
    bytes_t f;
    int ulen = payload.size() + 8;
    for (int i = 5; i >= 0; i--) f.push_back(dmac[8*i +: 8]);
    for (int i = 5; i >= 0; i--) f.push_back(HOST_MAC[8*i +: 8]);
    f.push_back(8'h08); f.push_back(8'h00);
    f.push_back(8'h45); f.push_back(8'h00);
    f.push_back(8'((ulen + 20) >> 8)); f.push_back(8'(ulen + 20));
    f.push_back(8'h12); f.push_back(8'h34); f.push_back(8'h40); f.push_back(8'h00);
    f.push_back(8'h40); f.push_back(proto); f.push_back(8'h00); f.push_back(8'h00);
    for (int i = 3; i >= 0; i--) f.push_back(HOST_IP[8*i +: 8]);
    for (int i = 3; i >= 0; i--) f.push_back(dip[8*i +: 8]);
    f.push_back(8'h13); f.push_back(8'h88);
    f.push_back(dport[15:8]); f.push_back(dport[7:0]);
    f.push_back(8'(ulen >> 8)); f.push_back(8'(ulen));
    f.push_back(8'h00); f.push_back(8'h00);
    foreach (payload[i]) f.push_back(payload[i]);
    while (f.size() < 60) f.push_back(8'hA5);                 // MAC padding
    return f;
  endfunction

  task automatic send_frame(bytes_t f);
    foreach (f[i]) begin
      while ($urandom_range(0, 3) == 0) begin
        @(negedge clk);
        rx_src_rdy_n = 1'b1;
      end
      @(negedge clk);
      rx_src_rdy_n = 1'b0;
      rx_data      = f[i];
      rx_sof_n     = (i != 0);
      rx_eof_n     = (i != f.size() - 1);
    end
    @(negedge clk);
    rx_src_rdy_n = 1'b1;
    rx_sof_n     = 1'b1;
    rx_eof_n     = 1'b1;
  endtask

  // ---------------- transmit side monitor ----------------
  bytes_t frames [$];
  bytes_t cur;
  bit     holdoff = 0;

  always @(negedge clk) tx_dst_rdy_n = holdoff ? 1'b1 : ($urandom_range(0, 4) == 0);

  always @(posedge clk) if (!tx_src_rdy_n && !tx_dst_rdy_n) begin
    if (!tx_sof_n) cur.delete();
    cur.push_back(tx_data);
    if (!tx_eof_n) frames.push_back(cur);
  end

  function automatic logic [15:0] model_csum(bytes_t h);   // over bytes 14..33
    int s = 0;
    for (int i = 14; i < 34; i += 2)
      if (i != 24) s += {h[i], h[i+1]};
    while (s > 16'hffff) s = (s & 16'hffff) + (s >> 16);
    return ~16'(s);
  endfunction

  int ip_id_model = 0;
  task automatic check_frame(bytes_t f, bytes_t pay, int plen);
    int pad = (plen < 18) ? 18 : plen;
    check(f.size() == 42 + pad, $sformatf("frame size %0d expected %0d", f.size(), 42 + pad));
    if (f.size() != 42 + pad) return;
    for (int i = 0; i < 6; i++) begin
      check(f[i] == HOST_MAC[8*(5-i) +: 8], "destination MAC");
      check(f[6+i] == FPGA_MAC[8*(5-i) +: 8], "source MAC");
    end
    check({f[12], f[13]} == 16'h0800, "EtherType IPv4");
    check(f[14] == 8'h45 && f[22] == 8'd64 && f[23] == 8'h11, "IP version, TTL, protocol");
    check({f[16], f[17]} == 16'(pad + 28), "IP total length");
    check({f[18], f[19]} == 16'(ip_id_model), "IP identification");
    check({f[24], f[25]} == model_csum(f), $sformatf("IP checksum %h expected %h", {f[24], f[25]}, model_csum(f)));
    check({f[26], f[27], f[28], f[29]} == FPGA_IP && {f[30], f[31], f[32], f[33]} == HOST_IP, "IP addresses");
    check({f[34], f[35]} == FPGA_PORT && {f[36], f[37]} == HOST_PORT, "UDP ports");
    check({f[38], f[39]} == 16'(pad + 8), "UDP length");
    for (int i = 0; i < pad; i++)
      check(f[42 + i] == ((i < plen) ? pay[i] : 8'h00), $sformatf("payload byte %0d", i));
    if (pad != plen) n_pad++;
    ip_id_model++;
  endtask

  task automatic transmit(input int len, input bit hold);
    logic [7:0] r;
    bytes_t pay;
    int nf, off, plen;
    for (int i = 0; i < len; i++) pay.push_back(8'($urandom));
    frames.delete();
    wb_access(1'b1, 8'h30, 8'(len >> 8), r);
    wb_access(1'b1, 8'h31, 8'(len), r);
    wb_access(1'b1, 8'h32, 8'h01, r);
    wb_access(1'b0, 8'h34, 8'h00, r);
    check(r[0], "transmit busy after the instruction");
    stall_cycles = 0;
    if (hold) holdoff = 1;
    fork
      if (hold) begin
        repeat (3000) @(posedge clk);
        holdoff = 0;
      end
      foreach (pay[i]) wb_access(1'b1, 8'h33, pay[i], r);
    join
    if (stall_cycles > 0) n_stall++;
    do wb_access(1'b0, 8'h34, 8'h00, r); while (r[0]);
    repeat (10) @(posedge clk);
    nf = (len + 1471) / 1472;
    check(frames.size() == nf, $sformatf("%0d bytes in %0d frames, expected %0d", len, frames.size(), nf));
    if (nf > 1) n_frag++;
    off = 0;
    foreach (frames[k]) begin
      bytes_t part;
      plen = (len - off > 1472) ? 1472 : len - off;
      for (int i = 0; i < plen; i++) part.push_back(pay[off + i]);
      check_frame(frames[k], part, plen);
      off += plen;
    end
  endtask

  initial begin
    logic [7:0] r;
    bytes_t p1, p2, p3, expected;
    bit     exp_last [$];
    int     got_n;
    repeat (4) @(posedge clk);
    #1 rst = 1'b0;
    // ---- receive ----
    p1 = '{8'h00, 8'h03};                                    // short: padded by the MAC
    for (int i = 0; i < 40; i++) p2.push_back(8'($urandom));
    p3 = '{8'h06, 8'h00, 8'h02, 8'h71, 8'h00};
    send_frame(make_frame(FPGA_MAC, FPGA_IP, FPGA_PORT, 8'h11, p1));
    send_frame(make_frame(48'h000A35000002, FPGA_IP, FPGA_PORT, 8'h11, p2));  n_drop++;
    send_frame(make_frame(FPGA_MAC, FPGA_IP, FPGA_PORT, 8'h11, p2));
    send_frame(make_frame(FPGA_MAC, 32'hC0A8010B, FPGA_PORT, 8'h11, p2));     n_drop++;
    send_frame(make_frame(FPGA_MAC, FPGA_IP, 16'd5001, 8'h11, p2));           n_drop++;
    send_frame(make_frame(FPGA_MAC, FPGA_IP, FPGA_PORT, 8'h06, p2));          n_drop++;
    send_frame(make_frame(FPGA_MAC, FPGA_IP, FPGA_PORT, 8'h11, p3));
    foreach (p1[i]) begin expected.push_back(p1[i]); exp_last.push_back(i == p1.size() - 1); end
    foreach (p2[i]) begin expected.push_back(p2[i]); exp_last.push_back(i == p2.size() - 1); end
    foreach (p3[i]) begin expected.push_back(p3[i]); exp_last.push_back(i == p3.size() - 1); end
    got_n = 0;
    forever begin
      logic last;
      wb_access(1'b0, 8'h41, 8'h00, r);
      if (!r[0]) break;
      last = r[1];
      wb_access(1'b0, 8'h40, 8'h00, r);
      if (got_n < expected.size()) begin
        check(r == expected[got_n], $sformatf("rx byte %0d: %h expected %h", got_n, r, expected[got_n]));
        check(last == exp_last[got_n], $sformatf("rx last flag at byte %0d", got_n));
      end
      got_n++;
    end
    check(got_n == expected.size(), $sformatf("received %0d payload bytes, expected %0d", got_n, expected.size()));
    // ---- transmit ----
    transmit(5, 1'b0);
    transmit(100, 1'b0);
    transmit(3000, 1'b1);
    $display("INFO: padded %0d, fragmented %0d, stalled %0d, dropped %0d", n_pad, n_frag, n_stall, n_drop);
    check(n_pad > 0, "padding happened");
    check(n_frag > 0, "fragmentation happened");
    check(n_stall > 0, "transmit FIFO full stall happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
