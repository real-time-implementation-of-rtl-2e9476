// eth_ctrl: UDP front end between the radar controller and an Ethernet MAC.
//
// The MAC itself (with its transmit and receive FIFOs) is outside this module; it is
// reached through two LocalLink byte streams (active-low sof/eof/src_rdy/dst_rdy, a byte
// moves when src_rdy_n and dst_rdy_n are both low). Frames carry no preamble and no
// frame check sequence: the MAC adds and strips those.
//
// Receive FSM: every incoming frame is parsed byte by byte. The frame is accepted only
// if its destination MAC, IPv4 type, 20-byte header, UDP protocol, destination IP and
// destination port all match the receive filter registers. The UDP payload of an
// accepted frame goes into the Ethernet receive FIFO, each byte tagged with a
// last-byte-of-packet flag; other frames are dropped. The FIFO-to-WishBone bridge hands
// the bytes to the master: reading 0x41 gives {last, available}, reading 0x40 pops one
// byte.
//
// Transmit FSM: the master writes the total byte count (0x30, 0x31), writes 0x01 to the
// instruction register (0x32) and then writes the bytes one by one to the data register
// (0x33, whose acknowledge waits while the transmit FIFO is full). The FSM cuts the
// data into UDP packets of at most MAX_PAYLOAD bytes, pads a packet shorter than
// MIN_PAYLOAD (the 18 bytes that make a 64-byte Ethernet frame) with zeros, and for each
// packet emits the 14-byte Ethernet, 20-byte IPv4 (with header checksum, incrementing
// identification, TTL 64, no fragmentation) and 8-byte UDP headers (checksum 0, which
// UDP over IPv4 allows) from the header registers, then the payload. A payload byte not
// yet written stalls the stream. Register 0x34 bit 0 reads transmit busy.
//
// WishBone register map (8-bit, big-endian multi-byte fields): 0x00-05 receive
// destination MAC, 0x06-09 receive destination IP, 0x0A-0B receive destination port,
// 0x10-15 transmit destination MAC, 0x16-1B transmit source MAC, 0x1C-1F transmit source
// IP, 0x20-23 transmit destination IP, 0x24-25 transmit source port, 0x26-27 transmit
// destination port; reset values come from the parameters.
//
// The two FSMs, the receive FIFO with its bridge, header registers, padding and
// fragmentation follow the design. The register addresses, the byte-wide data path, the
// length register that tells the transmit FSM how much data follows, the 100 MHz
// LocalLink clock and the reset addresses are this design's choices.
module eth_ctrl
  import radar_pkg::*;
#(
  parameter logic [47:0] FPGA_MAC    = 48'h000A35000001,
  parameter logic [31:0] FPGA_IP     = 32'hC0A8010A,   // 192.168.1.10
  parameter logic [15:0] FPGA_PORT   = 16'd5000,
  parameter logic [47:0] HOST_MAC    = 48'h001122334455,
  parameter logic [31:0] HOST_IP     = 32'hC0A80101,   // 192.168.1.1
  parameter logic [15:0] HOST_PORT   = 16'd5000,
  parameter int          MAX_PAYLOAD = 1472,
  parameter int          MIN_PAYLOAD = 18
) (
  input  logic       clk,
  input  logic       rst,
  input  wb_req_t    wb_i,
  output wb_rsp_t    wb_o,
  // LocalLink receive stream from the MAC
  input  logic [7:0] rx_data,
  input  logic       rx_sof_n,
  input  logic       rx_eof_n,
  input  logic       rx_src_rdy_n,
  output logic       rx_dst_rdy_n,
  // LocalLink transmit stream to the MAC
  output logic [7:0] tx_data,
  output logic       tx_sof_n,
  output logic       tx_eof_n,
  output logic       tx_src_rdy_n,
  input  logic       tx_dst_rdy_n
);

  // ---------------- registers ----------------
  logic [47:0] rx_mac, tx_dmac, tx_smac;
  logic [31:0] rx_ip, tx_sip, tx_dip;
  logic [15:0] rx_port, tx_sport, tx_dport, tx_len;
  logic        tx_start;

  logic        rxf_empty, rxf_full, rxf_pop;
  logic [8:0]  rxf_q;
  logic        txf_empty, txf_full, txf_push, txf_pop;
  logic [7:0]  txf_q;
  logic        tx_busy;
  logic        wb_hit, stall;

  assign wb_hit = wb_i.cyc && wb_i.stb && !wb_o.ack;
  assign stall  = wb_i.we && wb_i.adr == 8'h33 && txf_full;
  assign txf_push = wb_hit && !stall && wb_i.we && wb_i.adr == 8'h33;
  assign rxf_pop  = wb_hit && !wb_i.we && wb_i.adr == 8'h40 && !rxf_empty;

  function automatic logic [7:0] byte_of(logic [47:0] v, int i);  // i = 0 is the LSB
    return v[8*i +: 8];
  endfunction

  always_ff @(posedge clk) begin
    if (rst) begin
      wb_o     <= '0;
      rx_mac   <= FPGA_MAC;
      rx_ip    <= FPGA_IP;
      rx_port  <= FPGA_PORT;
      tx_dmac  <= HOST_MAC;
      tx_smac  <= FPGA_MAC;
      tx_sip   <= FPGA_IP;
      tx_dip   <= HOST_IP;
      tx_sport <= FPGA_PORT;
      tx_dport <= HOST_PORT;
      tx_len   <= '0;
      tx_start <= 1'b0;
    end else begin
      wb_o.ack <= wb_hit && !stall;
      tx_start <= 1'b0;
      unique case (wb_i.adr)
        8'h34:   wb_o.dat <= {7'd0, tx_busy};
        8'h40:   wb_o.dat <= rxf_q[7:0];
        8'h41:   wb_o.dat <= {6'd0, rxf_q[8], !rxf_empty};
        default: wb_o.dat <= 8'h00;
      endcase
      if (wb_hit && wb_i.we) begin
        if (wb_i.adr <= 8'h05) rx_mac[8*(5 - int'(wb_i.adr)) +: 8] <= wb_i.dat;
        else if (wb_i.adr <= 8'h09) rx_ip[8*(9 - int'(wb_i.adr)) +: 8] <= wb_i.dat;
        else if (wb_i.adr <= 8'h0B) rx_port[8*(11 - int'(wb_i.adr)) +: 8] <= wb_i.dat;
        else if (wb_i.adr >= 8'h10 && wb_i.adr <= 8'h15) tx_dmac[8*(21 - int'(wb_i.adr)) +: 8] <= wb_i.dat;
        else if (wb_i.adr >= 8'h16 && wb_i.adr <= 8'h1B) tx_smac[8*(27 - int'(wb_i.adr)) +: 8] <= wb_i.dat;
        else if (wb_i.adr >= 8'h1C && wb_i.adr <= 8'h1F) tx_sip[8*(31 - int'(wb_i.adr)) +: 8] <= wb_i.dat;
        else if (wb_i.adr >= 8'h20 && wb_i.adr <= 8'h23) tx_dip[8*(35 - int'(wb_i.adr)) +: 8] <= wb_i.dat;
        else if (wb_i.adr >= 8'h24 && wb_i.adr <= 8'h25) tx_sport[8*(37 - int'(wb_i.adr)) +: 8] <= wb_i.dat;
        else if (wb_i.adr >= 8'h26 && wb_i.adr <= 8'h27) tx_dport[8*(39 - int'(wb_i.adr)) +: 8] <= wb_i.dat;
        else if (wb_i.adr == 8'h30) tx_len[15:8] <= wb_i.dat;
        else if (wb_i.adr == 8'h31) tx_len[7:0]  <= wb_i.dat;
        else if (wb_i.adr == 8'h32) tx_start     <= (wb_i.dat == 8'h01);
      end
    end
  end

  // ---------------- receive FSM ----------------
  logic [10:0] rbc;            // byte index within the frame
  logic        in_frame, match;
  logic [15:0] udp_len;
  logic        rx_take, rxf_push, rx_last;
  logic [7:0]  expect_byte;
  logic        check_byte;

  assign rx_dst_rdy_n = 1'b0;  // always accepts; payload beyond a full FIFO is lost
  assign rx_take      = !rx_src_rdy_n;

  always_comb begin
    check_byte  = 1'b1;
    expect_byte = 8'h00;
    case (rbc)
      11'd0, 11'd1, 11'd2, 11'd3, 11'd4, 11'd5: expect_byte = byte_of(rx_mac, 5 - int'(rbc));
      11'd12: expect_byte = 8'h08;
      11'd13: expect_byte = 8'h00;
      11'd14: expect_byte = 8'h45;
      11'd23: expect_byte = 8'h11;
      11'd30, 11'd31, 11'd32, 11'd33: expect_byte = rx_ip[8*(33 - int'(rbc)) +: 8];
      11'd36: expect_byte = rx_port[15:8];
      11'd37: expect_byte = rx_port[7:0];
      default: check_byte = 1'b0;
    endcase
  end

  // byte index 42 + (udp_len - 8) - 1 is the last payload byte
  logic check_ok_payload;
  logic [7:0] expect_byte_sof;
  assign expect_byte_sof = byte_of(rx_mac, 5);
  assign rxf_push = rx_take && rx_sof_n && in_frame && match && check_ok_payload;
  assign check_ok_payload = (rbc >= 11'd42) && (udp_len > 16'd8) &&
                            (32'(rbc) < 32'(udp_len) + 32'd34);
  assign rx_last = (32'(rbc) == 32'(udp_len) + 32'd33);

  always_ff @(posedge clk) begin
    if (rst) begin
      rbc      <= '0;
      in_frame <= 1'b0;
      match    <= 1'b0;
      udp_len  <= '0;
    end else if (rx_take) begin
      if (!rx_sof_n) begin
        rbc      <= 11'd1;
        in_frame <= rx_eof_n;
        match    <= (rx_data == expect_byte_sof);
      end else if (in_frame) begin
        if (rbc != '1) rbc <= rbc + 1'b1;
        if (check_byte && rx_data != expect_byte) match <= 1'b0;
        if (rbc == 11'd38) udp_len[15:8] <= rx_data;
        if (rbc == 11'd39) udp_len[7:0]  <= rx_data;
        if (!rx_eof_n) in_frame <= 1'b0;
      end
    end
  end

  async_fifo #(.DW(9), .AW(11)) u_rx_fifo (
    .rst (rst), .wclk (clk), .wr_en (rxf_push), .din ({rx_last, rx_data}), .full (rxf_full),
    .rclk (clk), .rd_en (rxf_pop), .dout (rxf_q), .empty (rxf_empty)
  );

  // ---------------- transmit FSM ----------------
  async_fifo #(.DW(8), .AW(8)) u_tx_fifo (
    .rst (rst), .wclk (clk), .wr_en (txf_push), .din (wb_i.dat), .full (txf_full),
    .rclk (clk), .rd_en (txf_pop), .dout (txf_q), .empty (txf_empty)
  );

  typedef enum logic [1:0] {T_IDLE, T_PREP, T_HDR, T_PAY} tstate_e;
  tstate_e tstate;

  logic [15:0] remaining, plen, plen_pad, ip_id, tbc;
  logic [15:0] ip_total, ip_csum;
  logic [7:0]  hdr_byte;
  logic        tx_fire, tx_hdr_last, tx_pay_last;

  function automatic logic [15:0] ip_checksum(logic [15:0] total, logic [15:0] id,
                                              logic [31:0] sip, logic [31:0] dip);
    logic [31:0] s;
    s = 32'h4500 + 32'(total) + 32'(id) + 32'h4000 + 32'h4011 +
        32'(sip[31:16]) + 32'(sip[15:0]) + 32'(dip[31:16]) + 32'(dip[15:0]);
    s = 32'(s[15:0]) + 32'(s[31:16]);
    s = 32'(s[15:0]) + 32'(s[31:16]);
    return ~s[15:0];
  endfunction

  assign ip_total = plen_pad + 16'd28;
  assign ip_csum  = ip_checksum(ip_total, ip_id, tx_sip, tx_dip);

  always_comb begin
    unique case (tbc)
      16'd0, 16'd1, 16'd2, 16'd3, 16'd4, 16'd5:  hdr_byte = byte_of(tx_dmac, 5 - int'(tbc));
      16'd6, 16'd7, 16'd8, 16'd9, 16'd10, 16'd11: hdr_byte = byte_of(tx_smac, 11 - int'(tbc));
      16'd12: hdr_byte = 8'h08;
      16'd13: hdr_byte = 8'h00;
      16'd14: hdr_byte = 8'h45;
      16'd15: hdr_byte = 8'h00;
      16'd16: hdr_byte = ip_total[15:8];
      16'd17: hdr_byte = ip_total[7:0];
      16'd18: hdr_byte = ip_id[15:8];
      16'd19: hdr_byte = ip_id[7:0];
      16'd20: hdr_byte = 8'h40;              // don't fragment
      16'd21: hdr_byte = 8'h00;
      16'd22: hdr_byte = 8'h40;              // TTL 64
      16'd23: hdr_byte = 8'h11;              // UDP
      16'd24: hdr_byte = ip_csum[15:8];
      16'd25: hdr_byte = ip_csum[7:0];
      16'd26, 16'd27, 16'd28, 16'd29: hdr_byte = tx_sip[8*(29 - int'(tbc)) +: 8];
      16'd30, 16'd31, 16'd32, 16'd33: hdr_byte = tx_dip[8*(33 - int'(tbc)) +: 8];
      16'd34: hdr_byte = tx_sport[15:8];
      16'd35: hdr_byte = tx_sport[7:0];
      16'd36: hdr_byte = tx_dport[15:8];
      16'd37: hdr_byte = tx_dport[7:0];
      16'd38: hdr_byte = 8'((plen_pad + 16'd8) >> 8);
      16'd39: hdr_byte = 8'(plen_pad + 16'd8);
      default: hdr_byte = 8'h00;             // UDP checksum unused
    endcase
  end

  assign tx_hdr_last = (tbc == 16'd41);
  assign tx_pay_last = (tbc == plen_pad - 16'd1);

  always_comb begin
    tx_data      = 8'h00;
    tx_src_rdy_n = 1'b1;
    tx_sof_n     = 1'b1;
    tx_eof_n     = 1'b1;
    txf_pop      = 1'b0;
    if (tstate == T_HDR) begin
      tx_data      = hdr_byte;
      tx_src_rdy_n = 1'b0;
      tx_sof_n     = (tbc != 16'd0);
    end else if (tstate == T_PAY) begin
      if (tbc < plen) begin                  // data byte, waits for the master
        tx_data      = txf_q;
        tx_src_rdy_n = txf_empty;
        txf_pop      = !txf_empty && !tx_dst_rdy_n;
      end else begin                         // padding
        tx_src_rdy_n = 1'b0;
      end
      tx_eof_n = !tx_pay_last;
    end
  end

  assign tx_fire = !tx_src_rdy_n && !tx_dst_rdy_n;
  assign tx_busy = (tstate != T_IDLE);

  always_ff @(posedge clk) begin
    if (rst) begin
      tstate    <= T_IDLE;
      remaining <= '0;
      plen      <= '0;
      plen_pad  <= '0;
      ip_id     <= '0;
      tbc       <= '0;
    end else begin
      unique case (tstate)
        T_IDLE: if (tx_start && tx_len != '0) begin
          remaining <= tx_len;
          tstate    <= T_PREP;
        end
        T_PREP: begin
          plen     <= (remaining > 16'(MAX_PAYLOAD)) ? 16'(MAX_PAYLOAD) : remaining;
          plen_pad <= (remaining > 16'(MAX_PAYLOAD)) ? 16'(MAX_PAYLOAD) :
                      (remaining < 16'(MIN_PAYLOAD)) ? 16'(MIN_PAYLOAD) : remaining;
          tbc      <= '0;
          tstate   <= T_HDR;
        end
        T_HDR: if (tx_fire) begin
          tbc <= tx_hdr_last ? '0 : tbc + 1'b1;
          if (tx_hdr_last) tstate <= T_PAY;
        end
        T_PAY: if (tx_fire) begin
          tbc <= tbc + 1'b1;
          if (tx_pay_last) begin
            ip_id     <= ip_id + 1'b1;
            remaining <= remaining - plen;
            tstate    <= (remaining == plen) ? T_IDLE : T_PREP;
          end
        end
        default: tstate <= T_IDLE;
      endcase
    end
  end

  a_ack_in_cycle: assert property (@(posedge clk) disable iff (rst)
    wb_o.ack |-> wb_i.cyc && wb_i.stb);
  a_no_push_full: assert property (@(posedge clk) disable iff (rst) !(txf_push && txf_full));

endmodule
