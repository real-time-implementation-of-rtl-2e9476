// pcm1602_dac_ctrl: six-channel feed for a PCM1602 audio DAC over its serial audio port.
//
// Six dual-clock FIFOs (256 x 24 bits) take the transmit samples in the writer's clock
// domain (clk) and hand them to the serial side, which runs on the 5 MHz bclk. The
// serial side divides bclk by 2 for BCK (2.5 MHz) and by 96 for LRCK (52083 Hz), and
// shifts three stereo streams in the 24-bit right-justified format, most significant
// bit first: DATA0 carries channels 0 (left, LRCK high) and 1 (right, LRCK low), DATA1
// channels 2 and 3, DATA2 channels 4 and 5. With BCK = 48 fs each 24-bit word fills its
// half of the LRCK period exactly. Data changes on the falling edge of BCK and is stable
// at its rising edge, where the DAC samples it.
//
// Once per LRCK period, just before the left half starts, the six channel shift
// registers are reloaded. They are loaded from the FIFOs only when all six FIFOs hold
// data, so the six channels always stay in step; otherwise they are loaded with zeros
// and the DAC outputs silence. SCLK, the DAC system clock, is the 20 MHz clock passed
// through (384 fs).
//
// Interface: clk domain - wr_en[c], din[c], full[c] per channel; bclk domain - the
// serial port LRCK, BCK, DATA0..2 and SCLK. rst (active high) clears the FIFOs and the
// serial state. All serial outputs are registered, one bclk after the frame counter.
//
// The FIFOs, the all-FIFOs-ready rule, zero fill, the format and the clock ratios follow
// the design. The design's FIFOs have a 1-bit read side; here they are read 24 bits at a
// time into the 24-bit shift registers the design also describes, which gives the same
// serial stream.
module pcm1602_dac_ctrl
  import radar_pkg::*;
(
  input  logic               clk,
  input  logic               rst,
  input  logic [NCH-1:0]     wr_en,
  input  logic signed [23:0] din   [NCH],
  output logic [NCH-1:0]     full,
  input  logic               bclk,       // 5 MHz
  input  logic               clk_20m,    // 20 MHz DAC system clock
  output logic               lrck,
  output logic               bck,
  output logic               data0,
  output logic               data1,
  output logic               data2,
  output logic               sclk
);

  assign sclk = clk_20m;

  logic [NCH-1:0]    empty;
  logic [23:0]       fifo_q [NCH];
  logic              rd_all;

  for (genvar c = 0; c < NCH; c++) begin : g_fifo
    async_fifo #(.DW(24), .AW(8)) u_fifo (
      .rst   (rst),
      .wclk  (clk),
      .wr_en (wr_en[c]),
      .din   (din[c]),
      .full  (full[c]),
      .rclk  (bclk),
      .rd_en (rd_all),
      .dout  (fifo_q[c]),
      .empty (empty[c])
    );
  end

  // reset synchroniser for the bclk domain
  logic brst, brst_q1;
  always_ff @(posedge bclk or posedge rst)
    if (rst) {brst, brst_q1} <= 2'b11;
    else     {brst, brst_q1} <= {brst_q1, 1'b0};

  logic [6:0]  cnt;                       // 0..95, one LRCK period
  logic [23:0] word [NCH];
  logic [4:0]  bitn;
  logic        left;

  assign rd_all = (cnt == 7'd95) && (empty == '0);
  assign left   = (cnt < 7'd48);
  assign bitn   = 5'd23 - 5'((left ? cnt : cnt - 7'd48) >> 1);

  always_ff @(posedge bclk or posedge brst) begin
    if (brst) begin
      cnt   <= '0;
      lrck  <= 1'b0;
      bck   <= 1'b0;
      data0 <= 1'b0;
      data1 <= 1'b0;
      data2 <= 1'b0;
      for (int c = 0; c < NCH; c++) word[c] <= '0;
    end else begin
      cnt <= (cnt == 7'd95) ? '0 : cnt + 7'd1;
      if (cnt == 7'd95)
        for (int c = 0; c < NCH; c++) word[c] <= rd_all ? fifo_q[c] : '0;
      lrck  <= left;
      bck   <= cnt[0];
      data0 <= left ? word[0][bitn] : word[1][bitn];
      data1 <= left ? word[2][bitn] : word[3][bitn];
      data2 <= left ? word[4][bitn] : word[5][bitn];
    end
  end

endmodule
