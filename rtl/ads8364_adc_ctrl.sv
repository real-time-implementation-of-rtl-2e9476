// ads8364_adc_ctrl: continuous six-channel capture from an ADS8364 ADC at 250 kSPS.
//
// The controller runs on the ADC's own 5 MHz clock, which it also drives to the chip.
// Every CONV_PERIOD (20) clocks it pulls the three tied-together HOLD signals low for one
// clock, starting a simultaneous conversion on all six inputs. When the chip answers
// with EOC_N low (about 16.5 clocks later), the controller reads the six results in
// cycle mode (ADDRESS = 110): RD_N goes low for one clock per channel, channel 0 first,
// channel 5 last, with one high clock between reads. Each word read is written out at
// once on the matching channel's output with a one-clock write-enable pulse, so the
// six words of a sample set arrive on consecutive even clocks.
//
// The read of one sample set overlaps the conversion of the next, which the chip allows
// because its output registers hold the last result until the next end of conversion.
// ADD, BYTE and WR_N are tied inactive (no address tag, 16-bit bus, hardware mode) and
// FDATA is not used, as in the design's port table. The one-clock HOLD and RD_N pulse
// widths and the overlapped read are this design's choices; the chip's minimum pulse
// widths (20 ns for HOLD) are met by a 200 ns clock.
module ads8364_adc_ctrl
  import radar_pkg::*;
#(
  parameter int CONV_PERIOD = 20       // clocks per conversion: 5 MHz / 250 kSPS
) (
  input  logic               clk,      // 5 MHz
  input  logic               rst,
  // ADS8364 interface
  output logic               adc_clk,
  output logic               reset_n,
  output logic               hold_a_n,
  output logic               hold_b_n,
  output logic               hold_c_n,
  output logic [2:0]         address,
  output logic               add,
  output logic               byte_sel,
  output logic               rd_n,
  output logic               wr_n,
  output logic               cs_n,
  input  logic               fdata,
  input  logic               eoc_n,
  input  logic [15:0]        data,
  // channel FIFO interface
  output logic [NCH-1:0]     we,
  output logic signed [15:0] data_x [NCH]
);

  assign adc_clk  = clk;
  assign reset_n  = ~rst;
  assign address  = 3'b110;            // cycle mode
  assign add      = 1'b0;
  assign byte_sel = 1'b0;
  assign wr_n     = 1'b1;

  logic [$clog2(CONV_PERIOD)-1:0] conv_cnt;
  logic hold_n;
  logic eoc_q;
  logic reading;
  logic [2:0] ch;

  assign hold_a_n = hold_n;
  assign hold_b_n = hold_n;
  assign hold_c_n = hold_n;
  assign cs_n     = ~reading;

  // conversion start timer
  always_ff @(posedge clk) begin
    if (rst) begin
      conv_cnt <= '0;
      hold_n   <= 1'b1;
    end else begin
      conv_cnt <= (conv_cnt == ($bits(conv_cnt))'(CONV_PERIOD - 1)) ? '0 : conv_cnt + 1'b1;
      hold_n   <= (conv_cnt != '0);
    end
  end

  // cycle-mode read sequencer
  always_ff @(posedge clk) begin
    if (rst) begin
      eoc_q   <= 1'b1;
      reading <= 1'b0;
      rd_n    <= 1'b1;
      ch      <= '0;
      we      <= '0;
      for (int c = 0; c < NCH; c++) data_x[c] <= '0;
    end else begin
      eoc_q <= eoc_n;
      we    <= '0;
      if (!reading) begin
        if (eoc_q && !eoc_n) begin       // falling edge of EOC_N
          reading <= 1'b1;
          rd_n    <= 1'b0;
          ch      <= '0;
        end
      end else if (!rd_n) begin          // end of a read strobe: capture the word
        data_x[ch] <= data;
        we[ch]     <= 1'b1;
        rd_n       <= 1'b1;
      end else if (ch == 3'(NCH - 1)) begin
        reading <= 1'b0;
      end else begin
        ch   <= ch + 3'd1;
        rd_n <= 1'b0;
      end
    end
  end

  // FDATA only marks the first word of a cycle, which the fixed read order makes redundant.
  logic unused_fdata;
  assign unused_fdata = fdata;

endmodule
