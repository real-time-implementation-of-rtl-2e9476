// fir6_lpf: six-channel low-pass FIR filter built from one shared 33-tap pipeline.
//
// The filter is order 32 with a Hamming window and a 2 kHz cutoff at 250 kSPS; its
// coefficients (signed Q1.17, unity DC gain) are computed by radar_pkg::fir_coef. One
// pipelined systolic FIR serves all six channels: the channels are fed into it in turn,
// ch0 first and ch5 last, one sample per pipeline step. The systolic form has one
// register per tap on the sum line, a product register after each multiplier, and
// NCH+1 registers per tap on the input line: the two of the single-channel pipelined
// filter plus NCH-1 more, so that each tap sees the same channel's previous sample.
//
// The pipeline advances only while a set of six samples is being fed in, so its delays
// count channel slots, not clocks. After a step that fed channel s, the sum line holds
// a finished output for channel (s - LAT) mod NCH, where LAT = TAPS + NCH + 1 slots. The
// six results of one feed are collected and then written to the six output registers
// together, with all six valid bits high for one clock, so a reset of the downstream
// FIFOs can never split a sample set between channels. The output for a sample appears
// 6 or 7 input sample periods after the sample entered (depending on the channel), in
// addition to the filter's own group delay of 16 samples.
//
// Interface (as in the port table): din[c] with din_valid[c] per channel, dout[c] with
// dout_valid[c] per channel. An input sample is held until all six channels have a new
// sample; the six are then pushed through in six consecutive clocks, and the six
// outputs leave together one clock after the last. The input stream must leave at
// least NCH+1 clocks between sample sets (the ADC controller leaves 20).
//
// Structure and coefficient specification follow the design. The slot-enable scheme,
// the common output strobe, the Q1.17 coefficient format, the 48-bit accumulation (a
// DSP48 accumulator width), rounding and saturation of the output to 16 bits are this
// design's choices.
module fir6_lpf
  import radar_pkg::*;
#(
  parameter int TAPS = FIR_TAPS
) (
  input  logic               clk,
  input  logic               rst,
  input  logic signed [15:0] din       [NCH],
  input  logic [NCH-1:0]     din_valid,
  output logic signed [15:0] dout      [NCH],
  output logic [NCH-1:0]     dout_valid
);

  localparam int XLEN = (NCH + 1) * TAPS;
  localparam int LAT  = TAPS + NCH + 1;
  localparam int SHIFT_OUT = (NCH - (LAT % NCH)) % NCH;   // out channel = slot + SHIFT_OUT

  typedef logic signed [17:0] coef_arr_t [TAPS];
  function automatic coef_arr_t make_coefs();
    coef_arr_t c;
    for (int k = 0; k < TAPS; k++) c[k] = fir_coef(k);
    return c;
  endfunction
  localparam coef_arr_t COEF = make_coefs();

  // ---------------- input holding and slot sequencing ----------------
  logic signed [15:0] hold [NCH];
  logic [NCH-1:0]     pending;
  logic               feeding;
  logic [2:0]         slot;

  always_ff @(posedge clk) begin
    if (rst) begin
      pending <= '0;
      feeding <= 1'b0;
      slot    <= '0;
      for (int c = 0; c < NCH; c++) hold[c] <= '0;
    end else begin
      for (int c = 0; c < NCH; c++)
        if (din_valid[c]) begin
          hold[c]    <= din[c];
          pending[c] <= 1'b1;
        end
      if (!feeding && &pending) begin
        feeding <= 1'b1;
        slot    <= '0;
        pending <= din_valid;            // a new sample arriving now stays pending
      end else if (feeding) begin
        if (slot == 3'(NCH - 1)) feeding <= 1'b0;
        slot <= slot + 3'd1;
      end
    end
  end

  // ---------------- shared systolic pipeline ----------------
  logic signed [15:0] xline [XLEN];
  logic signed [33:0] prod  [TAPS];
  logic signed [47:0] sum   [TAPS];
  logic signed [15:0] x_in;

  assign x_in = hold[slot];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int j = 0; j < XLEN; j++) xline[j] <= '0;
      for (int k = 0; k < TAPS; k++) begin
        prod[k] <= '0;
        sum[k]  <= '0;
      end
    end else if (feeding) begin
      xline[0] <= x_in;
      for (int j = 1; j < XLEN; j++) xline[j] <= xline[j-1];
      for (int k = 0; k < TAPS; k++)
        prod[k] <= COEF[k] * xline[(NCH + 1) * (k + 1) - 1];
      sum[0] <= 48'(prod[0]);
      for (int k = 1; k < TAPS; k++) sum[k] <= sum[k-1] + 48'(prod[k]);
    end
  end

  // ---------------- output demultiplexer ----------------
  // The six results of one feed are collected and released together, so that every
  // channel's output stream advances on the same clock.
  logic       stepped, stepped_last;
  logic [2:0] stepped_ch;
  logic signed [15:0] stage [NCH];

  always_ff @(posedge clk) begin
    if (rst) begin
      stepped      <= 1'b0;
      stepped_last <= 1'b0;
      stepped_ch   <= '0;
    end else begin
      stepped      <= feeding;
      stepped_last <= feeding && (slot == 3'(NCH - 1));
      stepped_ch   <= 3'((32'(slot) + SHIFT_OUT) % NCH);
    end
  end

  function automatic logic signed [15:0] round_sat(logic signed [47:0] v);
    logic signed [47:0] r;
    r = (v + 48'sd65536) >>> 17;
    if (r > 48'sd32767)       return 16'sh7fff;
    else if (r < -48'sd32768) return 16'sh8000;
    else                      return r[15:0];
  endfunction

  always_ff @(posedge clk) begin
    if (rst) begin
      dout_valid <= '0;
      for (int c = 0; c < NCH; c++) begin
        dout[c]  <= '0;
        stage[c] <= '0;
      end
    end else begin
      dout_valid <= '0;
      if (stepped) stage[stepped_ch] <= round_sat(sum[TAPS-1]);
      if (stepped_last) begin
        for (int c = 0; c < NCH; c++)
          dout[c] <= (3'(c) == stepped_ch) ? round_sat(sum[TAPS-1]) : stage[c];
        dout_valid <= '1;
      end
    end
  end

endmodule
