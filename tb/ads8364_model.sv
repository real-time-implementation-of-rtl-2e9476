// ads8364_model: behavioural model of the ADS8364 six-channel 16-bit ADC, for testbenches.
//
// A falling edge of HOLD_A_N samples the six analog inputs, given here as signed 16-bit
// codes on ain. CONV_CLKS rising clock edges later the results move into the output
// registers and EOC_N goes low for one clock. In cycle mode (A = 110), with CS_N low,
// each RD_N low period puts the next register on DATA, channel 0 first; the read pointer
// advances on the rising edge of RD_N and returns to channel 0 at each end of
// conversion. FD is high while channel 0 is on the bus. The model has two-state outputs:
// DATA reads 0 when the bus is not driven. Only the modes the radar uses are modelled.
module ads8364_model #(
  parameter int CONV_CLKS = 17
) (
  input  logic               clk,
  input  logic               reset_n,
  input  logic               hold_a_n,
  input  logic               hold_b_n,
  input  logic               hold_c_n,
  input  logic [2:0]         address,
  input  logic               add,
  input  logic               byte_sel,
  input  logic               rd_n,
  input  logic               wr_n,
  input  logic               cs_n,
  output logic               fdata,
  output logic               eoc_n,
  output logic [15:0]        data,
  input  logic signed [15:0] ain [6],
  output int                 conversions
);
  logic signed [15:0] sampled [6];
  logic signed [15:0] out_reg [6];
  int                 countdown = -1;
  int                 ptr = 0;
  logic               hold_q = 1'b1;

  initial begin
    eoc_n = 1'b1;
    conversions = 0;
    for (int c = 0; c < 6; c++) begin
      sampled[c] = '0;
      out_reg[c] = '0;
    end
  end

  always @(posedge clk) begin
    hold_q <= hold_a_n;
    eoc_n  <= 1'b1;
    if (!reset_n) countdown <= -1;
    else if (hold_q && !hold_a_n && !hold_b_n && !hold_c_n) begin
      sampled   <= ain;
      countdown <= CONV_CLKS - 1;
    end else if (countdown > 0) countdown <= countdown - 1;
    else if (countdown == 0) begin
      out_reg     <= sampled;
      eoc_n       <= 1'b0;
      countdown   <= -1;
      conversions <= conversions + 1;
    end
  end

  always @(posedge rd_n or negedge eoc_n) begin
    if (!eoc_n) ptr <= 0;
    else if (!cs_n && address == 3'b110) ptr <= (ptr == 5) ? 0 : ptr + 1;
  end

  assign data  = (!cs_n && !rd_n) ? out_reg[ptr] : 16'h0000;
  assign fdata = !cs_n && !rd_n && ptr == 0;

  logic unused;
  assign unused = add ^ byte_sel ^ wr_n;
endmodule
