// dc_offset_remover: digital RC circuit that estimates and removes the DC offset of one
// ADC channel.
//
// Each valid input sample updates the estimate the way a capacitor charges through a
// resistor: dc' = dc + k * (vin - dc), with k = 2^-15. The estimate is held in a 32-bit
// accumulator with 15 fraction bits, so multiplying the difference by k is a plain
// alignment of the difference into the accumulator. The 16-bit DC offset is the integer
// part of the accumulator, and the output sample is vin minus the offset held before
// this update. After reset the estimate starts at zero and converges with a time
// constant of 2^15 samples (about 131 ms at 250 kSPS).
//
// Interface (as in the module's port table): vin/vin_valid in, vout, dc_offset and
// vout_valid out. vout and vout_valid are registered: they appear one clock after
// vin_valid. The clock period is the update interval of the RC model; with a
// qualifying vin_valid the update interval is the sample period.
//
// The structure (subtract, multiply by k, accumulate in 32 bits, enable-gated register,
// output subtractor, one-cycle delay of the valid) follows the design. Treating samples
// as two's complement and computing the differences one bit wider than the 16 bits
// drawn, so that they cannot wrap, are this design's choices.
module dc_offset_remover #(
  parameter int KSHIFT = 15            // k = 2^-KSHIFT
) (
  input  logic               clk,
  input  logic               rst,
  input  logic signed [15:0] vin,
  input  logic               vin_valid,
  output logic signed [15:0] vout,
  output logic signed [15:0] dc_offset,
  output logic               vout_valid
);

  logic signed [31:0] acc;               // DC estimate, KSHIFT fraction bits
  logic signed [16:0] diff_in;

  assign dc_offset = acc[KSHIFT+15:KSHIFT];
  assign diff_in   = 17'(vin) - 17'(dc_offset);

  always_ff @(posedge clk) begin
    if (rst) begin
      acc        <= '0;
      vout       <= '0;
      vout_valid <= 1'b0;
    end else begin
      vout_valid <= vin_valid;
      if (vin_valid) begin
        acc  <= acc + 32'(diff_in);      // diff * k in accumulator units
        vout <= sat16(diff_in);
      end
    end
  end

  function automatic logic signed [15:0] sat16(logic signed [16:0] v);
    if (v > 17'sd32767)       return 16'sh7fff;
    else if (v < -17'sd32768) return 16'sh8000;
    else                      return v[15:0];
  endfunction

endmodule
