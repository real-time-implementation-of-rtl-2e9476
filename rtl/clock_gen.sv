// clock_gen: derives the radar's 100, 20 and 5 MHz clocks and its global reset.
//
// The 100 MHz board clock is passed through as the system clock, and a modulo-20
// counter on it produces 20 MHz (divide by 5, 40 % duty) and 5 MHz (divide by 20, 50 %
// duty) clocks whose rising edges coincide with rising edges of the 100 MHz clock, so
// all three are phase aligned. pll_locked rises LOCK_CYCLES clocks after rst is
// released and falls at once when rst is asserted; the rest of the design uses its
// inverse as the global reset.
//
// Interface (as in the clock generator's port table): clk_100mhz_from_board and rst
// (active-high, asynchronous, from the board's reset switch) in; clk_100mhz,
// clk_20mhz, clk_5mhz and pll_locked out. The output clocks are registered, so they
// trail the input clock by one flop delay.
//
// The design builds this block from a vendor PLL primitive with global clock buffers;
// the division ratios (1, 5, 20), the phase alignment and the use of the lock flag as
// reset follow it. The counter dividers stand in for the PLL so that the block is plain
// logic; on an FPGA the PLL primitive is the better choice, and the lock delay here is
// this design's choice.
module clock_gen #(
  parameter int LOCK_CYCLES = 64
) (
  input  logic clk_100mhz_from_board,
  input  logic rst,
  output logic clk_100mhz,
  output logic clk_20mhz,
  output logic clk_5mhz,
  output logic pll_locked
);

  logic [4:0] cnt, cnt_next;
  logic [$clog2(LOCK_CYCLES+1)-1:0] lock_cnt;

  assign clk_100mhz = clk_100mhz_from_board;
  assign cnt_next   = (cnt == 5'd19) ? 5'd0 : cnt + 5'd1;

  always_ff @(posedge clk_100mhz_from_board or posedge rst) begin
    if (rst) begin
      cnt        <= 5'd19;
      clk_20mhz  <= 1'b0;
      clk_5mhz   <= 1'b0;
      lock_cnt   <= '0;
      pll_locked <= 1'b0;
    end else begin
      cnt       <= cnt_next;
      clk_20mhz <= (cnt_next % 5'd5) < 5'd2;
      clk_5mhz  <= cnt_next < 5'd10;
      if (lock_cnt != ($bits(lock_cnt))'(LOCK_CYCLES)) lock_cnt <= lock_cnt + 1'b1;
      pll_locked <= (lock_cnt == ($bits(lock_cnt))'(LOCK_CYCLES));
    end
  end

endmodule
