// tb_clock_gen: self-checking test of the clock generator.
//
// A 100 MHz board clock drives the block. The testbench samples the outputs just after
// every board clock edge and measures, in board clock cycles, the period and high time
// of the 20 MHz clock (5 and 2) and of the 5 MHz clock (20 and 10), checks that every
// rising edge of both comes with a rising edge of the 100 MHz clock and that the
// 100 MHz output follows the board clock, and checks that pll_locked stays low for
// LOCK_CYCLES cycles after reset is released, then stays high, and falls as soon as
// reset is asserted again. A watchdog ends the run if it stalls.
module tb_clock_gen;
  localparam int LOCK_CYCLES = 64;

  logic clk_100mhz_from_board = 1'b0, rst = 1'b1;
  logic clk_100mhz, clk_20mhz, clk_5mhz, pll_locked;
  int   checks = 0, failures = 0;

  clock_gen #(.LOCK_CYCLES(LOCK_CYCLES)) dut (.*);

  always #5 clk_100mhz_from_board = ~clk_100mhz_from_board;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    #1_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int  cyc = 0, lock_at = -1;
  int  rise20 = -1, rise5 = -1, n20 = 0, n5 = 0, hi20 = 0, hi5 = 0;
  logic p20 = 1'b0, p5 = 1'b0;

  initial begin
    #23 rst = 1'b0;
    repeat (1000) begin
      @(posedge clk_100mhz_from_board);
      #1;
      cyc++;
      check(clk_100mhz == 1'b1, "100 MHz output follows the board clock");
      if (pll_locked && lock_at < 0) lock_at = cyc;
      if (lock_at >= 0) check(pll_locked, "lock stays high");
      // high time counting
      if (clk_20mhz) hi20++;
      if (clk_5mhz)  hi5++;
      if (clk_20mhz && !p20) begin
        if (rise20 >= 0) begin
          check(cyc - rise20 == 5, $sformatf("20 MHz period %0d", cyc - rise20));
          check(hi20 - 1 == 2, $sformatf("20 MHz high time %0d", hi20 - 1));
          n20++;
        end
        rise20 = cyc;
        hi20   = 1;
      end
      if (clk_5mhz && !p5) begin
        if (rise5 >= 0) begin
          check(cyc - rise5 == 20, $sformatf("5 MHz period %0d", cyc - rise5));
          check(hi5 - 1 == 10, $sformatf("5 MHz high time %0d", hi5 - 1));
          check(clk_20mhz && !p20, "5 MHz and 20 MHz rising edges coincide");
          n5++;
        end
        rise5 = cyc;
        hi5   = 1;
      end
      p20 = clk_20mhz;
      p5  = clk_5mhz;
      // edges of the derived clocks only just after board clock rising edges
      @(negedge clk_100mhz_from_board);
      #1 check(clk_20mhz == p20 && clk_5mhz == p5, "no edge on the falling board edge");
    end
    check(n20 > 150 && n5 > 40, "clocks toggled");
    $display("INFO: lock after %0d cycles", lock_at);
    check(lock_at >= LOCK_CYCLES && lock_at <= LOCK_CYCLES + 2, "lock delay");
    #2 rst = 1'b1;
    #1 check(!pll_locked, "lock drops with reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
