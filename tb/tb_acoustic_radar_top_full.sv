// tb_acoustic_radar_top_full: end-to-end test of the acoustic radar with every
// parameter at its default (14112-sample capture, 14612-word correlation range).
//
// The host leaves the initial system delay (1.6 ms), the silence time (2 ms) and one
// capture per angle at their reset values, sets decimation 1 and a channel calibration,
// and runs "capture correlator out": every one of the 14612 words sent must equal the
// testbench's own full correlation of the BRAM contents at the correlator start, and the
// peak must sit at the echo delay. It then runs one angle of "run radar" and stops it.
// About 0.3 s of radar time is simulated. The checks are described in
// tb_acoustic_radar_top_body.svh; a watchdog ends the run if it stalls.
module tb_acoustic_radar_top_full;
  import radar_pkg::*;
  localparam int CAPTURE_LEN = 14112;
  localparam bit WORKLOADS = 1'b0;
  localparam bit FULL = 1'b1;

  initial begin
    #600_000_000;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  acoustic_radar_top dut (.*);

`include "tb_acoustic_radar_top_body.svh"
endmodule
