// tb_radar_workloads: the two measured scenarios of the acoustic radar, run end to end
// on acoustic_radar_top at its default sizes (14112-sample capture, no decimation,
// 1.6 ms initial system delay and 2 ms silence time from the register reset values).
//
// Scenario 1: a target 3.5 m away straight in front of the arrays (90 degrees); the
// design is put in radar mode at 90 degrees. Scenario 2: a target 2 m away at 60
// degrees; radar mode scans 60 and 90 degrees. For each packet the testbench checks the
// angle, that the correlation peak index lies where the echo was placed, that the range
// recovered from the index is within 2 cm of the target's, and in scenario 2 that the
// beam towards the target returns the clearly larger peak.
//
// The host, ADC model and echo are those of the shared end-to-end body; the echo start
// is set from the round-trip time 2 R / c (c = 346.13 m/s) less the 2 ms silence time,
// taking the end of the initial system delay as acoustic time zero. A watchdog ends
// the run after 900 ms of simulated time.
module tb_radar_workloads;
  import radar_pkg::*;
  localparam int CAPTURE_LEN = 14112;
  localparam bit WORKLOADS = 1'b1;
  localparam bit FULL = 1'b1;

  initial begin
    #900_000_000;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  acoustic_radar_top dut (.*);

`include "tb_acoustic_radar_top_body.svh"
endmodule
