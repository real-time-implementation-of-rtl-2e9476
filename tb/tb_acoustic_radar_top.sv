// tb_acoustic_radar_top: end-to-end test of the acoustic radar at a reduced capture
// length (1000 samples).
//
// The host sets short delays, two captures per angle, decimation 16 and a channel
// calibration, then runs three operations: "capture beamformer out" (the beam must
// show the echo at the right place with six channels aligned and two captures summed),
// "capture correlator out" (every word must equal the testbench's own correlation of
// the BRAM contents at the correlator start, decimated by 16, and the peak must sit at
// the echo delay) and "run radar" over 60 and 70 degrees (the target direction must give
// the larger peak, and the angle must wrap back to 60 after an acknowledge), then stops.
// Mode switches, capture accumulation, decimation, packet fragmentation and padding, the
// angle wrap, channel FIFO resets and DAC activity are counted, and each must happen. A
// watchdog ends the run if it stalls. The checks are described in
// tb_acoustic_radar_top_body.svh.
module tb_acoustic_radar_top;
  import radar_pkg::*;
  localparam int CAPTURE_LEN = 1000;
  localparam bit WORKLOADS = 1'b0;
  localparam bit FULL = 1'b0;

  initial begin
    #150_000_000;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  acoustic_radar_top #(.CAPTURE_LEN(CAPTURE_LEN)) dut (.*);

`include "tb_acoustic_radar_top_body.svh"
endmodule
