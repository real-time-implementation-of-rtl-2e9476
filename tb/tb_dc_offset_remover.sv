// tb_dc_offset_remover: self-checking test of the DC offset remover.
//
// The input is a DC level of 3000 plus a square wave of amplitude 2000 and some random
// noise, with random gaps between valid samples. A reference model in the testbench
// keeps the running DC estimate as a real number, e <- e + (x - floor(e)) * 2^-15, and
// predicts every output, x - floor(e) saturated to 16 bits; each output must match and
// must come exactly one clock after its input. After 5 time constants
// (5 * 2^15 samples) the estimate must be within 2 % of the DC level, and the mean of the
// output over the last full periods must be near zero. A short test of a large negative
// step checks the output saturation. A watchdog ends the run if it stalls.
module tb_dc_offset_remover;
  logic               clk = 1'b0, rst = 1'b1;
  logic signed [15:0] vin = '0, vout, dc_offset;
  logic               vin_valid = 1'b0, vout_valid;
  int                 checks = 0, failures = 0;

  dc_offset_remover dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    #20_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  real     est = 0.0;          // reference DC estimate
  longint  exp_out, fl;
  longint  sum_out = 0;
  int      n_out = 0, n;
  localparam int NS = 5 * 32768;

  initial begin
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    for (n = 0; n < NS + 40; n++) begin
      @(negedge clk);
      vin       = 16'(3000 + (((n / 20) % 2 == 0) ? 2000 : -2000) + $signed($urandom_range(0, 64)) - 32);
      vin_valid = 1'b1;
      fl        = longint'($floor(est));
      exp_out   = longint'(vin) - fl;
      est       = est + real'(exp_out) / 32768.0;
      @(posedge clk);
      #1;
      check(vout_valid, "valid one clock after input");
      check(vout == 16'(exp_out), $sformatf("sample %0d: out %0d expected %0d", n, vout, exp_out));
      if (n >= NS) begin
        sum_out += vout;
        n_out++;
      end
      vin_valid = 1'b0;
      if ($urandom_range(0, 3) == 0) begin
        @(posedge clk);
        #1 check(!vout_valid, "no valid without input");
      end
    end
    $display("INFO: dc estimate %0d (reference %f), output mean %f", dc_offset, est,
             real'(sum_out) / n_out);
    check(dc_offset > 2940 && dc_offset < 3060, "estimate converged to the DC level");
    check((sum_out / n_out) > -100 && (sum_out / n_out) < 100, "output mean near zero");
    // saturation: a full negative input far below the estimate
    @(negedge clk);
    vin = -16'sd32768;
    vin_valid = 1'b1;
    @(posedge clk);
    #1 check(vout == -16'sd32768, "negative saturation");
    vin_valid = 1'b0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
