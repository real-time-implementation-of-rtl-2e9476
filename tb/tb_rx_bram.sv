// tb_rx_bram: self-checking test of the receive BRAM.
//
// Random writes and reads over the whole address range are applied one per clock with
// random idle cycles in between, and a model array in the testbench holds what was
// written. Every read must return the model's word exactly one clock after the request,
// and the output must hold that word while the port is idle or writing. The full 36-bit
// width and the first and last addresses are exercised on purpose. A watchdog ends the
// run if it stalls.
module tb_rx_bram;
  import radar_pkg::*;
  localparam int DEPTH = 2**BRAM_AW;

  logic               clk = 1'b0;
  bram_req_t          req = '0;
  logic [BRAM_DW-1:0] dout;
  logic [BRAM_DW-1:0] model [DEPTH];
  int                 checks = 0, failures = 0;

  rx_bram dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    #10_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [BRAM_DW-1:0] last_read, w;
  logic [BRAM_AW-1:0] a;
  initial begin
    // write every address once so all reads are defined
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk);
      w = {4'($urandom), 32'($urandom)};
      if (i == 0) w = '1;
      if (i == DEPTH - 1) w = 36'h8_0000_0001;
      req = '{en: 1'b1, we: 1'b1, addr: BRAM_AW'(i), din: w};
      model[i] = w;
    end
    last_read = 'x;
    for (int i = 0; i < 20000; i++) begin
      @(negedge clk);
      a = ($urandom_range(0, 9) == 0) ? ((i % 2 == 0) ? '0 : '1) : BRAM_AW'($urandom);
      case ($urandom_range(0, 3))
        0: begin                                  // write
          w = {4'($urandom), 32'($urandom)};
          req = '{en: 1'b1, we: 1'b1, addr: a, din: w};
          model[a] = w;
          @(posedge clk); #1;
          if (i > 0) check(dout == last_read, "output held during a write");
        end
        1: begin                                  // idle
          req = '0;
          req.din = 36'($urandom);
          @(posedge clk); #1;
          if (i > 0) check(dout == last_read, "output held while idle");
        end
        default: begin                            // read
          req = '{en: 1'b1, we: 1'b0, addr: a, din: '0};
          @(posedge clk); #1;
          check(dout == model[a], $sformatf("read %0d: got %h expected %h", a, dout, model[a]));
          last_read = model[a];
        end
      endcase
      if (i == 0) last_read = dout;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
