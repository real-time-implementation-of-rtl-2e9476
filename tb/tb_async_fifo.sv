// tb_async_fifo: self-checking test of the dual-clock FIFO.
//
// The write clock (period 7 ns) and read clock (period 3 ns) are unrelated. Phase 1
// writes without reading until the FIFO reports full and checks that exactly 2**AW
// words went in. Phase 2 drains it, then writes and reads with random enables on both
// sides. Every word read is compared with a reference queue in the order written, and
// empty is checked against the queue (the FIFO may report empty late, never early).
// Phase 3 asserts the asynchronous reset while data is stored and checks that the FIFO
// comes back empty. A watchdog ends the run if it stalls.
module tb_async_fifo;
  localparam int DW = 16, AW = 4;

  logic          rst = 1'b1, wclk = 1'b0, rclk = 1'b0;
  logic          wr_en = 1'b0, rd_en = 1'b0, full, empty;
  logic [DW-1:0] din = '0, dout;
  int            checks = 0, failures = 0;
  logic [DW-1:0] q [$];

  async_fifo #(.DW(DW), .AW(AW)) dut (.*);

  always #3.5 wclk = ~wclk;
  always #1.5 rclk = ~rclk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // writer
  task automatic write_word(input logic [DW-1:0] d);
    @(negedge wclk);
    wr_en = 1'b1;
    din   = d;
    @(posedge wclk);
    if (!full) q.push_back(d);
    #0.1 wr_en = 1'b0;
  endtask

  initial begin
    #200000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int n;
  initial begin
    #20 rst = 1'b0;
    repeat (5) @(posedge wclk);
    check(empty, "empty after reset");
    // phase 1: fill
    n = 0;
    while (!full && n < 100) begin
      write_word(DW'($urandom));
      n++;
    end
    check(n == 2**AW, $sformatf("full after %0d writes, expected %0d", n, 2**AW));
    write_word(16'hdead);                   // ignored while full
    check(q.size() == 2**AW, "write while full ignored");
    // phase 2: drain and random traffic
    fork
      begin
        repeat (400) begin
          if ($urandom_range(0, 2) != 0) write_word(DW'($urandom));
          else @(posedge wclk);
        end
      end
      begin
        repeat (1500) begin
          @(negedge rclk);
          rd_en = ($urandom_range(0, 1) == 1) && !empty;
          if (rd_en) begin
            check(q.size() > 0, "no data read from an empty queue");
            if (q.size() > 0) check(dout == q.pop_front(), "data order");
          end else if (q.size() == 0) check(empty, "empty when nothing stored");
          @(posedge rclk);
          #0.1 rd_en = 1'b0;
        end
      end
    join
    // drain what is left
    repeat (200) begin
      @(negedge rclk);
      rd_en = !empty;
      if (rd_en && q.size() > 0) check(dout == q.pop_front(), "data order at drain");
      @(posedge rclk);
      #0.1 rd_en = 1'b0;
    end
    check(q.size() == 0, "all words read");
    // phase 3: reset with data stored
    repeat (5) write_word(DW'($urandom));
    repeat (6) @(posedge rclk);
    check(!empty, "data visible on read side");
    rst = 1'b1;
    #10 check(empty, "empty during reset");
    rst = 1'b0;
    q.delete();
    repeat (6) @(posedge rclk);
    check(empty && !full, "empty after reset release");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
