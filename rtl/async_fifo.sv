// async_fifo: dual-clock FIFO used for the six receive channel FIFOs and the six DAC
// input FIFOs.
//
// Write and read pointers are kept in Gray code and passed across the clock boundary
// through two-flop synchronisers, the usual structure for a clock-domain-crossing FIFO.
// The memory is a plain array, so it maps onto block RAM. full and empty are
// conservative: full may stay high and empty may stay high for two cycles of the other
// clock after the far side has moved its pointer.
//
// Interface: wr_en/din in the wclk domain (a write while full is dropped), rd_en in the
// rclk domain with first-word-fall-through output dout (valid whenever empty is low;
// rd_en pops it). rst is an active-high reset that may come from either domain or from
// a third one: it clears both pointers asynchronously and is released synchronously in
// each domain. The radar controller holds the receive channel FIFOs in this reset to
// ignore the ADC stream, as the design describes.
//
// The FIFOs of the original design are generated vendor cores; the Gray-code structure
// and the fall-through read are this design's choice.
module async_fifo #(
  parameter int DW = 16,
  parameter int AW = 10          // depth = 2**AW
) (
  input  logic          rst,
  input  logic          wclk,
  input  logic          wr_en,
  input  logic [DW-1:0] din,
  output logic          full,
  input  logic          rclk,
  input  logic          rd_en,
  output logic [DW-1:0] dout,
  output logic          empty
);

  logic [DW-1:0] mem [2**AW];

  logic [AW:0] wbin, wgray, rbin, rgray;
  logic [AW:0] wq1_rgray, wq2_rgray, rq1_wgray, rq2_wgray;
  logic        wrst_q1, wrst, rrst_q1, rrst;

  // reset synchronisers: asynchronous assertion, synchronous release
  always_ff @(posedge wclk or posedge rst)
    if (rst) {wrst, wrst_q1} <= 2'b11;
    else     {wrst, wrst_q1} <= {wrst_q1, 1'b0};

  always_ff @(posedge rclk or posedge rst)
    if (rst) {rrst, rrst_q1} <= 2'b11;
    else     {rrst, rrst_q1} <= {rrst_q1, 1'b0};

  function automatic logic [AW:0] bin2gray(logic [AW:0] b);
    return b ^ (b >> 1);
  endfunction

  // ---------------- write side ----------------
  logic [AW:0] wbin_next;
  assign wbin_next = wbin + (AW+1)'(wr_en && !full);

  always_ff @(posedge wclk or posedge wrst) begin
    if (wrst) begin
      wbin      <= '0;
      wgray     <= '0;
      wq1_rgray <= '0;
      wq2_rgray <= '0;
    end else begin
      wbin      <= wbin_next;
      wgray     <= bin2gray(wbin_next);
      wq1_rgray <= rgray;
      wq2_rgray <= wq1_rgray;
    end
  end

  always_ff @(posedge wclk)
    if (wr_en && !full) mem[wbin[AW-1:0]] <= din;

  // full when the write pointer is one lap ahead of the synchronised read pointer
  assign full = (wgray == {~wq2_rgray[AW:AW-1], wq2_rgray[AW-2:0]});

  // ---------------- read side ----------------
  logic [AW:0] rbin_next;
  assign rbin_next = rbin + (AW+1)'(rd_en && !empty);

  always_ff @(posedge rclk or posedge rrst) begin
    if (rrst) begin
      rbin      <= '0;
      rgray     <= '0;
      rq1_wgray <= '0;
      rq2_wgray <= '0;
    end else begin
      rbin      <= rbin_next;
      rgray     <= bin2gray(rbin_next);
      rq1_wgray <= wgray;
      rq2_wgray <= rq1_wgray;
    end
  end

  assign empty = (rgray == rq2_wgray);
  assign dout  = mem[rbin[AW-1:0]];

endmodule
