// rx_bram: the receive block RAM, one capture deep, with a single read/write port.
//
// The beamformer accumulates its output here, the correlator reads that output and
// overwrites it with the correlation, and the system controller clears the memory and
// reads it out to the host. One port serves them all through the BRAM bus arbiter.
//
// Interface: en, we, addr, din in one request struct; dout out. A write stores din at
// addr; a read returns the word at addr on dout one clock later (registered output, as in
// a block RAM). dout holds its value when en is low. Write-first or read-first behaviour
// is not relied upon by any user: a write leaves dout unchanged.
//
// The single port, 14-bit address and 36-bit word follow the design; DEPTH defaults to
// the full 2^14 words the address reaches, which holds the 499 leading zeros, the
// 14112-sample capture and the correlation tail.
module rx_bram
  import radar_pkg::*;
#(
  parameter int DEPTH = 2**BRAM_AW
) (
  input  logic               clk,
  input  bram_req_t          req,
  output logic [BRAM_DW-1:0] dout
);

  logic [BRAM_DW-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (req.en) begin
      if (req.we) mem[req.addr] <= req.din;
      else        dout <= mem[req.addr];
    end
  end

endmodule
