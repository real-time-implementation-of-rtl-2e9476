// bram_arbiter: BRAM bus arbiter that hands the single receive BRAM port to one master.
//
// The system controller sets port_sel to the module that is about to use the receive
// BRAM: itself (clearing, reading out), the receive beamformer or the correlator. The
// selected master's request goes to the memory; the other masters' requests are
// dropped. Read data is broadcast to all masters, since only the owner issues reads.
//
// The arbiter is combinational; it adds no latency. Switching port_sel while a master is
// mid-access is the controller's responsibility to avoid. Selecting a master by an
// explicit select input owned by the controller follows the design; the encoding of
// port_sel is this design's.
module bram_arbiter
  import radar_pkg::*;
(
  input  bram_sel_e          port_sel,
  input  bram_req_t          ctrl_req,
  input  bram_req_t          rxbf_req,
  input  bram_req_t          corr_req,
  output bram_req_t          bram_req
);

  always_comb begin
    unique case (port_sel)
      BRAM_SEL_RXBF: bram_req = rxbf_req;
      BRAM_SEL_CORR: bram_req = corr_req;
      BRAM_SEL_CTRL: bram_req = ctrl_req;
      default:       bram_req = '0;
    endcase
  end

endmodule
