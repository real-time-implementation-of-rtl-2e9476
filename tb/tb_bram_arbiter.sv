// tb_bram_arbiter: self-checking test of the BRAM bus arbiter.
//
// The three requesters (controller, beamformer, correlator) drive independent random
// requests, and the port select steps through all three owners and the unused code in
// random order. The output must equal the selected requester's request in every field,
// and be all zero for the unused select code, so that no other requester can write the
// BRAM. The arbiter is combinational, so each check is made in the same time step. A
// watchdog ends the run if it stalls.
module tb_bram_arbiter;
  import radar_pkg::*;

  bram_sel_e port_sel;
  bram_req_t ctrl_req, rxbf_req, corr_req, bram_req, expected;
  int        checks = 0, failures = 0;
  int        seen [4] = '{0, 0, 0, 0};

  bram_arbiter dut (.*);

  function automatic bram_req_t rand_req();
    bram_req_t r;
    r.en   = 1'($urandom);
    r.we   = 1'($urandom);
    r.addr = BRAM_AW'($urandom);
    r.din  = {4'($urandom), 32'($urandom)};
    return r;
  endfunction

  initial begin
    #1_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4000; i++) begin
      ctrl_req = rand_req();
      rxbf_req = rand_req();
      corr_req = rand_req();
      port_sel = bram_sel_e'($urandom_range(0, 3));
      case (int'(port_sel))
        0: expected = ctrl_req;
        1: expected = rxbf_req;
        2: expected = corr_req;
        default: expected = '0;
      endcase
      seen[int'(port_sel)]++;
      #1;
      checks++;
      if (bram_req !== expected) begin
        failures++;
        if (failures < 10) $display("FAIL: sel %0d got %p expected %p", port_sel, bram_req, expected);
      end
    end
    for (int s = 0; s < 4; s++) begin
      checks++;
      if (seen[s] == 0) begin
        failures++;
        $display("FAIL: select %0d never used", s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
