// correlator: matched filter of the beamformer output against the transmitted pulse,
// computed with a single multiply-accumulator, with decimation and peak search.
//
// The correlation is y[n] = sum_{k=0}^{N-1} h[k] x[n+k] with N = 500 pulse samples
// h (radar_pkg::rx_pulse_sample, signed Q1.15) and x the beamformer output in the
// receive BRAM. One output sample is computed at a time: the accumulator is cleared,
// then h[k]*x[n+k] is added for k = 0, D, 2D, ... below N, one product per clock, where
// D is the decimation factor. Only every D-th output n is computed, so the run time
// falls with D^2: about CORR_LEN*N/D^2 clocks, 73 ms at 100 MHz for D = 1 and 0.29 ms
// for D = 16 with the full 14612-sample correlation length (N + capture length).
//
// Each result, shifted right by 15 and saturated to 36 bits, is written back into the
// BRAM at address n, over x[n], which no later output needs; the skipped addresses
// between results are overwritten with zeros. When all outputs are done, the whole
// correlation range is scanned for the largest (signed) value, whose value and address
// land in the max registers, and the status register reads done.
//
// WishBone registers (8-bit): 0x00 decimation factor (1..255; writing starts a run,
// 0 acts as 1), 0x01 status (0x00 idle/busy, 0x01 done), 0x02/0x03 max index bits
// 15:8/7:0, 0x04..0x07 max value bits 31:24 .. 7:0 (saturated to 32 bits). The BRAM
// port returns read data one clock after the request.
//
// The register map, the single multiply-accumulator, the pulse ROM, the in-place output
// and the peak search follow the design. The design's run-time formula quotes 0.7306 s
// for D = 1, although (500 + 14112) x 500 x 10 ns evaluates to 73 ms; one product per
// clock as in its multiply-accumulate figure is built here. Decimating the pulse taps
// along with the outputs, the output scaling, the zero fill and the signed peak are this
// design's reading.
module correlator
  import radar_pkg::*;
#(
  parameter int CAPTURE_LEN = 14112,
  parameter int CORR_LEN    = RX_PULSE_LEN + CAPTURE_LEN
) (
  input  logic               clk,
  input  logic               rst,
  input  wb_req_t            wb_i,
  output wb_rsp_t            wb_o,
  output bram_req_t          bram_req,
  input  logic [BRAM_DW-1:0] bram_dout
);

  typedef logic signed [15:0] rom_t [RX_PULSE_LEN];
  function automatic rom_t make_rom();
    rom_t r;
    for (int i = 0; i < RX_PULSE_LEN; i++) r[i] = rx_pulse_sample(i);
    return r;
  endfunction
  localparam rom_t PULSE_ROM = make_rom();

  // ---------------- registers ----------------
  logic [7:0]  dec_reg, status_reg;
  logic [15:0] max_index;
  logic signed [BRAM_DW-1:0] max_value;
  logic [31:0] max_value32;
  logic        trigger, wb_hit;

  typedef enum logic [2:0] {
    S_WAIT, S_MAC, S_DRAIN, S_FILL, S_CLEAR, S_MAX, S_MAX_LAST
  } state_e;
  state_e state;

  assign wb_hit = wb_i.cyc && wb_i.stb && !wb_o.ack;
  assign max_value32 = (max_value > 36'sh07fffffff) ? 32'h7fffffff :
                       (max_value < -36'sh080000000) ? 32'h80000000 : max_value[31:0];

  always_ff @(posedge clk) begin
    if (rst) begin
      wb_o    <= '0;
      dec_reg <= 8'd1;
      trigger <= 1'b0;
    end else begin
      wb_o.ack <= wb_hit;
      trigger  <= 1'b0;
      unique case (wb_i.adr)
        8'h00:   wb_o.dat <= dec_reg;
        8'h01:   wb_o.dat <= status_reg;
        8'h02:   wb_o.dat <= max_index[15:8];
        8'h03:   wb_o.dat <= max_index[7:0];
        8'h04:   wb_o.dat <= max_value32[31:24];
        8'h05:   wb_o.dat <= max_value32[23:16];
        8'h06:   wb_o.dat <= max_value32[15:8];
        8'h07:   wb_o.dat <= max_value32[7:0];
        default: wb_o.dat <= 8'h00;
      endcase
      if (wb_hit && wb_i.we && wb_i.adr == 8'h00) begin
        dec_reg <= (wb_i.dat == 8'd0) ? 8'd1 : wb_i.dat;
        trigger <= (state == S_WAIT);
      end
    end
  end

  // ---------------- multiply-accumulate FSM ----------------
  logic [BRAM_AW:0]   n, wr_ptr, scan;
  logic [9:0]         k;
  logic [7:0]         dec;
  logic               mac_v;                    // a product is arriving this cycle
  logic signed [15:0] h_q;
  logic signed [63:0] acc;
  logic signed [63:0] y_shift;
  logic signed [BRAM_DW-1:0] y_sat;
  logic               scan_v;
  logic [BRAM_AW:0]   scan_q;

  assign y_shift = acc >>> 15;
  assign y_sat   = (y_shift > 64'sh7ffffffff)  ? 36'sh7ffffffff :
                   (y_shift < -64'sh800000000) ? 36'sh800000000 : y_shift[BRAM_DW-1:0];

  always_comb begin
    bram_req = '0;
    unique case (state)
      S_MAC: begin
        bram_req.en   = 1'b1;
        bram_req.addr = BRAM_AW'(n + (BRAM_AW+1)'(k));
      end
      S_FILL: begin
        bram_req.en   = 1'b1;
        bram_req.we   = 1'b1;
        bram_req.addr = BRAM_AW'(wr_ptr);
        bram_req.din  = (wr_ptr == n) ? y_sat : '0;
      end
      S_CLEAR: begin
        bram_req.en   = (wr_ptr < (BRAM_AW+1)'(CORR_LEN));
        bram_req.we   = 1'b1;
        bram_req.addr = BRAM_AW'(wr_ptr);
      end
      S_MAX: begin
        bram_req.en   = 1'b1;
        bram_req.addr = BRAM_AW'(scan);
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state      <= S_WAIT;
      status_reg <= STATUS_IDLE;
      n          <= '0;
      k          <= '0;
      dec        <= 8'd1;
      wr_ptr     <= '0;
      scan       <= '0;
      mac_v      <= 1'b0;
      h_q        <= '0;
      acc        <= '0;
      scan_v     <= 1'b0;
      scan_q     <= '0;
      max_index  <= '0;
      max_value  <= '0;
    end else begin
      // pulse ROM read and product accumulation, one clock behind the address
      mac_v <= (state == S_MAC);
      h_q   <= PULSE_ROM[9'(k)];
      if (mac_v) acc <= acc + 64'(h_q) * 64'($signed(bram_dout));

      scan_v <= (state == S_MAX);
      scan_q <= scan;
      if (scan_v && ($signed(bram_dout) > max_value || scan_q == '0)) begin
        max_value <= $signed(bram_dout);
        max_index <= 16'(scan_q);
      end

      unique case (state)
        S_WAIT: if (trigger) begin
          status_reg <= STATUS_IDLE;
          dec        <= dec_reg;
          n          <= '0;
          k          <= '0;
          wr_ptr     <= '0;
          acc        <= '0;
          state      <= S_MAC;
        end
        S_MAC: begin                           // mult_acc_cycle
          if (32'(k) + 32'(dec) >= RX_PULSE_LEN) state <= S_DRAIN;
          else k <= k + 10'(dec);
        end
        S_DRAIN: state <= S_FILL;
        S_FILL: begin                          // write zeros up to n, then y[n]
          wr_ptr <= wr_ptr + 1'b1;
          if (wr_ptr == n) begin
            acc <= '0;                         // reset_mult_acc
            k   <= '0;
            if (32'(n) + 32'(dec) >= CORR_LEN) state <= S_CLEAR;
            else begin
              n     <= n + (BRAM_AW+1)'(dec);
              state <= S_MAC;
            end
          end
        end
        S_CLEAR: begin                         // zero the tail after the last output
          if (wr_ptr >= (BRAM_AW+1)'(CORR_LEN)) begin
            scan  <= '0;
            state <= S_MAX;
          end else wr_ptr <= wr_ptr + 1'b1;
        end
        S_MAX: begin                           // find_corr_max
          if (scan == (BRAM_AW+1)'(CORR_LEN - 1)) state <= S_MAX_LAST;
          else scan <= scan + 1'b1;
        end
        S_MAX_LAST: begin
          status_reg <= STATUS_DONE;
          state      <= S_WAIT;
        end
        default: state <= S_WAIT;
      endcase
    end
  end

  a_ack_in_cycle: assert property (@(posedge clk) disable iff (rst)
    wb_o.ack |-> wb_i.cyc && wb_i.stb);

endmodule
