// radar_pkg: types, constants and table functions shared by the acoustic radar modules.
//
// The radar uses a six-element uniform linear array for both transmit and receive.
// Transmit samples run at the DAC rate (5 MHz BCLK / 96 = 52083 Hz), receive samples at
// the ADC rate of 250 kSPS. The radar pulse is a 1417 Hz carrier under a Gaussian
// window lasting 2 ms. All tables the hardware needs (pulse ROMs, steering delay
// lookup tables, low-pass FIR coefficients) are computed here by constant functions,
// so the formulas travel with the RTL instead of generated data files.
//
// Control buses are a minimal WishBone classic subset: the master raises cyc and stb
// with address, data and we and holds them until the slave answers with a one-cycle ack.
// Register data is 8 bits wide, as in the module port tables of the design.
//
// Numbers from the design description: 6 channels, 250 kSPS, 52083 Hz, 1417 Hz carrier,
// 671 Hz 3 dB bandwidth, 2 ms pulse (500 receive samples), 33-tap Hamming low-pass with a
// 2 kHz cutoff, capture length 14112, 14-bit BRAM address and 36-bit BRAM data, speed of
// sound 346.13 m/s. The element spacing of 0.12 m is this design's reading of the quoted
// inter-channel delays (173.35 us at 60 degrees); the 24-bit transmit pulse length of
// 104 samples follows from 2 ms at 52083 Hz.
package radar_pkg;

  localparam int NCH = 6;

  // ---------------- physical constants ----------------
  localparam real SOUND_SPEED   = 346.13;     // m/s at 25 C
  localparam real ELEM_SPACING  = 0.12;       // m between adjacent array elements
  localparam real FS_ADC        = 250000.0;   // receive sampling rate
  localparam real FS_DAC        = 2.5e6 / 48.0; // transmit sampling rate (BCK/48)
  localparam real PULSE_FREQ    = 1417.0;     // carrier frequency of the radar pulse
  localparam real PULSE_BW3DB   = 671.0;      // 3 dB bandwidth of the radar pulse
  localparam real PI            = 3.14159265358979323846;

  localparam int RX_PULSE_LEN   = 500;        // samples at 250 kSPS
  localparam int TX_PULSE_LEN   = 104;        // samples at 52083 Hz
  localparam int FIR_TAPS       = 33;         // order 32
  localparam int MAX_ANGLE      = 180;

  // ---------------- bus types ----------------
  typedef struct packed {
    logic       cyc;
    logic       stb;
    logic       we;
    logic [7:0] adr;
    logic [7:0] dat;
  } wb_req_t;

  typedef struct packed {
    logic       ack;
    logic [7:0] dat;
  } wb_rsp_t;

  localparam int BRAM_AW = 14;
  localparam int BRAM_DW = 36;

  typedef struct packed {
    logic               en;
    logic               we;
    logic [BRAM_AW-1:0] addr;
    logic [BRAM_DW-1:0] din;
  } bram_req_t;

  // Owner of the receive BRAM port (BRAM bus arbiter port select).
  typedef enum logic [1:0] {
    BRAM_SEL_CTRL = 2'd0,
    BRAM_SEL_RXBF = 2'd1,
    BRAM_SEL_CORR = 2'd2
  } bram_sel_e;

  // Status register values shared by the beamformer and the correlator.
  localparam logic [7:0] STATUS_IDLE = 8'h00;
  localparam logic [7:0] STATUS_DONE = 8'h01;

  // ---------------- tables ----------------
  // Gaussian sigma from the 3 dB bandwidth: |P(f)| ~ exp(-2 pi^2 sigma^2 f^2) = 1/sqrt(2)
  // at f = BW/2.
  function automatic real pulse_sigma();
    return $sqrt($ln(2.0) / 2.0) / (PI * (PULSE_BW3DB / 2.0));
  endfunction

  // Pulse value at time t (seconds) measured from the pulse centre, range [-1, 1].
  function automatic real pulse_shape(real t);
    real s;
    s = pulse_sigma();
    return $cos(2.0 * PI * PULSE_FREQ * t) * $exp(-(t * t) / (2.0 * s * s));
  endfunction

  // Receive (matched filter) pulse sample i of RX_PULSE_LEN, signed Q1.15.
  function automatic logic signed [15:0] rx_pulse_sample(int i);
    real t;
    t = (real'(i) - real'(RX_PULSE_LEN - 1) / 2.0) / FS_ADC;
    return 16'($rtoi($floor(32767.0 * pulse_shape(t) + 0.5)));
  endfunction

  // Transmit pulse sample i of TX_PULSE_LEN, signed 24-bit at 7/8 of full scale.
  function automatic logic signed [23:0] tx_pulse_sample(int i);
    real t;
    t = (real'(i) - real'(TX_PULSE_LEN - 1) / 2.0) / FS_DAC;
    return 24'($rtoi($floor(7340032.0 * pulse_shape(t) + 0.5)));
  endfunction

  // Delay between adjacent elements, in samples at rate fs, for a steer angle in degrees:
  // round(d * |cos(theta)| / c * fs). The sign (which end of the array leads) is taken
  // from whether the angle is below or above 90 degrees.
  function automatic int steer_delay(int angle_deg, real fs);
    real v;
    v = ELEM_SPACING * $cos(PI * real'(angle_deg) / 180.0) / SOUND_SPEED * fs;
    if (v < 0.0) v = -v;
    return $rtoi($floor(v + 0.5));
  endfunction

  function automatic int tx_steer_delay(int angle_deg);
    return steer_delay(angle_deg, FS_DAC);
  endfunction

  function automatic int rx_steer_delay(int angle_deg);
    return steer_delay(angle_deg, FS_ADC);
  endfunction

  // Low-pass FIR: order 32, Hamming window, cutoff 2000 Hz at 250 kSPS (normalised
  // cutoff 0.016 of Nyquist), scaled to unity DC gain, quantised to signed Q1.17.
  function automatic real fir_ideal(int n);
    real wn, x, w;
    wn = 2000.0 / (FS_ADC / 2.0);
    x  = real'(n) - real'(FIR_TAPS - 1) / 2.0;
    w  = 0.54 - 0.46 * $cos(2.0 * PI * real'(n) / real'(FIR_TAPS - 1));
    if (x == 0.0) return wn * w;
    return w * $sin(PI * wn * x) / (PI * x);
  endfunction

  function automatic logic signed [17:0] fir_coef(int n);
    real sum;
    sum = 0.0;
    for (int k = 0; k < FIR_TAPS; k++) sum += fir_ideal(k);
    return 18'($rtoi($floor(131072.0 * fir_ideal(n) / sum + 0.5)));
  endfunction

endpackage
