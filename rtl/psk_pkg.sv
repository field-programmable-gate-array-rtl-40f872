// psk_pkg: constants, types and the carrier-table arithmetic shared by the
// BPSK and QPSK modulators.
//
// Both modulators produce their output as a stream of 32-bit IEEE-754
// single-precision samples of a sinusoidal carrier. One symbol lasts exactly
// one carrier period of SAMPLES_PER_SYMBOL samples, and each sample is held
// for CLKS_PER_SAMPLE clock cycles. At the default 50 MHz clock this gives
// 20 clocks = 400 ns per symbol, i.e. 2.5 Mbit/s for BPSK and 5 Mbit/s for
// QPSK.
//
// The ROM contents are not stored as literal numbers: carrier_sample() works
// out sample k of a carrier with a given phase at elaboration time as
//     s(k) = sin(2*pi*k/N + phase)
// and float32_bits() turns that real value into its single-precision bit
// pattern (round to nearest). Only constant evaluation uses these functions;
// no real arithmetic reaches the hardware.
//
// The 14-bit ADC word, the 32-bit sample width, the 6-bit ROM address, the
// 10 samples per symbol and the 2 clocks per sample are the published design's
// numbers; the phase offsets of the individual ROMs follow its simulation
// waveforms.
package psk_pkg;

  // Width of one ADC word entering a modulator.
  localparam int unsigned DATA_W = 14;
  // Width of one output sample (IEEE-754 single precision).
  localparam int unsigned SAMPLE_W = 32;
  // ROM address width.
  localparam int unsigned ADDR_W = 6;
  // Carrier samples per symbol (one full carrier period per symbol).
  localparam int unsigned SAMPLES_PER_SYMBOL = 10;
  // Clock cycles each sample is held on the output.
  localparam int unsigned CLKS_PER_SAMPLE = 2;

  typedef logic [SAMPLE_W-1:0] sample_t;

  // Carrier phases, in degrees, of the four QPSK ROMs ph1..ph4 and the two
  // BPSK ROMs (Sin_ph1 carries bit 1, Sin_ph2 bit 0, 180 degrees apart).
  localparam int QPSK_PH1_DEG = 315;  // symbol 2'b11
  localparam int QPSK_PH2_DEG = 45;   // symbol 2'b10
  localparam int QPSK_PH3_DEG = 225;  // symbol 2'b01
  localparam int QPSK_PH4_DEG = 135;  // symbol 2'b00
  localparam int BPSK_PH1_DEG = 90;   // bit 1
  localparam int BPSK_PH2_DEG = 270;  // bit 0

  localparam real PI = 3.14159265358979323846;

  // Real value -> IEEE-754 single-precision bit pattern, round to nearest.
  // Handles the range a carrier sample can take (|x| <= 1, normal numbers).
  function automatic sample_t float32_bits(real x);
    real         m;
    int          e;
    int unsigned mant;
    logic        s;
    if (x == 0.0) return '0;
    s = (x < 0.0);
    m = s ? -x : x;
    e = 0;
    while (m >= 2.0) begin
      m = m / 2.0;
      e++;
    end
    while (m < 1.0) begin
      m = m * 2.0;
      e--;
    end
    mant = $rtoi((m - 1.0) * 8388608.0 + 0.5);
    if (mant == 32'd8388608) begin
      mant = 0;
      e++;
    end
    return {s, 8'(e + 127), mant[22:0]};
  endfunction

  // Sample k of n of one carrier period starting at phase_deg degrees.
  // Values below 1e-9 in magnitude are taken as exact zeros.
  function automatic sample_t carrier_sample(int k, int n, int phase_deg);
    real v;
    v = $sin(2.0 * PI * (real'(k) / real'(n) + real'(phase_deg) / 360.0));
    if (v < 1.0e-9 && v > -1.0e-9) v = 0.0;
    return float32_bits(v);
  endfunction

endpackage
