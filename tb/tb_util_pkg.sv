// tb_util_pkg: reference arithmetic shared by the testbenches.
//
// Decodes IEEE-754 single-precision bit patterns into reals and computes the
// expected carrier samples directly with $sin, independently of the RTL's own
// table generation, so a testbench can compare a DUT sample with the ideal
// value within a tolerance well below one float LSB step of the samples.
package tb_util_pkg;

  localparam real PI  = 3.14159265358979323846;
  localparam real TOL = 1.0e-6;

  // IEEE-754 single precision -> real (normal numbers and zero).
  function automatic real f32_to_real(logic [31:0] b);
    real m;
    int  e;
    if (b[30:0] == '0) return 0.0;
    e = int'(b[30:23]) - 127;
    m = 1.0 + real'(b[22:0]) / 8388608.0;
    while (e > 0) begin m = m * 2.0; e--; end
    while (e < 0) begin m = m / 2.0; e++; end
    return b[31] ? -m : m;
  endfunction

  // Ideal sample k of an n-sample carrier period at phase_deg degrees.
  function automatic real ref_sample(int k, int n, int phase_deg);
    return $sin(2.0 * PI * real'(k) / real'(n) + real'(phase_deg) * PI / 180.0);
  endfunction

  function automatic bit close_to(logic [31:0] b, real r);
    real d;
    d = f32_to_real(b) - r;
    return (d < TOL) && (d > -TOL);
  endfunction

  // Carrier phase the published waveforms show for each symbol value.
  function automatic int bpsk_phase(logic bit_v);
    return bit_v ? 90 : 270;
  endfunction

  function automatic int qpsk_phase(logic [1:0] dibit);
    case (dibit)
      2'b11:   return 315;
      2'b10:   return 45;
      2'b01:   return 225;
      default: return 135;
    endcase
  endfunction

endpackage
