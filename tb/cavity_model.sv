// cavity_model: behavioural model of everything outside the FPGA, for tests.
//
// Not synthesizable. It turns the DAC words into ADC samples of five
// channels:
//   * DAC and up-conversion: the offset-binary DAC stream of the 16 MHz
//     carrier is turned back into the drive phasor D (in DAC LSB) by reading
//     the +I, -Q, -I, +Q sample pattern; mixing with a local oscillator that
//     is coherent with the sampling clock keeps this phasor at 80 MHz.
//   * Resonator: a single-pole complex-envelope model in the frame of the
//     80 MHz carrier, advanced once per 64 MHz sample:
//       V[n+1] = V[n] + a * ( (j*delta - 1) * V[n] + gain * D * exp(j*cable) )
//     with a = 2*pi*f_half/f_s (f_half = half bandwidth) and
//     delta = detune / f_half; detune is the resonance minus 80 MHz.
//   * ADCs: channel 0 is the pickup Re(V * exp(j*n*90deg)), channel 1 a
//     reference generator of amplitude ref_amp and phase ref_ph at exactly
//     80 MHz, channels 2 and 3 forward and reflected waves (D and V - D),
//     channel 4 a beam-current channel carrying only noise. Each sample gets
//     uniform noise of +-noise LSB and is rounded and clipped to 12 bits.
// The test sets detune, cable, ref_ph and the other reals directly.
module cavity_model #(
  parameter int ADC_W = 12,
  parameter int DAC_W = 12
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic [DAC_W-1:0]           dac,
  output logic [4:0][ADC_W-1:0]      adc
);

  real f_s     = 64.0e6;
  real f_half  = 80.0e3;
  real detune  = 0.0;
  real cable   = 0.5236;     // 30 degrees of cable and amplifier phase
  real gain    = 1.0;
  real ref_amp = 1500.0;
  real ref_ph  = 0.0;
  real noise   = 2.0;

  real vr = 0.0, vi = 0.0;   // cavity field phasor, ADC LSB
  real dr = 0.0, di = 0.0;   // drive phasor, DAC LSB
  int  n = 0;

  function automatic logic [ADC_W-1:0] quant(real v);
    int r;
    v = v + noise * (($urandom_range(2000) / 1000.0) - 1.0);
    r = (v >= 0) ? int'($floor(v + 0.5)) : -int'($floor(-v + 0.5));
    if (r > 2 ** (ADC_W - 1) - 1) r = 2 ** (ADC_W - 1) - 1;
    if (r < -(2 ** (ADC_W - 1))) r = -(2 ** (ADC_W - 1));
    return ADC_W'(r);
  endfunction

  // Re(X * exp(j*k*90deg)) for the four sample phases
  function automatic real proj(real xr, real xi, int k);
    case (k % 4)
      0: return xr;
      1: return -xi;
      2: return -xr;
      default: return xi;
    endcase
  endfunction

  always @(posedge clk) begin
    real s, a, dl, ur, ui, cr, ci;
    if (!rst_n) begin
      n  <= 0;
      vr = 0.0; vi = 0.0; dr = 0.0; di = 0.0;
      adc <= '0;
    end else begin
      // drive phasor from the DAC pattern (the DAC word counter is aligned
      // with the FPGA's sample counters by the common reset)
      s = real'(int'(dac) - 2 ** (DAC_W - 1));
      // the word read now was made for the previous sample
      case ((n + 3) % 4)
        0: dr = s;
        1: di = -s;
        2: dr = -s;
        default: di = s;
      endcase
      // resonator
      a  = 6.283185307 * f_half / f_s;
      dl = detune / f_half;
      cr = gain * (dr * $cos(cable) - di * $sin(cable));
      ci = gain * (dr * $sin(cable) + di * $cos(cable));
      ur = -vr - dl * vi + cr;
      ui = -vi + dl * vr + ci;
      vr = vr + a * ur;
      vi = vi + a * ui;
      // ADC samples, for the sample the FPGA takes at the next edge
      adc[0] <= quant(proj(vr, vi, n + 1));
      adc[1] <= quant(proj(ref_amp * $cos(ref_ph), ref_amp * $sin(ref_ph), n + 1));
      adc[2] <= quant(proj(dr, di, n + 1));
      adc[3] <= quant(proj(vr - dr, vi - di, n + 1));
      adc[4] <= quant(0.0);
      n <= n + 1;
    end
  end

  // field seen by the test: amplitude in ADC LSB and phase in radians
  function automatic real field_amp();
    return $sqrt(vr * vr + vi * vi);
  endfunction

  function automatic real field_phase();
    return $atan2(vi, vr);
  endfunction

endmodule
