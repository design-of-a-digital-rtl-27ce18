// tb_llrf_disturbance: GDR feedback against mechanical vibration, and the
// noise / loop-delay trade-off of the CIC filter.
//
// The resonator model's detuning is swung sinusoidally, as mechanical
// vibration does to a quarter-wave resonator: +-40 kHz at 500 Hz against an
// 80 kHz half bandwidth. The test works on the model's own field:
//   1. GDR with both loops open: over one vibration period the field phase
//      swings by about atan(40/80) = +-26.6 degrees and the amplitude drops
//      to about 0.89 of its peak.
//   2. GDR with amplitude and phase PI feedback: over one period the phase
//      error must stay within 1 degree and the amplitude within 1%.
//   3. Filter trade-off, without vibration, with larger ADC noise: the rms
//      field phase jitter in lock with CIC decimation by 16 must be lower
//      than without filtering. The 10%-90% response to a 10 degree phase
//      set-point step must be slower with the filter (it adds loop delay).
//   4. Narrow-band resonator, as a superconducting cavity is: half
//      bandwidth 100 Hz (time constant 1.6 ms). With CIC decimation 2048
//      (k = 11, about 48 us of filter delay) the loop locks. A detuning step
//      of one half bandwidth, which open loop turns the phase by 45 degrees,
//      must stay below 9 degrees at its peak and settle back into lock. The
//      peak is set by the loop crossover the filter delay allows (about
//      1 kHz here against a phase drift of 2*pi*100 rad/s).
// The frequency-meter gate is shortened (GATE_LOG2 = 14); it is not used.
module tb_llrf_disturbance;
  import llrf_pkg::*;

  localparam real FS  = 64.0e6;
  localparam real PI2 = 6.283185307179586;

  logic clk = 0, rst_n = 0;
  logic [4:0][11:0] adc;
  logic [11:0] dac;
  logic wr_en, rd_en, trig_event;
  logic [6:0] addr;
  logic [31:0] wdata, rdata;
  logic [15:0] tuner_ph_diff;
  logic signed [39:0] tuner_freq_diff;
  logic tuner_valid;
  int checks = 0, failures = 0;

  real vib_amp = 0.0;        // detuning swing, Hz
  real vib_f   = 500.0;      // vibration frequency, Hz
  real det0    = 0.0;        // static detuning, Hz
  longint cyc = 0;

  llrf_top #(.GATE_LOG2(14)) dut (.*);
  cavity_model cav (.clk (clk), .rst_n (rst_n), .dac (dac), .adc (adc));

  always #5 clk = ~clk;

  initial begin
    #50ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // the vibration
  always @(posedge clk) begin
    cyc <= cyc + 1;
    cav.detune = det0 + vib_amp * $sin(PI2 * vib_f * real'(cyc) / FS);
  end

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", msg);
    end else begin
      $display("ok: %s", msg);
    end
  endtask

  task automatic wr(input int a, input int d);
    @(negedge clk);
    addr = 7'(a); wdata = 32'(d); wr_en = 1;
    @(negedge clk);
    wr_en = 0;
  endtask

  task automatic run(input int n);
    repeat (n) @(negedge clk);
  endtask

  function automatic real wrapdeg(real d);
    while (d > 180.0) d -= 360.0;
    while (d < -180.0) d += 360.0;
    return d;
  endfunction

  function automatic real field_rel_deg();
    return wrapdeg((cav.field_phase() - cav.ref_ph) * 360.0 / PI2);
  endfunction

  // largest phase deviation from ph0 (degrees) and amplitude range over n clocks
  task automatic watch(input int n, input real ph0, output real ph_dev,
                       output real a_min, output real a_max);
    real d;
    ph_dev = 0.0; a_min = 1.0e9; a_max = 0.0;
    repeat (n) begin
      @(negedge clk);
      d = wrapdeg(field_rel_deg() - ph0);
      if (d < 0.0) d = -d;
      if (d > ph_dev) ph_dev = d;
      if (cav.field_amp() < a_min) a_min = cav.field_amp();
      if (cav.field_amp() > a_max) a_max = cav.field_amp();
    end
  endtask

  // rms phase deviation from its mean over n clocks, degrees
  task automatic jitter(input int n, output real rms);
    real s, s2, d, ph0;
    s = 0.0; s2 = 0.0;
    ph0 = field_rel_deg();
    repeat (n) begin
      @(negedge clk);
      d = wrapdeg(field_rel_deg() - ph0);
      s += d; s2 += d * d;
    end
    rms = $sqrt(s2 / n - (s / n) * (s / n));
  endtask

  // 10%-90% time of the field phase after a 10 degree set-point step, clocks
  task automatic step_time(input int from_code, input int to_code, output int t);
    real p0, p1, p;
    int t10, t90;
    p0 = real'(from_code) * 360.0 / 4096.0;
    p1 = real'(to_code) * 360.0 / 4096.0;
    wr(7'h02, to_code);
    t10 = -1; t90 = -1;
    for (int i = 0; i < 40000 && t90 < 0; i++) begin
      @(negedge clk);
      p = (wrapdeg(field_rel_deg() - p0)) / (p1 - p0);
      if (t10 < 0 && p > 0.1) t10 = i;
      if (t90 < 0 && p > 0.9) t90 = i;
    end
    t = (t10 < 0 || t90 < 0) ? 1000000 : t90 - t10;
  endtask

  initial begin
    real dev_open, dev_closed, amin, amax, rms0, rms4;
    int  ts0, ts4;
    int  period;
    wr_en = 0; rd_en = 0; addr = 0; wdata = 0; trig_event = 0;
    cav.ref_ph = 0.0;
    repeat (4) @(posedge clk);
    @(negedge clk) rst_n = 1;
    period = int'(FS / vib_f);

    // ---- 1. open loop under vibration ----
    wr(7'h01, 16000);                      // 1000 ADC LSB at resonance
    wr(7'h02, 0);
    wr(7'h05, 16'hEAAB);                   // -30 degrees: undo the cable phase
    wr(7'h00, 32'(MODE_GDR));              // loops open
    run(2000);
    vib_amp = 40.0e3;
    watch(period, 0.0, dev_open, amin, amax);
    check(dev_open > 24.0 && dev_open < 29.0,
          $sformatf("open loop: phase swings by %.2f deg (atan(40/80) = 26.57)", dev_open));
    check(amin / amax > 0.86 && amin / amax < 0.92,
          $sformatf("open loop: amplitude %.1f .. %.1f LSB (ratio 0.894 expected)", amin, amax));

    // ---- 2. closed loop under vibration ----
    wr(7'h08, 128); wr(7'h09, 4);
    wr(7'h0B, 128); wr(7'h0C, 4);
    wr(7'h00, 32'(MODE_GDR) | 32'h18);
    run(4000);
    watch(period, 0.0, dev_closed, amin, amax);
    check(dev_closed < 1.0,
          $sformatf("locked: phase error at most %.3f deg (open loop %.2f)", dev_closed, dev_open));
    check(amin > 990.0 && amax < 1010.0,
          $sformatf("locked: amplitude %.1f .. %.1f LSB (set 1000)", amin, amax));

    // ---- 3. filter trade-off ----
    vib_amp = 0.0;
    cav.noise = 40.0;
    wr(7'h0E, 0);
    run(4000);
    jitter(20000, rms0);
    step_time(0, 114, ts0);                // 10.0 degrees
    wr(7'h02, 0);
    wr(7'h0E, 4);
    run(20000);
    jitter(20000, rms4);
    step_time(0, 114, ts4);
    $display("no filter: jitter %.4f deg rms, step %0d clocks; CIC 16: jitter %.4f deg rms, step %0d clocks",
             rms0, ts0, rms4, ts4);
    check(rms4 < 0.7 * rms0,
          $sformatf("filtering lowers the phase jitter: %.4f -> %.4f deg rms", rms0, rms4));
    check(ts4 > ts0 && ts0 < 1000000,
          $sformatf("filtering slows the step response: %0d -> %0d clocks", ts0, ts4));

    // ---- 4. narrow-band resonator with a long filter ----
    cav.noise  = 2.0;
    cav.f_half = 100.0;
    wr(7'h00, 32'(MODE_GDR));              // open, clear the integrators
    wr(7'h02, 0);
    wr(7'h0E, 11);
    wr(7'h08, 2048); wr(7'h09, 128);       // Kp 8, Ki 1/2 per filtered sample
    wr(7'h0B, 2048); wr(7'h0C, 128);
    wr(7'h00, 32'(MODE_GDR) | 32'h18);
    run(600000);
    check(cav.field_amp() > 990.0 && cav.field_amp() < 1010.0 &&
          wrapdeg(field_rel_deg()) < 0.5 && wrapdeg(field_rel_deg()) > -0.5,
          $sformatf("narrow-band lock with k = 11: field %.1f LSB %.2f deg", cav.field_amp(), field_rel_deg()));
    det0 = 100.0;
    watch(300000, 0.0, dev_closed, amin, amax);
    $display("after the detuning step: peak phase error %.3f deg, amplitude %.1f .. %.1f LSB",
             dev_closed, amin, amax);
    check(dev_closed < 9.0 && amin > 900.0 && amax < 1100.0,
          $sformatf("detuning step: peak phase error %.2f deg (45 deg open loop)", dev_closed));
    watch(100000, 0.0, dev_closed, amin, amax);
    check(dev_closed < 0.5 && amin > 990.0 && amax < 1010.0,
          $sformatf("detuning step: settled within %.3f deg, amplitude %.1f .. %.1f LSB",
                    dev_closed, amin, amax));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
