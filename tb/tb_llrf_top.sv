// tb_llrf_top: end-to-end test of the controller around a resonator model.
//
// The DAC output drives cavity_model, whose pickup, reference, forward,
// reflected and beam channels feed the ADC inputs. The host port programs
// the controller as an operator would. The expected results are taken from
// the model's own field (amplitude in ADC LSB, phase against the
// reference), not from the controller's measurements. Sequence:
//   1. FIXED mode, open loop, detuned cavity: field equals the open-loop
//      response of the model; the measured magnitude and relative phase
//      read over the host port agree with the field, and the forward,
//      reflected and beam channels agree with the model's waves.
//   2. Cable rotation: turning the reference channel by +30 degrees moves
//      the measured relative phase by -30 degrees.
//   3. GDR, amplitude/phase PI feedback: field locks to the set points.
//   4. Phase set-point step with an event-triggered capture of magnitude
//      and relative phase: the trace runs from the old to the new value.
//   5. I/Q feedback: field locks to (i_set, q_set).
//   6. CIC decimation by 8, new amplitude set point: still locks.
//   7. SEL mode with the cavity 100 kHz above 80 MHz: the loop oscillates
//      near the cavity resonance, seen by the frequency meter.
//   8. NCO frequency scan across the resonance: the response peaks at the
//      step nearest the detuning, and the capture, set to keep one sample
//      per scan step, holds the same response curve.
// Each mechanism is counted; one that never happened is a failure.
// The frequency-meter gate is shortened (GATE_LOG2 = 14) to keep this short.
module tb_llrf_top;
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

  // mechanisms
  int n_fixed, n_rotation, n_gdr_lock, n_capture, n_iq_lock, n_cic, n_sel, n_sweep, n_resp, n_tuner;

  llrf_top #(.GATE_LOG2(14)) dut (.*);
  cavity_model cav (.clk (clk), .rst_n (rst_n), .dac (dac), .adc (adc));

  always #5 clk = ~clk;

  initial begin
    #20ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && tuner_valid) n_tuner <= n_tuner + 1;

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

  task automatic rd(input int a, output logic [31:0] d);
    @(negedge clk);
    addr = 7'(a); rd_en = 1;
    @(negedge clk);
    rd_en = 0;
    d = rdata;
  endtask

  function automatic real wrapdeg(real d);
    while (d > 180.0) d -= 360.0;
    while (d < -180.0) d += 360.0;
    return d;
  endfunction

  function automatic int deg16(real d);
    return int'($floor(d / 360.0 * 65536.0 + 0.5)) & 16'hFFFF;
  endfunction

  // field phase against the reference, degrees
  function automatic real field_rel_deg();
    return wrapdeg((cav.field_phase() - cav.ref_ph) * 360.0 / PI2);
  endfunction

  function automatic real meas_ph_deg(logic [31:0] v);
    return wrapdeg(real'(v[15:0]) * 360.0 / 65536.0);
  endfunction

  task automatic run(input int n);
    repeat (n) @(negedge clk);
  endtask

  initial begin
    logic [31:0] v, v2;
    real a_exp, p_exp, ph0, ph1, fd, peak;
    real smag[7];
    int  ipk, jpk;
    n_fixed = 0; n_rotation = 0; n_gdr_lock = 0; n_capture = 0; n_iq_lock = 0;
    n_cic = 0; n_sel = 0; n_sweep = 0; n_resp = 0; n_tuner = 0;
    wr_en = 0; rd_en = 0; addr = 0; wdata = 0; trig_event = 0;
    cav.detune = 20.0e3;
    cav.ref_ph = 0.7;
    repeat (4) @(posedge clk);
    @(negedge clk) rst_n = 1;

    // ---- 1. FIXED mode, open loop ----
    wr(7'h01, 16000);                    // amplitude set point: 1000 ADC LSB
    wr(7'h02, 12'h100);                  // phase set point 22.5 degrees
    wr(7'h00, 32'(MODE_FIXED));
    run(3000);
    a_exp = 1000.0 / $sqrt(1.0 + 0.0625);
    p_exp = wrapdeg(22.5 + 30.0 + $atan(0.25) * 360.0 / PI2 - 0.7 * 360.0 / PI2);
    check(cav.field_amp() > 0.97 * a_exp && cav.field_amp() < 1.03 * a_exp &&
          wrapdeg(field_rel_deg() - p_exp) < 1.0 && wrapdeg(field_rel_deg() - p_exp) > -1.0,
          $sformatf("fixed-frequency open loop: field %.1f LSB %.2f deg, expected %.1f %.2f",
                    cav.field_amp(), field_rel_deg(), a_exp, p_exp));
    rd(7'h40, v);
    rd(7'h48, v2);
    check(real'(v[15:0]) > 0.98 * 16.0 * cav.field_amp() && real'(v[15:0]) < 1.02 * 16.0 * cav.field_amp() &&
          wrapdeg(meas_ph_deg(v2) - field_rel_deg()) < 1.0 && wrapdeg(meas_ph_deg(v2) - field_rel_deg()) > -1.0,
          $sformatf("measured magnitude %0d phase %.2f deg against field", v[15:0], meas_ph_deg(v2)));
    // forward (drive), reflected (field - drive) and beam (noise only) channels
    begin
      real fwd, rfl;
      logic [31:0] v3, v4;
      fwd = 16.0 * $sqrt(cav.dr * cav.dr + cav.di * cav.di);
      rfl = 16.0 * $sqrt((cav.vr - cav.dr) * (cav.vr - cav.dr) + (cav.vi - cav.di) * (cav.vi - cav.di));
      rd(7'h42, v);
      rd(7'h43, v3);
      rd(7'h44, v4);
      check(real'(v[15:0]) > 0.98 * fwd - 64.0 && real'(v[15:0]) < 1.02 * fwd + 64.0 &&
            real'(v3[15:0]) > 0.98 * rfl - 64.0 && real'(v3[15:0]) < 1.02 * rfl + 64.0 &&
            v4[15:0] < 16'd64,
            $sformatf("forward %0d (model %.0f), reflected %0d (model %.0f), beam %0d (noise only)",
                      v[15:0], fwd, v3[15:0], rfl, v4[15:0]));
    end
    n_fixed++;

    // ---- 2. cable-delay rotation on the reference channel ----
    ph0 = meas_ph_deg(v2);
    wr(7'h12, int'($floor(32767.0 * $cos(PI2 / 12.0) + 0.5)));
    wr(7'h13, int'($floor(32767.0 * $sin(PI2 / 12.0) + 0.5)));
    run(200);
    rd(7'h48, v2);
    ph1 = meas_ph_deg(v2);
    check(wrapdeg(ph1 - ph0 + 30.0) < 0.5 && wrapdeg(ph1 - ph0 + 30.0) > -0.5,
          $sformatf("reference rotated by 30 deg: relative phase %.2f -> %.2f", ph0, ph1));
    n_rotation++;
    wr(7'h12, 32767);
    wr(7'h13, 0);

    // ---- 3. GDR with amplitude and phase PI feedback ----
    wr(7'h08, 128); wr(7'h09, 4);        // amplitude Kp 0.5, Ki 1/64
    wr(7'h0B, 128); wr(7'h0C, 4);        // phase Kp 0.5, Ki 1/64
    wr(7'h00, 32'(MODE_GDR) | 32'h18);
    run(8000);
    check(cav.field_amp() > 990.0 && cav.field_amp() < 1010.0 &&
          wrapdeg(field_rel_deg() - 22.5) < 0.5 && wrapdeg(field_rel_deg() - 22.5) > -0.5,
          $sformatf("GDR amplitude/phase lock: field %.1f LSB %.2f deg", cav.field_amp(), field_rel_deg()));
    n_gdr_lock++;

    // ---- 4. phase step with a triggered capture ----
    wr(7'h28, 32'h130);                  // trace a: magnitude, trace b: relative phase, event
    wr(7'h29, 3);                        // keep every 4th sample
    wr(7'h2A, 1);                        // arm
    run(50);
    rd(7'h4B, v);
    check(v[1] && !v[2], "capture armed and waiting for its trigger");
    @(negedge clk);
    addr = 7'h02; wdata = 32'h200; wr_en = 1; trig_event = 1;   // 45 degrees
    @(negedge clk);
    wr_en = 0; trig_event = 0;
    run(5000);
    rd(7'h4B, v);
    check(v[2], "capture done after the step");
    wr(7'h2B, 0);
    rd(7'h4C, v);
    wr(7'h2B, 1023);
    rd(7'h4C, v2);
    check(wrapdeg(meas_ph_deg({16'd0, v[31:16]}) - 22.5) < 1.0 && wrapdeg(meas_ph_deg({16'd0, v[31:16]}) - 22.5) > -1.0 &&
          wrapdeg(meas_ph_deg({16'd0, v2[31:16]}) - 45.0) < 1.0 && wrapdeg(meas_ph_deg({16'd0, v2[31:16]}) - 45.0) > -1.0,
          $sformatf("captured step response %.2f -> %.2f deg", meas_ph_deg({16'd0, v[31:16]}),
                    meas_ph_deg({16'd0, v2[31:16]})));
    n_capture++;
    check(wrapdeg(field_rel_deg() - 45.0) < 0.5 && wrapdeg(field_rel_deg() - 45.0) > -0.5,
          $sformatf("field follows the phase step: %.2f deg", field_rel_deg()));

    // ---- 5. I/Q feedback ----
    wr(7'h05, deg16(-30.0 - $atan(0.25) * 360.0 / PI2));   // compensate cable and detuning
    wr(7'h03, 11314); wr(7'h04, 11314);                      // 16000 at 45 degrees
    wr(7'h08, 128); wr(7'h09, 4); wr(7'h0B, 128); wr(7'h0C, 4);
    wr(7'h00, 32'(MODE_GDR) | 32'h1C);
    run(8000);
    check(cav.field_amp() > 990.0 && cav.field_amp() < 1010.0 &&
          wrapdeg(field_rel_deg() - 45.0) < 0.5 && wrapdeg(field_rel_deg() - 45.0) > -0.5,
          $sformatf("I/Q lock: field %.1f LSB %.2f deg", cav.field_amp(), field_rel_deg()));
    n_iq_lock++;

    // ---- 6. CIC decimation by 8 ----
    wr(7'h05, 0);
    wr(7'h00, 32'(MODE_GDR) | 32'h18);
    wr(7'h0E, 3);
    wr(7'h01, 12000);
    run(16000);
    rd(7'h40, v);
    check(cav.field_amp() > 742.0 && cav.field_amp() < 758.0 &&
          wrapdeg(field_rel_deg() - 45.0) < 0.5 && wrapdeg(field_rel_deg() - 45.0) > -0.5,
          $sformatf("lock with CIC decimation 8: field %.1f LSB %.2f deg, measured %0d",
                    cav.field_amp(), field_rel_deg(), v[15:0]));
    n_cic++;
    wr(7'h0E, 0);

    // ---- 7. self-excited loop with a detuned cavity ----
    cav.detune = 100.0e3;
    wr(7'h06, deg16(-30.0));             // loop phase: undo the cable phase
    wr(7'h00, 32'(MODE_SEL) | 32'h08);   // amplitude loop only
    wr(7'h01, 16000);
    run(40000);
    rd(7'h49, v);
    rd(7'h4A, v2);
    fd = real'({v2[7:0], v}) ;
    if (v2[7]) fd = fd - 1099511627776.0;
    fd = fd * FS / 1073741824.0;         // 2^(16 + 14)
    check(fd > 40.0e3 && fd < 110.0e3,
          $sformatf("SEL oscillates near the resonance: cavity - reference = %.0f Hz (detuning 100 kHz)", fd));
    check(cav.field_amp() > 500.0, $sformatf("SEL field %.1f LSB", cav.field_amp()));
    n_sel++;

    // ---- 8. frequency scan ----
    wr(7'h00, 32'(MODE_NCO));
    wr(7'h02, 0);
    wr(7'h21, -157286);                  // -150 kHz
    wr(7'h22, 52429);                    //  +50 kHz per step
    wr(7'h23, 7);
    wr(7'h24, 3000);
    wr(7'h28, 32'h230);                  // one sample per scan step: magnitude, relative phase
    wr(7'h29, 0);
    wr(7'h2A, 1);
    wr(7'h25, 1);
    peak = 0.0; ipk = -1;
    for (int i = 0; i < 7; i++) begin
      run(2950);
      rd(7'h40, v);
      $display("scan step %0d: %0d kHz offset, magnitude %0d", i, -150 + 50 * i, v[15:0]);
      smag[i] = real'(v[15:0]);
      if (real'(v[15:0]) > peak) begin peak = real'(v[15:0]); ipk = i; end
      run(44);
    end
    run(100);
    rd(7'h4B, v);
    check(ipk == 5 && !v[0], $sformatf("scan peak at step %0d (expected 5, +100 kHz), scan ended %0d", ipk, !v[0]));
    n_sweep++;
    // frequency response recorded by the capture, one entry per step
    peak = 0.0; jpk = -1;
    for (int i = 0; i < 8; i++) begin
      wr(7'h2B, i);
      rd(7'h4C, v);
      if (i < 7) begin
        $display("response entry %0d: magnitude %0d", i, v[15:0]);
        check(real'(v[15:0]) > 0.98 * smag[i] && real'(v[15:0]) < 1.02 * smag[i],
              $sformatf("response entry %0d (%0d) matches the magnitude read in its step (%.0f)",
                        i, v[15:0], smag[i]));
        if (real'(v[15:0]) > peak) begin peak = real'(v[15:0]); jpk = i; end
      end
    end
    rd(7'h4B, v);
    check(jpk == 5 && v[1] && !v[2], $sformatf("recorded response peaks at entry %0d, capture still open", jpk));
    n_resp++;

    // ---- mechanisms ----
    check(n_fixed > 0, $sformatf("fixed-frequency mode %0d", n_fixed));
    check(n_rotation > 0, $sformatf("cable rotation %0d", n_rotation));
    check(n_gdr_lock > 0, $sformatf("GDR amplitude/phase lock %0d", n_gdr_lock));
    check(n_capture > 0, $sformatf("triggered capture %0d", n_capture));
    check(n_iq_lock > 0, $sformatf("I/Q lock %0d", n_iq_lock));
    check(n_cic > 0, $sformatf("CIC decimation %0d", n_cic));
    check(n_sel > 0, $sformatf("SEL %0d", n_sel));
    check(n_sweep > 0, $sformatf("frequency scan %0d", n_sweep));
    check(n_resp > 0, $sformatf("frequency-response capture %0d", n_resp));
    check(n_tuner > 0, $sformatf("tuner updates %0d", n_tuner));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
