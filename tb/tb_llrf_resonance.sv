// tb_llrf_resonance: start-up of a resonator that sits away from 80 MHz.
//
// The resonator model is set to 79.7 MHz (300 kHz below the 80 MHz carrier)
// with an 80 kHz half bandwidth, the test cavity of the controller's
// commissioning. The test does the two start-up procedures the controller
// offers for finding such a resonance, then a retuning:
//   1. Frequency scan in NCO mode from -500 kHz to -100 kHz in 20 kHz steps.
//      The host reads the cavity magnitude late in each step (it follows the
//      scan through the STATUS step index). The peak must be at -300 kHz.
//      The response 80 kHz either side of it must be 1/sqrt(2) of the peak,
//      which measures the half bandwidth. The capture buffer, set to keep
//      one sample per scan step, must hold the same curve. The two readings
//      are taken at different moments, and off the carrier the measured
//      magnitude ripples by about +-pi*df/fs (I and Q come from alternate
//      samples of a turning phasor): +-2.5% at -500 kHz, hence 4% tolerance.
//   2. SEL with amplitude feedback, started from the fixed 80 MHz drive,
//      300 kHz from the resonance. The frequency meter must show the loop
//      running well below 80 MHz, towards the resonance, and the amplitude
//      loop must hold the field.
//   3. The resonance is moved to 79.8 MHz while SEL runs: the loop
//      frequency must follow it upwards.
//   4. The resonance is brought to 80 MHz + 5 kHz, as the tuner would. The
//      phase loop is closed in SEL: a loop phase theta moves the SEL
//      oscillation by f_half*tan(theta), so the loop pulls the oscillation
//      onto the reference frequency. With proportional gain only a phase
//      error remains (the loop phase that holds the frequency shift needs
//      one); with PI it goes to zero. Then the controller is switched from
//      SEL to GDR: the field must lock at the amplitude and phase set points.
// In SEL the processing delay pulls the loop frequency part of the way back
// towards 80 MHz; for this model the loop settles near -190 kHz and then
// near -137 kHz, so the test asks for a range, not the resonance itself.
// The frequency-meter gate is shortened (GATE_LOG2 = 14) to keep this short.
module tb_llrf_resonance;
  import llrf_pkg::*;

  localparam real FS = 64.0e6;

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

  task automatic run(input int n);
    repeat (n) @(negedge clk);
  endtask

  function automatic int deg16(real d);
    return int'($floor(d / 360.0 * 65536.0 + 0.5)) & 16'hFFFF;
  endfunction

  function automatic real wrapdeg(real d);
    while (d > 180.0) d -= 360.0;
    while (d < -180.0) d += 360.0;
    return d;
  endfunction

  // field phase against the reference, degrees
  function automatic real field_rel_deg();
    return wrapdeg((cav.field_phase() - cav.ref_ph) * 57.29577951308232);
  endfunction

  // NCO word of a frequency offset: f * 2^26 / 64 MHz
  function automatic int fword(real f);
    return int'($floor(f * 67108864.0 / FS + 0.5));
  endfunction

  // cavity - reference frequency from the meter, Hz
  task automatic read_freq(output real fd);
    logic [31:0] lo, hi;
    rd(7'h49, lo);
    rd(7'h4A, hi);
    fd = real'({hi[7:0], lo});
    if (hi[7]) fd = fd - 1099511627776.0;
    fd = fd * FS / 1073741824.0;          // 2^(16 + 14)
  endtask

  initial begin
    logic [31:0] v;
    real mag[21];
    real peak, f1, f2, r_lo, r_hi;
    int  ipk;
    wr_en = 0; rd_en = 0; addr = 0; wdata = 0; trig_event = 0;
    cav.detune = -300.0e3;
    repeat (4) @(posedge clk);
    @(negedge clk) rst_n = 1;

    // ---- 1. frequency scan ----
    wr(7'h01, 16000);
    wr(7'h00, 32'(MODE_NCO));
    wr(7'h21, fword(-500.0e3));
    wr(7'h22, fword(20.0e3));
    wr(7'h23, 21);
    wr(7'h24, 2000);
    wr(7'h28, 32'h230);                   // capture one sample per scan step
    wr(7'h2A, 1);
    wr(7'h25, 1);
    peak = 0.0; ipk = -1;
    for (int i = 0; i < 21; i++) begin
      do rd(7'h4B, v); while (int'(v[31:16]) != i && v[0]);
      run(1500);
      rd(7'h40, v);
      mag[i] = real'(v[15:0]);
      $display("scan step %0d: %0d kHz, magnitude %0d", i, -500 + 20 * i, v[15:0]);
      if (mag[i] > peak) begin peak = mag[i]; ipk = i; end
    end
    check(ipk == 10, $sformatf("scan peak at step %0d (%0d kHz), resonance at -300 kHz",
                               ipk, -500 + 20 * ipk));
    r_lo = mag[6] / peak;
    r_hi = mag[14] / peak;
    check(r_lo > 0.66 && r_lo < 0.76 && r_hi > 0.66 && r_hi < 0.76,
          $sformatf("response 80 kHz off the peak: %.3f and %.3f of the peak (0.707)", r_lo, r_hi));
    run(2500);
    rd(7'h4B, v);
    check(!v[0], "scan finished");
    // the same curve from the capture buffer, as the plot window shows it
    ipk = -1; peak = 0.0;
    for (int i = 0; i < 21; i++) begin
      wr(7'h2B, i);
      rd(7'h4C, v);
      if (real'(v[15:0]) > peak) begin peak = real'(v[15:0]); ipk = i; end
      if (real'(v[15:0]) < 0.96 * mag[i] || real'(v[15:0]) > 1.04 * mag[i]) begin
        failures++;
        $display("FAIL: response entry %0d: %0d, read in its step %.0f", i, v[15:0], mag[i]);
      end
      checks++;
    end
    check(ipk == 10, $sformatf("captured frequency response peaks at entry %0d", ipk));

    // ---- 2. SEL start 300 kHz from the resonance ----
    wr(7'h01, 12000);
    wr(7'h00, 32'(MODE_FIXED));
    run(2000);
    check(cav.field_amp() < 300.0,
          $sformatf("fixed 80 MHz drive, 300 kHz off resonance: field only %.1f LSB", cav.field_amp()));
    wr(7'h06, deg16(-30.0));              // loop phase: undo the cable phase
    wr(7'h08, 128); wr(7'h09, 4);         // amplitude Kp 0.5, Ki 1/64
    wr(7'h00, 32'(MODE_SEL) | 32'h08);    // amplitude loop on
    run(40000);
    read_freq(f1);
    check(f1 < -120.0e3 && f1 > -300.0e3,
          $sformatf("SEL runs towards the resonance: cavity - reference = %.0f Hz", f1));
    check(cav.field_amp() > 735.0 && cav.field_amp() < 765.0,
          $sformatf("SEL amplitude loop holds the field: %.1f LSB (set 750)", cav.field_amp()));

    // ---- 3. resonance moved while SEL runs ----
    cav.detune = -200.0e3;
    run(40000);
    read_freq(f2);
    check(f2 > f1 + 20.0e3 && f2 < 0.0,
          $sformatf("SEL follows the retuned cavity: %.0f Hz -> %.0f Hz", f1, f2));
    check(cav.field_amp() > 735.0 && cav.field_amp() < 765.0,
          $sformatf("field held after retuning: %.1f LSB", cav.field_amp()));

    // ---- 4. tuned to 80 MHz, switch from SEL to GDR ----
    cav.detune = 5.0e3;
    run(40000);
    read_freq(f1);
    check(f1 > 0.0 && f1 < 5.0e3,
          $sformatf("SEL with the cavity tuned to +5 kHz: loop at %.0f Hz", f1));
    wr(7'h02, 12'h200);                   // 45 degrees to the reference
    wr(7'h0B, 64); wr(7'h0C, 0);          // phase Kp 0.25
    wr(7'h00, 32'(MODE_SEL) | 32'h18);    // SEL, amplitude and phase loops
    run(40000);
    read_freq(f2);
    check(f2 > -100.0 && f2 < 100.0 && wrapdeg(field_rel_deg() - 45.0) > 3.0 && wrapdeg(field_rel_deg() - 45.0) < 30.0,
          $sformatf("SEL with P phase loop: pulled onto the reference (%.0f Hz) with a phase error (%.2f deg, set 45)",
                    f2, field_rel_deg()));
    wr(7'h0C, 1);
    run(40000);
    read_freq(f2);
    check(f2 > -100.0 && f2 < 100.0 && wrapdeg(field_rel_deg() - 45.0) > -0.5 && wrapdeg(field_rel_deg() - 45.0) < 0.5 &&
          cav.field_amp() > 742.0 && cav.field_amp() < 758.0,
          $sformatf("SEL with PI phase loop: %.0f Hz, field %.1f LSB at %.2f deg", f2, cav.field_amp(), field_rel_deg()));
    wr(7'h0B, 128); wr(7'h0C, 4);         // phase Kp 0.5, Ki 1/64
    wr(7'h00, 32'(MODE_GDR) | 32'h18);
    run(8000);
    check(cav.field_amp() > 742.0 && cav.field_amp() < 758.0 &&
          wrapdeg(field_rel_deg() - 45.0) < 0.5 && wrapdeg(field_rel_deg() - 45.0) > -0.5,
          $sformatf("switched to GDR: field %.1f LSB at %.2f deg (set 750, 45)", cav.field_amp(), field_rel_deg()));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
