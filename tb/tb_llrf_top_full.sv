// tb_llrf_top_full: one complete operation of the controller at its default
// size (five channels, 131 ms frequency-meter gate).
// The controller first locks a cavity detuned by 20 kHz in GDR mode with
// amplitude/phase PI feedback (checked against the model's field), then
// switches to the self-excited loop with the cavity 100 kHz above 80 MHz.
// The second frequency-difference result sent to the tuner port, which
// covers a whole gate in SEL, must show the loop running near the cavity
// resonance, and results must arrive once per 2^23 clocks (~7.6 Hz at
// 64 MHz).
module tb_llrf_top_full;
  import llrf_pkg::*;

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
  longint cyc, t_res [$];
  real    f_res [$];

  llrf_top dut (.*);
  cavity_model cav (.clk (clk), .rst_n (rst_n), .dac (dac), .adc (adc));

  always #5 clk = ~clk;

  initial begin
    #400ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && tuner_valid) begin
      t_res.push_back(cyc);
      f_res.push_back(real'(tuner_freq_diff) * 64.0e6 / 549755813888.0);   // 2^(16 + 23)
    end
  end

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) failures++;
    $display("%s: %s", cond ? "ok" : "FAIL", msg);
  endtask

  task automatic wr(input int a, input int d);
    @(negedge clk);
    addr = 7'(a); wdata = 32'(d); wr_en = 1;
    @(negedge clk);
    wr_en = 0;
  endtask

  function automatic real wrapdeg(real d);
    while (d > 180.0) d -= 360.0;
    while (d < -180.0) d += 360.0;
    return d;
  endfunction

  initial begin
    real rel;
    cyc = 0;
    wr_en = 0; rd_en = 0; addr = 0; wdata = 0; trig_event = 0;
    cav.detune = 20.0e3;
    cav.ref_ph = -1.2;
    repeat (4) @(posedge clk);
    @(negedge clk) rst_n = 1;
    // GDR lock
    wr(7'h01, 20000);                    // 1250 ADC LSB
    wr(7'h02, 12'hC00);                  // -90 degrees
    wr(7'h08, 128); wr(7'h09, 4); wr(7'h0B, 128); wr(7'h0C, 4);
    wr(7'h00, 32'(MODE_GDR) | 32'h18);
    repeat (8000) @(negedge clk);
    rel = wrapdeg((cav.field_phase() - cav.ref_ph) * 360.0 / PI2);
    check(cav.field_amp() > 1240.0 && cav.field_amp() < 1260.0 && wrapdeg(rel + 90.0) < 0.5 &&
          wrapdeg(rel + 90.0) > -0.5,
          $sformatf("GDR lock: field %.1f LSB at %.2f deg", cav.field_amp(), rel));
    // SEL
    cav.detune = 100.0e3;
    wr(7'h06, int'($floor(-30.0 / 360.0 * 65536.0)) & 16'hFFFF);
    wr(7'h00, 32'(MODE_SEL) | 32'h08);
    wait (t_res.size() == 2);
    @(negedge clk);
    check(t_res[1] - t_res[0] == 64'd8388608,
          $sformatf("tuner update period %0d clocks", t_res[1] - t_res[0]));
    check(f_res[1] > 40.0e3 && f_res[1] < 110.0e3,
          $sformatf("SEL frequency difference %.1f Hz (cavity detuned by 100 kHz)", f_res[1]));
    check(cav.field_amp() > 1200.0, $sformatf("SEL field %.1f LSB", cav.field_amp()));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
