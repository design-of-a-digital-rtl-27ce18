// tb_loop_ctrl: checks set-point comparison, PIDs, modes and drive anchoring.
// Static measurements are applied every clock and the drive is checked once
// settled:
//   * open loop in GDR, SEL, FIXED and NCO: drive amplitude = set point and
//     drive phase anchored to reference, cavity, nothing or the NCO ramp,
//     plus set point / SEL shift and phase offset;
//   * proportional amplitude and phase feedback (gain 2 and 1) in GDR;
//   * the amplitude limit;
//   * I/Q feedback: the cavity vector at 45 degrees from the reference is
//     rotated into the reference frame and compared with (i_set, q_set);
//   * no feedback in FIXED mode even with the loops switched on;
//   * integral action ramps the correction, and a mode change clears it.
module tb_loop_ctrl;
  import llrf_pkg::*;
  logic clk = 0, rst_n = 0;
  loop_cfg_t cfg;
  logic meas_valid;
  logic [15:0] cav_mag, cav_ph, ref_ph, nco_ph, drive_angle, ph_rel;
  logic signed [15:0] drive_x, drive_y, cav_i_rel, cav_q_rel, err_a, err_b, corr_a, corr_b;
  int checks = 0, failures = 0;

  loop_ctrl dut (.*);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) nco_ph <= nco_ph + 16'd333;

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", msg);
    end
  endtask

  function automatic bit near(int a, int b, int tol);
    return (a - b <= tol) && (b - a <= tol);
  endfunction

  task automatic settle();
    repeat (40) @(negedge clk);
  endtask

  initial begin
    int c0, c1, c2;
    cfg = '0;
    cfg.mode = MODE_GDR; cfg.ctrl_type = CTRL_AMPPH;
    cfg.amp_set = 16'd10000; cfg.ph_set = 16'h1230; cfg.ph_offset = 16'h0100;
    cfg.sel_shift = 16'h0800; cfg.amp_limit = 16'h7FFF;
    meas_valid = 0; cav_mag = 16'd9000; cav_ph = 16'h5000; ref_ph = 16'h4000; nco_ph = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    meas_valid = 1;
    // open loop, the four anchors
    settle();
    check(drive_x == 10000 && drive_y == 0 && drive_angle == 16'h4000 + 16'h1230 + 16'h0100,
          $sformatf("GDR open loop: %0d %0d %h", drive_x, drive_y, drive_angle));
    check(ph_rel == 16'h1000, "relative phase");
    cfg.mode = MODE_SEL; settle();
    check(drive_angle == 16'h5000 + 16'h0800 + 16'h0100, $sformatf("SEL anchor %h", drive_angle));
    cfg.mode = MODE_FIXED; settle();
    check(drive_angle == 16'h1230 + 16'h0100, $sformatf("FIXED anchor %h", drive_angle));
    cfg.mode = MODE_NCO; settle();
    for (int t = 0; t < 5; t++) begin
      @(negedge clk);
      check(drive_angle == nco_ph - 16'd333 + 16'h1230 + 16'h0100,
            $sformatf("NCO anchor %h nco %h", drive_angle, nco_ph));
    end
    // proportional feedback in GDR
    cfg.mode = MODE_GDR;
    cfg.fb_a_en = 1; cfg.fb_b_en = 1;
    cfg.kp_a = 16'sd512; cfg.kp_b = 16'sd256;
    settle();
    check(err_a == 1000 && corr_a == 2000 && drive_x == 12000,
          $sformatf("amplitude P: err %0d corr %0d drive %0d", err_a, corr_a, drive_x));
    check(err_b == 16'h0230 && corr_b == 16'h0230 &&
          drive_angle == 16'h4000 + 16'h1230 + 16'h0230 + 16'h0100,
          $sformatf("phase P: err %h corr %h angle %h", err_b, corr_b, drive_angle));
    // amplitude limit
    cfg.amp_limit = 16'd11000; settle();
    check(drive_x == 11000, $sformatf("limit: %0d", drive_x));
    cfg.amp_limit = 16'h7FFF;
    // FIXED: loops are open whatever the switches say
    cfg.mode = MODE_FIXED; settle();
    check(corr_a == 0 && corr_b == 0 && drive_x == 10000, "feedback active in FIXED mode");
    // I/Q feedback
    cfg.mode = MODE_GDR; cfg.ctrl_type = CTRL_IQ;
    cfg.i_set = 16'sd6000; cfg.q_set = 16'sd5000;
    cav_mag = 16'd8000; cav_ph = 16'h6000; ref_ph = 16'h4000;     // 45 degrees
    settle();
    check(near(cav_i_rel, 5657, 3) && near(cav_q_rel, 5657, 3),
          $sformatf("reference frame vector %0d %0d", cav_i_rel, cav_q_rel));
    check(near(corr_a, 686, 6) && near(corr_b, -657, 4),
          $sformatf("I/Q corrections %0d %0d", corr_a, corr_b));
    check(near(drive_x, 6686, 6) && near(drive_y, 4343, 4) && drive_angle == 16'h4000 + 16'h0100,
          $sformatf("I/Q drive %0d %0d %h", drive_x, drive_y, drive_angle));
    // integral action, then cleared by a mode change
    cfg.ctrl_type = CTRL_AMPPH;
    cfg.kp_a = 0; cfg.ki_a = 16'sd16; cfg.fb_b_en = 0;
    cav_mag = 16'd9000;
    repeat (10) @(negedge clk);
    c0 = corr_a;
    repeat (10) @(negedge clk);
    c1 = corr_a;
    check(c0 > 0 && c1 - c0 >= 600 && c1 - c0 <= 650, $sformatf("integral ramp %0d -> %0d", c0, c1));
    cfg.mode = MODE_SEL;
    @(negedge clk);
    @(negedge clk);
    @(negedge clk);
    c2 = corr_a;
    check(c2 < 200, $sformatf("integrator not cleared on mode change: %0d", c2));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
