// tb_ctrl_regs: checks the host register bank.
// Checks the reset values, writes random values to every setting and reads
// them back (masked to each register's width), checks that the settings
// reach the outputs (including the 12-bit phase set point placed at the top
// of the phase word and the per-channel rotation coefficients), that the
// command registers give one-clock pulses, and that the status inputs
// appear at their read addresses one clock after rd_en.
module tb_ctrl_regs;
  import llrf_pkg::*;
  localparam int N_CH = 5;
  logic clk = 0, rst_n = 0;
  logic wr_en, rd_en;
  logic [6:0] addr;
  logic [31:0] wdata, rdata;
  loop_cfg_t cfg;
  logic [3:0] cic_k;
  logic [N_CH-1:0][15:0] rot_cos, rot_sin, ch_mag, ch_ph;
  logic signed [25:0] nco_freq, sw_fstart, sw_fstep;
  logic [15:0] sw_nsteps, diag_div, sw_idx;
  logic [23:0] sw_dwell;
  logic sw_start, sw_stop, diag_trig_mode, diag_step, diag_arm, sw_busy, diag_busy, diag_done;
  logic [2:0] diag_sel_a, diag_sel_b;
  logic [9:0] diag_raddr;
  logic [15:0] ph_rel, diag_a, diag_b, err_a, err_b, corr_a, corr_b, i_rel, q_rel;
  logic signed [39:0] freq_diff;
  int checks = 0, failures = 0;
  int pulses_start, pulses_arm;

  ctrl_regs #(.N_CH(N_CH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (rst_n && sw_start) pulses_start <= pulses_start + 1;
    if (rst_n && diag_arm) pulses_arm <= pulses_arm + 1;
  end

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", msg);
    end
  endtask

  task automatic wr(input int a, input logic [31:0] d);
    @(negedge clk);
    addr = 7'(a); wdata = d; wr_en = 1;
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

  int addrs [$];
  logic [31:0] masks [$];

  initial begin
    logic [31:0] v, vals [$];
    wr_en = 0; rd_en = 0; addr = 0; wdata = 0;
    pulses_start = 0; pulses_arm = 0;
    for (int c = 0; c < N_CH; c++) begin
      ch_mag[c] = 16'(1000 + c); ch_ph[c] = 16'(2000 + c);
    end
    ph_rel = 16'h1234; freq_diff = -40'sd5; sw_busy = 1; sw_idx = 16'd7;
    diag_busy = 0; diag_done = 1; diag_a = 16'hAAAA; diag_b = 16'hBBBB;
    err_a = 16'd1; err_b = 16'd2; corr_a = 16'd3; corr_b = 16'd4; i_rel = 16'd5; q_rel = 16'd6;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    // reset values
    check(cfg.mode == MODE_GDR && !cfg.fb_a_en && !cfg.fb_b_en && cfg.amp_limit == 16'h7FFF,
          "reset value of the loop settings");
    check(rot_cos[3] == 16'h7FFF && rot_sin[3] == 16'h0, "reset value of the rotations");
    // register list with masks
    addrs = '{7'h00, 7'h01, 7'h02, 7'h03, 7'h04, 7'h05, 7'h06, 7'h07, 7'h08, 7'h09, 7'h0A,
              7'h0B, 7'h0C, 7'h0D, 7'h0E, 7'h20, 7'h21, 7'h22, 7'h23, 7'h24, 7'h28, 7'h29, 7'h2B};
    masks = '{32'h1F, 32'hFFFF, 32'hFFF, 32'hFFFF, 32'hFFFF, 32'hFFFF, 32'hFFFF, 32'hFFFF,
              32'hFFFF, 32'hFFFF, 32'hFFFF, 32'hFFFF, 32'hFFFF, 32'hFFFF, 32'hF, 32'h3FFFFFF,
              32'h3FFFFFF, 32'h3FFFFFF, 32'hFFFF, 32'hFFFFFF, 32'h377, 32'hFFFF, 32'h3FF};
    for (int c = 0; c < 2 * N_CH; c++) begin
      addrs.push_back(7'h10 + c);
      masks.push_back(32'hFFFF);
    end
    foreach (addrs[i]) begin
      v = $urandom;
      vals.push_back(v);
      wr(addrs[i], v);
    end
    foreach (addrs[i]) begin
      logic [31:0] exp_v;
      rd(addrs[i], v);
      exp_v = vals[i] & masks[i];
      // signed registers read back sign extended
      if (addrs[i] >= 7'h03 && addrs[i] <= 7'h04 || addrs[i] >= 7'h08 && addrs[i] <= 7'h0D)
        exp_v = {{16{vals[i][15]}}, vals[i][15:0]};
      if (addrs[i] >= 7'h20 && addrs[i] <= 7'h22)
        exp_v = {{6{vals[i][25]}}, vals[i][25:0]};
      check(v == exp_v, $sformatf("addr %h read %h exp %h", addrs[i], v, exp_v));
    end
    // outputs
    check(cfg.ph_set == {vals[2][11:0], 4'h0}, "phase set point not at the top of the word");
    check(cfg.amp_set == vals[1][15:0] && cfg.kd_b == vals[13][15:0], "settings not on cfg");
    check(cic_k == vals[14][3:0] && sw_dwell == vals[19][23:0], "settings not on outputs");
    check(diag_step == vals[20][9] && diag_trig_mode == vals[20][8] && diag_sel_b == vals[20][6:4],
          "capture settings not on outputs");
    for (int c = 0; c < N_CH; c++)
      check(rot_cos[c] == vals[23 + 2 * c][15:0] && rot_sin[c] == vals[24 + 2 * c][15:0],
            $sformatf("rotation of channel %0d", c));
    // pulses
    wr(7'h25, 32'h1);
    wr(7'h2A, 32'h1);
    repeat (3) @(negedge clk);
    check(pulses_start == 1 && pulses_arm == 1 && !sw_start && !diag_arm,
          $sformatf("command pulses: %0d start, %0d arm", pulses_start, pulses_arm));
    // status
    for (int c = 0; c < N_CH; c++) begin
      rd(7'h40 + c, v);
      check(v == {16'(2000 + c), 16'(1000 + c)}, $sformatf("channel %0d status %h", c, v));
    end
    rd(7'h48, v); check(v == 32'h1234, "PH_REL");
    rd(7'h49, v); check(v == 32'hFFFFFFFB, "FREQ_DIFF low");
    rd(7'h4A, v); check(v == 32'hFFFFFFFF, "FREQ_DIFF high");
    rd(7'h4B, v); check(v == {16'd7, 13'd0, 1'b1, 1'b0, 1'b1}, "STATUS");
    rd(7'h4C, v); check(v == 32'hBBBBAAAA, "DIAG_DATA");
    rd(7'h4E, v); check(v == {16'd4, 16'd3}, "CORR");
    rd(7'h4F, v); check(v == {16'd6, 16'd5}, "IQ_REL");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
