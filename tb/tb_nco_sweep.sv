// tb_nco_sweep: checks the NCO phase ramp and the automatic scan.
// Static word: the phase must advance by freq/2^10 per clock, checked
// against an independent 26-bit accumulator over many clocks, for a
// positive and a negative offset. Scan: the frequency must take the values
// f_start + i*f_step for exactly dwell clocks each, step_stb must pulse
// once per step at the end of the dwell, busy must drop after n_steps
// steps and the frequency return to the static word; a stop aborts.
module tb_nco_sweep;
  localparam int F_W = 26;
  logic clk = 0, rst_n = 0;
  logic signed [F_W-1:0] freq_word, f_start, f_step, freq_cur;
  logic sweep_start, sweep_stop, busy, step_stb;
  logic [15:0] n_steps, step_idx, phase;
  logic [23:0] dwell;
  int checks = 0, failures = 0;

  nco_sweep #(.F_W(F_W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", msg);
    end
  endtask

  initial begin
    logic [F_W-1:0] ref_acc;
    int stb_count, seen_cycles;
    freq_word = 0; f_start = 0; f_step = 0; n_steps = 0; dwell = 0;
    sweep_start = 0; sweep_stop = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    // static offsets: 1 Hz steps -> word = Hz (0.954 Hz/LSB)
    ref_acc = '0;   // the accumulator is 0 after reset with a zero word
    for (int w = 0; w < 2; w++) begin
      freq_word = (w == 0) ? 26'sd314573 : -26'sd1048576;   // ~+300 kHz, -1 MHz
      for (int t = 0; t < 300; t++) begin
        @(negedge clk);
        ref_acc = ref_acc + $unsigned(freq_word);
        check(phase == ref_acc[F_W-1 -: 16], $sformatf("phase %h exp %h", phase, ref_acc[F_W-1 -: 16]));
      end
    end
    // scan
    freq_word = 26'sd1000;
    f_start = -26'sd5000; f_step = 26'sd700; n_steps = 16'd6; dwell = 24'd9;
    sweep_start = 1;
    @(negedge clk) sweep_start = 0;
    stb_count = 0;
    for (int i = 0; i < 6; i++) begin
      for (int d = 0; d < 9; d++) begin
        check(busy && freq_cur == f_start + i * f_step && step_idx == 16'(i),
              $sformatf("step %0d clk %0d: f=%0d idx=%0d busy=%0d", i, d, freq_cur, step_idx, busy));
        @(posedge clk); #1;
        if (step_stb) begin
          stb_count++;
          check(d == 8, $sformatf("step_stb at clock %0d of step %0d", d, i));
        end
        @(negedge clk);
      end
    end
    @(posedge clk); #1;
    if (step_stb) stb_count++;
    check(stb_count == 6, $sformatf("%0d step strobes", stb_count));
    @(negedge clk);
    check(!busy && freq_cur == 26'sd1000, "scan did not end");
    // stop
    sweep_start = 1;
    @(negedge clk) sweep_start = 0;
    repeat (5) @(negedge clk);
    check(busy, "scan did not restart");
    sweep_stop = 1;
    @(negedge clk) sweep_stop = 0;
    check(!busy && freq_cur == 26'sd1000, "stop ignored");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
