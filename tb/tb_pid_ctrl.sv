// tb_pid_ctrl: checks the PID regulator against a behavioural model.
// The model keeps e[n-1] and the running sum of Ki*e clamped to
// +-(2^15-1)*2^8, and forms (Kp*e + sum + Kd*(e - e_prev)) >> 8 saturated
// to 16 bits. Random errors and gains, bursts with gaps between valid
// samples, a wind-up phase with a large Ki, the enable switch and the
// clear input are exercised. Latency must be two clocks.
module tb_pid_ctrl;
  logic clk = 0, rst_n = 0;
  logic en, clr, valid_in, valid_out;
  logic signed [15:0] err, kp, ki, kd, u;
  int checks = 0, failures = 0;

  pid_ctrl dut (.*);

  always #5 clk = ~clk;

  initial begin
    #400000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint m_acc, m_prev;
  longint lim = longint'(32767) * 256;

  function automatic longint model(longint e);
    longint s;
    m_acc = m_acc + longint'(ki) * e;
    if (m_acc > lim) m_acc = lim;
    if (m_acc < -lim) m_acc = -lim;
    s = longint'(kp) * e + m_acc + longint'(kd) * (e - m_prev);
    m_prev = e;
    s = s >>> 8;
    if (s > 32767) s = 32767;
    if (s < -32768) s = -32768;
    return s;
  endfunction

  task automatic step(input longint e, input bit chk_zero);
    longint exp_u;
    err = 16'(e);
    valid_in = 1;
    @(negedge clk);
    valid_in = 0;
    exp_u = chk_zero ? 0 : model(e);
    @(posedge clk); #1;
    checks++;
    if (!valid_out || u != 16'(exp_u)) begin
      failures++;
      if (failures < 10) $display("e=%0d: u=%0d exp %0d valid %0d", e, u, exp_u, valid_out);
    end
    @(negedge clk);
    if ($urandom_range(1)) repeat ($urandom_range(3)) @(negedge clk);
  endtask

  initial begin
    en = 0; clr = 0; valid_in = 0; err = 0; kp = 0; ki = 0; kd = 0;
    m_acc = 0; m_prev = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    en = 1;
    // random gains
    for (int g = 0; g < 6; g++) begin
      kp = 16'($signed($urandom_range(4000)) - 2000);
      ki = 16'($signed($urandom_range(200)) - 100);
      kd = 16'($signed($urandom_range(1000)) - 500);
      for (int t = 0; t < 60; t++) step(longint'($signed($urandom_range(4000)) - 2000), 0);
    end
    // wind-up: large integral gain drives the integrator into its clamp
    kp = 16'sd256; ki = 16'sd2000; kd = 0;
    for (int t = 0; t < 60; t++) step(30000, 0);
    for (int t = 0; t < 20; t++) step(-3000, 0);
    // clear
    @(negedge clk) clr = 1;
    @(negedge clk) clr = 0;
    m_acc = 0; m_prev = 0;
    ki = 16'sd10;
    for (int t = 0; t < 20; t++) step(longint'($signed($urandom_range(2000)) - 1000), 0);
    // disabled: output 0
    en = 0;
    for (int t = 0; t < 10; t++) step(1000, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
