// tb_iq_rotator: checks the cable-delay rotation matrix.
// Random I/Q samples and random rotation angles; the expected output is the
// rotation computed in floating point, scaled by 2^4 (the added fraction
// bits), allowed 1 LSB of rounding. Also checks the one-clock latency and
// the identity setting.
module tb_iq_rotator;
  logic clk = 0, rst_n = 0;
  logic valid_in, valid_out;
  logic signed [11:0] i_in, q_in;
  logic signed [15:0] cos_c, sin_c, i_out, q_out;
  int checks = 0, failures = 0;

  iq_rotator #(.IN_W(12), .OUT_W(16), .C_W(16)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real th, c, s, ei, eq;
    valid_in = 0; i_in = 0; q_in = 0; cos_c = 16'sh7FFF; sin_c = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int t = 0; t < 300; t++) begin
      th = 6.283185307 * $urandom_range(9999) / 10000.0;
      if (t < 20) th = 0.0;
      // keep the vector inside the ADC circle, as a real sinusoid is
      i_in  = 12'($signed($urandom_range(2800)) - 1400);
      q_in  = 12'($signed($urandom_range(2800)) - 1400);
      cos_c = 16'($rtoi($floor($cos(th) * 32767.0 + 0.5)));
      sin_c = 16'($rtoi($floor($sin(th) * 32767.0 + 0.5)));
      c = real'(cos_c) / 32768.0;
      s = real'(sin_c) / 32768.0;
      ei = (i_in * c - q_in * s) * 16.0;
      eq = (i_in * s + q_in * c) * 16.0;
      valid_in = 1;
      @(posedge clk);
      #1;
      checks++;
      if (!valid_out || (real'(i_out) - ei) > 1.01 || (ei - real'(i_out)) > 1.01 || (real'(q_out) - eq) > 1.01 || (eq - real'(q_out)) > 1.01) begin
        failures++;
        if (failures < 10) $display("mismatch th=%f got %0d,%0d exp %f,%f", th, i_out, q_out, ei, eq);
      end
      @(negedge clk);
    end
    valid_in = 0;
    @(posedge clk); #1;
    checks++;
    if (valid_out) begin failures++; $display("valid_out stuck"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
