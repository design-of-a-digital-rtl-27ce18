// tb_iq_demod: checks the 4/5-rate I/Q demodulator.
// Drives ADC samples of A*cos(n*90deg + phi) for several amplitudes and
// phases and compares I and Q with A*cos(phi) and A*sin(phi) (within 1 LSB
// of rounding), every clock once the sequence has filled. Also checks the
// saturation of a negated most-negative code.
module tb_iq_demod;
  localparam int ADC_W = 12;
  logic clk = 0, rst_n = 0;
  logic signed [ADC_W-1:0] adc, i_out, q_out;
  logic valid;
  int checks = 0, failures = 0;

  iq_demod #(.ADC_W(ADC_W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int rnd(real v);
    return (v >= 0) ? int'($floor(v + 0.5)) : -int'($floor(-v + 0.5));
  endfunction

  initial begin
    real a, phi;
    int  n, ei, eq;
    adc = '0;
    n = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int t = 0; t < 40; t++) begin
      a   = 100.0 + $urandom_range(1900);
      phi = 6.283185307 * $urandom_range(9999) / 10000.0;
      ei  = rnd(a * $cos(phi));
      eq  = rnd(a * $sin(phi));
      for (int s = 0; s < 12; s++) begin
        adc = ADC_W'(rnd(a * $cos(1.5707963268 * n + phi)));
        @(posedge clk);
        #1;
        n++;
        if (s >= 5) begin
          checks++;
          if (!valid || (i_out - ei) > 1 || (ei - i_out) > 1 ||
              (q_out - eq) > 1 || (eq - q_out) > 1) begin
            failures++;
            if (failures < 10)
              $display("mismatch a=%f phi=%f I=%0d/%0d Q=%0d/%0d", a, phi, i_out, ei, q_out, eq);
          end
        end
        @(negedge clk);
      end
    end
    // most negative code as -I sample saturates to +2047
    for (int s = 0; s < 4; s++) begin
      adc = (n % 4 == 2) ? 12'sh800 : 12'sd0;
      @(posedge clk);
      #1;
      if (n % 4 == 2) begin
        checks++;
        if (i_out != 12'sh7FF) begin
          failures++;
          $display("saturation failed: %0d", i_out);
        end
      end
      n++;
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
