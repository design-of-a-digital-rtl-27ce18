// tb_quad_mod: checks the digital quadrature modulator.
// For random I and Q held over a few carrier periods, the DAC words must
// follow +I, -Q, -I, +Q (16-bit to 12-bit with rounding, saturated), in
// offset binary, one clock after the input. This is the 16 MHz carrier
// I*cos - Q*sin sampled at 64 MHz.
module tb_quad_mod;
  logic clk = 0, rst_n = 0;
  logic signed [15:0] i_in, q_in;
  logic [11:0] dac;
  int checks = 0, failures = 0;

  quad_mod #(.W(16), .DAC_W(12)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int expect_code(int n, int ii, int qq);
    real v;
    int  r;
    v = (n % 4 == 0) ? ii : (n % 4 == 1) ? -qq : (n % 4 == 2) ? -ii : qq;
    r = int'($floor(v / 16.0 + 0.5));
    if (r > 2047) r = 2047;
    if (r < -2048) r = -2048;
    return r + 2048;
  endfunction

  initial begin
    int n;
    i_in = 0; q_in = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    n = 0;
    for (int t = 0; t < 200; t++) begin
      i_in = 16'($urandom);
      q_in = 16'($urandom);
      if (t == 0) begin i_in = 16'sh8000; q_in = 16'sh8000; end
      for (int s = 0; s < 8; s++) begin
        @(posedge clk); #1;
        checks++;
        if (int'(dac) != expect_code(n, i_in, q_in)) begin
          failures++;
          if (failures < 10) $display("n=%0d I=%0d Q=%0d dac=%0d exp %0d", n, i_in, q_in, dac,
                                      expect_code(n, i_in, q_in));
        end
        n++;
        @(negedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
