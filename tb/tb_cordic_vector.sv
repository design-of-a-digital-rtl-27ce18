// tb_cordic_vector: checks the vectoring CORDIC.
// Random vectors in all four quadrants (and the axes); magnitude must be
// within 4 LSB of sqrt(x^2 + y^2) and phase within 4 LSB (0.016 degree) of
// atan2(y, x) in 2^16 units per turn. A new vector enters every clock and
// each result must appear exactly STAGES + 2 = 18 clocks later.
module tb_cordic_vector;
  import llrf_pkg::*;
  localparam int LAT = CORDIC_STAGES + 2;
  localparam int NV  = 400;
  logic clk = 0, rst_n = 0;
  logic valid_in, valid_out;
  logic signed [15:0] x_in, y_in;
  logic [15:0] mag, phase;
  int checks = 0, failures = 0;
  real em [NV];
  real ep [NV];
  int  sent, got, cyc, t_in [NV];

  cordic_vector dut (.*);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) cyc <= cyc + 1;

  always @(posedge clk) begin
    if (rst_n && valid_out) begin
      real dp;
      dp = real'(phase) - ep[got];
      if (dp > 32768.0) dp -= 65536.0;
      if (dp < -32768.0) dp += 65536.0;
      checks++;
      if (real'(mag) - em[got] > 4.0 || em[got] - real'(mag) > 4.0 || dp > 4.0 || dp < -3.0 ||
          cyc - t_in[got] != LAT) begin
        failures++;
        if (failures < 10)
          $display("vec %0d: mag %0d exp %f, phase %0d exp %f, latency %0d", got, mag, em[got],
                   phase, ep[got], cyc - t_in[got]);
      end
      got <= got + 1;
    end
  end

  initial begin
    real xr, yr, p;
    cyc = 0; sent = 0; got = 0;
    valid_in = 0; x_in = 0; y_in = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int t = 0; t < NV; t++) begin
      if (t < 4) begin
        x_in = (t == 0) ? 16'sd20000 : (t == 1) ? 16'sd0 : (t == 2) ? -16'sd20000 : 16'sd0;
        y_in = (t == 1) ? 16'sd20000 : (t == 3) ? -16'sd20000 : 16'sd0;
      end else begin
        x_in = 16'($signed($urandom_range(46000)) - 23000);
        y_in = 16'($signed($urandom_range(46000)) - 23000);
      end
      xr = x_in; yr = y_in;
      em[t] = $sqrt(xr * xr + yr * yr);
      p = $atan2(yr, xr) / 6.283185307 * 65536.0;
      if (p < 0) p += 65536.0;
      ep[t] = p;
      t_in[t] = cyc;
      valid_in = 1;
      @(negedge clk);
    end
    valid_in = 0;
    repeat (LAT + 5) @(negedge clk);
    checks++;
    if (got != NV) begin
      failures++;
      $display("got %0d results for %0d vectors", got, NV);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
