// tb_cordic_rotate: checks the rotation-mode CORDIC.
// Random vectors and angles over the full turn; the result must be within
// 3 LSB of the exact rotation computed in floating point. Polar-to-Cartesian
// use (y_in = 0) is included. One vector per clock; latency must be
// STAGES + 2 = 18 clocks.
module tb_cordic_rotate;
  import llrf_pkg::*;
  localparam int LAT = CORDIC_STAGES + 2;
  localparam int NV  = 400;
  logic clk = 0, rst_n = 0;
  logic valid_in, valid_out;
  logic signed [15:0] x_in, y_in, x_out, y_out;
  logic [15:0] angle;
  int checks = 0, failures = 0;
  real ex [NV];
  real ey [NV];
  int  got, cyc, t_in [NV];

  cordic_rotate dut (.*);

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
      checks++;
      if (real'(x_out) - ex[got] > 4.0 || ex[got] - real'(x_out) > 4.0 ||
          real'(y_out) - ey[got] > 4.0 || ey[got] - real'(y_out) > 4.0 ||
          cyc - t_in[got] != LAT) begin
        failures++;
        if (failures < 10)
          $display("vec %0d: got %0d,%0d exp %f,%f latency %0d", got, x_out, y_out, ex[got], ey[got],
                   cyc - t_in[got]);
      end
      got <= got + 1;
    end
  end

  initial begin
    real th, xr, yr;
    cyc = 0; got = 0;
    valid_in = 0; x_in = 0; y_in = 0; angle = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int t = 0; t < NV; t++) begin
      x_in  = 16'($signed($urandom_range(46000)) - 23000);
      y_in  = (t % 3 == 0) ? 16'sd0 : 16'($signed($urandom_range(46000)) - 23000);
      angle = 16'($urandom);
      if (t < 8) angle = 16'(t * 16'h2000);
      xr = x_in; yr = y_in;
      th = real'(angle) / 65536.0 * 6.283185307;
      ex[t] = xr * $cos(th) - yr * $sin(th);
      ey[t] = xr * $sin(th) + yr * $cos(th);
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
