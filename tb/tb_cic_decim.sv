// tb_cic_decim: checks the CIC decimator against a direct model.
// The model applies three moving sums of length R = 2^k to the recorded
// input and divides by R^3 (arithmetic shift); the block's outputs must
// equal that model sampled every R inputs, after one alignment found at the
// first output. Runs k = 0, 2 and 5 with random input, checks the number of
// outputs per input (the decimation rate) and that a DC input passes with
// unit gain.
module tb_cic_decim;
  localparam int IN_W = 16, N = 3, K_MAX = 12;
  logic clk = 0, rst_n = 0;
  logic [3:0] k;
  logic valid_in, valid_out;
  logic signed [IN_W-1:0] x, y;
  int checks = 0, failures = 0;

  cic_decim #(.IN_W(IN_W), .N(N), .K_MAX(K_MAX)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam int NS = 4000;
  longint xs [NS];
  longint z  [NS];
  longint ys [NS];
  int     nout, nin;

  always @(posedge clk) begin
    if (valid_out && nout < NS) begin
      ys[nout] <= y;
      nout <= nout + 1;
    end
  end

  task automatic run(input int kk, input bit dc);
    int r, n0;
    longint s1 [NS];
    longint s2 [NS];
    r = 1 << kk;
    @(negedge clk);
    k = 4'(kk);
    valid_in = 0;
    repeat (4) @(negedge clk);
    nout = 0;
    for (int n = 0; n < NS; n++) begin
      xs[n] = dc ? 1234 : longint'($signed(16'($urandom)));
      x = IN_W'(xs[n]);
      valid_in = 1;
      @(negedge clk);
    end
    valid_in = 0;
    repeat (10) @(negedge clk);
    // model
    for (int n = 0; n < NS; n++) begin
      s1[n] = 0;
      for (int j = 0; j < r; j++) if (n - j >= 0) s1[n] += xs[n-j];
    end
    for (int n = 0; n < NS; n++) begin
      s2[n] = 0;
      for (int j = 0; j < r; j++) if (n - j >= 0) s2[n] += s1[n-j];
    end
    for (int n = 0; n < NS; n++) begin
      z[n] = 0;
      for (int j = 0; j < r; j++) if (n - j >= 0) z[n] += s2[n-j];
      z[n] = z[n] >>> (3 * kk);
    end
    // rate
    checks++;
    if (nout < NS / r - 2 || nout > NS / r + 1) begin
      failures++;
      $display("k=%0d: %0d outputs for %0d inputs", kk, nout, NS);
    end
    // alignment: after the model has filled (index >= 3r)
    n0 = -100000;
    for (int c = -4 * r - 8; c < 4 * r + 8 && n0 < -1000; c++) begin
      bit ok;
      ok = 1;
      for (int m = 8; m < 16; m++) begin
        if (c + m * r >= NS || c + m * r < 0 || ys[m] != z[c + m * r]) ok = 0;
      end
      if (ok) n0 = c;
    end
    checks++;
    if (n0 < -1000) begin
      failures++;
      $display("k=%0d: output does not match the moving-sum model", kk);
    end else begin
      for (int m = 8; m < nout && n0 + m * r < NS; m++) begin
        checks++;
        if (ys[m] != z[n0 + m * r]) begin
          failures++;
          if (failures < 10) $display("k=%0d m=%0d got %0d exp %0d", kk, m, ys[m], z[n0 + m * r]);
        end
      end
    end
    if (dc) begin
      checks++;
      if (ys[nout-1] != 1234) begin
        failures++;
        $display("k=%0d: DC gain wrong, %0d", kk, ys[nout-1]);
      end
    end
  endtask

  initial begin
    k = 0; valid_in = 0; x = 0; nout = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    run(0, 0);
    run(2, 0);
    run(5, 0);
    run(4, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
