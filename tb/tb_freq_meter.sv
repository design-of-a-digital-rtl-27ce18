// tb_freq_meter: checks the cavity/reference frequency-difference meter.
// With a short gate (2^10 clocks) a phase ramp of known increment per valid
// sample is applied: with a sample every clock the result must be
// increment * 2^10 per gate, with a sample every second clock half of that,
// for positive and negative increments including ones that wrap the phase
// word. The result must come once per gate.
module tb_freq_meter;
  localparam int GL = 10;
  logic clk = 0, rst_n = 0;
  logic valid, out_valid;
  logic [15:0] ph, ph_last;
  logic signed [39:0] freq_diff;
  int checks = 0, failures = 0;
  int incr, every, nres, last_res_cyc, cyc;

  freq_meter #(.PH_W(16), .GATE_LOG2(GL), .OUT_W(40)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) cyc <= cyc + 1;

  always @(negedge clk) begin
    if (rst_n) begin
      valid <= (cyc % every == 0);
      if (cyc % every == 0) ph <= ph + 16'(incr);
    end
  end

  always @(posedge clk) begin
    if (out_valid) begin
      nres <= nres + 1;
      if (nres >= 1) begin
        checks++;
        if (freq_diff != 40'(longint'(incr) * (longint'(1) << GL) / every) ||
            (nres >= 2 && cyc - last_res_cyc != (1 << GL))) begin
          failures++;
          if (failures < 10) $display("incr=%0d every=%0d: %0d exp %0d period %0d", incr, every,
                                      freq_diff, longint'(incr) * (1 << GL) / every, cyc - last_res_cyc);
        end
      end
      last_res_cyc <= cyc;
    end
  end

  initial begin
    int incs [4] = '{37, -250, 20000, -31000};
    cyc = 0; nres = 0; valid = 0; ph = 0; incr = 0; every = 1;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int e = 1; e <= 2; e++) begin
      for (int i = 0; i < 4; i++) begin
        if (e == 2 && (incs[i] > 16000 || incs[i] < -16000)) continue;
        @(negedge clk);
        incr = incs[i];
        every = e;
        nres = 0;
        repeat (4 << GL) @(negedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
