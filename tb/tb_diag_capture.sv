// tb_diag_capture: checks the two-trace capture buffer (16 entries here).
// Probe k carries k*1000 plus a sample counter. Free-running mode: after an
// arm the two selected probes of 16 consecutive strobes must be stored and
// read back. Event mode with div = 2: nothing may be stored before the
// trigger edge; afterwards every third strobe is stored. busy and done must
// follow the capture.
module tb_diag_capture;
  localparam int AW = 4, W = 16;
  logic clk = 0, rst_n = 0;
  logic [7:0][W-1:0] probes;
  logic sample_stb, trig_mode, trig_event, arm, busy, done;
  logic [2:0] sel_a, sel_b;
  logic [15:0] div;
  logic [AW-1:0] rd_addr;
  logic [W-1:0] rd_a, rd_b;
  int checks = 0, failures = 0;
  int scount;
  int first_a [$];

  diag_capture #(.W(W), .AW(AW), .N_SRC(8)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // a strobe on about one clock in three; probes change after each strobe
  always @(negedge clk) if (rst_n) sample_stb <= ($urandom_range(2) == 0);
  always @(posedge clk) if (sample_stb) scount <= scount + 1;
  always_comb for (int k = 0; k < 8; k++) probes[k] = W'(k * 1000 + scount);

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", msg);
    end
  endtask

  task automatic read_back(input int a, input int b, input int step);
    int base;
    for (int i = 0; i < 16; i++) begin
      @(negedge clk) rd_addr = AW'(i);
      @(negedge clk);
      if (i == 0) base = int'(rd_a) - a * 1000;
      check(int'(rd_a) == a * 1000 + base + i * step && int'(rd_b) == b * 1000 + base + i * step,
            $sformatf("entry %0d: %0d %0d (base %0d)", i, rd_a, rd_b, base));
    end
  endtask

  initial begin
    int base_at_trig;
    scount = 0; sample_stb = 0;
    sel_a = 0; sel_b = 0; trig_mode = 0; trig_event = 0; arm = 0; div = 0; rd_addr = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    // free running
    sel_a = 3'd2; sel_b = 3'd5;
    arm = 1;
    @(negedge clk) arm = 0;
    check(busy && !done, "not busy after arm");
    repeat (200) @(negedge clk);
    check(done && !busy, "free-running capture did not finish");
    read_back(2, 5, 1);
    // event mode, every third strobe
    sel_a = 3'd7; sel_b = 3'd1; trig_mode = 1; div = 16'd2;
    arm = 1;
    @(negedge clk) arm = 0;
    repeat (100) @(negedge clk);
    check(busy && !done, "captured without a trigger");
    base_at_trig = scount;
    trig_event = 1;
    @(negedge clk) trig_event = 0;
    repeat (400) @(negedge clk);
    check(done, "event capture did not finish");
    read_back(7, 1, 3);
    rd_addr = 0;
    @(negedge clk); @(negedge clk);
    check(int'(rd_a) - 7000 >= base_at_trig, "samples from before the trigger");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
