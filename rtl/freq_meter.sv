// freq_meter: frequency difference between cavity and reference.
//
// The phase of the cavity relative to the reference turns at the frequency
// difference. Every valid phase sample the wrapped increment
// ph[n] - ph[n-1] (signed, within half a turn) is added up over a gate of
// 2^GATE_LOG2 clocks; the sum is the phase advanced during the gate in
// units of 2^-PH_W turn, so
//   delta_f = freq_diff * f_clk / 2^(PH_W + GATE_LOG2).
// With a 64 MHz clock and GATE_LOG2 = 23 the gate is 131 ms, one result
// about every 8 Hz, the update rate of the controller's displayed values,
// and one LSB is 1.16e-4 Hz. Increments are unambiguous while
// |delta_f| stays below half the phase sample rate.
// Timing: freq_diff and ph_last are registered and refreshed with a
// one-clock out_valid pulse at the end of each gate; the first gate after
// reset starts from the first valid sample.
// The displayed frequency difference, its ~8 Hz update and its use by the
// tuner are the controller's; computing it this way in logic is this
// design's own choice.
module freq_meter #(
  parameter int PH_W      = 16,
  parameter int GATE_LOG2 = 23,
  parameter int OUT_W     = 40
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    valid,
  input  logic [PH_W-1:0]         ph,
  output logic signed [OUT_W-1:0] freq_diff,
  output logic [PH_W-1:0]         ph_last,
  output logic                    out_valid
);

  logic [GATE_LOG2-1:0]    gcnt;
  logic [PH_W-1:0]         ph_prev;
  logic                    have_prev;
  logic signed [OUT_W-1:0] sum, sum_n;
  logic signed [PH_W-1:0]  inc;

  always_comb begin
    inc   = $signed(ph - ph_prev);
    sum_n = (valid && have_prev) ? sum + OUT_W'(inc) : sum;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      gcnt      <= '0;
      ph_prev   <= '0;
      have_prev <= 1'b0;
      sum       <= '0;
      freq_diff <= '0;
      ph_last   <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= 1'b0;
      if (valid) begin
        ph_prev   <= ph;
        have_prev <= 1'b1;
      end
      if (have_prev) gcnt <= gcnt + 1'b1;
      if (have_prev && (&gcnt)) begin
        freq_diff <= sum_n;
        ph_last   <= valid ? ph : ph_prev;
        out_valid <= 1'b1;
        sum       <= '0;
      end else begin
        sum <= sum_n;
      end
    end
  end

endmodule
