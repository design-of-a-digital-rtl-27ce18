// nco_sweep: numerically controlled phase ramp with an automatic frequency scan.
//
// A F_W-bit phase accumulator adds the current frequency word every clock;
// its top PH_W bits are the phase that loop_ctrl adds to the drive in
// MODE_NCO, moving the output away from 80 MHz by
//   f_offset = freq * f_clk / 2^F_W     (64 MHz / 2^26 = 0.954 Hz per LSB),
// which gives the ~1 Hz frequency step of the controller.
// When idle the frequency is the static word freq_word. A pulse on
// sweep_start begins a scan: the frequency steps from f_start by f_step,
// n_steps times, staying dwell clocks on each. step_stb pulses for one clock
// as each step ends (on the edge where the next frequency is taken), so the
// settled cavity response can be recorded then; step_idx still names the
// step that ended. After the last step the frequency returns
// to freq_word. sweep_stop aborts a scan.
// Timing: phase is registered; the frequency of a step applies from the
// clock after it is set. A dwell of 0 is treated as 1.
// The frequency step and the automatic scan are the controller's features;
// the accumulator width is chosen to give that step, the scan parameters
// are this design's own.
module nco_sweep #(
  parameter int F_W  = 26,
  parameter int PH_W = 16,
  parameter int N_W  = 16,
  parameter int D_W  = 24
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic signed [F_W-1:0] freq_word,
  input  logic                  sweep_start,
  input  logic                  sweep_stop,
  input  logic signed [F_W-1:0] f_start,
  input  logic signed [F_W-1:0] f_step,
  input  logic [N_W-1:0]        n_steps,
  input  logic [D_W-1:0]        dwell,
  output logic [PH_W-1:0]       phase,
  output logic signed [F_W-1:0] freq_cur,
  output logic                  busy,
  output logic [N_W-1:0]        step_idx,
  output logic                  step_stb
);

  logic [F_W-1:0]        acc;
  logic signed [F_W-1:0] f_sw;
  logic [D_W-1:0]        dcnt;

  always_comb begin
    freq_cur = busy ? f_sw : freq_word;
    phase    = acc[F_W-1 -: PH_W];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc      <= '0;
      f_sw     <= '0;
      dcnt     <= '0;
      busy     <= 1'b0;
      step_idx <= '0;
      step_stb <= 1'b0;
    end else begin
      acc      <= acc + $unsigned(freq_cur);
      step_stb <= 1'b0;
      if (sweep_stop) begin
        busy <= 1'b0;
      end else if (sweep_start && n_steps != 0) begin
        busy     <= 1'b1;
        f_sw     <= f_start;
        dcnt     <= '0;
        step_idx <= '0;
      end else if (busy) begin
        if (dcnt + 1'b1 >= dwell) begin
          step_stb <= 1'b1;
          dcnt     <= '0;
          if (step_idx + 1'b1 >= n_steps) begin
            busy <= 1'b0;
          end else begin
            step_idx <= step_idx + 1'b1;
            f_sw     <= f_sw + f_step;
          end
        end else begin
          dcnt <= dcnt + 1'b1;
        end
      end
    end
  end

endmodule
