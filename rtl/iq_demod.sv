// iq_demod: I/Q demodulation by sampling at 4/5 of the RF frequency.
//
// An 80 MHz signal A*cos(wt + phi) sampled at 64 MHz advances by 450 degrees,
// i.e. 90 degrees modulo a turn, from one sample to the next. Sample n is
// therefore A*cos(n*90deg + phi), and the repeating sample sequence is
//   n mod 4 = 0: +I   1: -Q   2: -I   3: +Q     (I = A cos phi, Q = A sin phi).
// A free-running 2-bit sample counter picks which output register a sample
// updates and whether it is negated, so each new sample refreshes either I or
// Q and a new (I, Q) pair is available every clock. All channels of the
// controller share the same reset, so their counters stay aligned.
//
// Interface: adc is the signed (two's complement) ADC word, one per clock.
// i_out / q_out are registered, one clock after the sample, valid every clock.
// Negating the most negative code saturates to the largest positive code.
// The sampling scheme is the one the controller uses; the sign convention,
// the counter and the saturation are this design's choices.
module iq_demod #(
  parameter int ADC_W = 12
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic signed [ADC_W-1:0] adc,
  output logic signed [ADC_W-1:0] i_out,
  output logic signed [ADC_W-1:0] q_out,
  output logic                    valid
);

  localparam logic signed [ADC_W-1:0] MAXP = {1'b0, {(ADC_W-1){1'b1}}};
  localparam logic signed [ADC_W-1:0] MINN = {1'b1, {(ADC_W-1){1'b0}}};

  logic [1:0] n;
  logic signed [ADC_W-1:0] neg;

  always_comb neg = (adc == MINN) ? MAXP : -adc;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      n     <= '0;
      i_out <= '0;
      q_out <= '0;
      valid <= 1'b0;
    end else begin
      n     <= n + 2'd1;
      valid <= 1'b1;
      unique case (n)
        2'd0: i_out <= adc;
        2'd1: q_out <= neg;
        2'd2: i_out <= neg;
        2'd3: q_out <= adc;
      endcase
    end
  end

endmodule
