// cic_decim: cascaded integrator-comb decimating low-pass filter.
//
// N integrators run at the input rate, the decimator keeps one sample in
// R = 2^k, and N combs (differential delay 1) run at the output rate. The DC
// gain R^N = 2^(N*k) is removed exactly by an arithmetic right shift, so the
// output has the input's scale. k is set by the host at run time (0 bypasses
// the filtering: R = 1 and the output equals the input, delayed); a larger k
// trades a longer loop delay for less noise. Integrator and comb registers
// are IN_W + N*K_MAX bits wide, enough for the largest decimation, and wrap
// in two's complement as a CIC requires.
// Timing: integrators update on valid_in; valid_out pulses once per R input
// samples, two clocks after the R-th input. Changing k restarts the
// decimation counter; the output settles after N output samples.
// That the controller filters with CIC decimators is taken from its signal
// flow; the order N = 3, the power-of-two decimation and K_MAX are this
// design's choices.
module cic_decim #(
  parameter int IN_W  = 16,
  parameter int N     = 3,
  parameter int K_MAX = 12
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic [$clog2(K_MAX+1)-1:0]   k,
  input  logic                         valid_in,
  input  logic signed [IN_W-1:0]       x,
  output logic                         valid_out,
  output logic signed [IN_W-1:0]       y
);

  localparam int ACC_W = IN_W + N * K_MAX;
  localparam int KW    = $clog2(K_MAX+1);

  logic signed [ACC_W-1:0] integ [N];
  logic signed [ACC_W-1:0] dly   [N];
  logic signed [ACC_W-1:0] comb  [N+1];
  logic [K_MAX-1:0]        cnt;
  logic [K_MAX-1:0]        cnt_max;
  logic [KW-1:0]           k_q;
  logic                    dec_stb;
  logic signed [ACC_W-1:0] shifted;

  always_comb begin
    cnt_max = K_MAX'((1 << k) - 1);
    comb[0] = integ[N-1];
    for (int s = 0; s < N; s++) comb[s+1] = comb[s] - dly[s];
    shifted = comb[N] >>> (N * k_q);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < N; s++) begin
        integ[s] <= '0;
        dly[s]   <= '0;
      end
      cnt       <= '0;
      k_q       <= '0;
      dec_stb   <= 1'b0;
      valid_out <= 1'b0;
      y         <= '0;
    end else begin
      dec_stb   <= 1'b0;
      valid_out <= 1'b0;
      k_q       <= k;
      if (k != k_q) begin
        cnt <= '0;
      end else if (valid_in) begin
        integ[0] <= integ[0] + ACC_W'(x);
        for (int s = 1; s < N; s++) integ[s] <= integ[s] + integ[s-1];
        if (cnt >= cnt_max) begin
          cnt     <= '0;
          dec_stb <= 1'b1;
        end else begin
          cnt <= cnt + 1'b1;
        end
      end
      if (dec_stb) begin
        dly[0] <= comb[0];
        for (int s = 1; s < N; s++) dly[s] <= comb[s];
        y         <= IN_W'(shifted);
        valid_out <= 1'b1;
      end
    end
  end

endmodule
