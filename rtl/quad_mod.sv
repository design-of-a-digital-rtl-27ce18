// quad_mod: digital quadrature modulator driving the output DAC.
//
// The DAC runs at the 64 MHz sampling clock and must carry a 16 MHz carrier,
// exactly four samples per period. For s(t) = I cos(wt) - Q sin(wt) the
// samples at 90 degree steps are simply
//   n mod 4 = 0: +I   1: -Q   2: -I   3: +Q
// so no multipliers or sine table are needed. The 16-bit I/Q values are
// rounded to DAC_W bits (dropping the IQ_W - DAC_W fraction bits) and
// saturated, and the result is given in offset binary, the input code of the
// AD9752 DAC (0 = most negative, 2^(DAC_W-1) = zero). A mixer with a 64 MHz
// local oscillator outside the FPGA moves the carrier to 80 MHz.
// Timing: one register stage; i_in/q_in are sampled every clock. The sample
// counter resets with the demodulators' counters, which keeps input and
// output phases in a fixed relation.
// The 16 MHz output and the 12-bit DAC word are the controller's; the
// sample pattern and rounding are this design's own.
module quad_mod #(
  parameter int W     = 16,
  parameter int DAC_W = 12
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic signed [W-1:0] i_in,
  input  logic signed [W-1:0] q_in,
  output logic [DAC_W-1:0]    dac
);

  localparam int SH = W - DAC_W;
  localparam logic signed [W+1:0] DMAX = (W+2)'(2 ** (DAC_W - 1) - 1);
  localparam logic signed [W+1:0] DMIN = -(W+2)'(2 ** (DAC_W - 1));

  logic [1:0]          n;
  logic signed [W+1:0] s, r;
  logic [DAC_W-1:0]    code;

  always_comb begin
    unique case (n)
      2'd0: s = (W+2)'(i_in);
      2'd1: s = -(W+2)'(q_in);
      2'd2: s = -(W+2)'(i_in);
      2'd3: s = (W+2)'(q_in);
    endcase
    r = (s + (W+2)'(2 ** (SH - 1))) >>> SH;
    if (r > DMAX)      r = DMAX;
    else if (r < DMIN) r = DMIN;
    code = r[DAC_W-1:0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      n   <= '0;
      dac <= {1'b1, {(DAC_W-1){1'b0}}};
    end else begin
      n   <= n + 2'd1;
      dac <= {~code[DAC_W-1], code[DAC_W-2:0]};
    end
  end

endmodule
