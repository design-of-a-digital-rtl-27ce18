// cordic_vector: CORDIC in vectoring mode, Cartesian (I, Q) to polar.
//
// Stage 0 folds the vector into the right half plane (a 180 degree turn when
// I < 0). Each of the STAGES micro-rotations then turns the vector by
// +-atan(2^-i) towards the I axis and accumulates the angle, so that at the
// end y is ~0, x is K*|v| and z is the phase. The magnitude is multiplied by
// 1/K = 0.60725 so that it reads in the input's units.
// Interface: x_in/y_in are signed IQ_W-bit numbers; mag is unsigned IQ_W
// bits (saturated), phase is PH_W bits of a turn (2^PH_W = 360 degrees).
// Timing: fully pipelined, one vector per clock, latency STAGES + 2 clocks.
// Converting to polar form with a CORDIC is the controller's method; the
// pipelining, stage count and widths are this design's choices.
module cordic_vector
  import llrf_pkg::*;
#(
  parameter int W      = IQ_W,
  parameter int STAGES = CORDIC_STAGES
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                valid_in,
  input  logic signed [W-1:0] x_in,
  input  logic signed [W-1:0] y_in,
  output logic                valid_out,
  output logic [W-1:0]        mag,
  output logic [PH_W-1:0]     phase
);

  localparam int G  = 4;          // guard bits below the LSB
  localparam int XW = W + 2 + G;
  localparam int ZW = CORDIC_ZW;

  logic signed [XW-1:0] xs [STAGES+1];
  logic signed [XW-1:0] ys [STAGES+1];
  logic        [ZW-1:0] zs [STAGES+1];
  logic                 vs [STAGES+1];

  logic [XW+16:0] prod;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s <= STAGES; s++) begin
        xs[s] <= '0;
        ys[s] <= '0;
        zs[s] <= '0;
        vs[s] <= 1'b0;
      end
    end else begin
      // stage 0: fold into the right half plane
      vs[0] <= valid_in;
      if (x_in < 0) begin
        xs[0] <= -(XW'(x_in) <<< G);
        ys[0] <= -(XW'(y_in) <<< G);
        zs[0] <= ZW'(1) << (ZW - 1);
      end else begin
        xs[0] <= XW'(x_in) <<< G;
        ys[0] <= XW'(y_in) <<< G;
        zs[0] <= '0;
      end
      for (int s = 0; s < STAGES; s++) begin
        vs[s+1] <= vs[s];
        if (ys[s] >= 0) begin
          xs[s+1] <= xs[s] + (ys[s] >>> s);
          ys[s+1] <= ys[s] - (xs[s] >>> s);
          zs[s+1] <= zs[s] + cordic_atan(s);
        end else begin
          xs[s+1] <= xs[s] - (ys[s] >>> s);
          ys[s+1] <= ys[s] + (xs[s] >>> s);
          zs[s+1] <= zs[s] - cordic_atan(s);
        end
      end
    end
  end

  // gain compensation and rounding to the output formats
  always_comb prod = $unsigned(xs[STAGES]) * CORDIC_INV_GAIN + ((XW+17)'(1) << (15 + G));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid_out <= 1'b0;
      mag       <= '0;
      phase     <= '0;
    end else begin
      valid_out <= vs[STAGES];
      if (xs[STAGES] < 0)               mag <= '0;
      else if (|prod[XW+16:W+16+G])       mag <= '1;
      else                              mag <= prod[W+15+G:16+G];
      phase <= PH_W'((zs[STAGES] + (ZW'(1) << (ZW - PH_W - 1))) >> (ZW - PH_W));
    end
  end

endmodule
