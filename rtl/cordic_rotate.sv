// cordic_rotate: CORDIC in rotation mode, turns the vector (x, y) by an angle.
//
// With y_in = 0 and x_in = A it converts the polar pair (A, angle) into
// Cartesian (A cos, A sin); with a general (x_in, y_in) it rotates a complex
// number. Stage 0 turns the vector by 180 degrees when the angle lies in the
// left half plane, leaving a residual angle within +-90 degrees, inside the
// CORDIC's convergence range. STAGES micro-rotations then drive the residual
// angle to zero. The result is multiplied by 1/K and saturated.
// Interface: signed W-bit x/y, angle in PH_W bits of a turn.
// Timing: fully pipelined, one vector per clock, latency STAGES + 2 clocks.
// Converting the correction back to I/Q with a second CORDIC follows the
// controller's signal flow; the pipelining and widths are this design's own.
module cordic_rotate
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
  input  logic [PH_W-1:0]     angle,
  output logic                valid_out,
  output logic signed [W-1:0] x_out,
  output logic signed [W-1:0] y_out
);

  localparam int G  = 4;          // guard bits below the LSB
  localparam int XW = W + 2 + G;
  localparam int ZW = CORDIC_ZW;
  localparam int PW = XW + 18;

  logic signed [XW-1:0] xs [STAGES+1];
  logic signed [XW-1:0] ys [STAGES+1];
  logic signed [ZW-1:0] zs [STAGES+1];
  logic                 vs [STAGES+1];

  logic        [ZW-1:0] z_in;
  logic signed [PW-1:0] px, py;

  always_comb z_in = {angle, {(ZW-PH_W){1'b0}}};

  function automatic logic signed [W-1:0] sat(input logic signed [PW-1:0] v);
    logic signed [PW-1:0] hi, lo;
    hi = PW'({1'b0, {(W-1){1'b1}}});
    lo = -hi - 1;
    if (v > hi)      return {1'b0, {(W-1){1'b1}}};
    else if (v < lo) return {1'b1, {(W-1){1'b0}}};
    else             return v[W-1:0];
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s <= STAGES; s++) begin
        xs[s] <= '0;
        ys[s] <= '0;
        zs[s] <= '0;
        vs[s] <= 1'b0;
      end
    end else begin
      vs[0] <= valid_in;
      // angle in (90, 270) degrees: turn by 180 first
      if (z_in[ZW-1] != z_in[ZW-2]) begin
        xs[0] <= -(XW'(x_in) <<< G);
        ys[0] <= -(XW'(y_in) <<< G);
        zs[0] <= $signed(z_in - (ZW'(1) << (ZW - 1)));
      end else begin
        xs[0] <= XW'(x_in) <<< G;
        ys[0] <= XW'(y_in) <<< G;
        zs[0] <= $signed(z_in);
      end
      for (int s = 0; s < STAGES; s++) begin
        vs[s+1] <= vs[s];
        if (zs[s] >= 0) begin
          xs[s+1] <= xs[s] - (ys[s] >>> s);
          ys[s+1] <= ys[s] + (xs[s] >>> s);
          zs[s+1] <= zs[s] - $signed(cordic_atan(s));
        end else begin
          xs[s+1] <= xs[s] + (ys[s] >>> s);
          ys[s+1] <= ys[s] - (xs[s] >>> s);
          zs[s+1] <= zs[s] + $signed(cordic_atan(s));
        end
      end
    end
  end

  always_comb begin
    px = (PW'(xs[STAGES]) * PW'($signed({1'b0, CORDIC_INV_GAIN})) + (PW'(1) <<< (15 + G))) >>> (16 + G);
    py = (PW'(ys[STAGES]) * PW'($signed({1'b0, CORDIC_INV_GAIN})) + (PW'(1) <<< (15 + G))) >>> (16 + G);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid_out <= 1'b0;
      x_out     <= '0;
      y_out     <= '0;
    end else begin
      valid_out <= vs[STAGES];
      x_out     <= sat(px);
      y_out     <= sat(py);
    end
  end

endmodule
