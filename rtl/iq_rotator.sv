// iq_rotator: rotation matrix that compensates the cable delay of a channel.
//
//   [i_out]   [cos -sin] [i_in]
//   [q_out] = [sin  cos] [q_in]
//
// cos_c and sin_c are signed Q1.15 coefficients written by the host
// (0x7FFF, 0 means no rotation). The inputs are IN_W-bit samples; the output
// keeps OUT_W - IN_W extra fraction bits, so a full-scale input maps to
// 2^(OUT_W-1). Results are saturated to OUT_W bits.
// Timing: one register stage; valid_out follows valid_in by one clock.
// The rotation matrix is the controller's; the coefficient format, widths
// and saturation are this design's choices.
module iq_rotator #(
  parameter int IN_W  = 12,
  parameter int OUT_W = 16,
  parameter int C_W   = 16
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    valid_in,
  input  logic signed [IN_W-1:0]  i_in,
  input  logic signed [IN_W-1:0]  q_in,
  input  logic signed [C_W-1:0]   cos_c,
  input  logic signed [C_W-1:0]   sin_c,
  output logic                    valid_out,
  output logic signed [OUT_W-1:0] i_out,
  output logic signed [OUT_W-1:0] q_out
);

  localparam int P_W   = IN_W + C_W + 1;
  localparam int SHIFT = (C_W - 1) - (OUT_W - IN_W);

  function automatic logic signed [OUT_W-1:0] sat(input logic signed [P_W-1:0] v);
    logic signed [P_W-1:0] hi, lo;
    hi = P_W'({1'b0, {(OUT_W-1){1'b1}}});
    lo = -hi - 1;
    if (v > hi)      return {1'b0, {(OUT_W-1){1'b1}}};
    else if (v < lo) return {1'b1, {(OUT_W-1){1'b0}}};
    else             return v[OUT_W-1:0];
  endfunction

  logic signed [P_W-1:0] ri, rq;

  always_comb begin
    ri = (P_W'(i_in * cos_c) - P_W'(q_in * sin_c)) >>> SHIFT;
    rq = (P_W'(i_in * sin_c) + P_W'(q_in * cos_c)) >>> SHIFT;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid_out <= 1'b0;
      i_out     <= '0;
      q_out     <= '0;
    end else begin
      valid_out <= valid_in;
      if (valid_in) begin
        i_out <= sat(ri);
        q_out <= sat(rq);
      end
    end
  end

endmodule
