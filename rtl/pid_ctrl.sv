// pid_ctrl: PID regulator for one control axis (amplitude, phase, I or Q).
//
//   u[n] = ( Kp*e[n] + sum_{m<=n} Ki*e[m] + Kd*(e[n] - e[n-1]) ) / 2^FRAC
//
// Gains are signed G_W-bit numbers with FRAC fraction bits. The integral is
// kept as the running sum of Ki*e (so a change of Ki causes no jump) and is
// clamped to the output range, which prevents wind-up. The output is
// saturated to W bits. When en is low, or clr is pulsed, the integrator and
// the derivative history are cleared and u is 0: the loop is open.
// Timing: two pipeline stages; a new error may arrive every clock and u
// appears with valid_out two clocks after valid_in.
// The PID algorithm and the on/off switch come from the controller's
// description; number formats, anti-wind-up and pipelining are this
// design's own.
module pid_ctrl
  import llrf_pkg::*;
#(
  parameter int W    = IQ_W,
  parameter int G_W  = GAIN_W,
  parameter int FRAC = GAIN_FRAC
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  en,
  input  logic                  clr,
  input  logic                  valid_in,
  input  logic signed [W-1:0]   err,
  input  logic signed [G_W-1:0] kp,
  input  logic signed [G_W-1:0] ki,
  input  logic signed [G_W-1:0] kd,
  output logic                  valid_out,
  output logic signed [W-1:0]   u
);

  localparam int S_W = W + G_W + 3;
  localparam logic signed [S_W-1:0] LIM = S_W'((2 ** (W - 1) - 1)) <<< FRAC;

  logic signed [W-1:0]   e_prev;
  logic signed [S_W-1:0] p1, i1, d1, acc;
  logic signed [S_W-1:0] acc_n, sum, sh;
  logic                  v1;

  always_comb begin
    acc_n = acc + i1;
    if (acc_n > LIM)       acc_n = LIM;
    else if (acc_n < -LIM) acc_n = -LIM;
    sum = p1 + acc_n + d1;
    sh  = sum >>> FRAC;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      e_prev    <= '0;
      p1        <= '0;
      i1        <= '0;
      d1        <= '0;
      acc       <= '0;
      v1        <= 1'b0;
      valid_out <= 1'b0;
      u         <= '0;
    end else begin
      v1        <= valid_in;
      valid_out <= v1;
      if (!en || clr) begin
        e_prev <= '0;
        p1     <= '0;
        i1     <= '0;
        d1     <= '0;
        acc    <= '0;
        u      <= '0;
      end else begin
        if (valid_in) begin
          p1     <= S_W'(kp * err);
          i1     <= S_W'(ki * err);
          d1     <= S_W'(kd * (S_W'(err) - S_W'(e_prev)));
          e_prev <= err;
        end
        if (v1) begin
          acc <= acc_n;
          if (sh > S_W'(2 ** (W - 1) - 1))  u <= {1'b0, {(W-1){1'b1}}};
          else if (sh < -S_W'(2 ** (W - 1))) u <= {1'b1, {(W-1){1'b0}}};
          else                              u <= sh[W-1:0];
        end
      end
    end
  end

endmodule
