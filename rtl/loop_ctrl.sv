// loop_ctrl: set-point comparison, feedback and drive generation.
//
// Inputs are the filtered cavity-pickup magnitude and phase and the filtered
// reference phase. The phase of the cavity relative to the reference,
// ph_rel = cav_ph - ref_ph, is what the phase loop regulates.
//
// Two feedback types are offered (cfg.ctrl_type):
//   CTRL_AMPPH  errors are amp_set - cav_mag and ph_set - ph_rel; the PID
//               outputs correct the drive amplitude and the drive phase.
//   CTRL_IQ     the cavity vector is rotated into the reference frame by a
//               CORDIC (cordic_rotate) and compared with (i_set, q_set); the
//               PID outputs correct the drive I and Q.
// The same two pid_ctrl instances (axis a = amplitude or I, axis b = phase or
// Q) serve both types; they are cleared whenever the type or mode changes.
//
// The drive phase is anchored according to cfg.mode:
//   MODE_GDR   reference phase + ph_set (+ phase correction)
//   MODE_SEL   cavity phase + sel_shift (+ phase correction): the loop closes
//              through the cavity and oscillates at its resonance; the
//              phase correction then shifts the loop phase, and with it
//              the oscillation frequency, which pulls the SEL loop onto
//              the reference when the phase loop is on
//   MODE_FIXED ph_set, i.e. exactly 5/4 of the sampling clock
//   MODE_NCO   NCO phase ramp + ph_set, i.e. a programmable frequency offset
// Feedback acts only in GDR and SEL; FIXED and NCO are open-loop (used for
// frequency-response scans). ph_offset is added in every mode to compensate
// the phase shift of cables and amplifiers. The drive amplitude is limited
// to [0, amp_limit].
//
// Outputs drive_x/drive_y/drive_angle go to the output CORDIC, which turns
// (x, y) by the angle; in CTRL_AMPPH drive_y is 0 and drive_x the amplitude.
// Timing: the drive is re-registered every clock (the NCO phase moves every
// clock); corrections follow a measurement after 2 clocks (polar type) or
// STAGES + 4 clocks (I/Q type, through the frame CORDIC).
// The comparison, PID, optional phase-offset rotation, the I/Q or
// amplitude/phase choice and the SEL/GDR modes come from the controller's
// description; how they are combined here is this design's own.
module loop_ctrl
  import llrf_pkg::*;
(
  input  logic                   clk,
  input  logic                   rst_n,
  input  loop_cfg_t              cfg,
  input  logic                   meas_valid,
  input  logic [IQ_W-1:0]        cav_mag,
  input  logic [PH_W-1:0]        cav_ph,
  input  logic [PH_W-1:0]        ref_ph,
  input  logic [PH_W-1:0]        nco_ph,
  output logic signed [IQ_W-1:0] drive_x,
  output logic signed [IQ_W-1:0] drive_y,
  output logic [PH_W-1:0]        drive_angle,
  // diagnostics
  output logic [PH_W-1:0]        ph_rel,
  output logic signed [IQ_W-1:0] cav_i_rel,
  output logic signed [IQ_W-1:0] cav_q_rel,
  output logic signed [IQ_W-1:0] err_a,
  output logic signed [IQ_W-1:0] err_b,
  output logic signed [IQ_W-1:0] corr_a,
  output logic signed [IQ_W-1:0] corr_b
);

  localparam logic signed [IQ_W+1:0] SMAX = (IQ_W+2)'(2 ** (IQ_W - 1) - 1);
  localparam logic signed [IQ_W+1:0] SMIN = -(IQ_W+2)'(2 ** (IQ_W - 1));

  function automatic logic signed [IQ_W-1:0] sat(input logic signed [IQ_W+1:0] v);
    if (v > SMAX)      return SMAX[IQ_W-1:0];
    else if (v < SMIN) return SMIN[IQ_W-1:0];
    else               return v[IQ_W-1:0];
  endfunction

  // ---- measurement in the reference frame ----
  logic [PH_W-1:0]        ph_rel_now;
  logic signed [IQ_W-1:0] mag_s;
  logic                   frame_valid;
  logic signed [IQ_W-1:0] fi, fq;

  always_comb begin
    ph_rel_now = cav_ph - ref_ph;
    mag_s      = cav_mag[IQ_W-1] ? SMAX[IQ_W-1:0] : $signed(cav_mag);
  end

  cordic_rotate u_frame (
    .clk       (clk),
    .rst_n     (rst_n),
    .valid_in  (meas_valid),
    .x_in      (mag_s),
    .y_in      ('0),
    .angle     (ph_rel_now),
    .valid_out (frame_valid),
    .x_out     (fi),
    .y_out     (fq)
  );

  // ---- errors ----
  logic signed [IQ_W-1:0] e_amp, e_ph, e_i, e_q;
  logic signed [IQ_W-1:0] pa_err, pb_err;
  logic                   pa_v, pb_v;

  always_comb begin
    e_amp = sat((IQ_W+2)'($signed({1'b0, cfg.amp_set})) - (IQ_W+2)'($signed({1'b0, cav_mag})));
    e_ph  = $signed(cfg.ph_set - ph_rel_now);
    e_i   = sat((IQ_W+2)'(cfg.i_set) - (IQ_W+2)'(fi));
    e_q   = sat((IQ_W+2)'(cfg.q_set) - (IQ_W+2)'(fq));
    if (cfg.ctrl_type == CTRL_IQ) begin
      pa_err = e_i;   pa_v = frame_valid;
      pb_err = e_q;   pb_v = frame_valid;
    end else begin
      pa_err = e_amp; pa_v = meas_valid;
      pb_err = e_ph;  pb_v = meas_valid;
    end
  end

  // ---- PID regulators ----
  logic        closed_loop;
  logic        clr;
  drive_mode_e mode_q;
  ctrl_type_e  type_q;
  logic signed [IQ_W-1:0] ua, ub;
  logic                   ua_v, ub_v;

  always_comb begin
    closed_loop = (cfg.mode == MODE_GDR) || (cfg.mode == MODE_SEL);
    clr         = (cfg.mode != mode_q) || (cfg.ctrl_type != type_q);
  end

  pid_ctrl u_pid_a (
    .clk (clk), .rst_n (rst_n),
    .en (cfg.fb_a_en && closed_loop), .clr (clr),
    .valid_in (pa_v), .err (pa_err),
    .kp (cfg.kp_a), .ki (cfg.ki_a), .kd (cfg.kd_a),
    .valid_out (ua_v), .u (ua)
  );

  pid_ctrl u_pid_b (
    .clk (clk), .rst_n (rst_n),
    .en (cfg.fb_b_en && closed_loop), .clr (clr),
    .valid_in (pb_v), .err (pb_err),
    .kp (cfg.kp_b), .ki (cfg.ki_b), .kd (cfg.kd_b),
    .valid_out (ub_v), .u (ub)
  );

  // ---- drive ----
  logic [PH_W-1:0]        ref_ph_h, cav_ph_h, base_ph;
  logic signed [IQ_W+1:0] amp_sum, amp_lim;

  always_comb begin
    unique case (cfg.mode)
      MODE_GDR:   base_ph = ref_ph_h + cfg.ph_set;
      MODE_SEL:   base_ph = cav_ph_h + cfg.sel_shift;
      MODE_FIXED: base_ph = cfg.ph_set;
      MODE_NCO:   base_ph = nco_ph + cfg.ph_set;
    endcase
    amp_lim = cfg.amp_limit[IQ_W-1] ? SMAX : (IQ_W+2)'({1'b0, cfg.amp_limit});
    amp_sum = (IQ_W+2)'({1'b0, cfg.amp_set}) + (IQ_W+2)'(corr_a);
    if (amp_sum < 0)             amp_sum = '0;
    else if (amp_sum > amp_lim)  amp_sum = amp_lim;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mode_q      <= MODE_GDR;
      type_q      <= CTRL_AMPPH;
      ref_ph_h    <= '0;
      cav_ph_h    <= '0;
      ph_rel      <= '0;
      cav_i_rel   <= '0;
      cav_q_rel   <= '0;
      err_a       <= '0;
      err_b       <= '0;
      corr_a      <= '0;
      corr_b      <= '0;
      drive_x     <= '0;
      drive_y     <= '0;
      drive_angle <= '0;
    end else begin
      mode_q <= cfg.mode;
      type_q <= cfg.ctrl_type;
      if (meas_valid) begin
        ref_ph_h <= ref_ph;
        cav_ph_h <= cav_ph;
        ph_rel   <= ph_rel_now;
      end
      if (frame_valid) begin
        cav_i_rel <= fi;
        cav_q_rel <= fq;
      end
      if (pa_v) err_a <= pa_err;
      if (pb_v) err_b <= pb_err;
      if (ua_v) corr_a <= ua;
      if (ub_v) corr_b <= ub;
      if (cfg.ctrl_type == CTRL_IQ) begin
        drive_x     <= sat((IQ_W+2)'(cfg.i_set) + (IQ_W+2)'(corr_a));
        drive_y     <= sat((IQ_W+2)'(cfg.q_set) + (IQ_W+2)'(corr_b));
        drive_angle <= ((cfg.mode == MODE_SEL) ? base_ph : base_ph - cfg.ph_set) + cfg.ph_offset;
      end else begin
        drive_x     <= amp_sum[IQ_W-1:0];
        drive_y     <= '0;
        drive_angle <= base_ph + corr_b + cfg.ph_offset;
      end
    end
  end

endmodule
