// llrf_top: digital low-level RF controller for an 80 MHz resonator.
//
// The FPGA part of a resonator controller that works either generator
// driven (GDR: the cavity field is locked to a reference generator) or as a
// self-excited loop (SEL: the cavity's own signal, phase-shifted, drives
// it). Everything runs on one 64 MHz clock, the ADC and DAC sample clock.
//
// Signal flow:
//   adc[c] -> iq_demod -> iq_rotator -> cic_decim (I and Q) -> cordic_vector
//     for each of N_CH channels: 0 cavity pickup, 1 reference generator,
//     2 forward power, 3 reflected power, 4 beam current. Channels 2-4 are
//     measured for display only.
//   cavity magnitude/phase, reference phase -> loop_ctrl (set-point
//     comparison, two PIDs, mode and feedback-type selection, phase offset)
//   drive (x, y, angle) -> cordic_rotate -> quad_mod -> dac
//   nco_sweep supplies the phase ramp for MODE_NCO (frequency offset, scan);
//   freq_meter measures the cavity-reference frequency difference, which is
//   brought out with the phase difference for the tuner; diag_capture
//   records two selectable traces, either from the filtered sample stream
//   or one sample at the end of each scan step (the cavity's frequency
//   response); ctrl_regs is the host register port.
//
// Interface: adc is one signed two's complement word per channel per clock
// (80 MHz inputs sampled at 64 MHz); dac is the offset-binary DAC word of a
// 16 MHz carrier at 64 MS/s, mixed to 80 MHz outside. The host bus is
// described in ctrl_regs. trig_event triggers a capture in event mode.
// Timing (CIC_K = 0): ADC sample to DAC word through the loop is about
// 50 clocks (0.8 us) in amplitude/phase mode.
// The partitioning into these stages is the controller's; widths, formats,
// encodings and the register map are this design's own.
// Three outputs of sub-blocks are left unconnected on purpose: the valid
// strobes of channels 1-4 equal that of channel 0 (all channels share k and
// the reset), the output CORDIC runs every clock so its valid is always
// high after the pipeline fills, and the NCO's current frequency is known to
// the host from the scan settings and the step index.
module llrf_top
  import llrf_pkg::*;
#(
  parameter int N_CH      = 5,
  parameter int ADC_W     = 12,
  parameter int DAC_W     = 12,
  parameter int CIC_N     = 3,
  parameter int K_MAX     = 12,
  parameter int F_W       = 26,
  parameter int GATE_LOG2 = 23,
  parameter int DIAG_AW   = 10
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic [N_CH-1:0][ADC_W-1:0]   adc,
  output logic [DAC_W-1:0]             dac,
  // host register port
  input  logic                         wr_en,
  input  logic                         rd_en,
  input  logic [6:0]                   addr,
  input  logic [31:0]                  wdata,
  output logic [31:0]                  rdata,
  input  logic                         trig_event,
  // to the cavity tuner
  output logic [PH_W-1:0]              tuner_ph_diff,
  output logic signed [39:0]           tuner_freq_diff,
  output logic                         tuner_valid
);

  localparam int KW = $clog2(K_MAX + 1);

  initial assert (N_CH >= 2) else $error("llrf_top needs the cavity and reference channels");

  // ---- settings ----
  loop_cfg_t                  cfg;
  logic [KW-1:0]              cic_k;
  logic [N_CH-1:0][IQ_W-1:0]  rot_cos, rot_sin;
  logic signed [F_W-1:0]      nco_freq, sw_fstart, sw_fstep;
  logic [15:0]                sw_nsteps;
  logic [23:0]                sw_dwell;
  logic                       sw_start, sw_stop;
  logic [2:0]                 diag_sel_a, diag_sel_b;
  logic                       diag_trig_mode, diag_step, diag_arm;
  logic [15:0]                diag_div;
  logic [9:0]                 diag_raddr;

  // ---- receive channels ----
  logic [N_CH-1:0][IQ_W-1:0]  ch_mag;
  logic [N_CH-1:0][PH_W-1:0]  ch_ph;
  logic [N_CH-1:0]            ch_valid;

  for (genvar c = 0; c < N_CH; c++) begin : g_ch
    logic signed [ADC_W-1:0] di, dq;
    logic                    dv, rv, cv_i, cv_q;
    logic signed [IQ_W-1:0]  ri, rq, fi, fq;

    iq_demod #(.ADC_W(ADC_W)) u_demod (
      .clk (clk), .rst_n (rst_n), .adc ($signed(adc[c])),
      .i_out (di), .q_out (dq), .valid (dv)
    );

    iq_rotator #(.IN_W(ADC_W), .OUT_W(IQ_W)) u_rot (
      .clk (clk), .rst_n (rst_n), .valid_in (dv), .i_in (di), .q_in (dq),
      .cos_c ($signed(rot_cos[c])), .sin_c ($signed(rot_sin[c])),
      .valid_out (rv), .i_out (ri), .q_out (rq)
    );

    cic_decim #(.IN_W(IQ_W), .N(CIC_N), .K_MAX(K_MAX)) u_cic_i (
      .clk (clk), .rst_n (rst_n), .k (cic_k), .valid_in (rv), .x (ri),
      .valid_out (cv_i), .y (fi)
    );

    cic_decim #(.IN_W(IQ_W), .N(CIC_N), .K_MAX(K_MAX)) u_cic_q (
      .clk (clk), .rst_n (rst_n), .k (cic_k), .valid_in (rv), .x (rq),
      .valid_out (cv_q), .y (fq)
    );

    cordic_vector u_vec (
      .clk (clk), .rst_n (rst_n), .valid_in (cv_i && cv_q), .x_in (fi), .y_in (fq),
      .valid_out (ch_valid[c]), .mag (ch_mag[c]), .phase (ch_ph[c])
    );
  end

  // ---- feedback loop ----
  logic [PH_W-1:0]        nco_ph, ph_rel, drive_angle;
  logic signed [IQ_W-1:0] drive_x, drive_y, i_rel, q_rel;
  logic signed [IQ_W-1:0] err_a, err_b, corr_a, corr_b;
  logic signed [F_W-1:0]  nco_fcur;
  logic                   sw_busy, sw_stb;
  logic [15:0]            sw_idx;

  nco_sweep #(.F_W(F_W), .PH_W(PH_W)) u_nco (
    .clk (clk), .rst_n (rst_n), .freq_word (nco_freq),
    .sweep_start (sw_start), .sweep_stop (sw_stop),
    .f_start (sw_fstart), .f_step (sw_fstep), .n_steps (sw_nsteps), .dwell (sw_dwell),
    .phase (nco_ph), .freq_cur (nco_fcur), .busy (sw_busy), .step_idx (sw_idx),
    .step_stb (sw_stb)
  );

  loop_ctrl u_loop (
    .clk (clk), .rst_n (rst_n), .cfg (cfg),
    .meas_valid (ch_valid[0]), .cav_mag (ch_mag[0]), .cav_ph (ch_ph[0]), .ref_ph (ch_ph[1]),
    .nco_ph (nco_ph),
    .drive_x (drive_x), .drive_y (drive_y), .drive_angle (drive_angle),
    .ph_rel (ph_rel), .cav_i_rel (i_rel), .cav_q_rel (q_rel),
    .err_a (err_a), .err_b (err_b), .corr_a (corr_a), .corr_b (corr_b)
  );

  // ---- output ----
  logic                   out_v;
  logic signed [IQ_W-1:0] out_i, out_q;

  cordic_rotate u_out (
    .clk (clk), .rst_n (rst_n), .valid_in (1'b1),
    .x_in (drive_x), .y_in (drive_y), .angle (drive_angle),
    .valid_out (out_v), .x_out (out_i), .y_out (out_q)
  );

  quad_mod #(.W(IQ_W), .DAC_W(DAC_W)) u_mod (
    .clk (clk), .rst_n (rst_n), .i_in (out_i), .q_in (out_q), .dac (dac)
  );

  // ---- diagnostics ----
  logic signed [39:0]     freq_diff;
  logic                   fm_valid;
  logic [PH_W-1:0]        fm_ph;
  logic [7:0][IQ_W-1:0]   probes;
  logic [IQ_W-1:0]        diag_a, diag_b;
  logic                   diag_busy, diag_done;

  freq_meter #(.PH_W(PH_W), .GATE_LOG2(GATE_LOG2), .OUT_W(40)) u_fm (
    .clk (clk), .rst_n (rst_n), .valid (ch_valid[0]), .ph (ch_ph[0] - ch_ph[1]),
    .freq_diff (freq_diff), .ph_last (fm_ph), .out_valid (fm_valid)
  );

  always_comb begin
    probes[0] = ch_mag[0];
    probes[1] = ch_ph[0];
    probes[2] = ch_mag[1];
    probes[3] = ph_rel;
    probes[4] = err_a;
    probes[5] = err_b;
    probes[6] = corr_a;
    probes[7] = corr_b;
  end

  diag_capture #(.W(IQ_W), .AW(DIAG_AW), .N_SRC(8)) u_diag (
    .clk (clk), .rst_n (rst_n), .probes (probes), .sample_stb (diag_step ? sw_stb : ch_valid[0]),
    .sel_a (diag_sel_a), .sel_b (diag_sel_b), .trig_mode (diag_trig_mode),
    .trig_event (trig_event || sw_stb), .div (diag_div), .arm (diag_arm),
    .rd_addr (DIAG_AW'(diag_raddr)), .rd_a (diag_a), .rd_b (diag_b),
    .busy (diag_busy), .done (diag_done)
  );

  ctrl_regs #(.N_CH(N_CH), .KW(KW), .F_W(F_W), .FD_W(40)) u_regs (
    .clk (clk), .rst_n (rst_n),
    .wr_en (wr_en), .rd_en (rd_en), .addr (addr), .wdata (wdata), .rdata (rdata),
    .cfg (cfg), .cic_k (cic_k), .rot_cos (rot_cos), .rot_sin (rot_sin),
    .nco_freq (nco_freq), .sw_fstart (sw_fstart), .sw_fstep (sw_fstep),
    .sw_nsteps (sw_nsteps), .sw_dwell (sw_dwell), .sw_start (sw_start), .sw_stop (sw_stop),
    .diag_sel_a (diag_sel_a), .diag_sel_b (diag_sel_b), .diag_trig_mode (diag_trig_mode),
    .diag_step (diag_step),
    .diag_div (diag_div), .diag_arm (diag_arm), .diag_raddr (diag_raddr),
    .ch_mag (ch_mag), .ch_ph (ch_ph), .ph_rel (ph_rel), .freq_diff (freq_diff),
    .sw_busy (sw_busy), .sw_idx (sw_idx), .diag_busy (diag_busy), .diag_done (diag_done),
    .diag_a (diag_a), .diag_b (diag_b),
    .err_a (err_a), .err_b (err_b), .corr_a (corr_a), .corr_b (corr_b),
    .i_rel (i_rel), .q_rel (q_rel)
  );

  always_comb begin
    tuner_ph_diff   = fm_ph;
    tuner_freq_diff = freq_diff;
    tuner_valid     = fm_valid;
  end

endmodule
