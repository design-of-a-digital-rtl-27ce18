// ctrl_regs: host register bank of the controller.
//
// Everything the operator sets (set points, feedback on/off and type, PID
// gains, mode, filter decimation, cable rotations, NCO frequency and scan,
// capture settings) is held here, and the measured values are read back
// here. The host bus is a plain synchronous register port: a write takes
// effect on the clock edge with wr_en high; rdata is valid the clock after
// rd_en. Writes to the command registers produce one-clock pulses.
//
// Word address map (hex):
//   00 CTRL       [1:0] mode, [2] ctrl_type, [3] fb_a_en, [4] fb_b_en
//   01 AMP_SET    02 PH_SET (PH_SET_W bits, top bits of the phase word)
//   03 I_SET      04 Q_SET      05 PH_OFFSET  06 SEL_SHIFT  07 AMP_LIMIT
//   08..0A KP_A KI_A KD_A       0B..0D KP_B KI_B KD_B       0E CIC_K
//   10+2c / 11+2c  ROT_COS / ROT_SIN of channel c (Q1.15), c < N_CH <= 8
//   20 NCO_FREQ   21 SW_FSTART  22 SW_FSTEP   23 SW_NSTEPS  24 SW_DWELL
//   25 SW_CMD     (write) bit0 start scan, bit1 stop scan
//   28 DIAG_SEL   [2:0] sel_a, [6:4] sel_b, [8] trig_mode,
//                 [9] step: one sample per scan step (frequency response)
//   29 DIAG_DIV   2A DIAG_CMD (write) bit0 arm   2B DIAG_RADDR
//   (signed settings read back sign extended)
//   read only:
//   40+c  channel c: [15:0] magnitude, [31:16] phase
//   48 PH_REL     49 FREQ_DIFF[31:0]  4A FREQ_DIFF[39:32] (sign extended)
//   4B STATUS     [0] scan busy, [1] capture busy, [2] capture done,
//                 [31:16] scan step index
//   4C DIAG_DATA  {trace b, trace a} at DIAG_RADDR
//   4D ERR {err_b, err_a}   4E CORR {corr_b, corr_a}   4F IQ_REL {Q, I}
// Reset state: loop open in GDR with amplitude/phase type, all set points
// and gains 0, amp_limit 0x7FFF, rotations cos = 0x7FFF sin = 0, CIC_K 0.
// The list of settings follows the controller's user functions; the
// phase set point has PH_SET_W = 12 bits, a step of 360/4096 = 0.088 degree,
// matching the ~0.09 degree step of the controller (the low
// PH_W-PH_SET_W bits of cfg.ph_set are therefore always zero). The bus and the map are
// this design's own.
module ctrl_regs
  import llrf_pkg::*;
#(
  parameter int N_CH     = 5,
  parameter int PH_SET_W = 12,
  parameter int KW       = 4,
  parameter int F_W      = 26,
  parameter int FD_W     = 40
) (
  input  logic                         clk,
  input  logic                         rst_n,
  // host port
  input  logic                         wr_en,
  input  logic                         rd_en,
  input  logic [6:0]                   addr,
  input  logic [31:0]                  wdata,
  output logic [31:0]                  rdata,
  // settings
  output loop_cfg_t                    cfg,
  output logic [KW-1:0]                cic_k,
  output logic [N_CH-1:0][IQ_W-1:0]    rot_cos,
  output logic [N_CH-1:0][IQ_W-1:0]    rot_sin,
  output logic signed [F_W-1:0]        nco_freq,
  output logic signed [F_W-1:0]        sw_fstart,
  output logic signed [F_W-1:0]        sw_fstep,
  output logic [15:0]                  sw_nsteps,
  output logic [23:0]                  sw_dwell,
  output logic                         sw_start,
  output logic                         sw_stop,
  output logic [2:0]                   diag_sel_a,
  output logic [2:0]                   diag_sel_b,
  output logic                         diag_trig_mode,
  output logic                         diag_step,
  output logic [15:0]                  diag_div,
  output logic                         diag_arm,
  output logic [9:0]                   diag_raddr,
  // status
  input  logic [N_CH-1:0][IQ_W-1:0]    ch_mag,
  input  logic [N_CH-1:0][PH_W-1:0]    ch_ph,
  input  logic [PH_W-1:0]              ph_rel,
  input  logic signed [FD_W-1:0]       freq_diff,
  input  logic                         sw_busy,
  input  logic [15:0]                  sw_idx,
  input  logic                         diag_busy,
  input  logic                         diag_done,
  input  logic [IQ_W-1:0]              diag_a,
  input  logic [IQ_W-1:0]              diag_b,
  input  logic [IQ_W-1:0]              err_a,
  input  logic [IQ_W-1:0]              err_b,
  input  logic [IQ_W-1:0]              corr_a,
  input  logic [IQ_W-1:0]              corr_b,
  input  logic [IQ_W-1:0]              i_rel,
  input  logic [IQ_W-1:0]              q_rel
);

  logic [PH_SET_W-1:0] ph_set_r;

  always_comb cfg.ph_set = {ph_set_r, {(PH_W-PH_SET_W){1'b0}}};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cfg.mode       <= MODE_GDR;
      cfg.ctrl_type  <= CTRL_AMPPH;
      cfg.fb_a_en    <= 1'b0;
      cfg.fb_b_en    <= 1'b0;
      cfg.amp_set    <= '0;
      ph_set_r       <= '0;
      cfg.i_set      <= '0;
      cfg.q_set      <= '0;
      cfg.ph_offset  <= '0;
      cfg.sel_shift  <= '0;
      cfg.amp_limit  <= 16'h7FFF;
      cfg.kp_a       <= '0;
      cfg.ki_a       <= '0;
      cfg.kd_a       <= '0;
      cfg.kp_b       <= '0;
      cfg.ki_b       <= '0;
      cfg.kd_b       <= '0;
      cic_k          <= '0;
      for (int c = 0; c < N_CH; c++) begin
        rot_cos[c] <= 16'h7FFF;
        rot_sin[c] <= '0;
      end
      nco_freq       <= '0;
      sw_fstart      <= '0;
      sw_fstep       <= '0;
      sw_nsteps      <= '0;
      sw_dwell       <= '0;
      sw_start       <= 1'b0;
      sw_stop        <= 1'b0;
      diag_sel_a     <= '0;
      diag_sel_b     <= '0;
      diag_trig_mode <= 1'b0;
      diag_step      <= 1'b0;
      diag_div       <= '0;
      diag_arm       <= 1'b0;
      diag_raddr     <= '0;
    end else begin
      sw_start <= 1'b0;
      sw_stop  <= 1'b0;
      diag_arm <= 1'b0;
      if (wr_en) begin
        if (addr >= 7'h10 && addr < 7'h10 + 7'(2 * N_CH)) begin
          if (addr[0]) rot_sin[(addr - 7'h10) >> 1] <= wdata[15:0];
          else         rot_cos[(addr - 7'h10) >> 1] <= wdata[15:0];
        end
        unique case (addr)
          7'h00: begin
            cfg.mode      <= drive_mode_e'(wdata[1:0]);
            cfg.ctrl_type <= ctrl_type_e'(wdata[2]);
            cfg.fb_a_en   <= wdata[3];
            cfg.fb_b_en   <= wdata[4];
          end
          7'h01: cfg.amp_set   <= wdata[15:0];
          7'h02: ph_set_r      <= wdata[PH_SET_W-1:0];
          7'h03: cfg.i_set     <= wdata[15:0];
          7'h04: cfg.q_set     <= wdata[15:0];
          7'h05: cfg.ph_offset <= wdata[15:0];
          7'h06: cfg.sel_shift <= wdata[15:0];
          7'h07: cfg.amp_limit <= wdata[15:0];
          7'h08: cfg.kp_a      <= wdata[15:0];
          7'h09: cfg.ki_a      <= wdata[15:0];
          7'h0A: cfg.kd_a      <= wdata[15:0];
          7'h0B: cfg.kp_b      <= wdata[15:0];
          7'h0C: cfg.ki_b      <= wdata[15:0];
          7'h0D: cfg.kd_b      <= wdata[15:0];
          7'h0E: cic_k         <= wdata[KW-1:0];
          7'h20: nco_freq      <= wdata[F_W-1:0];
          7'h21: sw_fstart     <= wdata[F_W-1:0];
          7'h22: sw_fstep      <= wdata[F_W-1:0];
          7'h23: sw_nsteps     <= wdata[15:0];
          7'h24: sw_dwell      <= wdata[23:0];
          7'h25: begin
            sw_start <= wdata[0];
            sw_stop  <= wdata[1];
          end
          7'h28: begin
            diag_sel_a     <= wdata[2:0];
            diag_sel_b     <= wdata[6:4];
            diag_trig_mode <= wdata[8];
            diag_step      <= wdata[9];
          end
          7'h29: diag_div   <= wdata[15:0];
          7'h2A: diag_arm   <= wdata[0];
          7'h2B: diag_raddr <= wdata[9:0];
          default: ;
        endcase
      end
    end
  end

  logic [31:0] rd_mux;

  always_comb begin
    rd_mux = '0;
    if (addr >= 7'h10 && addr < 7'h10 + 7'(2 * N_CH)) begin
      rd_mux = addr[0] ? 32'(rot_sin[(addr - 7'h10) >> 1]) : 32'(rot_cos[(addr - 7'h10) >> 1]);
    end else if (addr >= 7'h40 && addr < 7'h40 + 7'(N_CH)) begin
      rd_mux = {ch_ph[addr - 7'h40], ch_mag[addr - 7'h40]};
    end else begin
      unique case (addr)
        7'h00: rd_mux = 32'({cfg.fb_b_en, cfg.fb_a_en, cfg.ctrl_type, cfg.mode});
        7'h01: rd_mux = 32'(cfg.amp_set);
        7'h02: rd_mux = 32'(ph_set_r);
        7'h03: rd_mux = 32'($signed(cfg.i_set));
        7'h04: rd_mux = 32'($signed(cfg.q_set));
        7'h05: rd_mux = 32'(cfg.ph_offset);
        7'h06: rd_mux = 32'(cfg.sel_shift);
        7'h07: rd_mux = 32'(cfg.amp_limit);
        7'h08: rd_mux = 32'($signed(cfg.kp_a));
        7'h09: rd_mux = 32'($signed(cfg.ki_a));
        7'h0A: rd_mux = 32'($signed(cfg.kd_a));
        7'h0B: rd_mux = 32'($signed(cfg.kp_b));
        7'h0C: rd_mux = 32'($signed(cfg.ki_b));
        7'h0D: rd_mux = 32'($signed(cfg.kd_b));
        7'h0E: rd_mux = 32'(cic_k);
        7'h20: rd_mux = 32'($signed(nco_freq));
        7'h21: rd_mux = 32'($signed(sw_fstart));
        7'h22: rd_mux = 32'($signed(sw_fstep));
        7'h23: rd_mux = 32'(sw_nsteps);
        7'h24: rd_mux = 32'(sw_dwell);
        7'h28: rd_mux = 32'({diag_step, diag_trig_mode, 1'b0, diag_sel_b, 1'b0, diag_sel_a});
        7'h29: rd_mux = 32'(diag_div);
        7'h2B: rd_mux = 32'(diag_raddr);
        7'h48: rd_mux = 32'(ph_rel);
        7'h49: rd_mux = freq_diff[31:0];
        7'h4A: rd_mux = 32'(signed'(freq_diff[FD_W-1:32]));
        7'h4B: rd_mux = {sw_idx, 13'd0, diag_done, diag_busy, sw_busy};
        7'h4C: rd_mux = {diag_b, diag_a};
        7'h4D: rd_mux = {err_b, err_a};
        7'h4E: rd_mux = {corr_b, corr_a};
        7'h4F: rd_mux = {q_rel, i_rel};
        default: rd_mux = '0;
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     rdata <= '0;
    else if (rd_en) rdata <= rd_mux;
  end

endmodule
