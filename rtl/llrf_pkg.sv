// llrf_pkg: types and constants shared by the resonator controller.
//
// Number formats used throughout the design:
//   * Phase is an unsigned fraction of a full turn: PH_W = 16 bits, so
//     2^16 LSB = 360 degrees (0.0055 degree per LSB). Differences wrap
//     naturally and read as signed values in (-180, +180] degrees.
//   * Complex samples (I, Q) are signed IQ_W = 16 bit numbers. A full-scale
//     12-bit ADC sample maps to 2^15, i.e. four fraction bits are added
//     behind the ADC LSB.
//   * CORDIC angles are carried internally with CORDIC_ZW = 20 bits of a turn.
// The operating modes (GDR, SEL, fixed 5/4-clock frequency, NCO frequency)
// and the two feedback types (amplitude/phase or I/Q) follow the feature list
// of the controller; their encodings are this design's own.
package llrf_pkg;

  localparam int PH_W      = 16;  // phase word, full turn = 2^PH_W
  localparam int IQ_W      = 16;  // I/Q and amplitude datapath width
  localparam int GAIN_W    = 16;  // PID gain width (signed, GAIN_FRAC fraction bits)
  localparam int GAIN_FRAC = 8;
  localparam int CORDIC_ZW = 20;  // internal CORDIC angle width
  localparam int CORDIC_STAGES = 16;

  // 1/K of an infinite CORDIC, K = prod sqrt(1 + 2^-2i) = 1.646760,
  // as an unsigned Q0.16 number: round(2^16 / K).
  localparam logic [16:0] CORDIC_INV_GAIN = 17'd39797;

  // Drive modes.
  //   MODE_GDR   generator driven: the drive phase follows the reference channel
  //   MODE_SEL   self-excited loop: the drive phase follows the cavity pickup
  //   MODE_FIXED drive at exactly 5/4 of the sampling clock (80 MHz)
  //   MODE_NCO   drive at 80 MHz plus the NCO frequency offset (fixed or swept)
  typedef enum logic [1:0] {
    MODE_GDR   = 2'd0,
    MODE_SEL   = 2'd1,
    MODE_FIXED = 2'd2,
    MODE_NCO   = 2'd3
  } drive_mode_e;

  // Feedback type: amplitude/phase (polar) or I/Q (Cartesian) regulation.
  typedef enum logic {
    CTRL_AMPPH = 1'b0,
    CTRL_IQ    = 1'b1
  } ctrl_type_e;

  // Everything the host sets for the feedback loop.
  typedef struct packed {
    drive_mode_e              mode;
    ctrl_type_e               ctrl_type;
    logic                     fb_a_en;    // amplitude (or I) feedback on
    logic                     fb_b_en;    // phase (or Q) feedback on
    logic        [IQ_W-1:0]   amp_set;    // amplitude set point (unsigned)
    logic        [PH_W-1:0]   ph_set;     // phase set point relative to the reference
    logic signed [IQ_W-1:0]   i_set;      // I set point (reference frame)
    logic signed [IQ_W-1:0]   q_set;      // Q set point (reference frame)
    logic        [PH_W-1:0]   ph_offset;  // extra rotation of the drive phase
    logic        [PH_W-1:0]   sel_shift;  // loop phase shift in SEL mode
    logic        [IQ_W-1:0]   amp_limit;  // largest drive amplitude
    logic signed [GAIN_W-1:0] kp_a, ki_a, kd_a;
    logic signed [GAIN_W-1:0] kp_b, ki_b, kd_b;
  } loop_cfg_t;

  // arctan(2^-i) as a fraction of a turn in CORDIC_ZW bits:
  // round(atan(2^-i) / (2*pi) * 2^CORDIC_ZW).
  function automatic logic [CORDIC_ZW-1:0] cordic_atan(input int i);
    case (i)
      0:  return 20'd131072;
      1:  return 20'd77376;
      2:  return 20'd40884;
      3:  return 20'd20753;
      4:  return 20'd10417;
      5:  return 20'd5213;
      6:  return 20'd2607;
      7:  return 20'd1304;
      8:  return 20'd652;
      9:  return 20'd326;
      10: return 20'd163;
      11: return 20'd81;
      12: return 20'd41;
      13: return 20'd20;
      14: return 20'd10;
      15: return 20'd5;
      16: return 20'd3;
      17: return 20'd1;
      18: return 20'd1;
      default: return 20'd0;
    endcase
  endfunction

endpackage
