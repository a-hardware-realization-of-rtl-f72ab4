// fs_pkg: types and constants shared by the formant synthesizer.
//
// The synthesizer has ten filter sections served in turn by one arithmetic
// unit: seven on the voiced path (six two-pole resonators, then one two-zero
// filter) and three on the unvoiced path (two two-pole, then one two-zero).
// Each section needs two arithmetic steps per sample, so one sample takes 20
// steps and the two shift registers hold 20 words each. These counts and the
// 24-bit signal / 16-bit coefficient widths follow the document. The layout of
// the control frame (which word carries which parameter), the mode bits and
// the coefficient binary point are choices of this design.
package fs_pkg;

  localparam int unsigned DATA_W     = 24;  // internal signal width
  localparam int unsigned COEF_W     = 16;  // coefficient and control word width
  localparam int unsigned OUT_W      = 16;  // digital return to the computer
  localparam int unsigned DAC_W      = 12;  // D/A converter resolution
  localparam int unsigned COEF_FRAC  = 13;  // coefficient binary point (Q3.13)

  localparam int unsigned N_SECT     = 10;          // filter sections
  localparam int unsigned N_STEP     = 2 * N_SECT;  // arithmetic steps per sample
  localparam int unsigned SECT_W     = $clog2(N_SECT);
  localparam int unsigned STEP_W     = $clog2(N_STEP);

  // Section order in the multiplexing cycle.
  localparam int unsigned SEC_V_FIRST = 0;  // first voiced two-pole filter
  localparam int unsigned SEC_V_TAP   = 1;  // second voiced two-pole: feeds voiced fricative network
  localparam int unsigned SEC_V_LAST  = 6;  // voiced two-zero filter
  localparam int unsigned SEC_U_FIRST = 7;  // first unvoiced two-pole filter
  localparam int unsigned SEC_U_LAST  = 9;  // unvoiced two-zero filter

  // Control frame sent by the computer: five header words, then two
  // coefficients per section in section order.
  localparam int unsigned HDR_WORDS   = 5;
  localparam int unsigned FRAME_WORDS = HDR_WORDS + N_STEP;  // 25
  localparam int unsigned W_PITCH     = 0;
  localparam int unsigned W_AV        = 1;
  localparam int unsigned W_AN        = 2;
  localparam int unsigned W_MODE      = 3;
  localparam int unsigned W_VF_THR    = 4;

  typedef logic signed [DATA_W-1:0] sample_t;
  typedef logic signed [COEF_W-1:0] coef_t;
  typedef logic        [COEF_W-1:0] word_t;

  // Mode word: bit 0 routes noise into the voiced path (whisper),
  // bit 1 turns on voiced fricative modulation of the unvoiced path.
  typedef struct packed {
    logic [COEF_W-3:0] unused;
    logic              vf_en;
    logic              whisper;
  } mode_t;

  // Header of a control frame, as handed over at a pitch-period boundary.
  typedef struct packed {
    word_t pitch;    // pitch period P in samples
    coef_t av;       // voice amplitude
    coef_t an;       // noise amplitude
    mode_t mode;
    coef_t vf_thr;   // voiced fricative gate threshold
  } frame_hdr_t;

  // Two-pole sections store past outputs, two-zero sections past inputs.
  function automatic logic sect_is_zero(input logic [SECT_W-1:0] s);
    return (s == SECT_W'(SEC_V_LAST)) || (s == SECT_W'(SEC_U_LAST));
  endfunction

  // State of the arithmetic sequence, from the cycle timing to the datapath.
  typedef enum logic [1:0] {PH_IDLE, PH_LOAD, PH_RUN, PH_DONE} phase_e;

  typedef struct packed {
    phase_e            phase;
    logic [SECT_W-1:0] sect;     // section being served (PH_RUN)
    logic              second;   // 0: step on the older delayed value, 1: on the newer
  } au_ctl_t;

endpackage
