// radio_pkg - types and constants shared by the digital IF AM/FM receiver.
//
// The receiver runs from one 74.1 MHz master clock. The IF sigma-delta ADC samples at half of
// it (37.05 MHz) with a 10.7 MHz IF; the digital down converter (DDC) decimates by 32 in a
// 5th-order Sinc filter and by 2 in each of two FIR filters, so I/Q leave it at 289.45 kHz with
// 24-bit resolution. These numbers are the published ones. The FIR coefficients, the 33-level
// ADC code format and the fixed-point formats below are this design's own choices:
//   * FIR1 (21 taps): least-squares fit to the inverse of the Sinc^5 droop up to 150 kHz, stop
//     band from 429 kHz, sampled at 1.158 MHz.
//   * FIR2 (63 taps): equiripple low-pass, pass band to 120 kHz, stop band from 160 kHz,
//     sampled at 578.9 kHz (about 300 kHz of two-sided channel bandwidth).
//   Both are quantised to signed 18-bit numbers with 17 fractional bits (unity DC gain).
//   * Angles are unsigned fractions of a full turn: a PHASE_W-bit word, 2^PHASE_W = 360 deg.
//   * sin_q15() approximates a sine with a corrected parabola (peak error about 0.1 %); the
//     stereo decoder and the RDS demodulator use it for their local carriers.
package radio_pkg;

  // ---- clocking ------------------------------------------------------------------------
  localparam int unsigned MCLK_HZ   = 74_100_000;
  localparam int unsigned ADC_DIV   = 2;            // ADC sample rate = MCLK / 2
  // ---- IF ADC ------------------------------------------------------------------------
  localparam int ADC_W = 6;                         // 33-level code, two's complement -16..+16
  // ---- DDC -----------------------------------------------------------------------------
  localparam int PHASE_W  = 24;                     // DDC frequency word resolution
  localparam int IQ_W     = 24;                     // I/Q resolution after the filter chain
  localparam int CIC_N    = 5;                      // Sinc order
  localparam int CIC_R    = 32;                     // Sinc decimation
  localparam int FIR_DEC  = 2;                      // decimation of FIR1 and of FIR2
  localparam int COEF_W   = 18;
  localparam int COEF_FRAC = 17;
  // 10.7 MHz / 37.05 MHz * 2^24, the default DDC frequency word
  localparam logic [PHASE_W-1:0] FREQ_10M7 = 24'd4845242;

  localparam int FIR1_TAPS = 21;
  localparam int FIR2_TAPS = 63;
  typedef logic signed [COEF_W-1:0] coef_t;
  localparam coef_t FIR1_COEF [FIR1_TAPS] = '{
    -1675, -560, 6924, 447, -18408, 1264, 33166, -11225, -50695, 43131, 127398,
    43131, -50695, -11225, 33166, 1264, -18408, 447, 6924, -560, -1675};
  localparam coef_t FIR2_COEF [FIR2_TAPS] = '{
    18, 9, -51, -66, 52, 119, -67, -223, 53, 363, -4, -551, -106, 785, 304, -1061,
    -623, 1369, 1110, -1696, -1827, 2024, 2884, -2332, -4500, 2598, 7245, -2805, -13224,
    2935, 41490, 62556, 41490, 2935, -13224, -2805, 7245, 2598, -4500, -2332, 2884, 2024,
    -1827, -1696, 1110, 1369, -623, -1061, 304, 785, -106, -551, -4, 363, 53, -223, -67,
    119, 52, -66, -51, 9, 18};

  // ---- CORDIC --------------------------------------------------------------------------
  // atan(2^-i) as a fraction of a full turn times 2^24: round(atan(2^-i) / (2 pi) * 2^24)
  localparam int CORDIC_MAX_IT = 24;
  localparam logic [23:0] ATAN_TAB [CORDIC_MAX_IT] = '{
    24'd2097152, 24'd1238021, 24'd654136, 24'd332050, 24'd166669, 24'd83416, 24'd41718,
    24'd20860, 24'd10430, 24'd5215, 24'd2608, 24'd1304, 24'd652, 24'd326, 24'd163, 24'd81,
    24'd41, 24'd20, 24'd10, 24'd5, 24'd3, 24'd1, 24'd1, 24'd0};

  typedef struct packed {
    logic signed [IQ_W-1:0] i;
    logic signed [IQ_W-1:0] q;
  } iq_t;

  // ---- AM/FM detector -----------------------------------------------------------------------
  typedef enum logic [1:0] {
    DET_AM = 2'd0,   // magnitude of I/Q
    DET_PM = 2'd1,   // phase of I/Q
    DET_FM = 2'd2    // phase difference to the previous sample of the same core
  } det_mode_e;

  // ---- stereo decoder / RDS ----------------------------------------------------------
  localparam int AUD_W = 24;                        // MPX and audio sample width
  // 19 kHz / 289.45 kHz * 2^24, pilot NCO centre frequency
  localparam logic [PHASE_W-1:0] FREQ_PILOT = 24'd1101286;

  // Audio low-pass of the stereo decoder (M and S paths), run at 289.45 kHz and decimating by
  // AUD_DEC = 6 to 48.24 kHz: 127-tap equiripple, pass band to 14 kHz (+-0.16 dB), stop band
  // from 19 kHz (-52 dB), so the pilot, the 38 kHz products and RDS are removed.
  localparam int AUD_DEC  = 6;
  localparam int AUD_TAPS = 127;
  localparam coef_t AUD_COEF [AUD_TAPS] = '{
    220, 163, 204, 235, 250, 244, 212, 156, 76, -21, -126, -228, -314, -372, -391, -364, -290,
    -173, -23, 144, 309, 450, 546, 579, 538, 420, 231, -11, -282, -550, -779, -935, -991,
    -928, -739, -436, -44, 397, 836, 1216, 1481, 1584, 1489, 1185, 682, 16, -750, -1535,
    -2242, -2770, -3021, -2916, -2397, -1442, -62, 1688, 3719, 5912, 8126, 10209, 12014,
    13408, 14289, 14591, 14289, 13408, 12014, 10209, 8126, 5912, 3719, 1688, -62, -1442,
    -2397, -2916, -3021, -2770, -2242, -1535, -750, 16, 682, 1185, 1489, 1584, 1481, 1216,
    836, 397, -44, -436, -739, -928, -991, -935, -779, -550, -282, -11, 231, 420, 538, 579,
    546, 450, 309, 144, -23, -173, -290, -364, -391, -372, -314, -228, -126, -21, 76, 156,
    212, 244, 250, 235, 204, 163, 220};
  // De-emphasis at the 48.24 kHz audio rate, alpha = 1 - exp(-1 / (fs tau)) in Q16
  localparam logic [15:0] DEEMPH_50US = 16'd22242;
  localparam logic [15:0] DEEMPH_75US = 16'd15826;

  // ---- DSP data ALU and address generation -------------------------------------------
  typedef enum logic [2:0] {
    MAC_NOP = 3'd0, MAC_CLR = 3'd1, MAC_MPY = 3'd2, MAC_MPYN = 3'd3,
    MAC_MAC = 3'd4, MAC_MACN = 3'd5, MAC_MACSH = 3'd6, MAC_LOAD = 3'd7
  } mac_op_e;
  typedef enum logic [1:0] {MAC_SS = 2'd0, MAC_SU = 2'd1, MAC_UU = 2'd2} mac_sign_e;
  typedef enum logic [1:0] {SCALE_NONE = 2'd0, SCALE_DOWN = 2'd1, SCALE_UP = 2'd2} scale_e;
  typedef enum logic [1:0] {AGU_LINEAR = 2'd0, AGU_MODULO = 2'd1, AGU_REVERSE = 2'd2} agu_mode_e;
  typedef enum logic [2:0] {
    AGU_NONE = 3'd0, AGU_INC = 3'd1, AGU_DEC = 3'd2, AGU_INC_N = 3'd3, AGU_DEC_N = 3'd4
  } agu_upd_e;

  // sin(2 pi p / 2^16) in Q15, p taken as a signed 16-bit fraction of a turn.
  // t = p / 2^15 lies in [-1, 1); y = 4 t (1 - |t|); result = y + 0.225 (y |y| - y).
  function automatic logic signed [15:0] sin_q15(input logic [15:0] p);
    logic signed [17:0] t, at, y, ay;
    logic signed [35:0] prod, corr;
    logic signed [19:0] res;
    t    = 18'(signed'(p));
    at   = (t < 0) ? -t : t;
    prod = 36'(t) * 36'(18'sd32768 - at);
    y    = 18'(prod >>> 13);                        // 4 t (1-|t|) in Q15
    ay   = (y < 0) ? -y : y;
    prod = 36'(y) * 36'(ay);
    corr = 36'(18'((prod >>> 15)) - y) * 36'sd7373; // 0.225 = 7373 / 2^15
    res  = 20'(y) + 20'(corr >>> 15);
    if (res > 20'sd32767)       sin_q15 = 16'sh7FFF;
    else if (res < -20'sd32767) sin_q15 = -16'sh7FFF;
    else                        sin_q15 = 16'(res);
  endfunction

  function automatic logic signed [15:0] cos_q15(input logic [15:0] p);
    cos_q15 = sin_q15(p + 16'h4000);
  endfunction

endpackage
