// stereo_decoder - FM stereo decoder for the MPX signal coming out of the FM detector.
//
// MPX = M + p sin(th) + S sin(2 th) (+ RDS at 57 kHz), with M = (L+R)/2, S = (L-R)/2 and a
// 19 kHz pilot of phase th. Working at the detector rate of 289.45 kHz:
//  * Pilot PLL: an NCO (centred on 19 kHz) is locked to the pilot. Phase detector
//    MPX * cos(th_nco), two first-order low-passes (alpha 2^-7, ~360 Hz corner) and a PI loop
//    filter (gains 2^-KP_SH and 2^-KI_SH) steering the NCO frequency. At lock the NCO phase is
//    the pilot phase; it is brought out for the RDS demodulator (57 kHz = 3 th).
//  * Pilot detection: MPX * sin(th_nco) through two first-order low-passes (alpha 2^-8) is
//    the pilot level; above PILOT_ON the decoder switches to stereo, below PILOT_OFF back to
//    mono (hysteresis).
//  * Matrix: S is demodulated as 2 MPX sin(2 th_nco). M and S each pass a 127-tap low-pass
//    that also decimates by 6 to the 48.24 kHz audio rate (AUD_COEF in radio_pkg).
//    S is scaled by blend (Q8, 256 = full separation) and forced to 0 when mono or when the
//    DSP forces mono; L = M + S', R = M - S'.
//  * High-cut (first-order low-pass, DSP-set alpha), de-emphasis (first-order, 50 us or
//    75 us), soft-mute gain (Q8, 256 = unity) from the DSP.
//  * Field-strength filter: a low-pass (alpha 2^-8) of the level input (AM magnitude of the
//    received signal) for the DSP's field-strength processing.
// That the decoder is hardware, has pilot-dependent mono/stereo switching, stereo blend,
// high-cut, selectable de-emphasis, hardware field-strength filters and DSP-controlled
// soft-mute, blend and high-cut follows the published description; every filter structure,
// constant and threshold here is this design's own choice.
//
// Interface: mpx_valid/mpx/level, one sample per pulse at least AUD_TAPS+2 clocks apart (the
// MPX rate gives 256 clocks). aud_valid pulses with left/right once per AUD_DEC inputs.
module stereo_decoder #(
  parameter int W         = radio_pkg::AUD_W,
  parameter int KP_SH     = 6,
  parameter int KI_SH     = 17,
  parameter int PILOT_ON  = 60000,
  parameter int PILOT_OFF = 40000
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 mpx_valid,
  input  logic signed [W-1:0]  mpx,
  input  logic signed [W-1:0]  level,
  // DSP controls
  input  logic                 force_mono,
  input  logic [8:0]           blend,
  input  logic [16:0]          highcut_alpha,
  input  logic                 deemph_75us,
  input  logic [8:0]           mute_gain,
  // outputs
  output logic [radio_pkg::PHASE_W-1:0] pilot_phase,
  output logic                 stereo,
  output logic signed [W-1:0]  pilot_level,
  output logic signed [W-1:0]  field_strength,
  output logic                 aud_valid,
  output logic signed [W-1:0]  left,
  output logic signed [W-1:0]  right
);
  import radio_pkg::*;

  // ---------------- pilot PLL ----------------
  logic signed [15:0]    cos_th, sin_th, sin_2th;
  logic signed [W+15:0]  p_cos, p_sin, p_2th;
  logic signed [W-1:0]   pd, pl_in, s_mod;
  logic signed [W+7:0]   pd1, pd2, pl1;     // low-passed detector outputs (extra fraction bits)
  logic signed [W+7:0]   integ;
  logic signed [W+7:0]   corr;

  always_comb begin
    cos_th  = cos_q15(pilot_phase[PHASE_W-1 -: 16]);
    sin_th  = sin_q15(pilot_phase[PHASE_W-1 -: 16]);
    sin_2th = sin_q15({pilot_phase[PHASE_W-2 -: 15], 1'b0});
    p_cos   = (W+16)'(mpx) * (W+16)'(cos_th);
    p_sin   = (W+16)'(mpx) * (W+16)'(sin_th);
    p_2th   = (W+16)'(mpx) * (W+16)'(sin_2th);
    pd      = W'(p_cos >>> 15);
    pl_in   = W'(p_sin >>> 15);
    s_mod   = W'(p_2th >>> 14);                 // 2 * MPX * sin(2 th)
    corr    = integ + (pd2 >>> KP_SH);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pilot_phase <= '0;
      pd1 <= '0; pd2 <= '0; integ <= '0; pl1 <= '0;
      pilot_level <= '0; stereo <= 1'b0;
      field_strength <= '0;
    end else if (mpx_valid) begin
      pd1   <= pd1 + ((((W+8)'(pd) <<< 8) - pd1) >>> 7);
      pd2   <= pd2 + ((pd1 - pd2) >>> 7);
      integ <= integ + (pd2 >>> KI_SH);
      pilot_phase <= pilot_phase + FREQ_PILOT + PHASE_W'(corr >>> 8);
      pl1   <= pl1 + ((((W+8)'(pl_in) <<< 8) - pl1) >>> 8);
      pilot_level <= pilot_level + ((W'(pl1 >>> 8) - pilot_level) >>> 8);
      field_strength <= field_strength + ((level - field_strength) >>> 8);
      if (!stereo && pilot_level > W'(PILOT_ON))       stereo <= 1'b1;
      else if (stereo && pilot_level < W'(PILOT_OFF)) stereo <= 1'b0;
    end
  end

  // ---------------- M / S low-pass and decimation ----------------
  logic                m_v, s_v;
  logic signed [W-1:0] m_lp, s_lp;

  fir_decim #(.W(W), .TAPS(AUD_TAPS), .DEC(AUD_DEC), .COEF(AUD_COEF)) u_lp_m (
    .clk, .rst_n, .in_valid(mpx_valid), .din(mpx),   .out_valid(m_v), .dout(m_lp));
  fir_decim #(.W(W), .TAPS(AUD_TAPS), .DEC(AUD_DEC), .COEF(AUD_COEF)) u_lp_s (
    .clk, .rst_n, .in_valid(mpx_valid), .din(s_mod), .out_valid(s_v), .dout(s_lp));

  // ---------------- matrix with blend ----------------
  logic signed [W+9:0]  s_bl;
  logic signed [W+1:0]  l_sum, r_sum;
  logic                 mx_v;
  logic signed [W-1:0]  l_mx, r_mx;

  function automatic logic signed [W-1:0] sat(input logic signed [W+1:0] v);
    if (v > (W+2)'((2 ** (W - 1)) - 1))  return {1'b0, {(W-1){1'b1}}};
    if (v < -(W+2)'(2 ** (W - 1)))      return {1'b1, {(W-1){1'b0}}};
    return W'(v);
  endfunction

  always_comb begin
    s_bl  = (stereo && !force_mono) ? ((W+10)'(s_lp) * (W+10)'(signed'({1'b0, blend}))) >>> 8
                                    : '0;
    l_sum = (W+2)'(m_lp) + (W+2)'(s_bl);
    r_sum = (W+2)'(m_lp) - (W+2)'(s_bl);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mx_v <= 1'b0; l_mx <= '0; r_mx <= '0;
    end else begin
      mx_v <= m_v;
      if (m_v) begin
        l_mx <= sat(l_sum);
        r_mx <= sat(r_sum);
      end
    end
  end

  // ---------------- high-cut, de-emphasis, soft mute ----------------
  logic                hc_v, de_v, de_vr;
  logic signed [W-1:0] l_hc, r_hc, l_de, r_de;
  logic [16:0]         de_alpha;
  assign de_alpha = {1'b0, deemph_75us ? DEEMPH_75US : DEEMPH_50US};

  iir1 #(.W(W)) u_hc_l (.clk, .rst_n, .in_valid(mx_v), .x(l_mx), .alpha(highcut_alpha),
                        .out_valid(hc_v), .y(l_hc));
  iir1 #(.W(W)) u_hc_r (.clk, .rst_n, .in_valid(mx_v), .x(r_mx), .alpha(highcut_alpha),
                        .out_valid(), .y(r_hc));
  iir1 #(.W(W)) u_de_l (.clk, .rst_n, .in_valid(hc_v), .x(l_hc), .alpha(de_alpha),
                        .out_valid(de_v), .y(l_de));
  iir1 #(.W(W)) u_de_r (.clk, .rst_n, .in_valid(hc_v), .x(r_hc), .alpha(de_alpha),
                        .out_valid(de_vr), .y(r_de));

  logic signed [W+9:0] l_mu, r_mu;
  assign l_mu = ((W+10)'(l_de) * (W+10)'(signed'({1'b0, mute_gain}))) >>> 8;
  assign r_mu = ((W+10)'(r_de) * (W+10)'(signed'({1'b0, mute_gain}))) >>> 8;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      aud_valid <= 1'b0; left <= '0; right <= '0;
    end else begin
      aud_valid <= de_v;
      if (de_v) begin
        left  <= sat((W+2)'(l_mu));
        right <= sat((W+2)'(r_mu));
      end
    end
  end

  a_lr_lockstep: assert property (@(posedge clk) disable iff (!rst_n) (m_v == s_v) && (de_v == de_vr));
endmodule
