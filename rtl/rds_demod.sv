// rds_demod - 2-PSK (biphase) RDS demodulator: data clock, data and quality from the MPX.
//
// RDS is a 1187.5 bit/s differentially coded biphase signal on a 57 kHz suppressed carrier,
// locked to the third harmonic of the 19 kHz pilot (RDS standard, not the receiver text).
//  * Carrier: the MPX is mixed with cos and sin of 3 x the pilot phase from the stereo
//    decoder's PLL; the branch with the larger average symbol magnitude is used, which
//    covers an in-phase or a quadrature subcarrier.
//  * Filtering and symbol detection: each mixer output passes a two-pole low-pass (two
//    first-order sections, alpha 1/8, about 5.8 kHz), which removes the audio that the mixer
//    moved to 42 kHz and above; then integrate-and-dump over the four quarters q1..q4 of a
//    bit period; the biphase symbol is (q1 + q2) - (q3 + q4).
//  * Half-bit lock: a window half a bit off sees symbols of zero or double size; the average
//    |symbol| of the half-offset window is tracked too, and if it exceeds the in-step one by
//    half, the bit NCO jumps by half a bit.
//  * Data clock: a bit-rate NCO (BIT_FREQ per input sample) whose wrap is the bit edge. The
//    mid-bit transition that every biphase symbol has should fall between q2 and q3; the
//    sign of sym * (q2 + q3) tells early from late, and the NCO phase is nudged by TSTEP.
//  * Data: the sign of the symbol, differentially decoded (bit = sign xor previous sign),
//    which also removes the 180-degree carrier ambiguity. Quality is |symbol| low-passed.
// The 2-PSK demodulator producing data clock, data and quality after filtering the
// oversampled MPX is the published description; every mechanism above is this design's own.
//
// Interface: mpx_valid/mpx/pilot_phase at the MPX rate. bit_valid (the data clock) pulses
// with bit_out and quality once per bit, one clock after the input that ends the bit.
module rds_demod #(
  parameter int W        = radio_pkg::AUD_W,
  parameter int PHASE_W  = radio_pkg::PHASE_W,
  // 1187.5 / 289450 * 2^24
  parameter logic [PHASE_W-1:0] BIT_FREQ = 24'd68831,
  parameter logic [PHASE_W-1:0] TSTEP    = 24'd32768
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                mpx_valid,
  input  logic signed [W-1:0] mpx,
  input  logic [PHASE_W-1:0]  pilot_phase,
  output logic                bit_valid,
  output logic                bit_out,
  output logic [W-1:0]        quality
);
  import radio_pkg::*;
  localparam int AW = W + 10;     // accumulators: up to 62 samples per quarter

  logic [15:0]          ph57;
  logic signed [15:0]   c57, s57;
  logic signed [W+15:0] pc, ps;
  logic signed [W-1:0]  xi, xq;
  logic signed [W+3:0]  li1, li2, lq1, lq2;   // two-pole low-pass, 3 extra fraction bits
  logic signed [W-1:0]  fi, fq;
  logic [PHASE_W-1:0]   bph, bph_nxt;
  logic [1:0]           quarter;
  logic signed [AW-1:0] qi [4];
  logic signed [AW-1:0] qq [4];
  logic signed [AW+1:0] sym_i, sym_q, mid_i, mid_q, sym, mid;
  logic [AW+1:0]        mag_i, mag_q;
  logic [AW+1:0]        avg_i, avg_q;
  logic                 wrap, use_q, prev_sign;
  logic [1:0]           adj;       // pending timing step: 01 retard, 10 advance, 11 half bit
  logic signed [AW+1:0] h2_prev;   // second half of the previous bit, selected branch
  logic signed [AW+1:0] half_sym;  // symbol seen by a window offset by half a bit
  logic [AW+1:0]        mag_s, mag_h, avg_s, avg_h;

  always_comb begin
    ph57    = 16'(pilot_phase[PHASE_W-1 -: 16] * 3);
    c57     = cos_q15(ph57);
    s57     = sin_q15(ph57);
    pc      = (W+16)'(mpx) * (W+16)'(c57);
    ps      = (W+16)'(mpx) * (W+16)'(s57);
    xi      = W'(pc >>> 15);
    xq      = W'(ps >>> 15);
    fi      = W'(li2 >>> 3);
    fq      = W'(lq2 >>> 3);
    quarter = bph[PHASE_W-1 -: 2];
    bph_nxt = bph + BIT_FREQ;
    wrap    = bph_nxt < bph;
    sym_i   = (AW+2)'(qi[0]) + (AW+2)'(qi[1]) - (AW+2)'(qi[2]) - (AW+2)'(qi[3]);
    sym_q   = (AW+2)'(qq[0]) + (AW+2)'(qq[1]) - (AW+2)'(qq[2]) - (AW+2)'(qq[3]);
    mid_i   = (AW+2)'(qi[1]) + (AW+2)'(qi[2]);
    mid_q   = (AW+2)'(qq[1]) + (AW+2)'(qq[2]);
    mag_i   = (sym_i < 0) ? -sym_i : sym_i;
    mag_q   = (sym_q < 0) ? -sym_q : sym_q;
    sym     = use_q ? sym_q : sym_i;
    mid     = use_q ? mid_q : mid_i;
    half_sym = h2_prev - (use_q ? (AW+2)'(qq[0]) + (AW+2)'(qq[1])
                                : (AW+2)'(qi[0]) + (AW+2)'(qi[1]));
    mag_s   = (sym < 0) ? -sym : sym;
    mag_h   = (half_sym < 0) ? -half_sym : half_sym;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bph <= '0; use_q <= 1'b0; prev_sign <= 1'b0; adj <= '0;
      h2_prev <= '0; avg_s <= '0; avg_h <= '0;
      li1 <= '0; li2 <= '0; lq1 <= '0; lq2 <= '0;
      avg_i <= '0; avg_q <= '0;
      bit_valid <= 1'b0; bit_out <= 1'b0; quality <= '0;
      for (int k = 0; k < 4; k++) begin qi[k] <= '0; qq[k] <= '0; end
    end else begin
      bit_valid <= 1'b0;
      if (mpx_valid) begin
        li1 <= li1 + ((((W+4)'(xi) <<< 3) - li1) >>> 3);
        li2 <= li2 + ((li1 - li2) >>> 3);
        lq1 <= lq1 + ((((W+4)'(xq) <<< 3) - lq1) >>> 3);
        lq2 <= lq2 + ((lq1 - lq2) >>> 3);
        if (wrap) begin
          // bit boundary: decide, adjust timing, restart the integrators with this sample
          bit_valid <= 1'b1;
          bit_out   <= sym[AW+1] ^ prev_sign;
          prev_sign <= sym[AW+1];
          quality   <= W'((avg_i > avg_q ? avg_i : avg_q) >> (AW + 2 - W));
          avg_i     <= avg_i + (mag_i >> 3) - (avg_i >> 3);
          avg_q     <= avg_q + (mag_q >> 3) - (avg_q >> 3);
          use_q     <= avg_q > avg_i;
          // sym*mid > 0: sampling early -> retard the NCO, else advance it; the step is
          // applied in the second quarter, away from the wrap
          bph <= bph_nxt;
          h2_prev <= use_q ? -((AW+2)'(qq[2]) + (AW+2)'(qq[3])) : -((AW+2)'(qi[2]) + (AW+2)'(qi[3]));
          avg_s   <= avg_s + (mag_s >> 3) - (avg_s >> 3);
          avg_h   <= avg_h + (mag_h >> 3) - (avg_h >> 3);
          if (avg_h > avg_s + (avg_s >> 1)) begin
            adj   <= 2'b11;                  // locked half a bit off: jump
            avg_h <= '0;
          end else if (mid == 0)            adj <= 2'b00;
          else if (sym[AW+1] == mid[AW+1])  adj <= 2'b01;
          else                              adj <= 2'b10;
          for (int k = 0; k < 4; k++) begin
            qi[k] <= (k == 0) ? AW'(fi) : '0;
            qq[k] <= (k == 0) ? AW'(fq) : '0;
          end
        end else begin
          if (quarter == 2'd1 && adj == 2'b11)      bph <= bph_nxt + (PHASE_W'(1) << (PHASE_W - 1));
          else if (quarter == 2'd1 && adj == 2'b01) bph <= bph_nxt - TSTEP;
          else if (quarter == 2'd1 && adj == 2'b10) bph <= bph_nxt + TSTEP;
          else                                      bph <= bph_nxt;
          if (quarter == 2'd1) adj <= 2'b00;
          qi[quarter] <= qi[quarter] + AW'(fi);
          qq[quarter] <= qq[quarter] + AW'(fq);
        end
      end
    end
  end
endmodule
