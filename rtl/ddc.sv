// ddc - digital down converter: real IF samples in, complex 24-bit baseband I/Q out.
//
// Chain (as published): phase generator -> CORDIC mixer -> 5th-order Sinc decimating by 32
// -> FIR1 (Sinc droop compensation, decimate by 2) -> FIR2 (channel selection, decimate by
// 2). At 37.05 MHz in, I/Q leave at 289.45 kHz, a decimation of 128. The DSP sets the 24-bit
// frequency shift freq; the default FREQ_10M7 moves a 10.7 MHz IF to zero.
// Own choices: the CORDIC datapath is MIX_W bits wide with the ADC code at bit MIX_FRAC; the
// Sinc output keeps 24 bits (see cic_decim); the FIR coefficients are in radio_pkg. The
// overall DC gain from ADC code to I/Q is about 1.65 * 2^(MIX_FRAC + IQ_W - MIX_W) = 1.65*2^16
// per ADC LSB, so a full-scale 16-LSB IF tone gives I/Q magnitude near 2^20.7.
//
// Interface: adc_valid qualifies adc_code (one sample every ADC_DIV master clocks). iq_valid
// pulses once per output sample with iq.
module ddc #(
  parameter int ADC_W    = radio_pkg::ADC_W,
  parameter int PHASE_W  = radio_pkg::PHASE_W,
  parameter int MIX_W    = 20,
  parameter int MIX_FRAC = 12,
  parameter int MIX_ITER = 18,
  parameter int IQ_W     = radio_pkg::IQ_W
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    adc_valid,
  input  logic signed [ADC_W-1:0] adc_code,
  input  logic [PHASE_W-1:0]      freq,
  output logic                    iq_valid,
  output logic signed [IQ_W-1:0]  i_out,
  output logic signed [IQ_W-1:0]  q_out
);
  import radio_pkg::*;

  logic [PHASE_W-1:0]       phase;
  logic                     mix_v;
  logic signed [MIX_W-1:0]  mix_i, mix_q;
  logic                     cic_v, cic_vq;
  logic signed [IQ_W-1:0]   cic_i, cic_q;
  logic                     f1_v, f1_vq;
  logic signed [IQ_W-1:0]   f1_i, f1_q;
  logic                     f2_vq;

  phase_gen #(.PHASE_W(PHASE_W)) u_phase (
    .clk, .rst_n, .en(adc_valid), .clear(1'b0), .freq, .phase);

  cordic_rotator #(.IN_W(ADC_W), .W(MIX_W), .FRAC(MIX_FRAC), .ITER(MIX_ITER), .PHASE_W(PHASE_W))
    u_mix (.clk, .rst_n, .in_valid(adc_valid), .x_in(adc_code), .angle(phase),
           .out_valid(mix_v), .i_out(mix_i), .q_out(mix_q));

  cic_decim #(.IN_W(MIX_W), .OUT_W(IQ_W)) u_cic_i (
    .clk, .rst_n, .in_valid(mix_v), .din(mix_i), .out_valid(cic_v),  .dout(cic_i));
  cic_decim #(.IN_W(MIX_W), .OUT_W(IQ_W)) u_cic_q (
    .clk, .rst_n, .in_valid(mix_v), .din(mix_q), .out_valid(cic_vq), .dout(cic_q));

  fir_decim #(.W(IQ_W), .TAPS(FIR1_TAPS), .COEF(FIR1_COEF)) u_fir1_i (
    .clk, .rst_n, .in_valid(cic_v), .din(cic_i), .out_valid(f1_v),  .dout(f1_i));
  fir_decim #(.W(IQ_W), .TAPS(FIR1_TAPS), .COEF(FIR1_COEF)) u_fir1_q (
    .clk, .rst_n, .in_valid(cic_vq), .din(cic_q), .out_valid(f1_vq), .dout(f1_q));

  fir_decim #(.W(IQ_W), .TAPS(FIR2_TAPS), .COEF(FIR2_COEF)) u_fir2_i (
    .clk, .rst_n, .in_valid(f1_v), .din(f1_i), .out_valid(iq_valid), .dout(i_out));
  fir_decim #(.W(IQ_W), .TAPS(FIR2_TAPS), .COEF(FIR2_COEF)) u_fir2_q (
    .clk, .rst_n, .in_valid(f1_vq), .din(f1_q), .out_valid(f2_vq), .dout(q_out));

  // I and Q paths run in lock step
  a_iq_lockstep: assert property (@(posedge clk) disable iff (!rst_n)
    (cic_v == cic_vq) && (f1_v == f1_vq) && (iq_valid == f2_vq));
endmodule
