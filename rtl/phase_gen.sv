// phase_gen - phase generator of the digital down converter.
//
// A PHASE_W-bit phase accumulator: every enabled clock it adds the frequency word written by
// the DSP, wrapping modulo one turn. The accumulated phase is the angle by which the CORDIC
// mixer rotates the current IF sample. The 24-bit resolution of the frequency shift is the
// published figure (37.05 MHz / 2^24 = 2.2 Hz steps); the accumulator itself, and that the
// output phase belongs to the sample presented in the same cycle, are this design's choices.
//
// Interface: en advances the phase once (one ADC sample); clear sets it to zero. phase is
// registered and valid the cycle after reset, it changes one clock after each en.
module phase_gen #(
  parameter int PHASE_W = radio_pkg::PHASE_W
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               en,
  input  logic               clear,
  input  logic [PHASE_W-1:0] freq,
  output logic [PHASE_W-1:0] phase
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      phase <= '0;
    else if (clear)  phase <= '0;
    else if (en)     phase <= phase + freq;
  end
endmodule
