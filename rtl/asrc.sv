// asrc - asynchronous sample-rate converter with a digital ratio locked loop.
//
// Stereo samples arrive at one rate (in_valid, for instance from the DSP) and are taken at
// another, unrelated one (out_req, for instance the frame strobe of a serial audio port). No
// rate is configured: a digital ratio locked loop measures the input rate against the master
// clock and interpolates each output sample at the moment it is requested.
//  * Loop: a phase accumulator p advances by STEP per master clock, STEP being the estimated
//    input-sample period as a fraction of 2^F. When an input arrives, p should just have
//    reached 1.0 (2^F); the error e = p - 2^F corrects the phase (p - 2^F - e/2^KP_SH) and
//    the frequency (STEP - e/2^KI_SH). A proportional-integral loop of this kind tracks a
//    fixed rate with no error and filters the arrival jitter of the input.
//  * Interpolation: between input arrivals p/2^F (limited to 0..1) is the time since the
//    last input in input periods, so the output is the straight line between the last two
//    inputs at that point: x(t - T_in), with a delay of one input period.
//  * locked is set after 16 inputs in a row with |e| below 1/64 period and cleared by an
//    error above 1/16. An error above half a period (no input for a while, or a new rate)
//    restarts the phase; the frequency correction is limited to a quarter period per input,
//    so the estimate walks to a new rate within some tens of inputs.
// That an ASRC with a digital ratio locked loop decouples the DSP rate from an external
// device and needs no rate configuration follows the published description; the loop
// structure, its gains and the linear interpolation are this design's own choices. Linear
// interpolation keeps the error below 0.3 % of full scale for tones up to 1 kHz at 44.1 kHz
// input rate; a polyphase filter would do better and is not described.
//
// Interface: in_valid with in_left/in_right, out_req asks for a sample; out_valid pulses one
// clock later with out_left/out_right. The loop is stable for input periods of about 500 to
// 8000 master clocks (9 to 150 kHz at 74.1 MHz); STEP_INIT sets the rate it starts from.
// If no input arrives the phase stops at 4 periods and the output holds the last input.
module asrc #(
  parameter int W       = radio_pkg::AUD_W,
  parameter int F       = 24,
  parameter int KP_SH   = 2,
  parameter int KI_SH   = 12,
  parameter logic [F-1:0] STEP_INIT = 24'd10923      // 2^24 / 1536, a 48.24 kHz input
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic signed [W-1:0] in_left,           // input left sample
  input  logic signed [W-1:0] in_right,          // input right sample
  input  logic                out_req,           // output sample request (output rate)
  output logic                out_valid,
  output logic signed [W-1:0] out_left,          // interpolated left sample
  output logic signed [W-1:0] out_right,         // interpolated right sample
  output logic                locked,            // ratio loop locked
  output logic [F-1:0]        step               // input period estimate: 2^F / clocks
);
  localparam logic signed [F+3:0] ONE = (F+4)'(1) <<< F;

  logic signed [F+3:0] p, err;
  logic signed [W-1:0] l_prev, l_last, r_prev, r_last;
  logic [4:0]          good;
  logic [15:0]         frac;

  logic signed [F+3:0] step_s;
  assign step_s = signed'((F+4)'(step));
  assign err    = p - ONE;

  // frequency update with the error limited to +-1/4 period and the estimate kept inside
  // input periods of 256 .. 16384 clocks, so a large error (input absent for a while, or a
  // new rate) pulls the estimate in steps instead of overturning it
  logic signed [F+3:0] err_c, step_nxt;
  always_comb begin
    err_c = err;
    if (err > (ONE >>> 2))       err_c = ONE >>> 2;
    else if (err < -(ONE >>> 2)) err_c = -(ONE >>> 2);
    step_nxt = step_s - (err_c >>> KI_SH);
    if (step_nxt > (ONE >>> 8))       step_nxt = ONE >>> 8;
    else if (step_nxt < (ONE >>> 14)) step_nxt = ONE >>> 14;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      p <= '0; step <= STEP_INIT; good <= '0; locked <= 1'b0;
      l_prev <= '0; l_last <= '0; r_prev <= '0; r_last <= '0;
    end else if (in_valid) begin
      if (err > (ONE >>> 1) || err < -(ONE >>> 1)) p <= step_s;   // far off: restart the phase
      else                                         p <= err - (err >>> KP_SH) + step_s;
      step   <= F'(step_nxt);
      l_prev <= l_last; l_last <= in_left;
      r_prev <= r_last; r_last <= in_right;
      if ((err < 0 ? -err : err) < (ONE >>> 6)) begin
        if (good != 5'd16) good <= good + 1'b1;
        if (good == 5'd15) locked <= 1'b1;
      end else begin
        good <= '0;
        if ((err < 0 ? -err : err) > (ONE >>> 4)) locked <= 1'b0;
      end
    end else if (p < (ONE <<< 2)) begin
      p <= p + step_s;                       // stops at 4 periods if inputs cease
    end
  end

  // time since the last input, in input periods, limited to 0..1 (16 fraction bits)
  always_comb begin
    if (p <= 0)        frac = '0;
    else if (p >= ONE) frac = 16'hFFFF;
    else               frac = 16'(p >>> (F - 16));
  end

  function automatic logic signed [W-1:0] interp(input logic signed [W-1:0] a,
                                                 input logic signed [W-1:0] b,
                                                 input logic [15:0] f);
    logic signed [W+17:0] d;
    d = ((W+18)'(b) - (W+18)'(a)) * (W+18)'(signed'({1'b0, f}));
    return W'((W+18)'(a) + (d >>> 16));                 // lies between a and b
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0; out_left <= '0; out_right <= '0;
    end else begin
      out_valid <= out_req;
      if (out_req) begin
        out_left  <= interp(l_prev, l_last, frac);
        out_right <= interp(r_prev, r_last, frac);
      end
    end
  end
endmodule
