// iir1 - first-order low-pass section y[n] = y[n-1] + alpha (x[n] - y[n-1]).
//
// Used by the stereo decoder for its high-cut and de-emphasis filters. alpha is an unsigned
// Q16 number; alpha = 65536 passes x unchanged, smaller values lower the corner frequency
// (about alpha * fs / (2 pi) for small alpha). The DSP may change alpha at any time.
//
// Interface: in_valid/x; out_valid/y follow one clock later. y saturates at W bits.
module iir1 #(
  parameter int W = radio_pkg::AUD_W
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic signed [W-1:0] x,
  input  logic [16:0]         alpha,
  output logic                out_valid,
  output logic signed [W-1:0] y
);
  logic signed [W+1:0]  diff;
  logic signed [W+18:0] step;
  logic signed [W+1:0]  nxt;

  always_comb begin
    diff = (W+2)'(x) - (W+2)'(y);
    step = (W+19)'(diff) * (W+19)'(signed'({1'b0, alpha}));
    nxt  = (W+2)'(y) + (W+2)'(step >>> 16);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      y <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        if (nxt > (W+2)'((2 ** (W - 1)) - 1))  y <= {1'b0, {(W-1){1'b1}}};
        else if (nxt < -(W+2)'(2 ** (W - 1))) y <= {1'b1, {(W-1){1'b0}}};
        else                                  y <= W'(nxt);
      end
    end
  end
endmodule
