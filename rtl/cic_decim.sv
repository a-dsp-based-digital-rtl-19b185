// cic_decim - 5th-order Sinc (CIC) decimation filter of the digital down converter.
//
// N cascaded integrators run at the input rate; every R-th input sample the integrator output
// is passed through N cascaded combs (differential delay 1) at the output rate. The transfer
// function is ((1 - z^-R) / (1 - z^-1))^N with DC gain R^N, i.e. a Sinc^N response. Order 5 and
// decimation 32 follow the published design; the structure (Hogenauer), the full-precision
// two's-complement registers (wrap-around is harmless in a CIC) and the output scaling are this
// design's choices. The output keeps the top OUT_W bits of the ACC_W = IN_W + N log2(R) bit
// result, so the DC gain is R^N / 2^(ACC_W-OUT_W) = 2^(OUT_W-IN_W).
//
// Interface: in_valid qualifies din (one per ADC sample). out_valid pulses for one clock with
// dout, one clock after every R-th accepted input.
module cic_decim #(
  parameter int N     = radio_pkg::CIC_N,
  parameter int R     = radio_pkg::CIC_R,
  parameter int IN_W  = 20,
  parameter int OUT_W = radio_pkg::IQ_W
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic signed [IN_W-1:0]  din,
  output logic                    out_valid,
  output logic signed [OUT_W-1:0] dout
);
  localparam int ACC_W = IN_W + N * $clog2(R);

  logic signed [ACC_W-1:0] integ [N];
  logic signed [ACC_W-1:0] delay [N];
  logic signed [ACC_W-1:0] comb  [N+1];
  localparam int CW = $clog2(R);
  logic [CW-1:0]           cnt;
  logic                    dec_en;

  assign dec_en = in_valid && (cnt == CW'(R - 1));

  always_comb begin
    comb[0] = integ[N-1];
    for (int k = 0; k < N; k++) comb[k+1] = comb[k] - delay[k];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt <= '0;
      out_valid <= 1'b0;
      dout <= '0;
      for (int k = 0; k < N; k++) begin
        integ[k] <= '0;
        delay[k] <= '0;
      end
    end else begin
      out_valid <= 1'b0;
      if (in_valid) begin
        cnt <= (cnt == CW'(R - 1)) ? '0 : cnt + 1'b1;
        integ[0] <= integ[0] + ACC_W'(din);
        for (int k = 1; k < N; k++) integ[k] <= integ[k] + integ[k-1];
      end
      if (dec_en) begin
        for (int k = 0; k < N; k++) delay[k] <= comb[k];
        dout      <= OUT_W'(comb[N] >>> (ACC_W - OUT_W));
        out_valid <= 1'b1;
      end
    end
  end
endmodule
