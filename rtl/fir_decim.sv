// fir_decim - decimating FIR filter with one time-shared multiplier (FIR1 and FIR2 of the DDC).
//
// y[m] = sum_k COEF[k] * x[m*DEC - k], computed once per DEC input samples. Input samples go
// into a circular buffer of TAPS words; after every DEC-th input one multiply-accumulate per
// clock walks the buffer from the newest sample backwards, so an output takes TAPS+1 clocks.
// With a 74.1 MHz clock this leaves plenty of margin: FIR1 gets an input every 64 clocks,
// FIR2 every 128. That the DDC decimates further in two FIRs (FIR1 compensating the Sinc
// droop, FIR2 selecting about 300 kHz) is the published design; the serial architecture, the
// coefficients (see radio_pkg) and the rounding are this design's choices. The sum is rounded
// to nearest, shifted right by FRAC and saturated to W bits.
//
// Interface: in_valid/din, one sample per pulse; inputs must be at least TAPS+2 clocks apart
// (checked by an assertion). out_valid pulses with dout TAPS+2 clocks after the input that
// completed a group of DEC.
module fir_decim #(
  parameter int W      = radio_pkg::IQ_W,
  parameter int TAPS   = radio_pkg::FIR1_TAPS,
  parameter int DEC    = radio_pkg::FIR_DEC,
  parameter int COEF_W = radio_pkg::COEF_W,
  parameter int FRAC   = radio_pkg::COEF_FRAC,
  parameter logic signed [COEF_W-1:0] COEF [TAPS] = radio_pkg::FIR1_COEF
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic signed [W-1:0] din,
  output logic                out_valid,
  output logic signed [W-1:0] dout
);
  localparam int AW    = (TAPS > 1) ? $clog2(TAPS) : 1;
  localparam int ACC_W = W + COEF_W + AW;

  logic signed [W-1:0]     sbuf [TAPS];
  logic [AW-1:0]           wp, rp, k;
  logic [$clog2(DEC+1)-1:0] dcnt;
  logic                    busy;
  logic signed [ACC_W-1:0] acc, rounded;
  logic signed [W+COEF_W-1:0] prod;

  assign prod    = sbuf[rp] * COEF[k];
  assign rounded = (acc + (ACC_W'(1) <<< (FRAC - 1))) >>> FRAC;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp <= '0; rp <= '0; k <= '0; dcnt <= '0; busy <= 1'b0;
      acc <= '0; out_valid <= 1'b0; dout <= '0;
      for (int j = 0; j < TAPS; j++) sbuf[j] <= '0;
    end else begin
      out_valid <= 1'b0;
      if (in_valid) begin
        sbuf[wp] <= din;
        wp <= (wp == AW'(TAPS - 1)) ? '0 : wp + 1'b1;
        if (dcnt == ($bits(dcnt))'(DEC - 1)) begin
          dcnt <= '0;
          busy <= 1'b1;
          rp   <= wp;               // newest sample
          k    <= '0;
          acc  <= '0;
        end else begin
          dcnt <= dcnt + 1'b1;
        end
      end else if (busy) begin
        acc <= acc + ACC_W'(prod);
        rp  <= (rp == '0) ? AW'(TAPS - 1) : rp - 1'b1;
        if (k == AW'(TAPS - 1)) busy <= 1'b0;
        else                    k <= k + 1'b1;
      end else if (!out_valid && k == AW'(TAPS - 1)) begin
        // one clock after the last product: round, saturate, present
        out_valid <= 1'b1;
        k <= '0;
        if (rounded > ACC_W'((2 ** (W - 1)) - 1))  dout <= {1'b0, {(W-1){1'b1}}};
        else if (rounded < -ACC_W'(2 ** (W - 1))) dout <= {1'b1, {(W-1){1'b0}}};
        else                                      dout <= W'(rounded);
      end
    end
  end

  // an input arriving while the MAC walks the buffer would overwrite a sample in use
  a_no_overrun: assert property (@(posedge clk) disable iff (!rst_n) !(in_valid && busy))
    else $error("fir_decim: input sample while busy");
endmodule
