// cgu - clock generation unit: all sampling strobes are derived from the 74.1 MHz master clock.
//
// The receiver needs no PLL because every rate divides the master clock. This unit produces
// one-clock enable strobes (the design is single-clock, peripherals run on enables):
//   adc_en   every ADC_DIV = 2 clocks, 37.05 MHz, the IF ADC sample rate;
//   div_en[k] every div_ratio[k] clocks, shifted by div_phase[k] clocks, for NDIV
//             DSP-programmable peripheral clocks (ratio and phase relation chosen by the DSP).
// It also keeps the oscillator bias trim word: a self-trimming value loaded at reset
// (TRIM_INIT) that the DSP moves by one step per trim_up/trim_dn pulse, saturating at the
// code range (one step is about 80 Hz in FM, 250 Hz in AM).
// The master-clock-only derivation, DSP-selected frequencies and phases and the DSP-driven
// fine bias trim are published; the strobe scheme, the widths and the reset value are this
// design's choices. The automatic self-trimming of the bias currents acts on the analog
// oscillator and is not modelled.
//
// Interface: outputs are registered. Writing a new ratio restarts that divider.
module cgu #(
  parameter int NDIV    = 4,
  parameter int DIV_W   = 12,
  parameter int TRIM_W  = 8,
  parameter logic [TRIM_W-1:0] TRIM_INIT = 8'd128
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [DIV_W-1:0]  div_ratio [NDIV],
  input  logic [DIV_W-1:0]  div_phase [NDIV],
  input  logic              trim_up,
  input  logic              trim_dn,
  output logic              adc_en,
  output logic [NDIV-1:0]   div_en,
  output logic [TRIM_W-1:0] osc_trim
);
  import radio_pkg::*;

  logic [$clog2(ADC_DIV)-1:0] acnt;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acnt <= '0; adc_en <= 1'b0;
    end else begin
      acnt   <= (32'(acnt) == ADC_DIV - 1) ? '0 : acnt + 1'b1;
      adc_en <= (acnt == '0);
    end
  end

  for (genvar k = 0; k < NDIV; k++) begin : g_div
    logic [DIV_W-1:0] cnt, ratio_q;
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        cnt <= '0; ratio_q <= '0; div_en[k] <= 1'b0;
      end else begin
        ratio_q <= div_ratio[k];
        if (div_ratio[k] != ratio_q || div_ratio[k] == '0) begin
          cnt <= '0;
          div_en[k] <= 1'b0;
        end else begin
          cnt <= (cnt == div_ratio[k] - 1'b1) ? '0 : cnt + 1'b1;
          div_en[k] <= (cnt == div_phase[k]);
        end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                          osc_trim <= TRIM_INIT;
    else if (trim_up && !trim_dn && osc_trim != '1) osc_trim <= osc_trim + 1'b1;
    else if (trim_dn && !trim_up && osc_trim != '0) osc_trim <= osc_trim - 1'b1;
  end
endmodule
