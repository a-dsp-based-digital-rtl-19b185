// tb_ddc - drives the DDC with 33-level codes of an IF tone and checks the complex baseband:
// a 10.75 MHz tone (50 kHz above the 10.7 MHz tuning) must come out as a counter-clockwise
// phasor of steady magnitude (about 16 * 1.6468 * 2^12 * 15 / 2) advancing 62.2 deg per
// sample; a tone 300 kHz off must be suppressed by more than 40 dB; outputs arrive exactly
// every 256 master clocks (289.45 kHz).
module tb_ddc;
  import radio_pkg::*;
  localparam real PI = 3.14159265358979;
  logic clk = 0, rst_n = 0, adc_valid = 0, iq_valid;
  logic signed [5:0]  adc_code;
  logic [23:0] freq;
  logic signed [23:0] i_out, q_out;
  int checks = 0, failures = 0;
  ddc dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (1500000) @(posedge clk);
    failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  real f_tone = 10.75e6;
  longint n = 0;
  int cyc = 0, last_v = 0, nout = 0;
  real mag, ph, ph_prev, mag_sum2;
  int  cnt_meas;
  always @(posedge clk) begin
    cyc++;
    adc_valid <= (cyc % 2 == 0);
    if (cyc % 2 == 0) begin
      adc_code <= 6'($rtoi($floor(15.0 * $cos(2.0 * PI * f_tone * real'(n) / 37.05e6) + 0.5 +
                                  (real'($urandom % 1000) / 1000.0 - 0.5))));
      n++;
    end
  end
  always @(posedge clk) if (rst_n && iq_valid) begin
    nout++;
    if (last_v != 0 && nout > 3) begin
      checks++;
      if (cyc - last_v != 256) begin failures++; $display("spacing %0d", cyc - last_v); end
    end
    last_v = cyc;
    mag = $sqrt(real'(i_out) * real'(i_out) + real'(q_out) * real'(q_out));
    ph  = $atan2(real'(q_out), real'(i_out));
  end
  initial begin
    real d, expm;
    freq = FREQ_10M7;
    repeat (3) @(posedge clk); rst_n = 1;
    // --- in-band tone
    wait (nout == 60);
    expm = 16.0 * 1.64676 * 4096.0 * 15.0 / 2.0;
    for (int k = 0; k < 40; k++) begin
      @(posedge iq_valid); @(negedge clk);
      ph_prev = ph;
      @(posedge iq_valid); @(negedge clk);
      d = (ph - ph_prev) * 180.0 / PI;
      if (d < -180.0) d += 360.0;
      checks++;
      if (d < 61.2 || d > 63.2) begin failures++; $display("phase step %f", d); end
      checks++;
      if (mag < 0.95 * expm || mag > 1.05 * expm) begin failures++; $display("mag %f exp %f", mag, expm); end
    end
    // --- tone 300 kHz away: out of the channel
    f_tone = 11.0e6;
    repeat (60) @(posedge iq_valid);
    mag_sum2 = 0; cnt_meas = 0;
    repeat (100) begin @(posedge iq_valid); @(negedge clk); mag_sum2 += mag * mag; cnt_meas++; end
    checks++;
    if ($sqrt(mag_sum2 / cnt_meas) > expm / 100.0) begin
      failures++; $display("stop band rms %f", $sqrt(mag_sum2 / cnt_meas));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
