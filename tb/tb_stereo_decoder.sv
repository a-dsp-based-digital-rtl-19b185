// tb_stereo_decoder - feeds a synthetic FM multiplex (19 kHz pilot, left-only 1 kHz tone)
// at the 289.45 kHz MPX rate and checks: the pilot PLL locks to the pilot phase (within
// 3 deg) and the decoder switches to stereo; left/right separation above 26 dB; one audio
// sample per 6 MPX samples; forced mono gives L = R; blend 0 also gives L = R; without pilot
// the decoder falls back to mono; soft mute scales the output.
module tb_stereo_decoder;
  import radio_pkg::*;
  localparam real PI = 3.14159265358979;
  localparam real FS = 289450.0;
  logic clk = 0, rst_n = 0, mpx_valid = 0;
  logic signed [23:0] mpx, level, pilot_level, field_strength, left, right;
  logic force_mono = 0, deemph_75us = 0, stereo, aud_valid;
  logic [8:0] blend = 256, mute_gain = 256;
  logic [16:0] highcut_alpha = 17'd65536;
  logic [23:0] pilot_phase;
  int checks = 0, failures = 0;
  stereo_decoder dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (12000000) @(posedge clk);
    failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  real pilot_amp = 0.1, s_on = 1.0;
  longint n = 0;
  int naud = 0;
  real sl2, sr2, sd2; int nm;
  task automatic run(input int samples);
    for (int k = 0; k < samples; k++) begin
      real t, m, s, th;
      t  = real'(n) / FS;
      th = 2.0 * PI * 19000.0 * t + 0.7;
      m  = 0.5 * $sin(2.0 * PI * 1000.0 * t);
      s  = 0.5 * $sin(2.0 * PI * 1000.0 * t) * s_on;
      @(negedge clk);
      mpx = 24'($rtoi(4.0e6 * (0.9 * (m + s * $sin(2.0 * th)) + pilot_amp * $sin(th))));
      level = 24'sd1000000;
      mpx_valid = 1;
      n++;
      @(negedge clk) mpx_valid = 0;
      repeat (158) @(negedge clk);
    end
  endtask
  always @(posedge clk) if (rst_n && aud_valid) begin
    naud++;
    sl2 += real'(left) * real'(left);
    sr2 += real'(right) * real'(right);
    sd2 += (real'(left) - real'(right)) ** 2;
    nm++;
  end
  function automatic void reset_meas(); sl2 = 0; sr2 = 0; sd2 = 0; nm = 0; endfunction

  initial begin
    real pe, full_rms;
    repeat (3) @(posedge clk); rst_n = 1;
    // 1: stereo with pilot
    run(20000);
    checks++; if (!stereo) begin failures++; $display("no stereo"); end
    pe = real'(pilot_phase) / 16777216.0 - (19000.0 * real'(n) / FS + 0.7 / (2.0 * PI));
    pe = (pe - $floor(pe + 0.5)) * 360.0;
    checks++; if (pe > 3.0 || pe < -3.0) begin failures++; $display("pilot phase error %f deg", pe); end
    reset_meas();
    run(6000);
    checks++;
    if (sr2 * 400.0 > sl2) begin failures++; $display("separation %f dB", 10.0 * $log10(sl2 / sr2)); end
    checks++;
    full_rms = $sqrt(sl2 / nm);
    // L = 0.9 * 4e6 * sin(1 kHz), de-emphasis (50 us) gain 0.954 at 1 kHz: rms 2.43e6
    if (full_rms < 2.3e6 || full_rms > 2.55e6) begin failures++; $display("left rms %f", full_rms); end
    checks++; if (naud != (20000 + 6000) / 6) begin failures++; $display("audio samples %0d", naud); end
    // 2: blend to mono
    blend = 0; run(1500); reset_meas(); run(3000);
    checks++; if (sd2 * 1e4 > sl2) begin failures++; $display("blend 0 not mono"); end
    blend = 256;
    // 3: forced mono
    force_mono = 1; run(1500); reset_meas(); run(3000);
    checks++; if (sd2 * 1e4 > sl2) begin failures++; $display("forced mono: L-R %f L %f", sd2, sl2); end
    force_mono = 0;
    // 4: soft mute at half gain
    mute_gain = 128; run(1500); reset_meas(); run(3000);
    checks++;
    if ($sqrt(sl2 / nm) > 0.52 * full_rms || $sqrt(sl2 / nm) < 0.48 * full_rms) begin
      failures++; $display("mute: rms %f", $sqrt(sl2 / nm));
    end
    mute_gain = 256;
    // 5: pilot removed -> mono
    pilot_amp = 0; s_on = 0; run(4000);
    checks++; if (stereo) begin failures++; $display("still stereo"); end
    checks++; if (field_strength < 24'sd990000) begin failures++; $display("field strength %0d", field_strength); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
