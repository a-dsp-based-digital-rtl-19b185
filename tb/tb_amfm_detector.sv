// tb_amfm_detector - runs the four detector cores concurrently: core 0 FM on a phasor turning
// by a known step per sample, core 1 AM on random vectors, core 2 PM, core 3 FM on a phasor
// of changing frequency. Results are compared with floating-point references and the
// request-to-done latency (27 clocks) is checked.
module tb_amfm_detector;
  import radio_pkg::*;
  localparam real PI = 3.14159265358979;
  logic clk = 0, rst_n = 0;
  logic [3:0] req = 0, busy, done;
  det_mode_e mode [4];
  logic signed [23:0] i_in [4], q_in [4], result [4];
  int checks = 0, failures = 0;
  amfm_detector dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (400000) @(posedge clk);
    failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  function automatic real wrap(real v);  // to (-2^23, 2^23]
    while (v > 8388608.0) v -= 16777216.0;
    while (v <= -8388608.0) v += 16777216.0;
    return v;
  endfunction
  initial begin
    real ph0, ph3, st0, st3, prev3, amp, exp_r [4];
    int t;
    mode[0] = DET_FM; mode[1] = DET_AM; mode[2] = DET_PM; mode[3] = DET_FM;
    ph0 = 0; ph3 = 0; prev3 = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      st0 = 0.13;                                     // turns per sample
      st3 = 0.2 * $sin(2.0 * PI * real'(n) / 97.0);
      ph0 += st0; ph3 += st3;
      amp = 3.0e6;
      i_in[0] = 24'($rtoi(amp * $cos(2.0 * PI * ph0))); q_in[0] = 24'($rtoi(amp * $sin(2.0 * PI * ph0)));
      i_in[3] = 24'($rtoi(5.0e6 * $cos(2.0 * PI * ph3))); q_in[3] = 24'($rtoi(5.0e6 * $sin(2.0 * PI * ph3)));
      i_in[1] = 24'($urandom); q_in[1] = 24'($urandom);
      i_in[2] = 24'($urandom); q_in[2] = 24'($urandom);
      exp_r[0] = st0 * 16777216.0;
      exp_r[3] = wrap(st3 * 16777216.0);
      exp_r[1] = $sqrt(real'(i_in[1]) * real'(i_in[1]) + real'(q_in[1]) * real'(q_in[1]));
      if (exp_r[1] > 8388607.0) exp_r[1] = 8388607.0;
      exp_r[2] = $atan2(real'(q_in[2]), real'(i_in[2])) / (2.0 * PI) * 16777216.0;
      req = 4'hF;
      @(negedge clk) req = 0; t = 1;
      while (done != 4'hF) begin @(negedge clk); t++; end
      for (int c = 0; c < 4; c++) begin
        real e;
        if (n == 0 && (c == 0 || c == 3)) continue;   // no previous sample yet
        e = (c == 1) ? real'(result[c]) - exp_r[c] : wrap(real'(result[c]) - exp_r[c]);
        checks++;
        if (e > 40.0 || e < -40.0) begin
          failures++; $display("core %0d n %0d result %0d exp %f", c, n, result[c], exp_r[c]);
        end
      end
      checks++;
      if (t != 27) begin failures++; $display("latency %0d", t); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
