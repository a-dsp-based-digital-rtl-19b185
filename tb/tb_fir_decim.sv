// tb_fir_decim - random samples into FIR1 (21 taps, decimate by 2); each output is compared
// with round(sum c[k] x[n-k] / 2^17), saturated to 24 bits, and its latency (TAPS+2 clocks
// after the input that completes a group of two) is checked.
module tb_fir_decim;
  import radio_pkg::*;
  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  logic signed [23:0] din, dout;
  int checks = 0, failures = 0;
  fir_decim dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (400000) @(posedge clk);
    failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  longint x [$];
  int cyc = 0, t_last = 0, nout = 0;
  always @(posedge clk) cyc++;
  always @(posedge clk) if (rst_n && out_valid) begin
    longint s; int n;
    n = x.size() - 1;
    s = 0;
    for (int k = 0; k < FIR1_TAPS; k++) if (n - k >= 0) s += longint'(FIR1_COEF[k]) * x[n - k];
    s = (s + 65536) >>> 17;
    if (s > 8388607) s = 8388607;
    if (s < -8388608) s = -8388608;
    checks++;
    if (longint'(dout) != s) begin failures++; $display("out %0d exp %0d", dout, s); end
    checks++;
    if (cyc - t_last != FIR1_TAPS + 2) begin failures++; $display("latency %0d", cyc - t_last); end
    nout++;
  end
  initial begin
    repeat (3) @(posedge clk); rst_n = 1;
    for (int n = 0; n < 400; n++) begin
      @(negedge clk);
      in_valid = 1;
      din = (n % 50 < 10) ? 24'sh7FFFFF * ((n % 2) ? 1 : -1) : 24'($urandom);
      x.push_back(longint'(din));
      t_last = cyc + 1;
      @(negedge clk) in_valid = 0;
      repeat (30 + $urandom % 5) @(negedge clk);
    end
    repeat (40) @(posedge clk);
    checks++; if (nout != 200) begin failures++; $display("outputs %0d", nout); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
