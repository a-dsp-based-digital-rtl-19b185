// tb_asrc - checks the sample-rate converter between two unrelated rates.
//
// Input: a 500 Hz (left) and 1 kHz (right) sine, amplitude 2^22, arriving every 1681 master
// clocks (44.08 kHz) with +-3 clocks of random jitter; output requested every 1536 clocks
// (48.24 kHz). After the loop has locked every output must equal the input tone at the
// request time minus one nominal input period, within 1 % of the amplitude (linear
// interpolation error plus loop jitter). The input period then changes to 1283 clocks
// (57.75 kHz) without any configuration; the converter must relock and meet the same bound.
// A rate change and a lock are each counted; one that never happens is a failure.
module tb_asrc;
  localparam real PI = 3.14159265358979;
  localparam real A  = 4194304.0;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0, out_req = 0, out_valid, locked;
  logic signed [23:0] in_left = 0, in_right = 0, out_left, out_right;
  logic [23:0] step;

  asrc dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  function automatic real fabs(input real v); return v < 0.0 ? -v : v; endfunction
  initial begin
    repeat (6000000) @(posedge clk);
    failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // input source: sample n is the tone at n * tin, delivered at that time plus jitter
  int  tin = 1681;
  longint t_first = -1;     // clock of the first input: tone time = clock - t_first
  real tone_t = 0.0;        // tone time of the next input sample
  initial begin
    longint next;
    @(posedge rst_n);
    next = cyc + tin;
    t_first = next;
    forever begin
      int j;
      j = int'($urandom % 7) - 3;
      while (cyc < next + j) @(negedge clk);
      in_valid = 1;
      in_left  = 24'($rtoi(A * $sin(2.0 * PI * 500.0 * tone_t / 74.1e6)));
      in_right = 24'($rtoi(A * $sin(2.0 * PI * 1000.0 * tone_t / 74.1e6)));
      @(negedge clk) in_valid = 0;
      tone_t += real'(tin);
      next   += tin;
    end
  end

  // output requests and checks
  int  n_lock = 0, n_rate = 0, n_ok = 0;
  bit  checking = 0;
  logic locked_d = 0;
  always @(posedge clk) if (rst_n) begin
    locked_d <= locked;
    if (locked && !locked_d) n_lock++;
  end
  initial begin
    @(posedge rst_n);
    forever begin
      real t, el, er;
      repeat (1535) @(negedge clk);
      out_req = 1;
      t = real'(cyc - t_first);
      @(negedge clk) out_req = 0;
      if (checking) begin
        el = A * $sin(2.0 * PI * 500.0 * (t - real'(tin)) / 74.1e6);
        er = A * $sin(2.0 * PI * 1000.0 * (t - real'(tin)) / 74.1e6);
        checks++;
        if (fabs(real'(out_left) - el) > 0.01 * A || fabs(real'(out_right) - er) > 0.01 * A) begin
          failures++;
          if (failures < 10) $display("t=%0d out %0d %0d expected %0.0f %0.0f", cyc, out_left, out_right, el, er);
        end else n_ok++;
      end
    end
  end

  initial begin
    repeat (5) @(posedge clk); rst_n = 1;
    // first rate: lock, then check for 300 outputs
    repeat (400 * 1681) @(posedge clk);
    checks++; if (!locked) begin failures++; $display("not locked at 44.08 kHz"); end
    checks++; if (step < 24'd9940 || step > 24'd10020) begin failures++; $display("step %0d, expected 9980 +- 40", step); end
    checking = 1;
    repeat (300 * 1536) @(posedge clk);
    checking = 0;
    // second rate, no configuration
    tin = 1283; n_rate++;
    repeat (400 * 1283) @(posedge clk);
    checks++; if (!locked) begin failures++; $display("not locked at 57.75 kHz"); end
    checks++; if (step < 24'd13036 || step > 24'd13116) begin failures++; $display("step %0d, expected 13076 +- 40", step); end
    checking = 1;
    repeat (300 * 1536) @(posedge clk);
    checking = 0;
    $display("locks %0d rate changes %0d good outputs %0d", n_lock, n_rate, n_ok);
    checks++; if (n_lock < 1 || n_rate < 1) begin failures++; $display("a mechanism never happened"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
