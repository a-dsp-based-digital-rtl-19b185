// tb_cordic_vectoring - random I/Q vectors (all quadrants, including the axes); magnitude and
// phase are compared with sqrt(i^2+q^2) and atan2(q, i) computed in floating point, and the
// done latency (ITER+2 = 26 clocks) is checked.
module tb_cordic_vectoring;
  localparam real PI = 3.14159265358979;
  logic clk = 0, rst_n = 0, start = 0, busy, done;
  logic signed [23:0] i_in, q_in;
  logic [24:0] mag;
  logic [23:0] phase;
  int checks = 0, failures = 0;
  cordic_vectoring dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    real em, ep, dp; int t0;
    repeat (3) @(posedge clk); rst_n = 1;
    for (int n = 0; n < 1500; n++) begin
      @(negedge clk);
      case (n)
        0: begin i_in = 24'sh7FFFFF; q_in = 0; end
        1: begin i_in = -24'sh7FFFFF; q_in = 0; end
        2: begin i_in = 0; q_in = 24'sh7FFFFF; end
        3: begin i_in = 0; q_in = -24'sh800000; end
        4: begin i_in = -24'sh800000; q_in = -24'sh800000; end
        default: begin
          i_in = 24'($urandom); q_in = 24'($urandom);
          if (n % 3 == 0) begin i_in = i_in >>> ($urandom % 16); q_in = q_in >>> ($urandom % 16); end
        end
      endcase
      start = 1; t0 = 0;
      @(negedge clk) start = 0;
      while (!done) begin @(negedge clk); t0++; end
      em = $sqrt(real'(i_in) * real'(i_in) + real'(q_in) * real'(q_in));
      ep = $atan2(real'(q_in), real'(i_in)) / (2.0 * PI) * 16777216.0;
      if (ep < 0) ep += 16777216.0;
      dp = real'(phase) - ep;
      if (dp > 8388608.0) dp -= 16777216.0;
      if (dp < -8388608.0) dp += 16777216.0;
      checks++;
      if (real'(mag) - em > 8.0 + em * 1e-5 || em - real'(mag) > 8.0 + em * 1e-5) begin
        failures++; $display("mag %0d exp %f (%0d,%0d)", mag, em, i_in, q_in);
      end
      checks++;
      if (em > 1000.0 && (dp > 6.0 + 2e6 / em || dp < -6.0 - 2e6 / em)) begin
        failures++; $display("phase %0d exp %f (%0d,%0d)", phase, ep, i_in, q_in);
      end
      checks++;
      if (t0 != 25) begin failures++; $display("latency %0d", t0 + 1); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
