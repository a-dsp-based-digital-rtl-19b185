// tb_cordic_rotator - compares the CORDIC mixer with K x 2^12 (cos a, -sin a) computed in
// floating point, for random codes and angles, and checks the ITER+1 clock latency.
module tb_cordic_rotator;
  localparam real PI = 3.14159265358979;
  localparam real K  = 1.646760258;
  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  logic signed [5:0]  x_in;
  logic [23:0] angle;
  logic signed [19:0] i_out, q_out;
  int checks = 0, failures = 0;
  cordic_rotator dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  real ei[$], eq[$];
  int  tin[$];
  int  cyc = 0;
  always @(posedge clk) cyc++;
  always @(posedge clk) if (rst_n && out_valid) begin
    real xi, xq; int t;
    xi = ei.pop_front(); xq = eq.pop_front(); t = tin.pop_front();
    checks++;
    if ((i_out - xi) > 40 || (xi - i_out) > 40 || (q_out - xq) > 40 || (xq - q_out) > 40) begin
      failures++; $display("mismatch i %0d/%0f q %0d/%0f", i_out, xi, q_out, xq);
    end
    checks++;
    if (cyc - t != 19) begin failures++; $display("latency %0d", cyc - t); end
  end
  initial begin
    repeat (3) @(posedge clk); rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      in_valid = ($urandom % 4) != 0;
      x_in  = 6'($signed($urandom % 33) - 16);
      angle = (n < 8) ? 24'(n * 24'h200000) : 24'($urandom);
      if (in_valid) begin
        real a;
        a = 2.0 * PI * real'(angle) / 16777216.0;
        ei.push_back(K * real'(x_in) * 4096.0 * $cos(a));
        eq.push_back(-K * real'(x_in) * 4096.0 * $sin(a));
        tin.push_back(cyc + 1);
      end
    end
    @(negedge clk) in_valid = 0;
    repeat (30) @(posedge clk);
    checks++; if (ei.size() != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
