// tb_cic_decim - feeds random samples to the Sinc^5 decimator and compares every output with
// floor(sum h[k] x[n-k] / 2^21), h being the 32-sample boxcar convolved five times with
// itself (computed here), after finding the pipeline delay once.
module tb_cic_decim;
  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  logic signed [19:0] din;
  logic signed [23:0] dout;
  int checks = 0, failures = 0;
  cic_decim dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (400000) @(posedge clk);
    failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  longint h [160];
  longint x [$];
  int     nin = 0, delay = -1, nout = 0;
  function automatic longint ref_at(int n);   // sum h[k] x[n-k]
    longint s = 0;
    for (int k = 0; k < 156; k++) if (n - k >= 0 && n - k < x.size()) s += h[k] * x[n - k];
    return s;
  endfunction
  always @(posedge clk) if (rst_n && out_valid) begin
    nout++;
    if (delay < 0) begin
      for (int d = 0; d < 10; d++) if ((ref_at(nin - 1 - d) >>> 21) == longint'(dout) && dout != 0) begin
        if (delay < 0) delay = d;
      end
      checks++;
      if (delay < 0 && nout > 8) begin failures++; $display("no alignment"); end
    end else begin
      checks++;
      if ((ref_at(nin - 1 - delay) >>> 21) != longint'(dout)) begin
        failures++; $display("out %0d exp %0d", dout, ref_at(nin - 1 - delay) >>> 21);
      end
    end
  end
  initial begin
    longint b [160];
    for (int k = 0; k < 160; k++) h[k] = (k < 32) ? 1 : 0;
    for (int o = 1; o < 5; o++) begin
      for (int k = 0; k < 160; k++) begin
        b[k] = 0;
        for (int j = 0; j < 32; j++) if (k - j >= 0) b[k] += h[k - j];
      end
      h = b;
    end
    repeat (3) @(posedge clk); rst_n = 1;
    for (int n = 0; n < 32 * 300; n++) begin
      @(negedge clk);
      in_valid = 1;
      din = (n < 32 * 100) ? 20'sd300000 : 20'($urandom);
      x.push_back(longint'(din));
      nin++;
      @(negedge clk) in_valid = 0;
    end
    repeat (5) @(posedge clk);
    checks++; if (nout != 300) begin failures++; $display("outputs %0d", nout); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
