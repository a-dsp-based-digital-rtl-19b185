// tb_rds_demod - builds an MPX with a strong mono tone, the 19 kHz pilot and a 1187.5 bit/s
// differentially coded biphase RDS signal on a 57 kHz carrier in quadrature to the third
// pilot harmonic, starting 0.6 bit out of step with the demodulator. After 120 bits of
// acquisition the recovered bits must equal the sent data (found by alignment) for 250 bits,
// the data clock must tick every 243 or 244 MPX samples, and the quality must be non-zero.
module tb_rds_demod;
  localparam real PI = 3.14159265358979;
  localparam real FS = 289450.0;
  logic clk = 0, rst_n = 0, mpx_valid = 0, bit_valid, bit_out;
  logic signed [23:0] mpx;
  logic [23:0] pilot_phase, quality;
  int checks = 0, failures = 0;
  rds_demod dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (3000000) @(posedge clk);
    failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  bit data [500];
  bit enc  [500];
  bit got  [$];
  longint n = 0, last_bit_n = -1;
  int bad_spacing = 0;
  always @(posedge clk) if (rst_n && bit_valid) begin
    got.push_back(bit_out);
    if (last_bit_n >= 0 && got.size() > 40 && (n - last_bit_n < 242 || n - last_bit_n > 245)) bad_spacing++;
    last_bit_n = n;
  end
  initial begin
    int best, errs;
    for (int k = 0; k < 500; k++) begin
      data[k] = 1'($urandom);
      enc[k]  = (k == 0) ? data[k] : data[k] ^ enc[k-1];
    end
    repeat (3) @(posedge clk); rst_n = 1;
    for (int k = 0; k < 440 * 244; k++) begin
      real t, th, bp, sym, v; int b;
      t   = real'(n) / FS;
      th  = 2.0 * PI * 19000.0 * t + 1.1;
      bp  = t * 1187.5 + 0.60;                     // position in bits
      b   = $rtoi($floor(bp));
      sym = (enc[b % 500] ? 1.0 : -1.0) * ((bp - $floor(bp) < 0.5) ? 1.0 : -1.0);
      v   = 3.0e6 * $sin(2.0 * PI * 1000.0 * t) + 4.0e5 * $sin(th) + 1.6e5 * sym * $sin(3.0 * th);
      @(negedge clk);
      mpx = 24'($rtoi(v));
      pilot_phase = 24'($rtoi((th / (2.0 * PI) - $floor(th / (2.0 * PI))) * 16777216.0));
      mpx_valid = 1; n++;
      @(negedge clk) mpx_valid = 0;
      @(negedge clk);
    end
    // align: received bit j corresponds to data bit j + off
    best = 1000;
    for (int off = -3; off < 4; off++) begin
      errs = 0;
      for (int j = 120; j < 370; j++) if (j + off >= 0 && got[j] != data[j + off]) errs++;
      if (errs < best) best = errs;
    end
    checks++; if (best != 0) begin failures++; $display("bit errors %0d of 250 (received %0d bits)", best, got.size()); end
    checks++; if (bad_spacing != 0) begin failures++; $display("data clock spacing off %0d times", bad_spacing); end
    checks++; if (quality == 0) begin failures++; $display("quality 0"); end
    checks++; if (got.size() < 430 || got.size() > 442) begin failures++; $display("bits %0d", got.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
