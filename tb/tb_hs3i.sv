// tb_hs3i - HS3I transmitter looped back into its receiver. Random words must arrive intact
// and in order; the serial clock period must be 8 master clocks (9.26 Mbit/s) with a high
// time equal to the programmed hi_time (tried 2, 4 and 6); back-to-back words must follow
// each other every 24 bits.
module tb_hs3i;
  logic clk = 0, rst_n = 0, en = 0, tx_valid = 0, tx_ready, sclk, fs, sd, rx_valid;
  logic [2:0] hi_time = 3'd4;
  logic [23:0] tx_data, rx_data;
  int checks = 0, failures = 0;
  hs3i dut (.clk, .rst_n, .en, .hi_time, .tx_valid, .tx_data, .tx_ready, .sclk_out(sclk),
            .fs_out(fs), .sd_out(sd), .sclk_in(sclk), .fs_in(fs), .sd_in(sd), .rx_valid, .rx_data);
  always #5 clk = ~clk;
  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  logic [23:0] sent [$];
  int cyc = 0, rise_t = 0, fall_t = 0, nrx = 0, last_rx = 0, bad_per = 0, bad_hi = 0;
  logic sclk_d = 0;
  always @(posedge clk) if (rst_n) begin
    cyc++;
    sclk_d <= sclk;
    if (sclk && !sclk_d) begin
      if (rise_t != 0 && cyc - rise_t != 8) bad_per++;
      rise_t = cyc;
    end
    if (!sclk && sclk_d) begin
      if (cyc - rise_t != int'(hi_time)) bad_hi++;
    end
    if (rx_valid) begin
      checks++;
      if (rx_data != sent[nrx]) begin failures++; $display("rx %h exp %h", rx_data, sent[nrx]); end
      if (nrx > 0 && nrx % 20 != 0) begin
        checks++;
        if (cyc - last_rx != 192) begin failures++; $display("word spacing %0d", cyc - last_rx); end
      end
      last_rx = cyc;
      nrx++;
    end
  end
  initial begin
    repeat (3) @(posedge clk); rst_n = 1;
    for (int h = 0; h < 3; h++) begin
      @(negedge clk) hi_time = 3'(2 + 2 * h); en = 1;
      for (int k = 0; k < 20; k++) begin
        @(negedge clk);
        while (!tx_ready) @(negedge clk);
        tx_data = 24'($urandom); tx_valid = 1; sent.push_back(tx_data);
        @(negedge clk) tx_valid = 0;
      end
      repeat (400) @(negedge clk);
      en = 0; rise_t = 0;
      repeat (20) @(negedge clk);
    end
    checks++; if (nrx != 60) begin failures++; $display("received %0d", nrx); end
    checks++; if (bad_per != 0) begin failures++; $display("clock period wrong %0d times", bad_per); end
    checks++; if (bad_hi != 0) begin failures++; $display("high time wrong %0d times", bad_hi); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
