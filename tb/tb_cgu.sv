// tb_cgu - checks the fixed ADC strobe (every 2 clocks), programmable divider strobes (period
// = ratio, position = phase, restart when the ratio changes, off for ratio 0) and the
// saturating oscillator trim counter.
module tb_cgu;
  logic clk = 0, rst_n = 0, trim_up = 0, trim_dn = 0, adc_en;
  logic [11:0] div_ratio [4], div_phase [4];
  logic [3:0] div_en;
  logic [7:0] osc_trim;
  int checks = 0, failures = 0;
  cgu dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  int cyc = 0, last_adc = 0, bad_adc = 0, nadc = 0;
  int last_en [4], cnt_en [4], bad_en [4];
  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (adc_en) begin if (last_adc != 0 && cyc - last_adc != 2) bad_adc++; last_adc = cyc; nadc++; end
    for (int k = 0; k < 4; k++) if (div_en[k]) begin
      if (last_en[k] != 0 && cyc - last_en[k] != int'(div_ratio[k])) bad_en[k]++;
      last_en[k] = cyc; cnt_en[k]++;
    end
  end
  initial begin
    int ref_cyc;
    for (int k = 0; k < 4; k++) begin last_en[k] = 0; cnt_en[k] = 0; bad_en[k] = 0; end
    div_ratio = '{12'd5, 12'd256, 12'd3, 12'd0};
    div_phase = '{12'd2, 12'd100, 12'd0, 12'd0};
    repeat (3) @(posedge clk); rst_n = 1;
    repeat (2600) @(posedge clk);
    checks++; if (bad_adc != 0 || nadc < 1290) begin failures++; $display("adc strobes bad %0d n %0d", bad_adc, nadc); end
    for (int k = 0; k < 3; k++) begin
      checks++;
      if (bad_en[k] != 0 || cnt_en[k] < 2600 / int'(div_ratio[k]) - 1) begin
        failures++; $display("divider %0d bad %0d count %0d", k, bad_en[k], cnt_en[k]);
      end
    end
    checks++; if (cnt_en[3] != 0) begin failures++; $display("ratio 0 not off"); end
    // phase: after a ratio change the strobe comes phase + 2 clocks later (restart, register)
    @(negedge clk) div_ratio[1] = 12'd64; div_phase[1] = 12'd10; last_en[1] = 0;
    ref_cyc = cyc;
    @(posedge div_en[1]);
    checks++; if (cyc - ref_cyc != 12) begin failures++; $display("phase position %0d", cyc - ref_cyc); end
    // trim
    checks++; if (osc_trim != 8'd128) failures++;
    repeat (200) begin @(negedge clk) trim_up = 1; @(negedge clk) trim_up = 0; end
    checks++; if (osc_trim != 8'd255) begin failures++; $display("trim up %0d", osc_trim); end
    repeat (10) begin @(negedge clk) trim_dn = 1; @(negedge clk) trim_dn = 0; end
    checks++; if (osc_trim != 8'd245) begin failures++; $display("trim dn %0d", osc_trim); end
    @(negedge clk) trim_dn = 1; trim_up = 1; @(negedge clk) trim_dn = 0; trim_up = 0;
    checks++; if (osc_trim != 8'd245) failures++;
    repeat (300) begin @(negedge clk) trim_dn = 1; @(negedge clk) trim_dn = 0; end
    checks++; if (osc_trim != 8'd0) begin failures++; $display("trim floor %0d", osc_trim); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
