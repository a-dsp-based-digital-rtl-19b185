// tb_spi_ctrl - an SPI mode-0 master (sclk = master clock / 16) writes random values to all
// control registers, reads them back, reads the status words and an unmapped address, and
// checks reset values, the write strobe and that an aborted transfer (cs_n raised early)
// changes nothing.
module tb_spi_ctrl;
  logic clk = 0, rst_n = 0, sclk = 0, cs_n = 1, mosi = 0, miso, wr_pulse;
  logic [23:0] regs [16];
  logic [23:0] stat [16];
  logic [6:0]  wr_addr;
  int checks = 0, failures = 0;
  localparam logic [23:0] RV [16] = '{24'h111111, 24'h2, 24'h3, 24'h4, 24'h5, 24'h6, 24'h7,
    24'h8, 24'h9, 24'ha, 24'hb, 24'hc, 24'hd, 24'he, 24'hf, 24'h10};
  spi_ctrl #(.RESET_VAL(RV)) dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (400000) @(posedge clk);
    failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  int nwr = 0;
  always @(posedge clk) if (rst_n && wr_pulse) nwr++;
  task automatic xfer(input logic [7:0] cmd, input logic [23:0] wd, output logic [23:0] rd, input int nbits = 32);
    logic [31:0] o; o = {cmd, wd}; rd = 0;
    cs_n = 0; repeat (8) @(negedge clk);
    for (int i = 31; i >= 32 - nbits; i--) begin
      mosi = o[i]; repeat (8) @(negedge clk);
      sclk = 1; if (i < 24) rd = {rd[22:0], miso}; repeat (8) @(negedge clk);
      sclk = 0;
    end
    repeat (8) @(negedge clk); cs_n = 1; repeat (8) @(negedge clk);
  endtask
  initial begin
    logic [23:0] v [16], r;
    for (int k = 0; k < 16; k++) stat[k] = 24'($urandom);
    repeat (3) @(posedge clk); rst_n = 1;
    repeat (4) @(posedge clk);
    for (int k = 0; k < 16; k++) begin checks++; if (regs[k] != RV[k]) failures++; end
    xfer({1'b0, 7'd0}, 0, r); checks++; if (r != 24'h111111) begin failures++; $display("reset read %h", r); end
    for (int k = 0; k < 16; k++) begin v[k] = 24'($urandom); xfer({1'b1, 7'(k)}, v[k], r); end
    checks++; if (nwr != 16) begin failures++; $display("write strobes %0d", nwr); end
    for (int k = 0; k < 16; k++) begin
      checks++; if (regs[k] != v[k]) begin failures++; $display("reg %0d = %h exp %h", k, regs[k], v[k]); end
      xfer({1'b0, 7'(k)}, 0, r);
      checks++; if (r != v[k]) begin failures++; $display("read %0d = %h exp %h", k, r, v[k]); end
    end
    for (int k = 0; k < 16; k++) begin
      xfer({1'b0, 7'(16 + k)}, 0, r);
      checks++; if (r != stat[k]) begin failures++; $display("stat %0d = %h exp %h", k, r, stat[k]); end
    end
    xfer({1'b0, 7'd100}, 0, r); checks++; if (r != 0) failures++;
    xfer({1'b1, 7'd3}, 24'hABCDEF, r, 20);     // aborted write
    checks++; if (regs[3] != v[3]) begin failures++; $display("aborted write changed reg"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
