// tb_sp_ram - writes random words to random addresses of a 4096 x 24 RAM, reads them back
// one clock later, and checks that a disabled access neither writes nor updates the output.
module tb_sp_ram;
  logic clk = 0, en = 0, we = 0;
  logic [11:0] addr = 0;
  logic [23:0] wdata = 0, rdata;
  int checks = 0, failures = 0;
  sp_ram dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    logic [23:0] model [4096];
    for (int a = 0; a < 4096; a++) begin
      @(negedge clk) en = 1; we = 1; addr = 12'(a); wdata = 24'($urandom); model[a] = wdata;
    end
    for (int n = 0; n < 6000; n++) begin
      @(negedge clk);
      en = 1; we = ($urandom % 4) == 0; addr = 12'($urandom); wdata = 24'($urandom);
      if (we) model[addr] = wdata;
      else begin
        @(negedge clk) en = 0; we = 0;
        checks++;
        if (rdata != model[addr]) begin failures++; $display("addr %h read %h exp %h", addr, rdata, model[addr]); end
      end
    end
    @(negedge clk) en = 1; we = 0; addr = 12'd5;
    @(negedge clk) en = 0; we = 1; addr = 12'd6; wdata = ~model[6];
    @(negedge clk) we = 0;
    checks++; if (rdata != model[5]) failures++;
    @(negedge clk) en = 1; addr = 12'd6;
    @(negedge clk) en = 0;
    checks++; if (rdata != model[6]) begin failures++; $display("disabled write took effect"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
