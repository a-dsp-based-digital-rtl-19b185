// tb_phase_gen - checks the DDC phase accumulator against n * freq mod 2^24, including clear.
module tb_phase_gen;
  logic clk = 0, rst_n = 0, en = 0, clear = 0;
  logic [23:0] freq, phase;
  int checks = 0, failures = 0;
  phase_gen dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    logic [23:0] model;
    freq = 24'd4845242;
    repeat (3) @(posedge clk); rst_n = 1;
    for (int r = 0; r < 4; r++) begin
      model = 0;
      @(negedge clk) clear = 1; @(negedge clk) clear = 0;
      freq = (r == 0) ? 24'd4845242 : 24'($urandom);
      for (int n = 0; n < 500; n++) begin
        checks++;
        if (phase !== model) begin failures++; $display("phase %h exp %h", phase, model); end
        en = ($urandom % 3) != 0;
        @(negedge clk);
        if (en) model = model + freq;
        en = 0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
