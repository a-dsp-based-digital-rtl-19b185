// tb_pa_history - pushes program addresses and checks that the five most recent are kept in
// order (newest first), that the valid count saturates at 5 and that freeze stops recording.
module tb_pa_history;
  logic clk = 0, rst_n = 0, pc_valid = 0, freeze = 0;
  logic [15:0] pc, hist [5];
  logic [2:0] count;
  int checks = 0, failures = 0;
  pa_history dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    logic [15:0] model [$];
    repeat (3) @(posedge clk); rst_n = 1;
    for (int n = 0; n < 300; n++) begin
      @(negedge clk);
      pc = 16'($urandom); pc_valid = ($urandom % 3) != 0; freeze = (n > 150 && n < 200);
      if (pc_valid && !freeze) begin model.push_front(pc); if (model.size() > 5) void'(model.pop_back()); end
      @(negedge clk); pc_valid = 0;
      checks++;
      if (int'(count) != model.size()) begin failures++; $display("count %0d exp %0d", count, model.size()); end
      for (int k = 0; k < model.size(); k++) begin
        checks++;
        if (hist[k] != model[k]) begin failures++; $display("hist[%0d] %h exp %h", k, hist[k], model[k]); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
