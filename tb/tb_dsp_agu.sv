// tb_dsp_agu - address sequences of the AGU against sequences worked out by hand: linear
// +1/-1/+N, a modulo-10 buffer at 0x0130 stepping past both ends, reverse-carry addressing
// for an 8-point FFT (N = 4: 0 4 2 6 1 5 3 7) and two pointers updated in the same clock.
module tb_dsp_agu;
  import radio_pkg::*;
  logic clk = 0, rst_n = 0, cfg_we = 0;
  logic [2:0] cfg_idx = 0, idx_a = 0, idx_b = 1;
  logic [15:0] cfg_r = 0, cfg_n = 0, cfg_m = 0, addr_a, addr_b;
  agu_mode_e cfg_mode = AGU_LINEAR;
  agu_upd_e upd_a = AGU_NONE, upd_b = AGU_NONE;
  int checks = 0, failures = 0;
  dsp_agu dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  task automatic cfg(input int i, input logic [15:0] r, input logic [15:0] n, input agu_mode_e md, input logic [15:0] m);
    @(negedge clk); cfg_we = 1; cfg_idx = 3'(i); cfg_r = r; cfg_n = n; cfg_mode = md; cfg_m = m;
    @(negedge clk); cfg_we = 0;
  endtask
  task automatic step_a(input int i, input agu_upd_e u, input logic [15:0] expect_addr);
    @(negedge clk); idx_a = 3'(i); upd_a = u;
    #1; checks++;
    if (addr_a != expect_addr) begin failures++; $display("ptr %0d addr %h exp %h", i, addr_a, expect_addr); end
    @(posedge clk); #1 upd_a = AGU_NONE;
  endtask
  initial begin
    logic [15:0] seq_mod [14] = '{16'h137, 16'h138, 16'h139, 16'h130, 16'h131, 16'h132, 16'h133, 16'h134,
                                  16'h135, 16'h136, 16'h137, 16'h138, 16'h139, 16'h130};
    logic [15:0] seq_rev [10] = '{0, 4, 2, 6, 1, 5, 3, 7, 0, 4};
    repeat (3) @(posedge clk); rst_n = 1;
    // linear
    cfg(0, 16'hFFFE, 16'd5, AGU_LINEAR, 0);
    step_a(0, AGU_INC, 16'hFFFE); step_a(0, AGU_INC, 16'hFFFF); step_a(0, AGU_INC, 16'h0000);
    step_a(0, AGU_DEC, 16'h0001); step_a(0, AGU_INC_N, 16'h0000); step_a(0, AGU_DEC_N, 16'h0005);
    step_a(0, AGU_NONE, 16'h0000);
    // modulo 10 at base 0x130, start at 0x137
    cfg(2, 16'h137, 16'd3, AGU_MODULO, 16'd10);
    for (int k = 0; k < 13; k++) step_a(2, AGU_INC, seq_mod[k]);
    step_a(2, AGU_DEC, 16'h130); step_a(2, AGU_DEC, 16'h139);
    step_a(2, AGU_INC_N, 16'h138); step_a(2, AGU_INC_N, 16'h131); step_a(2, AGU_DEC_N, 16'h134);
    step_a(2, AGU_NONE, 16'h131);
    // reverse carry, N = 4
    cfg(3, 0, 16'd4, AGU_REVERSE, 0);
    for (int k = 0; k < 10; k++) step_a(3, AGU_INC_N, seq_rev[k]);
    // two pointers per clock
    cfg(4, 16'h100, 0, AGU_LINEAR, 0); cfg(5, 16'h200, 0, AGU_LINEAR, 0);
    @(negedge clk); idx_a = 4; idx_b = 5; upd_a = AGU_INC; upd_b = AGU_DEC;
    @(negedge clk); upd_a = AGU_NONE; upd_b = AGU_NONE;
    checks++; if (addr_a != 16'h101 || addr_b != 16'h1FF) begin failures++; $display("dual %h %h", addr_a, addr_b); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
