// tb_rds_decoder - sends RDS groups, built here with a bit-serial CRC (g = x^10+x^8+x^7+x^5+
// x^4+x^3+1) plus the A, B, C, C', D offset words, after 13 random bits so that the decoder
// must find the block boundary. It checks: sync is found; every error-free block is reported
// with its data, type and status 0; blocks hit by a burst of 1 to 5 bits are reported
// corrected with the original data; a block with a long burst is flagged uncorrectable
// without losing sync; group_valid delivers the four blocks; a long stretch of noise makes the
// flywheel give up sync (more than 8 uncorrectable blocks), and sync returns afterwards.
module tb_rds_decoder;
  logic clk = 0, rst_n = 0, bit_valid = 0, bit_in = 0;
  logic synced, block_valid, group_valid;
  logic [15:0] block_data;
  logic [2:0]  block_type;
  logic [1:0]  block_status;
  logic [15:0] group [4];
  int checks = 0, failures = 0;
  rds_decoder dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (3000000) @(posedge clk);
    failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  localparam logic [9:0] OFF [5] = '{10'h0FC, 10'h198, 10'h168, 10'h350, 10'h1B4};

  function automatic logic [9:0] crc(input logic [15:0] d);
    logic [9:0] r = 0;
    for (int i = 15; i >= 0; i--) begin
      logic fb;
      fb = d[i] ^ r[9];
      r  = {r[8:0], 1'b0};
      if (fb) r = r ^ 10'h1B9;          // g without the x^10 term
    end
    return r;
  endfunction

  // remainder of a 26-bit word divided by g(x)
  function automatic logic [9:0] rem26(input logic [25:0] w);
    logic [10:0] r = 0;
    for (int i = 25; i >= 0; i--) begin
      r = {r[9:0], w[i]};
      if (r[10]) r ^= 11'h5B9;
    end
    return r[9:0];
  endfunction
  // a random error pattern whose syndrome differs from that of every burst of <= 5 bits
  function automatic logic [25:0] uncorrectable();
    logic [25:0] e; bit clash;
    do begin
      e = 26'($urandom) | 26'h2000001;
      clash = 0;
      for (int p = 0; p < 26; p++) for (int b = 0; b < 16; b++)
        if (rem26(26'({4'(b), 1'b1}) << p) == rem26(e)) clash = 1;
    end while (clash);
    return e;
  endfunction

  task automatic send_bit(input logic b);
    @(negedge clk); bit_in = b; bit_valid = 1;
    @(negedge clk); bit_valid = 0;
    repeat (440) @(negedge clk);
  endtask

  // expected reports
  typedef struct { logic [15:0] d; logic [2:0] t; logic [1:0] st; } exp_t;
  exp_t exq [$];
  int ngroups = 0, nlost = 0;
  logic [15:0] last_grp [4];

  task automatic send_block(input logic [15:0] d, input int t, input logic [25:0] err, input bit track);
    logic [25:0] w;
    w = {d, crc(d) ^ OFF[t]} ^ err;
    for (int i = 25; i >= 0; i--) send_bit(w[i]);
  endtask

  always @(posedge clk) if (rst_n) begin
    if (block_valid && exq.size() > 0) begin
      exp_t e;
      e = exq.pop_front();
      checks++;
      if (block_status != e.st || block_type != e.t || (e.st != 2 && block_data != e.d)) begin
        failures++;
        $display("block %h type %0d st %0d, expected %h %0d %0d", block_data, block_type, block_status, e.d, e.t, e.st);
      end
    end
    if (group_valid) begin ngroups++; last_grp = group; end
  end

  initial begin
    logic [15:0] d [4];
    logic [25:0] err;
    int bt;
    repeat (3) @(posedge clk); rst_n = 1;
    repeat (13) send_bit(1'($urandom));
    // the first block only starts the search; the second confirms (and is reported)
    for (int g = 0; g < 24; g++) begin
      for (int b = 0; b < 4; b++) begin
        d[b] = 16'($urandom);
        bt = (b == 2 && g % 2 == 1) ? 3 : (b == 3 ? 4 : b);
        err = '0;
        if (g >= 4 && g < 12 && b == g % 4) begin
          logic [4:0] burst;
          burst = 5'($urandom) | 5'b00001;
          err = 26'(burst) << ($urandom % 22);
        end
        if (g == 14 && b == 1) err = uncorrectable();
        if (g > 0 || b >= 1) begin
          exp_t e;
          e.d = d[b]; e.t = 3'(bt);
          e.st = (err == 0) ? 2'd0 : ((g == 14 && b == 1) ? 2'd2 : 2'd1);
          exq.push_back(e);
        end
        send_block(d[b], bt, err, 1);
      end
      checks++;
      if (g > 0 && !(g == 14) && last_grp[0] != d[0] || (g > 0 && g != 14 && last_grp[3] != d[3])) begin
        failures++; $display("group %0d not delivered", g);
      end
      checks++;
      if (!synced) begin failures++; $display("sync lost in group %0d", g); end
    end
    checks++; if (exq.size() != 0) begin failures++; $display("%0d blocks not reported", exq.size()); end
    // noise: flywheel keeps sync for up to 8 bad blocks, then drops it
    exq.delete();
    for (int k = 0; k < 26 * 6; k++) send_bit(1'($urandom));
    checks++; if (!synced) begin failures++; $display("flywheel dropped sync too early"); end
    for (int k = 0; k < 26 * 40; k++) send_bit(1'($urandom));
    checks++; if (synced) begin failures++; $display("sync not dropped on noise"); end
    // clean groups again: sync returns
    for (int g = 0; g < 3; g++) for (int b = 0; b < 4; b++) send_block(16'($urandom), b == 3 ? 4 : b, '0, 0);
    checks++; if (!synced) begin failures++; $display("sync not regained"); end
    $display("groups %0d", ngroups);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
