// tb_sai - two SAIs back to back: the master drives bit and word clock into the slave; the
// master's transmitter feeds the slave's receiver and the slave's transmitter the master's
// receiver. Random stereo frames must arrive intact in both directions (after a two-frame
// pipeline), the frame period must be 64 * 24 = 1536 master clocks and tx_req must request
// one frame per period.
module tb_sai;
  logic clk = 0, rst_n = 0;
  logic m_bclk, m_ws, m_sdo, s_sdo, s_bclk_o, s_ws_o;
  logic m_tx_valid = 0, s_tx_valid = 0, m_tx_req, s_tx_req;
  logic signed [23:0] m_tl, m_tr, s_tl, s_tr;
  logic m_rx_valid, s_rx_valid;
  logic signed [23:0] m_rl, m_rr, s_rl, s_rr;
  int checks = 0, failures = 0;
  sai u_m (.clk, .rst_n, .master(1'b1), .bclk_in(1'b0), .ws_in(1'b0), .bclk_out(m_bclk),
           .ws_out(m_ws), .sdo(m_sdo), .sdi(s_sdo), .tx_valid(m_tx_valid), .tx_left(m_tl),
           .tx_right(m_tr), .tx_req(m_tx_req), .rx_valid(m_rx_valid), .rx_left(m_rl), .rx_right(m_rr));
  sai u_s (.clk, .rst_n, .master(1'b0), .bclk_in(m_bclk), .ws_in(m_ws), .bclk_out(s_bclk_o),
           .ws_out(s_ws_o), .sdo(s_sdo), .sdi(m_sdo), .tx_valid(s_tx_valid), .tx_left(s_tl),
           .tx_right(s_tr), .tx_req(s_tx_req), .rx_valid(s_rx_valid), .rx_left(s_rl), .rx_right(s_rr));
  always #5 clk = ~clk;
  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  logic [47:0] m_sent [$], s_sent [$];
  int cyc = 0, last_req = 0, nreq = 0, m_got = 0, s_got = 0;
  always @(posedge clk) cyc++;
  // sources: answer each tx_req with a new random frame
  always @(posedge clk) if (rst_n) begin
    m_tx_valid <= 0; s_tx_valid <= 0;
    if (m_tx_req) begin
      logic [47:0] f; f = {24'($urandom), 24'($urandom)};
      m_tl <= f[47:24]; m_tr <= f[23:0]; m_tx_valid <= 1; m_sent.push_back(f);
      if (nreq > 1) begin
        checks++; if (cyc - last_req != 1536) begin failures++; $display("frame period %0d", cyc - last_req); end
      end
      last_req = cyc; nreq++;
    end
    if (s_tx_req) begin
      logic [47:0] f; f = {24'($urandom), 24'($urandom)};
      s_tl <= f[47:24]; s_tr <= f[23:0]; s_tx_valid <= 1; s_sent.push_back(f);
    end
  end
  // the frame loaded at a tx_req was supplied at the previous tx_req
  always @(posedge clk) if (rst_n) begin
    if (s_rx_valid) begin
      s_got++;
      if (s_got > 2) begin
        checks++;
        if ({s_rl, s_rr} != m_sent[s_got - 2]) begin failures++; $display("slave rx %h exp %h", {s_rl, s_rr}, m_sent[s_got - 2]); end
      end
    end
    if (m_rx_valid) begin
      m_got++;
      if (m_got > 2) begin
        checks++;
        if ({m_rl, m_rr} != s_sent[m_got - 2]) begin failures++; $display("master rx %h exp %h", {m_rl, m_rr}, s_sent[m_got - 2]); end
      end
    end
  end
  initial begin
    m_tl = 0; m_tr = 0; s_tl = 0; s_tr = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    repeat (1536 * 40) @(posedge clk);
    checks++; if (s_got < 38 || m_got < 37) begin failures++; $display("frames %0d %0d", s_got, m_got); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
