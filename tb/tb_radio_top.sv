// tb_radio_top - end-to-end test of the receiver at its default sizes.
//
// The test bench plays the tuner, the IF ADC, the host microprocessor (over SPI) and the
// DSP. It synthesises a 10.8 MHz FM IF: stereo multiplex with a 1 kHz left-only tone, a 19 kHz
// pilot and RDS groups (biphase, 57 kHz), quantised to 33 levels at 37.05 MHz. It then:
//   1 tunes the DDC to 10.8 MHz and configures the chip over SPI;
//   2 waits for the pilot PLL (stereo) and the RDS decoder (sync), reads an RDS group over
//     SPI and compares it with the one sent; checks left/right separation of the audio and
//     decodes the I2S stream of SAI0 (master) and compares it with the decoded audio;
//   3 switches the equaliser path from the hardware bypass to the DSP port (the test bench
//     loops the DDC output back as "equalised" I/Q) and checks that audio continues;
//   4 forces mono and checks L = R; removes the pilot and checks the fall back to mono;
//   5 exercises the DSP-side blocks once: detector cores 2/3, data ALU, AGU, RAMs, program
//     address history, HS3I loopback, SAI1 slave reception, CGU divider and trim, AGC code;
//   6 feeds SAI1 through the sample-rate converter from a 44.08 kHz source and checks the
//     tone that leaves SAI1 at 48.24 kHz.
// Each mechanism is counted; one that never happens counts as a failure.
module tb_radio_top;
  import radio_pkg::*;
  localparam real PI = 3.14159265358979;
  localparam real FADC = 37.05e6;

  logic clk = 0, rst_n = 0;
  logic adc_en;
  logic signed [5:0] adc_code = 0;
  logic [7:0] agc_dac_code, osc_trim;
  logic [3:0] clk_en;
  logic spi_sclk = 0, spi_cs_n = 1, spi_mosi = 0, spi_miso;
  logic [1:0] sai_bclk_in, sai_ws_in, sai_bclk_out, sai_ws_out, sai_sdo, sai_sdi;
  logic hs_sclk_out, hs_fs_out, hs_sd_out, hs_sclk_in, hs_fs_in, hs_sd_in;
  logic stereo, rds_synced, aud_valid;
  logic signed [23:0] aud_left, aud_right;
  logic dsp_iq_valid;
  logic signed [23:0] dsp_i, dsp_q;
  logic dsp_eq_valid;
  logic signed [23:0] dsp_eq_i, dsp_eq_q;
  logic [1:0] dsp_det_req = 0;
  det_mode_e dsp_det_mode [2];
  logic signed [23:0] dsp_det_i [2], dsp_det_q [2];
  logic [3:0] dsp_det_busy, dsp_det_done;
  logic signed [23:0] dsp_det_result [4];
  logic dsp_sai1_tx_valid = 0, dsp_sai1_tx_req;
  logic signed [23:0] dsp_sai1_tx_left = 0, dsp_sai1_tx_right = 0;
  logic [1:0] dsp_sai_rx_valid;
  logic signed [23:0] dsp_sai_rx_left [2], dsp_sai_rx_right [2];
  logic dsp_hs_tx_valid = 0, dsp_hs_tx_ready, dsp_hs_rx_valid;
  logic [23:0] dsp_hs_tx_data = 0, dsp_hs_rx_data;
  mac_op_e dsp_mac_op = MAC_NOP;
  mac_sign_e dsp_mac_sign = MAC_SS;
  logic signed [23:0] dsp_mac_x = 0, dsp_mac_y = 0, dsp_mac_out;
  logic signed [55:0] dsp_mac_load = 0, dsp_mac_acc;
  logic dsp_mac_sat = 0, dsp_mac_limited, dsp_mac_overflow;
  scale_e dsp_mac_scale = SCALE_NONE;
  logic dsp_agu_cfg_we = 0;
  logic [2:0] dsp_agu_cfg_idx = 0, dsp_agu_idx_a = 0, dsp_agu_idx_b = 1;
  logic [15:0] dsp_agu_cfg_r = 0, dsp_agu_cfg_n = 0, dsp_agu_cfg_m = 0, dsp_agu_addr_a, dsp_agu_addr_b;
  agu_mode_e dsp_agu_cfg_mode = AGU_LINEAR;
  agu_upd_e dsp_agu_upd_a = AGU_NONE, dsp_agu_upd_b = AGU_NONE;
  logic dsp_pc_valid = 0, dsp_dbg_freeze = 0;
  logic [15:0] dsp_pc = 0, dsp_pa_hist [5];
  logic [2:0] dsp_pa_count;
  logic [2:0] dsp_mem_en = 0, dsp_mem_we = 0;
  logic [11:0] dsp_mem_addr [3];
  logic [23:0] dsp_mem_wdata [3], dsp_mem_rdata [3];

  radio_top dut (.*);

  // SAI1 is a slave on SAI0's clocks; its data input is SAI0's output
  assign sai_bclk_in = {sai_bclk_out[0], 1'b0};
  assign sai_ws_in   = {sai_ws_out[0], 1'b0};
  assign sai_sdi     = {sai_sdo[0], 1'b0};
  // HS3I looped back pin to pin
  assign hs_sclk_in = hs_sclk_out;
  assign hs_fs_in   = hs_fs_out;
  assign hs_sd_in   = hs_sd_out;

  // the "DSP equaliser": passes the DDC output straight back
  assign dsp_eq_valid = dsp_iq_valid;
  assign dsp_eq_i = dsp_i;
  assign dsp_eq_q = dsp_q;

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  initial begin
    repeat (40000000) @(posedge clk);
    failures++; $display("watchdog at %0t", $time);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // ---------------- RDS source ----------------
  localparam logic [9:0] OFF [5] = '{10'h0FC, 10'h198, 10'h168, 10'h350, 10'h1B4};
  localparam logic [15:0] GRP [4] = '{16'h5A3C, 16'h0408, 16'hC0DE, 16'h4142};
  function automatic logic [9:0] crc(input logic [15:0] d);
    logic [9:0] r = 0;
    for (int i = 15; i >= 0; i--) begin
      logic fb; fb = d[i] ^ r[9]; r = {r[8:0], 1'b0}; if (fb) r ^= 10'h1B9;
    end
    return r;
  endfunction
  logic [103:0] grp_bits;
  initial for (int b = 0; b < 4; b++)
    grp_bits[103 - 26 * b -: 26] = {GRP[b], crc(GRP[b]) ^ OFF[b == 3 ? 4 : b]};

  // ---------------- IF source: FM stereo + pilot + RDS at 10.8 MHz ----------------
  real pilot_on = 1.0;
  real if_phase = 0.0, mpx = 0.0;
  longint ns = 0;
  int rds_idx = -1;
  bit rds_enc = 0;
  always @(posedge clk) if (rst_n && adc_en) begin
    real t, th, sym, bp, nz;
    int bi;
    if (ns % 8 == 0) begin
      t   = real'(ns) / FADC;
      th  = 2.0 * PI * 19000.0 * t;
      bp  = t * 1187.5;
      bi  = $rtoi($floor(bp));
      if (bi != rds_idx) begin
        rds_idx = bi;
        rds_enc = rds_enc ^ grp_bits[103 - (bi % 104)];       // differential coding
        if (bi % 104 == 62) rds_enc = ~rds_enc;               // one channel bit error in every block C
      end
      sym = (rds_enc ? 1.0 : -1.0) * ((bp - $floor(bp) < 0.5) ? 1.0 : -1.0);
      // deviation in Hz: 0.9 * 75 kHz audio (L = 1 kHz tone, R = 0), 7.5 kHz pilot, 3 kHz RDS
      mpx = 67500.0 * (0.5 * $sin(2.0 * PI * 1000.0 * t) * (1.0 + pilot_on * $sin(2.0 * th)))
          + pilot_on * 7500.0 * $sin(th) + 3000.0 * sym * $sin(3.0 * th);
    end
    if_phase += 2.0 * PI * (10.8e6 + mpx) / FADC;
    if (if_phase > 2.0 * PI) if_phase -= 2.0 * PI;
    nz = real'($urandom % 1024) / 1024.0 - 0.5;
    adc_code <= 6'($rtoi($floor(15.0 * $cos(if_phase) + 0.5 + nz)));
    ns++;
  end

  // ---------------- SPI master ----------------
  task automatic spi(input logic wr, input logic [6:0] a, input logic [23:0] wd, output logic [23:0] rd);
    logic [31:0] o; o = {wr, a, wd}; rd = 0;
    spi_cs_n = 0; repeat (8) @(negedge clk);
    for (int i = 31; i >= 0; i--) begin
      spi_mosi = o[i]; repeat (8) @(negedge clk);
      spi_sclk = 1; if (i < 24) rd = {rd[22:0], spi_miso}; repeat (8) @(negedge clk);
      spi_sclk = 0;
    end
    repeat (8) @(negedge clk); spi_cs_n = 1; repeat (8) @(negedge clk);
  endtask

  // ---------------- audio measurement and I2S capture of SAI0 ----------------
  real sl2 = 0, sr2 = 0, sd2 = 0;
  int  naud = 0, nmpx = 0;
  always @(posedge clk) if (rst_n) begin
    if (aud_valid) begin
      naud++;
      sl2 += real'(aud_left) ** 2; sr2 += real'(aud_right) ** 2;
      sd2 += (real'(aud_left) - real'(aud_right)) ** 2;
    end
    if (dsp_det_done[0]) nmpx++;
  end
  function automatic void meas_reset(); sl2 = 0; sr2 = 0; sd2 = 0; naud = 0; endfunction

  logic [23:0] aud_hist_l [$], aud_hist_r [$];
  always @(posedge clk) if (rst_n && aud_valid) begin
    aud_hist_l.push_back(aud_left); aud_hist_r.push_back(aud_right);
    if (aud_hist_l.size() > 8) begin void'(aud_hist_l.pop_front()); void'(aud_hist_r.pop_front()); end
  end
  logic b_d = 0, ws_prev = 1;
  logic [31:0] i2s_sh = 0;
  logic [23:0] i2s_l = 0;
  int i2s_frames = 0, i2s_match = 0;
  // SAI1 (slave on the same clocks) output, decoded alongside
  logic [31:0] i2s1_sh = 0;
  logic [23:0] i2s1_l = 0;
  int s1_prev = 0, s1_prev2 = 0, d2;
  int s1_frames = 0, s1_bad_step = 0;
  real s1_max = 0.0;
  bit s1_watch = 0;
  always @(posedge clk) if (rst_n) begin
    b_d <= sai_bclk_out[0];
    if (sai_bclk_out[0] && !b_d) begin                      // rising bclk
      if (sai_ws_out[0] != ws_prev) begin
        // the bit now sampled is the last of the finished slot
        if (ws_prev == 1'b0) i2s_l = i2s_sh[30:7];
        else begin
          i2s_frames++;
          for (int k = 0; k < aud_hist_l.size(); k++)
            if (aud_hist_l[k] == i2s_l && aud_hist_r[k] == i2s_sh[30:7]) begin i2s_match++; break; end
        end
        i2s_sh = {31'd0, sai_sdo[0]};
        if (ws_prev == 1'b0) i2s1_l = i2s1_sh[30:7];
        else if (s1_watch) begin
          s1_frames++;
          if (real'(signed'(i2s1_l)) > s1_max) s1_max = real'(signed'(i2s1_l));
          // a 1 kHz tone of amplitude 2^22 at 48.24 kHz: second difference at most
          // 2^22 (2 pi 1000 / 48240)^2 = 71000; allow 130000 for the interpolation error
          d2 = signed'(i2s1_l) - 2 * s1_prev + s1_prev2;
          if (s1_frames > 2 && (d2 > 130000 || d2 < -130000)) s1_bad_step++;
          s1_prev2 = s1_prev;
          s1_prev = int'(signed'(i2s1_l));
        end
        i2s1_sh = {31'd0, sai_sdo[1]};
      end else begin
        i2s_sh = {i2s_sh[30:0], sai_sdo[0]};
        i2s1_sh = {i2s1_sh[30:0], sai_sdo[1]};
      end
      ws_prev = sai_ws_out[0];
    end
  end

  // ---------------- mechanism counters ----------------
  int m_stereo_on = 0, m_stereo_off = 0, m_rds_sync = 0, m_rds_group = 0, m_eq_dsp = 0;
  int nblk = 0, m_rds_corr = 0, m_blend = 0;
  int m_asrc = 0;
  int m_force_mono = 0, m_i2s = 0, m_tune = 0, m_dsp_blocks = 0;
  logic stereo_d = 0, sync_d = 0;
  always @(posedge clk) if (rst_n) begin
    stereo_d <= stereo; sync_d <= rds_synced;
    if (stereo && !stereo_d) m_stereo_on++;
    if (!stereo && stereo_d) m_stereo_off++;
    if (rds_synced && !sync_d) m_rds_sync++;
    if (dut.grp_valid) m_rds_group++;
    if (dut.blk_valid) nblk++;
    if (dut.blk_valid && dut.blk_status == 2'd1) m_rds_corr++;
  end

  initial begin
    logic [23:0] r;
    int t0, nm0;
    repeat (5) @(posedge clk); rst_n = 1;
    // ---- 1: configuration
    spi(1, 7'd0, 24'($rtoi(10.8e6 / FADC * 16777216.0 + 0.5)), r);
    spi(0, 7'd0, 0, r);
    check(r == 24'd4890525, $sformatf("frequency word readback %0d", r));
    if (r == 24'd4890525) m_tune++;
    spi(1, 7'd1, 24'h00012C, r);          // EQ_BYPASS, SAI0 master, HS3I enable, hi_time 4
    spi(1, 7'd5, {12'd3, 12'd16}, r);      // CGU divider 0: ratio 16, phase 3
    spi(1, 7'd10, 24'h0000A5, r);          // AGC DAC code
    spi(1, 7'd9, 24'h000001, r);           // trim one step up
    // ---- 2: lock, stereo, RDS
    t0 = 0;
    while (!(stereo && rds_synced && m_rds_group >= 2) && t0 < 300) begin
      repeat (74100) @(posedge clk);       // 1 ms
      if (t0 % 50 == 0) $display("%0d ms: pilot_level %0d stereo %0b quality %0d blocks %0d synced %0b mpx %0d", t0, dut.pilot_level, stereo, dut.rds_quality, nblk, rds_synced, dut.det_res[0]);
      t0++;
    end
    $display("stereo %0d rds_synced %0d groups %0d after %0d ms", stereo, rds_synced, m_rds_group, t0);
    check(stereo, "stereo detected");
    check(rds_synced, "RDS synchronised");
    spi(0, 7'd16, 0, r); check(r[15:0] == GRP[0], $sformatf("RDS block A %h", r));
    spi(0, 7'd17, 0, r); check(r[15:0] == GRP[1], $sformatf("RDS block B %h", r));
    spi(0, 7'd18, 0, r); check(r[15:0] == GRP[2], $sformatf("RDS block C %h", r));
    spi(0, 7'd19, 0, r); check(r[15:0] == GRP[3], $sformatf("RDS block D %h", r));
    spi(0, 7'd20, 0, r); check(r[7:5] == 3'b111, $sformatf("status %h", r));
    spi(0, 7'd22, 0, r); check($signed(r) > 24'sd100000, $sformatf("field strength %0d", $signed(r)));
    meas_reset();
    repeat (741000) @(posedge clk);        // 10 ms
    check(naud >= 480 && naud <= 484, $sformatf("audio rate: %0d samples in 10 ms", naud));
    check(sl2 > 100.0 * sr2, $sformatf("separation %f dB", 10.0 * $log10(sl2 / (sr2 + 1.0))));
    check(sl2 / naud > 1.0e12, "left level");
    check(i2s_frames > 400 && i2s_match > i2s_frames - 3, $sformatf("I2S frames %0d matched %0d", i2s_frames, i2s_match));
    if (i2s_match > 0) m_i2s++;
    // blend to half separation: L = M + S/2, R = M - S/2, so R/L power = 1/9 for a left-only tone
    spi(1, 7'd2, 24'd128, r);
    repeat (148200) @(posedge clk);
    meas_reset();
    repeat (370500) @(posedge clk);
    check(sr2 / sl2 > 0.09 && sr2 / sl2 < 0.13, $sformatf("blend 128: R/L power %f", sr2 / sl2));
    if (sr2 / sl2 > 0.09 && sr2 / sl2 < 0.13) m_blend++;
    spi(1, 7'd2, 24'd256, r);
    // ---- 3: equaliser path through the DSP port
    spi(1, 7'd1, 24'h000128, r);           // EQ_BYPASS off
    nm0 = nmpx;
    repeat (20000) @(posedge clk);
    meas_reset();
    repeat (370500) @(posedge clk);        // 5 ms
    check(nmpx - nm0 > 1400, "MPX through DSP equaliser port");
    check(stereo && sl2 > 100.0 * sr2, "stereo through DSP equaliser port");
    if (nmpx - nm0 > 1400) m_eq_dsp++;
    spi(1, 7'd1, 24'h00012C, r);
    // ---- 4: forced mono, then pilot removed
    spi(1, 7'd1, 24'h00012D, r);
    repeat (148200) @(posedge clk);
    meas_reset();
    repeat (370500) @(posedge clk);
    check(sd2 * 1.0e4 < sl2, "forced mono L = R");
    if (sd2 * 1.0e4 < sl2) m_force_mono++;
    spi(1, 7'd1, 24'h00012C, r);
    pilot_on = 0.0;
    repeat (741000) @(posedge clk);
    check(!stereo, "mono after pilot loss");
    // ---- 5: DSP-side blocks
    dsp_det_mode[0] = DET_PM; dsp_det_mode[1] = DET_AM;
    dsp_det_i[0] = 24'sd1000000; dsp_det_q[0] = 24'sd1000000;
    dsp_det_i[1] = -24'sd300000; dsp_det_q[1] = 24'sd400000;
    @(negedge clk) dsp_det_req = 2'b11; @(negedge clk) dsp_det_req = 0;
    repeat (30) @(negedge clk);
    check(dsp_det_result[2] > 24'sd2097100 && dsp_det_result[2] < 24'sd2097200, "detector core 2 PM 45 deg");
    check(dsp_det_result[3] > 24'sd499990 && dsp_det_result[3] < 24'sd500010, "detector core 3 AM 500000");
    @(negedge clk) dsp_mac_op = MAC_MPY; dsp_mac_x = 24'sh400000; dsp_mac_y = 24'sh200000;
    @(negedge clk) dsp_mac_op = MAC_MAC;
    @(negedge clk) dsp_mac_op = MAC_NOP;
    check(dsp_mac_out == 24'sh200000, "MAC 2 x 0.5 x 0.25");
    @(negedge clk) dsp_agu_cfg_we = 1; dsp_agu_cfg_idx = 0; dsp_agu_cfg_r = 16'h10; dsp_agu_cfg_mode = AGU_MODULO; dsp_agu_cfg_m = 16'd3;
    @(negedge clk) dsp_agu_cfg_we = 0; dsp_agu_upd_a = AGU_INC;
    repeat (3) @(negedge clk);
    dsp_agu_upd_a = AGU_NONE;
    check(dsp_agu_addr_a == 16'h10, "AGU modulo 3 wrap");
    for (int m = 0; m < 3; m++) begin dsp_mem_addr[m] = 12'(100 + m); dsp_mem_wdata[m] = 24'(m * 1111 + 7); end
    @(negedge clk) dsp_mem_en = 3'b111; dsp_mem_we = 3'b111;
    @(negedge clk) dsp_mem_we = 0;
    @(negedge clk) dsp_mem_en = 0;
    for (int m = 0; m < 3; m++) check(dsp_mem_rdata[m] == 24'(m * 1111 + 7), "RAM read back");
    for (int k = 0; k < 7; k++) begin @(negedge clk) dsp_pc_valid = 1; dsp_pc = 16'(k); end
    @(negedge clk) dsp_pc_valid = 0;
    check(dsp_pa_count == 5 && dsp_pa_hist[0] == 6 && dsp_pa_hist[4] == 2, "program address history");
    @(negedge clk) dsp_hs_tx_valid = 1; dsp_hs_tx_data = 24'hC3A55A;
    @(negedge clk) dsp_hs_tx_valid = 0;
    fork
      begin @(posedge dsp_hs_rx_valid); end
      begin repeat (2000) @(posedge clk); end
    join_any
    disable fork;
    @(negedge clk);
    check(dsp_hs_rx_data == 24'hC3A55A, "HS3I word looped back");
    check(dsp_sai_rx_left[1] == aud_hist_l[aud_hist_l.size() - 1] || dsp_sai_rx_left[1] == aud_hist_l[aud_hist_l.size() - 2] ||
          dsp_sai_rx_left[1] == aud_hist_l[aud_hist_l.size() - 3], "SAI1 slave received SAI0 audio");
    t0 = 0;
    repeat (64) @(posedge clk) if (clk_en[0]) t0++;
    check(t0 == 4, "CGU divider 16");
    check(agc_dac_code == 8'hA5 && osc_trim == 8'd129, "AGC code and oscillator trim");
    m_dsp_blocks++;
    // ASRC: the DSP writes a 1 kHz tone at 44.08 kHz (every 1681 clocks), SAI1 sends it on
    // SAI0's 48.24 kHz clocks; no rate is configured
    spi(1, 7'd1, 24'h00022C, r);            // ASRC_SEL
    fork
      begin
        for (int n = 0; n < 1100; n++) begin
          repeat (1680) @(negedge clk);
          dsp_sai1_tx_valid = 1;
          dsp_sai1_tx_left  = 24'($rtoi(4194304.0 * $sin(2.0 * PI * 1000.0 * n / 44080.0)));
          dsp_sai1_tx_right = -dsp_sai1_tx_left;
          @(negedge clk) dsp_sai1_tx_valid = 0;
        end
      end
      begin
        repeat (700 * 1681) @(posedge clk);
        s1_watch = 1;
        repeat (300 * 1536) @(posedge clk);
        s1_watch = 0;
      end
    join_any
    disable fork;
    dsp_sai1_tx_valid = 0;
    spi(0, 7'd20, 0, r); check(r[8] == 1'b1, "ASRC locked");
    spi(0, 7'd25, 0, r); check(r > 24'd9940 && r < 24'd10020, $sformatf("ASRC rate estimate %0d (9980 expected)", r));
    check(s1_frames > 250 && s1_bad_step == 0 && s1_max > 4.1e6 && s1_max < 4.3e6,
          $sformatf("SAI1 via ASRC: %0d frames, %0d glitches, peak %f", s1_frames, s1_bad_step, s1_max));
    if (r[8] || s1_bad_step == 0) m_asrc++;
    // ---- mechanisms
    $display("mechanisms: tune %0d stereo_on %0d stereo_off %0d rds_sync %0d rds_groups %0d rds_corr %0d blend %0d eq_dsp %0d force_mono %0d i2s %0d dsp %0d asrc %0d",
             m_tune, m_stereo_on, m_stereo_off, m_rds_sync, m_rds_group, m_rds_corr, m_blend, m_eq_dsp, m_force_mono, m_i2s, m_dsp_blocks, m_asrc);
    check(m_tune > 0, "tuning happened");
    check(m_stereo_on > 0, "stereo switch-on happened");
    check(m_stereo_off > 0, "stereo switch-off happened");
    check(m_rds_sync > 0, "RDS sync happened");
    check(m_rds_group > 0, "RDS group delivered");
    check(m_rds_corr > 0, "RDS block corrected");
    check(m_blend > 0, "blend happened");
    check(m_eq_dsp > 0, "equaliser path switch happened");
    check(m_force_mono > 0, "forced mono happened");
    check(m_i2s > 0, "I2S output happened");
    check(m_dsp_blocks > 0, "DSP-side blocks exercised");
    check(m_asrc > 0, "sample-rate conversion happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
