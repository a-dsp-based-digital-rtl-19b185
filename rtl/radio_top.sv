// radio_top - digital IF AM/FM car-radio receiver: the hardware around the DSP core.
//
// The 10.7 MHz IF is sampled by the external sigma-delta ADC at 37.05 MHz (adc_code, one
// 33-level code per adc_en). The DDC brings the wanted channel to zero IF and decimates to
// 289.45 kHz I/Q. With the equaliser bypassed (ctrl bit EQ_BYPASS, default set) the I/Q go
// straight to AM/FM detector core 0 (FM) and core 1 (AM, the level for the field strength
// filter); otherwise the DSP feeds both cores with its equalised I/Q (dsp_eq_*), as the
// software CMA equaliser does in the published system. The FM MPX from core 0 drives the
// stereo decoder, whose audio goes to SAI0, and the RDS demodulator and decoder, whose
// groups can be read over SPI. Detector cores 2 and 3, SAI1, the HS3I (antenna-diversity
// link), the DSP data ALU, address generation unit, program address history and the RAMs
// are brought out on dsp_* ports, where the DSP core (not part of this RTL) connects. SAI1
// transmits the DSP's words either directly or, with ASRC_SEL, through the sample-rate
// converter, so the DSP can write at its own rate while SAI1 runs on external clocks.
//
// Control: an SPI register file stands in for the DSP's peripheral registers:
//   0 DDC frequency word (reset 10.7 MHz / 37.05 MHz * 2^24)
//   1 bits: 0 force mono, 1 75 us de-emphasis, 2 EQ_BYPASS, 3 SAI0 master, 4 SAI1 master,
//     5 HS3I enable, 8:6 HS3I clock high time, 9 ASRC_SEL (SAI1 fed by the ASRC)
//   2 stereo blend (Q8, 256 = full)      3 high-cut alpha (Q16, 65536 = off)
//   4 soft-mute gain (Q8, 256 = unity)  5..8 CGU divider k: ratio [11:0], phase [23:12]
//   9 oscillator trim: writing bit 0 steps up, bit 1 steps down
//  10 AGC keying DAC code [7:0]
// Status (read at 16 + k): 0..3 RDS group blocks A..D, 4 {ASRC locked [8], group ready [7],
// RDS synced [6], stereo [5], last block status [4:3], last block type [2:0]}, 5 pilot
// level, 6 field strength, 7 oscillator trim, 8 RDS quality, 9 ASRC rate estimate (2^24 /
// input period in clocks). A write to address 20 clears the group-ready flag.
// The block set and the data flow follow the published block diagrams; the register map,
// the bypass path and the use of SPI in place of the DSP bus are this design's choices.
module radio_top
  import radio_pkg::*;
(
  input  logic                    clk,          // 74.1 MHz master clock
  input  logic                    rst_n,
  // IF ADC
  output logic                    adc_en,
  input  logic signed [ADC_W-1:0] adc_code,
  // tuner AGC keying DAC code and oscillator bias trim (analog parts)
  output logic [7:0]              agc_dac_code,
  output logic [7:0]              osc_trim,
  output logic [3:0]              clk_en,       // CGU programmable strobes
  // SPI control
  input  logic                    spi_sclk,
  input  logic                    spi_cs_n,
  input  logic                    spi_mosi,
  output logic                    spi_miso,
  // SAI0: decoded audio out, SAI1: DSP audio
  input  logic [1:0]              sai_bclk_in,
  input  logic [1:0]              sai_ws_in,
  output logic [1:0]              sai_bclk_out,
  output logic [1:0]              sai_ws_out,
  output logic [1:0]              sai_sdo,
  input  logic [1:0]              sai_sdi,
  // HS3I pins
  output logic                    hs_sclk_out,
  output logic                    hs_fs_out,
  output logic                    hs_sd_out,
  input  logic                    hs_sclk_in,
  input  logic                    hs_fs_in,
  input  logic                    hs_sd_in,
  // status for the system
  output logic                    stereo,
  output logic                    rds_synced,
  output logic                    aud_valid,
  output logic signed [AUD_W-1:0] aud_left,
  output logic signed [AUD_W-1:0] aud_right,
  // ---- DSP side ----
  output logic                    dsp_iq_valid,
  output logic signed [IQ_W-1:0]  dsp_i,
  output logic signed [IQ_W-1:0]  dsp_q,
  input  logic                    dsp_eq_valid,
  input  logic signed [IQ_W-1:0]  dsp_eq_i,
  input  logic signed [IQ_W-1:0]  dsp_eq_q,
  input  logic [1:0]              dsp_det_req,       // detector cores 2, 3
  input  det_mode_e               dsp_det_mode [2],
  input  logic signed [IQ_W-1:0]  dsp_det_i [2],
  input  logic signed [IQ_W-1:0]  dsp_det_q [2],
  output logic [3:0]              dsp_det_busy,
  output logic [3:0]              dsp_det_done,
  output logic signed [IQ_W-1:0]  dsp_det_result [4],
  input  logic                    dsp_sai1_tx_valid,
  input  logic signed [AUD_W-1:0] dsp_sai1_tx_left,
  input  logic signed [AUD_W-1:0] dsp_sai1_tx_right,
  output logic                    dsp_sai1_tx_req,
  output logic [1:0]              dsp_sai_rx_valid,
  output logic signed [AUD_W-1:0] dsp_sai_rx_left [2],
  output logic signed [AUD_W-1:0] dsp_sai_rx_right [2],
  input  logic                    dsp_hs_tx_valid,
  input  logic [AUD_W-1:0]        dsp_hs_tx_data,
  output logic                    dsp_hs_tx_ready,
  output logic                    dsp_hs_rx_valid,
  output logic [AUD_W-1:0]        dsp_hs_rx_data,
  // data ALU
  input  mac_op_e                 dsp_mac_op,
  input  mac_sign_e               dsp_mac_sign,
  input  logic signed [23:0]      dsp_mac_x,
  input  logic signed [23:0]      dsp_mac_y,
  input  logic signed [55:0]      dsp_mac_load,
  input  logic                    dsp_mac_sat,
  input  scale_e                  dsp_mac_scale,
  output logic signed [55:0]      dsp_mac_acc,
  output logic signed [23:0]      dsp_mac_out,
  output logic                    dsp_mac_limited,
  output logic                    dsp_mac_overflow,
  // address generation
  input  logic                    dsp_agu_cfg_we,
  input  logic [2:0]              dsp_agu_cfg_idx,
  input  logic [15:0]             dsp_agu_cfg_r,
  input  logic [15:0]             dsp_agu_cfg_n,
  input  agu_mode_e               dsp_agu_cfg_mode,
  input  logic [15:0]             dsp_agu_cfg_m,
  input  agu_upd_e                dsp_agu_upd_a,
  input  logic [2:0]              dsp_agu_idx_a,
  input  agu_upd_e                dsp_agu_upd_b,
  input  logic [2:0]              dsp_agu_idx_b,
  output logic [15:0]             dsp_agu_addr_a,
  output logic [15:0]             dsp_agu_addr_b,
  // program address history (debug)
  input  logic                    dsp_pc_valid,
  input  logic [15:0]             dsp_pc,
  input  logic                    dsp_dbg_freeze,
  output logic [15:0]             dsp_pa_hist [5],
  output logic [2:0]              dsp_pa_count,
  // memories: 0 program RAM, 1 X data RAM, 2 Y data RAM
  input  logic [2:0]              dsp_mem_en,
  input  logic [2:0]              dsp_mem_we,
  input  logic [11:0]             dsp_mem_addr [3],
  input  logic [23:0]             dsp_mem_wdata [3],
  output logic [23:0]             dsp_mem_rdata [3]
);
  // ---------------- control registers ----------------
  localparam int NREG = 16, NSTAT = 16;
  localparam logic [23:0] REG_RESET [NREG] = '{
    24'(FREQ_10M7), 24'h000004, 24'd256, 24'd65536, 24'd256, 24'd0, 24'd0, 24'd0, 24'd0,
    24'd0, 24'd128, 24'd0, 24'd0, 24'd0, 24'd0, 24'd0};
  logic [23:0] regs [NREG];
  logic [23:0] stat [NSTAT];
  logic        wr_pulse;
  logic [6:0]  wr_addr;

  spi_ctrl #(.NREG(NREG), .NSTAT(NSTAT), .DW(24), .RESET_VAL(REG_RESET)) u_spi (
    .clk, .rst_n, .sclk(spi_sclk), .cs_n(spi_cs_n), .mosi(spi_mosi), .miso(spi_miso),
    .regs, .stat, .wr_pulse, .wr_addr);

  logic force_mono, deemph_75us, eq_bypass, sai0_master, sai1_master, hs_en;
  assign force_mono   = regs[1][0];
  assign deemph_75us  = regs[1][1];
  assign eq_bypass    = regs[1][2];
  assign sai0_master  = regs[1][3];
  assign sai1_master  = regs[1][4];
  assign hs_en        = regs[1][5];
  assign agc_dac_code = regs[10][7:0];

  // ---------------- clock generation ----------------
  logic [11:0] div_ratio [4];
  logic [11:0] div_phase [4];
  for (genvar k = 0; k < 4; k++) begin : g_cgu_cfg
    assign div_ratio[k] = regs[5+k][11:0];
    assign div_phase[k] = regs[5+k][23:12];
  end

  cgu #(.NDIV(4), .DIV_W(12), .TRIM_W(8)) u_cgu (
    .clk, .rst_n, .div_ratio, .div_phase,
    .trim_up(wr_pulse && wr_addr == 7'd9 && regs[9][0]),
    .trim_dn(wr_pulse && wr_addr == 7'd9 && regs[9][1]),
    .adc_en, .div_en(clk_en), .osc_trim);

  // ---------------- DDC ----------------
  logic                   iq_valid;
  logic signed [IQ_W-1:0] ddc_i, ddc_q;
  ddc u_ddc (.clk, .rst_n, .adc_valid(adc_en), .adc_code, .freq(regs[0]),
             .iq_valid, .i_out(ddc_i), .q_out(ddc_q));
  assign dsp_iq_valid = iq_valid;
  assign dsp_i = ddc_i;
  assign dsp_q = ddc_q;

  // ---------------- AM/FM detector ----------------
  logic [3:0]             det_req;
  det_mode_e              det_mode [4];
  logic signed [IQ_W-1:0] det_i [4];
  logic signed [IQ_W-1:0] det_q [4];
  logic signed [IQ_W-1:0] det_res [4];

  always_comb begin
    det_req[0]  = eq_bypass ? iq_valid : dsp_eq_valid;
    det_req[1]  = det_req[0];
    det_mode[0] = DET_FM;
    det_mode[1] = DET_AM;
    det_i[0]    = eq_bypass ? ddc_i : dsp_eq_i;
    det_q[0]    = eq_bypass ? ddc_q : dsp_eq_q;
    det_i[1]    = det_i[0];
    det_q[1]    = det_q[0];
    for (int k = 0; k < 2; k++) begin
      det_req[2+k]  = dsp_det_req[k];
      det_mode[2+k] = dsp_det_mode[k];
      det_i[2+k]    = dsp_det_i[k];
      det_q[2+k]    = dsp_det_q[k];
    end
  end

  amfm_detector #(.NCORES(4), .W(IQ_W)) u_det (
    .clk, .rst_n, .req(det_req), .mode(det_mode), .i_in(det_i), .q_in(det_q),
    .busy(dsp_det_busy), .done(dsp_det_done), .result(det_res));
  assign dsp_det_result = det_res;

  // AM level held for the field-strength filter
  logic signed [IQ_W-1:0] am_level;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)               am_level <= '0;
    else if (dsp_det_done[1]) am_level <= det_res[1];
  end

  // ---------------- stereo decoder ----------------
  logic [PHASE_W-1:0]     pilot_phase;
  logic signed [AUD_W-1:0] pilot_level, field_strength;
  stereo_decoder u_stereo (
    .clk, .rst_n, .mpx_valid(dsp_det_done[0]), .mpx(det_res[0]), .level(am_level),
    .force_mono, .blend(regs[2][8:0]), .highcut_alpha(regs[3][16:0]), .deemph_75us,
    .mute_gain(regs[4][8:0]), .pilot_phase, .stereo, .pilot_level, .field_strength,
    .aud_valid, .left(aud_left), .right(aud_right));

  // ---------------- RDS ----------------
  logic        rds_bit_valid, rds_bit;
  logic [23:0] rds_quality;
  logic        blk_valid, grp_valid;
  logic [15:0] blk_data;
  logic [2:0]  blk_type;
  logic [1:0]  blk_status;
  logic [15:0] grp [4];

  rds_demod u_rds_demod (
    .clk, .rst_n, .mpx_valid(dsp_det_done[0]), .mpx(det_res[0]), .pilot_phase,
    .bit_valid(rds_bit_valid), .bit_out(rds_bit), .quality(rds_quality));
  rds_decoder u_rds_dec (
    .clk, .rst_n, .bit_valid(rds_bit_valid), .bit_in(rds_bit), .synced(rds_synced),
    .block_valid(blk_valid), .block_data(blk_data), .block_type(blk_type),
    .block_status(blk_status), .group_valid(grp_valid), .group(grp));

  logic [2:0] last_type;
  logic [1:0] last_status;
  logic       grp_flag;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      last_type <= '0; last_status <= '0; grp_flag <= 1'b0;
    end else begin
      if (blk_valid) begin
        last_type <= blk_type; last_status <= blk_status;
      end
      if (grp_valid) grp_flag <= 1'b1;
      else if (wr_pulse && wr_addr == 7'd20) grp_flag <= 1'b0;   // host acknowledges
    end
  end

  // sample-rate converter signals, read by the status words and wired below
  logic                    asrc_sel, asrc_valid, asrc_locked, sai1_tx_valid;
  logic signed [AUD_W-1:0] asrc_left, asrc_right, sai1_tx_left, sai1_tx_right;
  logic [23:0]             asrc_step;

  always_comb begin
    for (int k = 0; k < NSTAT; k++) stat[k] = '0;
    for (int k = 0; k < 4; k++) stat[k] = {8'd0, grp[k]};
    stat[4] = {15'd0, asrc_locked, grp_flag, rds_synced, stereo, last_status, last_type};
    stat[5] = pilot_level;
    stat[6] = field_strength;
    stat[7] = {16'd0, osc_trim};
    stat[8] = rds_quality;
    stat[9] = asrc_step;
  end

  // ---------------- serial audio interfaces ----------------
  assign asrc_sel = regs[1][9];

  asrc u_asrc (
    .clk, .rst_n, .in_valid(dsp_sai1_tx_valid), .in_left(dsp_sai1_tx_left),
    .in_right(dsp_sai1_tx_right), .out_req(dsp_sai1_tx_req), .out_valid(asrc_valid),
    .out_left(asrc_left), .out_right(asrc_right), .locked(asrc_locked), .step(asrc_step));

  assign sai1_tx_valid = asrc_sel ? asrc_valid : dsp_sai1_tx_valid;
  assign sai1_tx_left  = asrc_sel ? asrc_left  : dsp_sai1_tx_left;
  assign sai1_tx_right = asrc_sel ? asrc_right : dsp_sai1_tx_right;

  sai u_sai0 (
    .clk, .rst_n, .master(sai0_master), .bclk_in(sai_bclk_in[0]), .ws_in(sai_ws_in[0]),
    .bclk_out(sai_bclk_out[0]), .ws_out(sai_ws_out[0]), .sdo(sai_sdo[0]), .sdi(sai_sdi[0]),
    .tx_valid(aud_valid), .tx_left(aud_left), .tx_right(aud_right), .tx_req(),
    .rx_valid(dsp_sai_rx_valid[0]), .rx_left(dsp_sai_rx_left[0]),
    .rx_right(dsp_sai_rx_right[0]));
  sai u_sai1 (
    .clk, .rst_n, .master(sai1_master), .bclk_in(sai_bclk_in[1]), .ws_in(sai_ws_in[1]),
    .bclk_out(sai_bclk_out[1]), .ws_out(sai_ws_out[1]), .sdo(sai_sdo[1]), .sdi(sai_sdi[1]),
    .tx_valid(sai1_tx_valid), .tx_left(sai1_tx_left), .tx_right(sai1_tx_right),
    .tx_req(dsp_sai1_tx_req),
    .rx_valid(dsp_sai_rx_valid[1]), .rx_left(dsp_sai_rx_left[1]),
    .rx_right(dsp_sai_rx_right[1]));

  // ---------------- HS3I ----------------
  hs3i u_hs3i (
    .clk, .rst_n, .en(hs_en), .hi_time(regs[1][8:6]),
    .tx_valid(dsp_hs_tx_valid), .tx_data(dsp_hs_tx_data), .tx_ready(dsp_hs_tx_ready),
    .sclk_out(hs_sclk_out), .fs_out(hs_fs_out), .sd_out(hs_sd_out),
    .sclk_in(hs_sclk_in), .fs_in(hs_fs_in), .sd_in(hs_sd_in),
    .rx_valid(dsp_hs_rx_valid), .rx_data(dsp_hs_rx_data));

  // ---------------- DSP data ALU, AGU, debug history ----------------
  dsp_mac u_mac (
    .clk, .rst_n, .op(dsp_mac_op), .sign_mode(dsp_mac_sign), .x(dsp_mac_x), .y(dsp_mac_y),
    .acc_load(dsp_mac_load), .sat_mode(dsp_mac_sat), .scale(dsp_mac_scale),
    .acc(dsp_mac_acc), .out24(dsp_mac_out), .limited(dsp_mac_limited),
    .overflow(dsp_mac_overflow));

  dsp_agu #(.NPTR(8), .AW(16)) u_agu (
    .clk, .rst_n, .cfg_we(dsp_agu_cfg_we), .cfg_idx(dsp_agu_cfg_idx), .cfg_r(dsp_agu_cfg_r),
    .cfg_n(dsp_agu_cfg_n), .cfg_mode(dsp_agu_cfg_mode), .cfg_m(dsp_agu_cfg_m),
    .upd_a(dsp_agu_upd_a), .idx_a(dsp_agu_idx_a), .upd_b(dsp_agu_upd_b), .idx_b(dsp_agu_idx_b),
    .addr_a(dsp_agu_addr_a), .addr_b(dsp_agu_addr_b));

  pa_history #(.DEPTH(5), .AW(16)) u_pah (
    .clk, .rst_n, .pc_valid(dsp_pc_valid), .pc(dsp_pc), .freeze(dsp_dbg_freeze),
    .hist(dsp_pa_hist), .count(dsp_pa_count));

  // ---------------- memories ----------------
  sp_ram #(.W(24), .DEPTH(4096)) u_pram (
    .clk, .en(dsp_mem_en[0]), .we(dsp_mem_we[0]), .addr(dsp_mem_addr[0]),
    .wdata(dsp_mem_wdata[0]), .rdata(dsp_mem_rdata[0]));
  sp_ram #(.W(24), .DEPTH(3072)) u_xram (
    .clk, .en(dsp_mem_en[1]), .we(dsp_mem_we[1]), .addr(dsp_mem_addr[1]),
    .wdata(dsp_mem_wdata[1]), .rdata(dsp_mem_rdata[1]));
  sp_ram #(.W(24), .DEPTH(3072)) u_yram (
    .clk, .en(dsp_mem_en[2]), .we(dsp_mem_we[2]), .addr(dsp_mem_addr[2]),
    .wdata(dsp_mem_wdata[2]), .rdata(dsp_mem_rdata[2]));
endmodule
