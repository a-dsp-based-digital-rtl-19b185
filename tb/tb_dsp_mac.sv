// tb_dsp_mac - random sequences of data ALU operations compared with a 64-bit integer model
// written here: fractional products (x*y*2), 56-bit accumulation, optional saturation to
// 48 bits, scaling, rounding and 24-bit limiting of the output, overflow flag, and a
// double-precision 48x48 multiply assembled from four partial products with MACSH.
module tb_dsp_mac;
  import radio_pkg::*;
  logic clk = 0, rst_n = 0, sat_mode = 0, limited, overflow;
  mac_op_e op = MAC_NOP;
  mac_sign_e sign_mode = MAC_SS;
  scale_e scale = SCALE_NONE;
  logic signed [23:0] x = 0, y = 0, out24;
  logic signed [55:0] acc_load = 0, acc;
  int checks = 0, failures = 0;
  dsp_mac dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  localparam longint MAX48 = 64'sh0000_7FFF_FFFF_FFFF;
  function automatic longint wrap56(longint v); return (v <<< 8) >>> 8; endfunction
  initial begin
    longint m, p, xs, ys, s, r, o; bit lim;
    m = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    for (int n = 0; n < 5000; n++) begin
      @(negedge clk);
      op = mac_op_e'($urandom % 8);
      sign_mode = mac_sign_e'($urandom % 3);
      scale = scale_e'($urandom % 3);
      sat_mode = ($urandom % 4) == 0;
      x = 24'($urandom); y = 24'($urandom);
      if (n % 7 == 0) begin x = 24'sh7FFFFF; y = 24'sh7FFFFF; end
      acc_load = 56'({$urandom, $urandom}) >>> ($urandom % 16);
      xs = (sign_mode == MAC_UU) ? longint'({40'd0, x}) : longint'(x);
      ys = (sign_mode == MAC_SS) ? longint'(y) : longint'({40'd0, y});
      p = xs * ys * 2;
      case (op)
        MAC_CLR:   s = 0;
        MAC_MPY:   s = p;
        MAC_MPYN:  s = -p;
        MAC_MAC:   s = m + p;
        MAC_MACN:  s = m - p;
        MAC_MACSH: s = (m >>> 24) + p;
        MAC_LOAD:  s = longint'(acc_load);
        default:   s = m;
      endcase
      s = wrap56(s);
      if (sat_mode && s > MAX48) s = MAX48;
      if (sat_mode && s < -MAX48 - 1) s = -MAX48 - 1;
      m = s;
      @(posedge clk); #1;
      checks++;
      if (longint'(acc) != m) begin failures++; $display("acc %h exp %h op %0d", acc, m, op); end
      // output path with the current scale
      r = (scale == SCALE_DOWN) ? (m >>> 1) : (scale == SCALE_UP) ? wrap56(m <<< 1) : m;
      r = r + 8388608;
      lim = 0;
      if (r > MAX48) begin o = 8388607; lim = 1; end
      else if (r < -MAX48 - 1) begin o = -8388608; lim = 1; end
      else o = r >>> 24;
      checks++;
      if (longint'(out24) != o || limited != lim) begin
        failures++; $display("out %0d exp %0d lim %0d", out24, o, lim);
      end
    end
    // double precision: a * b with a, b 48-bit fractions: hi*hi + (hi*lo + lo*hi) >> 24 ...
    begin
      logic signed [47:0] a, b;
      longint exp_hi;
      a = 48'sh3456_789A_BCDE; b = -48'sh1234_5678_9ABC;
      @(negedge clk) op = MAC_MPY; sign_mode = MAC_UU; sat_mode = 0; x = a[23:0]; y = b[23:0];
      @(negedge clk) op = MAC_MACSH; sign_mode = MAC_SU; x = a[47:24]; y = b[23:0];
      @(negedge clk) op = MAC_MAC;   sign_mode = MAC_SU; x = b[47:24]; y = a[23:0];
      @(negedge clk) op = MAC_MACSH; sign_mode = MAC_SS; x = a[47:24]; y = b[47:24];
      @(negedge clk) op = MAC_NOP; scale = SCALE_NONE;
      // reference: floor((a * b * 2) / 2^48) computed in pieces
      begin
        longint ah, al, bh, bl, t;
        ah = longint'(signed'(a[47:24])); al = longint'({40'd0, a[23:0]});
        bh = longint'(signed'(b[47:24])); bl = longint'({40'd0, b[23:0]});
        t = (al * bl * 2) >>> 24;
        t = t + ah * bl * 2 + bh * al * 2;
        t = (t >>> 24) + ah * bh * 2;
        exp_hi = t;
      end
      checks++;
      if (longint'(acc) != wrap56(exp_hi)) begin failures++; $display("double %h exp %h", acc, exp_hi); end
      // compare with the real product to 2^-46
      checks++;
      if ($itor(acc) - $itor(a) * $itor(b) * 2.0 / 2.0**48 > 4.0 ||
          $itor(acc) - $itor(a) * $itor(b) * 2.0 / 2.0**48 < -4.0) begin
        failures++; $display("double precision value off");
      end
    end
    // overflow flag
    @(negedge clk) op = MAC_LOAD; acc_load = 56'sh7F_FFFF_FFFF_FFFF; sat_mode = 0;
    @(negedge clk) op = MAC_MAC; sign_mode = MAC_SS; x = 24'sh7FFFFF; y = 24'sh7FFFFF;
    @(negedge clk) op = MAC_NOP;
    checks++; if (!overflow) begin failures++; $display("overflow not flagged"); end
    @(negedge clk) op = MAC_CLR;
    @(negedge clk) op = MAC_NOP;
    checks++; if (overflow) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
