// dsp_mac - data ALU multiply-accumulate unit of the 24-bit DSP.
//
// One operation per clock on a 56-bit accumulator (8 extension bits over a 48-bit
// fractional product), as published: a 24x24-bit multiply and a 56-bit addition in the same
// cycle, scaling and saturation arithmetic, and support for double-precision 48x48-bit
// multiplication. Operands are fractional (Q23); the product is shifted left by one so it is
// Q47, as in fractional DSPs. Double precision is built in software from four partial
// products: the operand signedness is selectable (ss, su, uu) and MACSH first shifts the
// accumulator right by 24 bits, so that the partial products line up.
// Saturating mode clamps the accumulator to the 48-bit range after each operation; the
// 24-bit output is the accumulator scaled (none, down = /2, up = x2), rounded to nearest and
// limited to the 24-bit range when the extension bits are in use. The opcode set, the
// rounding and the encodings are this design's own choices.
//
// Interface: op/x/y/sign_mode are taken each clock; acc and the flags update at the clock
// edge; out24 and limited are combinational from acc.
module dsp_mac (
  input  logic                clk,
  input  logic                rst_n,
  input  radio_pkg::mac_op_e  op,
  input  radio_pkg::mac_sign_e sign_mode,
  input  logic signed [23:0]  x,
  input  logic signed [23:0]  y,
  input  logic signed [55:0]  acc_load,
  input  logic                sat_mode,
  input  radio_pkg::scale_e   scale,
  output logic signed [55:0]  acc,
  output logic signed [23:0]  out24,
  output logic                limited,
  output logic                overflow
);
  import radio_pkg::*;

  logic signed [25:0] xe, ye;
  logic signed [51:0] p52;
  logic signed [55:0] prod, sum, nxt;
  logic signed [56:0] wide;
  logic signed [55:0] scaled, rnd;

  always_comb begin
    xe = (sign_mode == MAC_UU) ? 26'({2'b00, x}) : 26'(x);
    ye = (sign_mode == MAC_SS) ? 26'(y) : 26'({2'b00, y});
    p52  = xe * ye;
    prod = 56'(p52) <<< 1;
    unique case (op)
      MAC_CLR:   wide = '0;
      MAC_MPY:   wide = 57'(prod);
      MAC_MPYN:  wide = -57'(prod);
      MAC_MAC:   wide = 57'(acc) + 57'(prod);
      MAC_MACN:  wide = 57'(acc) - 57'(prod);
      MAC_MACSH: wide = 57'(acc >>> 24) + 57'(prod);
      MAC_LOAD:  wide = 57'(acc_load);
      default:   wide = 57'(acc);
    endcase
    sum = wide[55:0];
    nxt = sum;
    if (sat_mode) begin
      if (sum > 56'sh0000_7FFF_FFFF_FFFF)       nxt = 56'sh0000_7FFF_FFFF_FFFF;
      else if (sum < -56'sh0000_8000_0000_0000) nxt = -56'sh0000_8000_0000_0000;
    end
    // readout: scale, round at bit 23, limit to 24 bits
    unique case (scale)
      SCALE_DOWN: scaled = acc >>> 1;
      SCALE_UP:   scaled = acc <<< 1;
      default:    scaled = acc;
    endcase
    rnd = scaled + 56'sd8388608;
    if (rnd > 56'sh0000_7FFF_FFFF_FFFF) begin
      out24 = 24'sh7FFFFF; limited = 1'b1;
    end else if (rnd < -56'sh0000_8000_0000_0000) begin
      out24 = -24'sh800000; limited = 1'b1;
    end else begin
      out24 = rnd[47:24]; limited = 1'b0;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc <= '0; overflow <= 1'b0;
    end else begin
      acc <= nxt;
      // sticky: the 56-bit result itself wrapped
      if (wide[56] != wide[55]) overflow <= 1'b1;
      if (op == MAC_CLR) overflow <= 1'b0;
    end
  end
endmodule
