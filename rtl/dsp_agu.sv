// dsp_agu - address generation unit of the 24-bit DSP.
//
// NPTR address registers R, each with an offset register N and a modifier: an addressing
// mode and a buffer size M. Two pointer updates per clock (ports a and b), as published,
// each in linear (by 1 or by the offset), modulo or reverse-carry arithmetic:
//   linear:  R +- 1, R +- N (wrapping at 2^AW);
//   modulo:  R stays inside a circular buffer of M words whose base is R with its low
//            ceil(log2 M) bits cleared; stepping past either end wraps around (|step| <= M);
//   reverse: the carry of R + 1 or R + N propagates from the most to the least significant
//            bit (bit-reversed addressing for FFTs, N usually half the FFT size).
// The address used by the access is the register value before the update (post-update).
// The modes are the published ones; their register layout, the base rule for modulo buffers
// and the port structure are this design's own choices.
//
// Interface: cfg_we writes R, N, mode and M of pointer cfg_idx. upd_a/upd_b select an update
// of pointers idx_a/idx_b (if both name the same pointer, port a wins); addr_a/addr_b are
// the current values, combinational.
module dsp_agu #(
  parameter int NPTR = 8,
  parameter int AW   = 16
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     cfg_we,
  input  logic [$clog2(NPTR)-1:0]  cfg_idx,
  input  logic [AW-1:0]            cfg_r,
  input  logic [AW-1:0]            cfg_n,
  input  radio_pkg::agu_mode_e     cfg_mode,
  input  logic [AW-1:0]            cfg_m,
  input  radio_pkg::agu_upd_e      upd_a,
  input  logic [$clog2(NPTR)-1:0]  idx_a,
  input  radio_pkg::agu_upd_e      upd_b,
  input  logic [$clog2(NPTR)-1:0]  idx_b,
  output logic [AW-1:0]            addr_a,
  output logic [AW-1:0]            addr_b
);
  import radio_pkg::*;

  logic [AW-1:0] r [NPTR];
  logic [AW-1:0] n [NPTR];
  logic [AW-1:0] m [NPTR];
  agu_mode_e     md [NPTR];

  function automatic logic [AW-1:0] bitrev(input logic [AW-1:0] v);
    for (int k = 0; k < AW; k++) bitrev[k] = v[AW-1-k];
  endfunction

  function automatic logic [AW-1:0] update(input logic [AW-1:0] rv, input logic [AW-1:0] nv,
                                           input agu_mode_e mode, input logic [AW-1:0] mv,
                                           input agu_upd_e u);
    logic [AW-1:0] step, mask, base, off, lim;
    logic          neg;
    logic [AW:0]   t;
    step = (u == AGU_INC_N || u == AGU_DEC_N) ? nv : AW'(1);
    neg  = (u == AGU_DEC || u == AGU_DEC_N);
    if (u == AGU_NONE) return rv;
    unique case (mode)
      AGU_MODULO: begin
        mask = '0;
        for (int k = 0; k < AW; k++) if ((AW'(1) << k) < mv) mask[k] = 1'b1;
        base = rv & ~mask;
        off  = rv & mask;
        lim  = (mv == '0) ? AW'(1) : mv;
        if (neg) begin
          t = (AW+1)'(off) - (AW+1)'(step);
          if (t[AW]) t = t + (AW+1)'(lim);
        end else begin
          t = (AW+1)'(off) + (AW+1)'(step);
          if (t >= (AW+1)'(lim)) t = t - (AW+1)'(lim);
        end
        return base | AW'(t);
      end
      AGU_REVERSE:
        return neg ? bitrev(bitrev(rv) - bitrev(step)) : bitrev(bitrev(rv) + bitrev(step));
      default:
        return neg ? rv - step : rv + step;
    endcase
  endfunction

  assign addr_a = r[idx_a];
  assign addr_b = r[idx_b];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < NPTR; k++) begin
        r[k] <= '0; n[k] <= '0; m[k] <= '0; md[k] <= AGU_LINEAR;
      end
    end else begin
      if (upd_b != AGU_NONE)
        r[idx_b] <= update(r[idx_b], n[idx_b], md[idx_b], m[idx_b], upd_b);
      if (upd_a != AGU_NONE)
        r[idx_a] <= update(r[idx_a], n[idx_a], md[idx_a], m[idx_a], upd_a);
      if (cfg_we) begin
        r[cfg_idx] <= cfg_r; n[cfg_idx] <= cfg_n; m[cfg_idx] <= cfg_m; md[cfg_idx] <= cfg_mode;
      end
    end
  end
endmodule
