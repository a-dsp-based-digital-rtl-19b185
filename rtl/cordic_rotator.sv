// cordic_rotator - CORDIC mixer of the digital down converter.
//
// Converts a real IF sample x to complex baseband by rotating the vector (x, 0) by -angle:
//   i = K x cos(angle),  q = -K x sin(angle),  K = 1.6468 (CORDIC gain, not removed here;
//   the following filters only scale the signal).
// Using a CORDIC instead of a multiplier mixer follows the published design. The structure
// is this design's own: a pre-rotation by 180 degrees folds the angle into +-90 degrees, then
// ITER shift-and-add stages, one per pipeline register, so one sample can enter every clock.
//
// Interface: in_valid/x_in/angle enter together; out_valid/i_out/q_out appear ITER+1 clocks
// later. x_in is a signed IN_W-bit code, placed at bit FRAC of the W-bit datapath, so the
// output full scale is about 1.65 * 2^(IN_W-1+FRAC).
module cordic_rotator #(
  parameter int IN_W    = radio_pkg::ADC_W,
  parameter int W       = 20,
  parameter int FRAC    = 12,
  parameter int ITER    = 18,
  parameter int PHASE_W = radio_pkg::PHASE_W
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic signed [IN_W-1:0] x_in,
  input  logic [PHASE_W-1:0]  angle,
  output logic                out_valid,
  output logic signed [W-1:0] i_out,
  output logic signed [W-1:0] q_out
);
  import radio_pkg::*;

  logic signed [W-1:0]       xs [ITER+1];
  logic signed [W-1:0]       ys [ITER+1];
  logic signed [PHASE_W-1:0] zs [ITER+1];
  logic [ITER:0]             vs;

  // angle table scaled to PHASE_W bits
  function automatic logic signed [PHASE_W-1:0] atan_i(input int k);
    return PHASE_W'(ATAN_TAB[k] >> (24 - PHASE_W));
  endfunction

  // stage 0: rotate by -angle; fold into [-90, 90) degrees
  logic [PHASE_W-1:0] phi;
  logic signed [W-1:0] x_ext;
  always_comb begin
    phi   = -angle;
    x_ext = W'(x_in) <<< FRAC;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      vs <= '0;
      for (int k = 0; k <= ITER; k++) begin
        xs[k] <= '0; ys[k] <= '0; zs[k] <= '0;
      end
    end else begin
      vs <= {vs[ITER-1:0], in_valid};
      // quadrant fold: phi in [90, 270) degrees -> negate x, phi -= 180 degrees
      if (phi[PHASE_W-1] ^ phi[PHASE_W-2]) begin
        xs[0] <= -x_ext;
        zs[0] <= signed'(phi - {1'b1, {(PHASE_W-1){1'b0}}});
      end else begin
        xs[0] <= x_ext;
        zs[0] <= signed'(phi);
      end
      ys[0] <= '0;
      for (int k = 0; k < ITER; k++) begin
        if (zs[k] >= 0) begin
          xs[k+1] <= xs[k] - (ys[k] >>> k);
          ys[k+1] <= ys[k] + (xs[k] >>> k);
          zs[k+1] <= zs[k] - atan_i(k);
        end else begin
          xs[k+1] <= xs[k] + (ys[k] >>> k);
          ys[k+1] <= ys[k] - (xs[k] >>> k);
          zs[k+1] <= zs[k] + atan_i(k);
        end
      end
    end
  end

  assign out_valid = vs[ITER];
  assign i_out     = xs[ITER];
  assign q_out     = ys[ITER];
endmodule
