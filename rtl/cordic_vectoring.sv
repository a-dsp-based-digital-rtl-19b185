// cordic_vectoring - serial CORDIC in vectoring mode: magnitude and phase of an I/Q sample.
//
// The vector (i, q) is first folded into the right half plane (negated, with the angle
// started at 180 degrees, when i < 0), then rotated towards the x axis by ITER shift-and-add
// iterations, one per clock, on a single adder set, with 6 guard bits below the input LSB.
// The accumulated rotation is the phase; the final x, times 1/K = 0.60725 (Q16 constant
// 39797), is the magnitude. The serial CORDIC is
// the published choice for the AM/FM detector; widths, iteration count and the gain
// correction are this design's.
//
// Interface: start (while !busy) loads i_in/q_in. done pulses ITER+2 clocks later with
// mag (unsigned, W+1 bits, saturating is not needed: |v| < 2^W * sqrt 2 fits W+1 bits) and
// phase (PHASE_W-bit fraction of a turn, 0 = positive i axis, counter-clockwise).
module cordic_vectoring #(
  parameter int W       = radio_pkg::IQ_W,
  parameter int ITER    = 24,
  parameter int PHASE_W = radio_pkg::PHASE_W
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                start,
  input  logic signed [W-1:0] i_in,
  input  logic signed [W-1:0] q_in,
  output logic                busy,
  output logic                done,
  output logic [W:0]          mag,
  output logic [PHASE_W-1:0]  phase
);
  import radio_pkg::*;
  localparam int G  = 6;         // guard bits below the input LSB
  localparam int XW = W + 3 + G; // headroom for the CORDIC gain
  localparam int CW = $clog2(ITER + 1);

  logic signed [XW-1:0] x, y;
  logic [PHASE_W-1:0]   z;
  logic [CW-1:0]        it;
  logic [XW+16-1:0]     scaled;
  logic [PHASE_W-1:0]   atan_k;

  assign atan_k = PHASE_W'(ATAN_TAB[5'(it)] >> (24 - PHASE_W));
  assign scaled = (XW+16)'(x) * (XW+16)'(39797);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x <= '0; y <= '0; z <= '0; it <= '0;
      busy <= 1'b0; done <= 1'b0; mag <= '0; phase <= '0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        busy <= 1'b1;
        it   <= '0;
        if (i_in < 0) begin
          x <= -(XW'(i_in) <<< G);
          y <= -(XW'(q_in) <<< G);
          z <= {1'b1, {(PHASE_W-1){1'b0}}};
        end else begin
          x <= XW'(i_in) <<< G;
          y <= XW'(q_in) <<< G;
          z <= '0;
        end
      end else if (busy) begin
        if (it == CW'(ITER)) begin
          busy  <= 1'b0;
          done  <= 1'b1;
          mag   <= (W+1)'((scaled + (XW+16)'(1 << (15 + G))) >> (16 + G));
          phase <= z;
        end else begin
          it <= it + 1'b1;
          if (y >= 0) begin
            x <= x + (y >>> it);
            y <= y - (x >>> it);
            z <= z + atan_k;
          end else begin
            x <= x - (y >>> it);
            y <= y + (x >>> it);
            z <= z - atan_k;
          end
        end
      end
    end
  end
endmodule
