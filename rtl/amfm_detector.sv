// amfm_detector - AM/FM detector peripheral: NCORES serial CORDIC cores for the DSP.
//
// Each core takes one complex I/Q sample per request and returns, according to its mode,
//   DET_AM: the magnitude |i + jq|, saturated to a positive W-bit number,
//   DET_PM: the phase atan2(q, i) as a signed W-bit fraction of a turn (2^W = 360 deg),
//   DET_FM: the phase step since the previous request of the same core (instantaneous
//           frequency, same units; wraps modulo one turn, so +-180 deg per sample maximum).
// Detection by a serially implemented CORDIC, and four cores so that several software calls
// can be served concurrently, follow the published design. The request/done handshake, the
// result formats and the per-core FM phase memory are this design's own.
//
// Interface, per core c: req[c] with mode[c], i_in[c], q_in[c] starts a detection when
// busy[c] is low; done[c] pulses with result[c] 27 clocks later (W = 24). A request while
// busy is ignored.
module amfm_detector #(
  parameter int NCORES = 4,
  parameter int W      = radio_pkg::IQ_W
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic [NCORES-1:0]         req,
  input  radio_pkg::det_mode_e      mode   [NCORES],
  input  logic signed [W-1:0]       i_in   [NCORES],
  input  logic signed [W-1:0]       q_in   [NCORES],
  output logic [NCORES-1:0]         busy,
  output logic [NCORES-1:0]         done,
  output logic signed [W-1:0]       result [NCORES]
);
  import radio_pkg::*;

  for (genvar c = 0; c < NCORES; c++) begin : g_core
    logic          cdone;
    logic [W:0]    mag;
    logic [W-1:0]  ph, ph_prev;
    det_mode_e     mode_q;

    cordic_vectoring #(.W(W), .ITER(W), .PHASE_W(W)) u_cordic (
      .clk, .rst_n, .start(req[c]), .i_in(i_in[c]), .q_in(q_in[c]),
      .busy(busy[c]), .done(cdone), .mag, .phase(ph));

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        mode_q    <= DET_AM;
        ph_prev   <= '0;
        done[c]   <= 1'b0;
        result[c] <= '0;
      end else begin
        done[c] <= cdone;
        if (req[c] && !busy[c]) mode_q <= mode[c];
        if (cdone) begin
          unique case (mode_q)
            DET_AM:  result[c] <= (mag[W:W-1] != 2'b00) ? {1'b0, {(W-1){1'b1}}} : W'(mag);
            DET_PM:  result[c] <= signed'(ph);
            default: result[c] <= signed'(ph - ph_prev);
          endcase
          ph_prev <= ph;
        end
      end
    end
  end
endmodule
