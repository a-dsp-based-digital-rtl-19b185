// hs3i - high-speed serial synchronous interface (one transmit and one receive channel).
//
// Transmit: the master clock divided by CLK_DIV gives the serial clock (8 -> 9.26 Mbit/s,
// the published maximum of about 9.25 Mbit/s per channel). Its high time is hi_time master
// clocks, programmable so that the clock's harmonics can be moved out of a sensitive band.
// Words of W bits go out MSB first; data change on the falling edge, the frame sync fs_out
// is high during the MSB. The clock runs whenever en is set; with no word pending, fs_out
// stays low and the data line idles low.
// Receive: clock, frame sync and data pins are synchronised to the master clock and sampled
// at each rising clock edge; a word is complete W bits after the bit flagged by fs.
// The rate and the programmable duty cycle follow the published description; the word
// format and the frame sync are this design's own choices.
//
// Interface: tx_valid with tx_data is accepted when tx_ready is high (one-word buffer).
// rx_valid pulses with rx_data. hi_time must be between 1 and CLK_DIV-1.
module hs3i #(
  parameter int W       = radio_pkg::AUD_W,
  parameter int CLK_DIV = 8
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       en,
  input  logic [$clog2(CLK_DIV)-1:0] hi_time,
  // transmit
  input  logic                       tx_valid,
  input  logic [W-1:0]               tx_data,
  output logic                       tx_ready,
  output logic                       sclk_out,
  output logic                       fs_out,
  output logic                       sd_out,
  // receive
  input  logic                       sclk_in,
  input  logic                       fs_in,
  input  logic                       sd_in,
  output logic                       rx_valid,
  output logic [W-1:0]               rx_data
);
  localparam int DW = $clog2(CLK_DIV);
  localparam int BW = $clog2(W + 1);

  // ---------------- transmitter ----------------
  logic [DW-1:0] div;
  logic [W-1:0]  buf_q, sh;
  logic          buf_full, active;
  logic [BW-1:0] left;

  assign tx_ready = !buf_full;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      div <= '0; sclk_out <= 1'b0; fs_out <= 1'b0; sd_out <= 1'b0;
      buf_q <= '0; buf_full <= 1'b0; sh <= '0; active <= 1'b0; left <= '0;
    end else begin
      if (tx_valid && tx_ready) begin
        buf_q    <= tx_data;
        buf_full <= 1'b1;
      end
      if (!en) begin
        div <= '0; sclk_out <= 1'b0;
      end else begin
        div <= (div == DW'(CLK_DIV - 1)) ? '0 : div + 1'b1;
        if (div == '0) sclk_out <= 1'b1;
        if (div == hi_time) begin
          // falling edge: next bit
          sclk_out <= 1'b0;
          if (active && left != '0) begin
            sd_out <= sh[W-1];
            sh     <= sh << 1;
            fs_out <= 1'b0;
            left   <= left - 1'b1;
          end else if (buf_full) begin
            sd_out   <= buf_q[W-1];
            sh       <= buf_q << 1;
            fs_out   <= 1'b1;
            left     <= BW'(W - 1);
            active   <= 1'b1;
            buf_full <= 1'b0;
          end else begin
            active <= 1'b0;
            fs_out <= 1'b0;
            sd_out <= 1'b0;
          end
        end
      end
    end
  end

  // ---------------- receiver ----------------
  logic [2:0]    sc_s;
  logic [1:0]    fs_s, sd_s;
  logic [W-1:0]  rsh;
  logic [BW-1:0] rcnt;
  logic          rx_on;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sc_s <= '0; fs_s <= '0; sd_s <= '0; rsh <= '0; rcnt <= '0; rx_on <= 1'b0;
      rx_valid <= 1'b0; rx_data <= '0;
    end else begin
      sc_s <= {sc_s[1:0], sclk_in};
      fs_s <= {fs_s[0], fs_in};
      sd_s <= {sd_s[0], sd_in};
      rx_valid <= 1'b0;
      if (sc_s[1] && !sc_s[2]) begin                 // rising edge
        if (fs_s[1]) begin
          rsh   <= {{(W-1){1'b0}}, sd_s[1]};
          rcnt  <= BW'(1);
          rx_on <= 1'b1;
        end else if (rx_on) begin
          rsh  <= {rsh[W-2:0], sd_s[1]};
          rcnt <= rcnt + 1'b1;
          if (rcnt == BW'(W - 1)) begin
            rx_valid <= 1'b1;
            rx_data  <= {rsh[W-2:0], sd_s[1]};
            rx_on    <= 1'b0;
          end
        end
      end
    end
  end
endmodule
