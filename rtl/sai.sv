// sai - serial audio interface: one transmit and one receive channel, master or slave.
//
// I2S-style frames: the word clock ws is low for the left and high for the right channel,
// each channel has SLOT bit clocks, data are MSB first, W significant bits, starting one bit
// clock after each ws change; data change on the falling and are sampled on the rising edge
// of bclk. As master the interface divides the master clock by BCLK_DIV for bclk (24 gives
// 3.0875 MHz and a 48.24 kHz frame rate with SLOT = 32) and drives ws; as slave it takes
// bclk and ws from the pins, synchronised to the master clock (bclk must stay below a
// quarter of it). Everything runs in the master-clock domain, bclk_out and ws_out are
// registered.
// Receive and transmit channels, master or slave selection and bit and word clocks on the
// pins follow the published description; the frame format, the divider and the double
// buffering are this design's own choices.
//
// Interface: tx_valid loads tx_left/tx_right into a holding register, which is copied into
// the shifter when the left slot starts; tx_req pulses then so the source can supply the
// next frame. rx_valid pulses with rx_left/rx_right after each received right slot.
module sai #(
  parameter int W        = radio_pkg::AUD_W,
  parameter int SLOT     = 32,
  parameter int BCLK_DIV = 24
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                master,
  // pins
  input  logic                bclk_in,
  input  logic                ws_in,
  output logic                bclk_out,
  output logic                ws_out,
  output logic                sdo,
  input  logic                sdi,
  // transmit side
  input  logic                tx_valid,
  input  logic signed [W-1:0] tx_left,
  input  logic signed [W-1:0] tx_right,
  output logic                tx_req,
  // receive side
  output logic                rx_valid,
  output logic signed [W-1:0] rx_left,
  output logic signed [W-1:0] rx_right
);
  localparam int DW = $clog2(BCLK_DIV);
  localparam int BW = $clog2(2 * SLOT);

  // ---------------- master clock generation ----------------
  logic [DW-1:0] div;
  logic [BW-1:0] mbit;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      div <= '0; bclk_out <= 1'b0; ws_out <= 1'b1; mbit <= BW'(2 * SLOT - 1);
    end else if (master) begin
      if (div == DW'(BCLK_DIV / 2 - 1) || div == DW'(BCLK_DIV - 1)) begin
        bclk_out <= ~bclk_out;
        if (bclk_out) begin                       // falling edge
          mbit   <= mbit + 1'b1;
          ws_out <= (mbit + 1'b1 >= BW'(SLOT - 1) && mbit + 1'b1 < BW'(2 * SLOT - 1));
        end
      end
      div <= (div == DW'(BCLK_DIV - 1)) ? '0 : div + 1'b1;
    end
  end

  // ---------------- edge detection (both modes) ----------------
  logic [2:0] bclk_s, ws_s;
  logic       bc, wsc, bc_d, rise, fall;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bclk_s <= '0; ws_s <= '0; bc_d <= 1'b0;
    end else begin
      bclk_s <= {bclk_s[1:0], bclk_in};
      ws_s   <= {ws_s[1:0], ws_in};
      bc_d   <= bc;
    end
  end
  assign bc   = master ? bclk_out : bclk_s[2];
  assign wsc  = master ? ws_out   : ws_s[2];
  assign rise = bc & ~bc_d;
  assign fall = ~bc & bc_d;

  // ---------------- frame tracking ----------------
  logic ws_r;          // ws sampled at the last rising edge
  logic start_pend;    // a channel starts with the next falling edge
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ws_r <= 1'b1; start_pend <= 1'b0;
    end else if (rise) begin
      ws_r <= wsc;
      if (wsc != ws_r) start_pend <= 1'b1;
    end else if (fall && start_pend) begin
      start_pend <= 1'b0;
    end
  end

  // ---------------- transmitter ----------------
  logic [W-1:0]    hold_l, hold_r, cur_r;
  logic [SLOT-1:0] tsh;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hold_l <= '0; hold_r <= '0; cur_r <= '0; tsh <= '0; sdo <= 1'b0; tx_req <= 1'b0;
    end else begin
      tx_req <= 1'b0;
      if (tx_valid) begin
        hold_l <= tx_left;
        hold_r <= tx_right;
      end
      if (fall) begin
        if (start_pend) begin
          if (!ws_r) begin
            tsh    <= {hold_l, {(SLOT-W){1'b0}}} << 1;
            sdo    <= hold_l[W-1];
            cur_r  <= hold_r;
            tx_req <= 1'b1;
          end else begin
            tsh <= {cur_r, {(SLOT-W){1'b0}}} << 1;
            sdo <= cur_r[W-1];
          end
        end else begin
          sdo <= tsh[SLOT-1];
          tsh <= tsh << 1;
        end
      end
    end
  end

  // ---------------- receiver ----------------
  logic [W-1:0]  rsh;
  logic [BW-1:0] rcnt;
  logic          got_l;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rsh <= '0; rcnt <= '0; got_l <= 1'b0; rx_valid <= 1'b0; rx_left <= '0; rx_right <= '0;
    end else begin
      rx_valid <= 1'b0;
      if (rise) begin
        if (wsc != ws_r) begin
          // this bit is the last slot bit of the channel that is ending
          if (!ws_r) begin
            rx_left <= (rcnt < BW'(W)) ? {rsh[W-2:0], sdi} : rsh;
            got_l   <= 1'b1;
          end else begin
            rx_right <= (rcnt < BW'(W)) ? {rsh[W-2:0], sdi} : rsh;
            rx_valid <= got_l;
          end
          rcnt <= '0;
        end else begin
          if (rcnt < BW'(W)) rsh <= {rsh[W-2:0], sdi};
          rcnt <= rcnt + 1'b1;
        end
      end
    end
  end
endmodule
