// spi_ctrl - SPI slave for run-time control of the receiver by an external microprocessor.
//
// SPI mode 0 (data sampled on the rising, shifted on the falling edge of sclk), MSB first.
// A transfer is one 8-bit command {write, addr[6:0]} followed by a DW-bit data word. A
// write updates control register addr (0 .. NREG-1); a read returns, on miso during the
// data phase, control register addr or, for addr >= NREG, status word addr-NREG (for
// instance RDS blocks). Pins are synchronised to the master clock, so sclk must stay below
// about a sixth of it (12 MHz at 74.1 MHz). cs_n high aborts a transfer.
// An I2C/SPI interface for run-time control and for reading the RDS data is published;
// the frame format, the address map and the register reset values are this design's own.
//
// Interface: regs[] are the control registers (reset to RESET_VAL); wr_pulse pulses for
// one clock with wr_addr after a completed write. stat[] are sampled when a read's command
// byte is complete.
module spi_ctrl #(
  parameter int NREG  = 16,
  parameter int NSTAT = 16,
  parameter int DW    = 24,
  parameter logic [DW-1:0] RESET_VAL [NREG] = '{default: '0}
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          sclk,
  input  logic          cs_n,
  input  logic          mosi,
  output logic          miso,
  output logic [DW-1:0] regs [NREG],
  input  logic [DW-1:0] stat [NSTAT],
  output logic          wr_pulse,
  output logic [6:0]    wr_addr
);
  localparam int CW = $clog2(8 + DW + 1);

  logic [2:0]    sclk_s;
  logic [1:0]    cs_s, mosi_s;
  logic          rise, fall, sel;
  logic [CW-1:0] cnt;
  logic [7:0]    cmd;
  logic [DW-1:0] sh_in, sh_out;

  assign rise = sclk_s[1] && !sclk_s[2];
  assign fall = !sclk_s[1] && sclk_s[2];
  assign sel  = !cs_s[1];

  function automatic logic [DW-1:0] read_word(input logic [6:0] a);
    if (32'(a) < NREG)         return regs[$clog2(NREG)'(a)];
    if (32'(a) < NREG + NSTAT) return stat[32'(a) - NREG];
    return '0;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sclk_s <= '0; cs_s <= 2'b11; mosi_s <= '0;
      cnt <= '0; cmd <= '0; sh_in <= '0; sh_out <= '0; miso <= 1'b0;
      wr_pulse <= 1'b0; wr_addr <= '0;
      for (int k = 0; k < NREG; k++) regs[k] <= RESET_VAL[k];
    end else begin
      sclk_s <= {sclk_s[1:0], sclk};
      cs_s   <= {cs_s[0], cs_n};
      mosi_s <= {mosi_s[0], mosi};
      wr_pulse <= 1'b0;
      if (!sel) begin
        cnt <= '0;
        miso <= 1'b0;
      end else if (rise) begin
        cnt <= cnt + 1'b1;
        if (cnt < CW'(8)) begin
          cmd <= {cmd[6:0], mosi_s[1]};
          if (cnt == CW'(7)) sh_out <= read_word({cmd[5:0], mosi_s[1]});
        end else if (cnt < CW'(8 + DW)) begin
          sh_in <= {sh_in[DW-2:0], mosi_s[1]};
          if (cnt == CW'(8 + DW - 1) && cmd[7]) begin
            if (32'(cmd[6:0]) < NREG) regs[$clog2(NREG)'(cmd[6:0])] <= {sh_in[DW-2:0], mosi_s[1]};
            wr_pulse <= 1'b1;
            wr_addr  <= cmd[6:0];
          end
        end
      end else if (fall && cnt >= CW'(8) && cnt < CW'(8 + DW)) begin
        miso   <= sh_out[DW-1];
        sh_out <= sh_out << 1;
      end
    end
  end
endmodule
