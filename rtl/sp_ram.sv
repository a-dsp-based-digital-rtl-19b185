// sp_ram - single-port synchronous RAM, used for the DSP program RAM and the X and Y data RAMs.
//
// DEPTH words of W bits, one read or write per clock, read data registered (available the
// clock after the address). The published sizes are 12 kbyte of program RAM and 18 kbyte of
// data RAM; with 24-bit words these are 4096 program words and 6144 data words, split here
// into an X and a Y bank of 3072 words so that two data moves can run per cycle. The word
// organisation and the bank split are this design's reading; the contents are loaded by the
// DSP's boot code, so no reset is applied to the array.
module sp_ram #(
  parameter int W     = 24,
  parameter int DEPTH = 4096
) (
  input  logic                     clk,
  input  logic                     en,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] addr,
  input  logic [W-1:0]             wdata,
  output logic [W-1:0]             rdata
);
  logic [W-1:0] mem [DEPTH];
  always_ff @(posedge clk) begin
    if (en) begin
      if (we) mem[addr] <= wdata;
      rdata <= mem[addr];
    end
  end
endmodule
