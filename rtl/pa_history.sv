// pa_history - program address history FIFO of the DSP debug interface.
//
// Remembers the addresses of the last DEPTH (5, as published) executed instructions so that
// a debugger can see how the program reached a breakpoint. Each pc_valid pushes pc and drops
// the oldest entry; entry 0 is the newest. freeze (set while the core is halted for debug)
// stops recording. The shift-register structure and the count of valid entries are this
// design's own.
//
// Interface: hist[k] is the k-th most recent address, valid for k < count.
module pa_history #(
  parameter int DEPTH = 5,
  parameter int AW    = 16
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       pc_valid,
  input  logic [AW-1:0]              pc,
  input  logic                       freeze,
  output logic [AW-1:0]              hist [DEPTH],
  output logic [$clog2(DEPTH+1)-1:0] count
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      count <= '0;
      for (int k = 0; k < DEPTH; k++) hist[k] <= '0;
    end else if (pc_valid && !freeze) begin
      hist[0] <= pc;
      for (int k = 1; k < DEPTH; k++) hist[k] <= hist[k-1];
      if (32'(count) < DEPTH) count <= count + 1'b1;
    end
  end
endmodule
