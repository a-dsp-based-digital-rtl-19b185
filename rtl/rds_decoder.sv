// rds_decoder - RDS/RBDS block synchroniser and decoder with error correction and flywheel.
//
// RDS sends groups of four 26-bit blocks A, B, C (or C'), D: 16 information bits, MSB first,
// followed by a 10-bit check word = (info * x^10 mod g(x)) xor an offset word that marks the
// block position, with g(x) = x^10+x^8+x^7+x^5+x^4+x^3+1 (the RDS standard, not given in
// the receiver description). Hence for a received block r, r(x) mod g(x) equals the offset
// word when there is no error, and offset xor (e(x) mod g(x)) for an error pattern e.
//  * Search: every bit the last 26 bits are tested against all five offsets. A hit starts
//    a candidate; a second hit of the expected next block exactly 26 bits later gives sync.
//  * Synchronised: every 26 bits the block is checked against the offset expected at this
//    position (C or C' after B). A non-zero difference is corrected if it is the syndrome of
//    a burst of at most 5 bits: a sequential search tries each 5-bit burst pattern with its
//    lowest bit set, at each of the 26 positions, one candidate per clock (416 clocks, far
//    less than one bit period). Blocks are reported as good, corrected or uncorrectable.
//  * Flywheel: sync is only dropped after more than FLYWHEEL uncorrectable blocks with no
//    error-free block in between (corrected blocks do not count either way), so short fades
//    do not force a new search. A whole group is buffered and
//    group_valid raised once per group, so the host is not interrupted per block.
// Block sync, error detection and correction and an automatic flywheel follow the published
// description; the search rules, the burst-trapping search and the flywheel rule are this
// design's own choices.
//
// Interface: bit_valid/bit_in from the demodulator. block_valid pulses with block_data,
// block_type (0..4 = A, B, C, C', D) and block_status (0 ok, 1 corrected, 2 uncorrectable);
// group_valid pulses with group[0..3] after block D. Corrected blocks are reported at most
// 418 clocks after their last bit; bits must be at least that far apart.
module rds_decoder #(
  parameter int FLYWHEEL = 8
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        bit_valid,
  input  logic        bit_in,
  output logic        synced,
  output logic        block_valid,
  output logic [15:0] block_data,
  output logic [2:0]  block_type,
  output logic [1:0]  block_status,
  output logic        group_valid,
  output logic [15:0] group [4]
);
  localparam logic [10:0] G = 11'h5B9;
  localparam logic [9:0] OFFS [5] = '{10'h0FC, 10'h198, 10'h168, 10'h350, 10'h1B4};

  function automatic logic [9:0] syndrome(input logic [25:0] r);
    logic [10:0] rem;
    rem = '0;
    for (int i = 25; i >= 0; i--) begin
      rem = {rem[9:0], r[i]};
      if (rem[10]) rem = rem ^ G;
    end
    return rem[9:0];
  endfunction

  // next expected block type: A->B->C->D->A, C' also follows B and precedes D
  function automatic logic [2:0] next_type(input logic [2:0] t);
    case (t)
      3'd0: return 3'd1;
      3'd1: return 3'd2;
      3'd2, 3'd3: return 3'd4;
      default: return 3'd0;
    endcase
  endfunction

  function automatic logic offs_ok(input logic [9:0] syn, input logic [2:0] t);
    if (t == 3'd2 || t == 3'd3) return syn == OFFS[2] || syn == OFFS[3];
    return syn == OFFS[t];
  endfunction

  typedef enum logic [1:0] {S_SEARCH, S_CONFIRM, S_SYNC, S_CORRECT} state_e;
  state_e      state;
  logic [25:0] sr, blk;
  logic [9:0]  syn, err_syn;
  logic [4:0]  bitcnt;
  logic [2:0]  exp_type, cur_type;
  logic [4:0]  pos;         // burst position 0..25
  logic [3:0]  pat;         // burst pattern bits 1..4 (bit 0 always set)
  logic [25:0] cand;
  logic [9:0]  cand_syn;
  logic [$clog2(FLYWHEEL+2)-1:0] bad_run;

  assign syn      = syndrome({sr[24:0], bit_in});
  assign cand     = 26'({pat, 1'b1}) << pos;
  assign cand_syn = syndrome(cand);

  // received type: which offset (if any) matches, with C' reported as 3
  logic       hit;
  logic [2:0] hit_type;
  always_comb begin
    hit = 1'b0; hit_type = 3'd0;
    for (int t = 4; t >= 0; t--)
      if (syn == OFFS[t]) begin hit = 1'b1; hit_type = 3'(t); end
  end

  task automatic report(input logic [15:0] d, input logic [2:0] t, input logic [1:0] st);
    block_valid  <= 1'b1;
    block_data   <= d;
    block_type   <= t;
    block_status <= st;
    if (st != 2'd2) begin
      if (t == 3'd2 || t == 3'd3) group[2] <= d;
      else                         group[2'(t == 3'd4 ? 3'd3 : t)] <= d;
      group_valid <= (t == 3'd4);
    end
  endtask

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_SEARCH; sr <= '0; blk <= '0; bitcnt <= '0; exp_type <= '0; cur_type <= '0;
      err_syn <= '0; pos <= '0; pat <= '0; bad_run <= '0; synced <= 1'b0;
      block_valid <= 1'b0; block_data <= '0; block_type <= '0; block_status <= '0;
      group_valid <= 1'b0;
      for (int k = 0; k < 4; k++) group[k] <= '0;
    end else begin
      block_valid <= 1'b0;
      group_valid <= 1'b0;
      if (bit_valid) sr <= {sr[24:0], bit_in};
      unique case (state)
        S_SEARCH: if (bit_valid && hit) begin
          state    <= S_CONFIRM;
          exp_type <= next_type(hit_type);
          bitcnt   <= '0;
        end
        S_CONFIRM: if (bit_valid) begin
          if (bitcnt == 5'd25) begin
            bitcnt <= '0;
            if (hit && offs_ok(syn, exp_type)) begin
              state    <= S_SYNC;
              synced   <= 1'b1;
              bad_run  <= '0;
              exp_type <= next_type(exp_type);
              report(16'({sr[24:0], bit_in} >> 10), hit_type, 2'd0);
            end else begin
              state <= S_SEARCH;
            end
          end else begin
            bitcnt <= bitcnt + 1'b1;
          end
        end
        S_SYNC: if (bit_valid) begin
          if (bitcnt == 5'd25) begin
            bitcnt   <= '0;
            exp_type <= next_type(exp_type);
            if (offs_ok(syn, exp_type)) begin
              bad_run <= '0;
              report(16'({sr[24:0], bit_in} >> 10), (exp_type == 3'd2 || exp_type == 3'd3) ?
                     ((syn == OFFS[3]) ? 3'd3 : 3'd2) : exp_type, 2'd0);
            end else begin
              // try burst correction; C/C' ambiguity resolved as C
              state    <= S_CORRECT;
              blk      <= {sr[24:0], bit_in};
              cur_type <= (exp_type == 3'd3) ? 3'd2 : exp_type;
              err_syn  <= syn ^ OFFS[(exp_type == 3'd3) ? 3'd2 : exp_type];
              pos      <= '0;
              pat      <= '0;
            end
          end else begin
            bitcnt <= bitcnt + 1'b1;
          end
        end
        S_CORRECT: begin
          if (bit_valid) bitcnt <= bitcnt + 1'b1;
          if (cand_syn == err_syn && cand != '0) begin
            state <= S_SYNC;
            report(16'((blk ^ cand) >> 10), cur_type, 2'd1);
          end else if (pos == 5'd25 && pat == 4'hF) begin
            state <= S_SYNC;
            report(blk[25:10], cur_type, 2'd2);
            if (32'(bad_run) >= FLYWHEEL) begin
              state  <= S_SEARCH;
              synced <= 1'b0;
            end else begin
              bad_run <= bad_run + 1'b1;
            end
          end else if (pat == 4'hF) begin
            pat <= '0;
            pos <= pos + 1'b1;
          end else begin
            pat <= pat + 1'b1;
          end
        end
        default: state <= S_SEARCH;
      endcase
    end
  end
endmodule
