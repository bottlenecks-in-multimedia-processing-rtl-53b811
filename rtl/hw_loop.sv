// hw_loop: the five nested hardware loops of the MediaBreeze unit.
//
// Each loop index counts from 1 (lower bound) to its loop count (upper
// bound). Five 32-bit comparators work in parallel and flag which indices sit
// at their bound; the flags are priority encoded so that on every advance the
// innermost loop not yet at its bound is incremented by one and every loop
// inside it is reset to 1. The iteration in which all five indices are at
// their bounds is the last one. This is the looping scheme of the
// architecture; a count of 0 is treated like 1 (a loop that is not used),
// which is this design's choice.
//
// Interface: load sets the indices to load_idx (all 1 for a fresh start, the
// saved indices when an interrupted instruction is restored); en advances by
// one iteration
// and is ignored in the last iteration. While en is low (a stall or an
// interrupt) the indices hold, so they are the saved loop state.
// at_last[k] flags level k+1 at its bound (combinational from the registers),
// final_iter marks the last iteration, inc_level is the level (1..5) that the
// next advance increments (0 in the last iteration).
// Timing: one iteration per clock; single register stage (the source timing
// study suggests two pipeline stages above 1 GHz, not done here).
module hw_loop
  import breeze_pkg::*;
#(
  parameter int unsigned N = NLOOPS,
  parameter int unsigned W = AW
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                load,
  input  logic [N-1:0][W-1:0] load_idx,
  input  logic                en,
  input  logic [N-1:0][W-1:0] count,
  output logic [N-1:0][W-1:0] idx,
  output logic [N-1:0]        at_last,
  output logic                final_iter,
  output logic [2:0]          inc_level
);

  logic [N-1:0][W-1:0] bound;
  int unsigned         sel;      // zero-based level to increment
  logic                any_inc;

  always_comb begin
    for (int k = 0; k < N; k++) begin
      bound[k]   = (count[k] == '0) ? W'(1) : count[k];
      at_last[k] = (idx[k] == bound[k]);
    end
    // priority encoder: innermost level that is not at its bound
    sel     = 0;
    any_inc = 1'b0;
    for (int k = 0; k < N; k++)
      if (!at_last[k]) begin
        sel     = k;
        any_inc = 1'b1;
      end
    final_iter = !any_inc;
    inc_level  = any_inc ? 3'(sel + 1) : 3'd0;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < N; k++) idx[k] <= W'(1);
    end else if (load) begin
      idx <= load_idx;
    end else if (en && any_inc) begin
      for (int k = 0; k < N; k++)
        if (k == sel)     idx[k] <= idx[k] + W'(1);
        else if (k > sel) idx[k] <= W'(1);
    end
  end

endmodule
