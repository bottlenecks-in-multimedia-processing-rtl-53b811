// data_station: the register file of the SIMD computation, organised as a
// queue.
//
// Operand bundles produced by the access side (loops, address generation,
// loads, reorganization) are pushed at the tail and consumed in order by the
// SIMD unit at the head. Because it is a queue, a load that misses stalls
// only the access side while the SIMD unit keeps consuming queued operands,
// and a blocked store stalls only the execute side. That the data station is
// a queue follows the architecture; its depth (8, like the eight MMX
// registers) and entry layout are this design's choice.
//
// Interface: push/wdata (ignored when full), pop/rdata (rdata is the head,
// valid while !empty), full, empty, level.
// Timing: a pushed entry is visible at the head the next clock.
module data_station #(
  parameter int unsigned WIDTH = 8,
  parameter int unsigned DEPTH = 8
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     push,
  input  logic [WIDTH-1:0]         wdata,
  input  logic                     pop,
  output logic [WIDTH-1:0]         rdata,
  output logic                     full,
  output logic                     empty,
  output logic [$clog2(DEPTH+1)-1:0] level
);

  localparam int unsigned PB = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [WIDTH-1:0] q [DEPTH];
  logic [PB-1:0]    wp, rp;
  logic             do_push, do_pop;

  assign full    = (level == ($clog2(DEPTH+1))'(DEPTH));
  assign empty   = (level == '0);
  assign do_push = push && !full;
  assign do_pop  = pop && !empty;
  assign rdata   = q[rp];

  function automatic logic [PB-1:0] nxt(logic [PB-1:0] p);
    return (p == PB'(DEPTH - 1)) ? '0 : p + PB'(1);
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp    <= '0;
      rp    <= '0;
      level <= '0;
      for (int i = 0; i < DEPTH; i++) q[i] <= '0;
    end else begin
      if (do_push) begin
        q[wp] <= wdata;
        wp    <= nxt(wp);
      end
      if (do_pop) rp <= nxt(rp);
      if (do_push && !do_pop)      level <= level + 1'b1;
      else if (do_pop && !do_push) level <= level - 1'b1;
    end
  end

  a_no_overflow:  assert property (@(posedge clk) disable iff (!rst_n) !(push && full));
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) !(pop && empty));

endmodule
