// breeze_imem: Breeze instruction memory.
//
// Stores Breeze instructions once they enter the processor so that each is
// fetched from the host instruction stream only once. One instruction is
// INSTR_WORDS 32-bit words; the memory holds NUM_INSTR of them (the
// architecture only says "one or more"; four is this design's choice).
// It is written as a plain array, which maps to an SRAM.
//
// Interface: one write port for the host (we, waddr, wdata) and one
// synchronous read port for the decoder (re, raddr -> rdata one clock later).
// Word addresses; a write and a read of the same word in one clock return the
// old word. The array is cleared at reset so that unwritten words read as 0.
module breeze_imem
  import breeze_pkg::*;
#(
  parameter int unsigned NUM_INSTR = 4,
  parameter int unsigned DEPTH     = NUM_INSTR * INSTR_WORDS,
  parameter int unsigned ABITS     = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             we,
  input  logic [ABITS-1:0] waddr,
  input  logic [31:0]      wdata,
  input  logic             re,
  input  logic [ABITS-1:0] raddr,
  output logic [31:0]      rdata
);

  logic [31:0] mem [DEPTH];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < DEPTH; i++) mem[i] <= '0;
    end else if (we) begin
      mem[waddr] <= wdata;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  rdata <= '0;
    else if (re) rdata <= mem[raddr];
  end

endmodule
