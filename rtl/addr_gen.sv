// addr_gen: address generator of one MediaBreeze data stream.
//
// Every clock in which the loops advance, one of five strides is added to the
// previous address with a 32-bit adder. The stride is chosen from the
// last-value flags of the four inner loops (levels 2..5), which are computed
// once in hw_loop and shared by all four streams: if the innermost loop is
// not at its bound the level-5 stride is used, otherwise the level k whose
// inner loops k+1..5 are all at their bounds (the loop that is about to be
// incremented) selects stride k. The stream's mask bit for that level gates
// the update; a masked level leaves the address unchanged. The outermost
// loop needs no comparison here because the instruction ends when it
// reaches its bound. This follows the address generation scheme of the
// architecture.
//
// Interface: load sets the address to start_addr; en advances one iteration;
// last_inner[j] is the at-bound flag of loop level j+2. On a stall or an
// interrupt en is low and only addr has to be kept.
// Timing: addr is a register, valid the cycle after load; one address per
// clock (the source timing study would split this over three pipe stages
// above 1 GHz; here it is a single stage).
module addr_gen
  import breeze_pkg::*;
#(
  parameter int unsigned W = AW
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     load,
  input  logic                     en,
  input  logic [W-1:0]             start_addr,
  input  logic [NLOOPS-1:0][W-1:0] stride,
  input  logic [NLOOPS-1:0]        mask,
  input  logic [NLOOPS-2:0]        last_inner,
  output logic [W-1:0]             addr,
  output logic [2:0]               sel_level
);

  logic [NLOOPS-2:0] flag;      // flag[k-1]: loop level k is incremented
  logic [W-1:0]      sel_stride;
  logic              sel_on;

  // inc-cond: flag for level k (1..4) is true when loops k+1..5 are all at
  // their bound
  always_comb begin
    for (int k = 0; k < NLOOPS - 1; k++) begin
      flag[k] = 1'b1;
      for (int j = k; j < NLOOPS - 1; j++)
        flag[k] = flag[k] & last_inner[j];
    end
  end

  // inc-combine: the outermost true flag is the loop being incremented;
  // no flag true selects stride 5
  always_comb begin
    sel_level = 3'd5;
    for (int k = NLOOPS - 2; k >= 0; k--)
      if (flag[k]) sel_level = 3'(k + 1);
    sel_stride = stride[sel_level - 3'd1];
    sel_on     = mask[sel_level - 3'd1];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)          addr <= '0;
    else if (load)       addr <= start_addr;
    else if (en && sel_on) addr <= addr + sel_stride;
  end

endmodule
