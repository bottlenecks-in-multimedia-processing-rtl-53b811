// mb_controller: sequencing of one Breeze instruction.
//
// The host starts the MediaBreeze unit with a 32-bit start instruction that
// gives the location and length of a Breeze instruction in the Breeze
// instruction memory; the host pipeline is held (busy) until the Breeze
// instruction completes. The controller then has the decoder read the
// instruction into the control registers (DECODE), loads the loops and
// address generators (INIT) and lets the access side issue one iteration
// per clock (RUN). After the last iteration has been issued it waits until
// the data station has drained through the SIMD unit (DRAIN) and pulses
// done. The host's interrupt instruction, or an exception, pauses the
// access side (PAUSE). The access side stops at the next result boundary
// (after an iteration that writes a result, so no partial accumulation is
// left), the loop indices and stream addresses hold in their registers, the
// queued iterations drain, and paused rises once nothing is in flight so that
// the state can be saved. resume continues exactly where it stopped. A start
// while paused gives up the paused instruction (its state has been saved) and
// begins another one; a start with restore set reloads a saved state instead
// of the start values, so the given-up instruction can be continued later.
// Start and interrupt instructions and the save/restore of loop state follow
// the architecture; the states, the handshakes and pausing only at a result
// boundary are this design's own.
//
// Timing: start -> DECODE for the decoder's length, one clock INIT, then one
// iteration per clock in RUN when there is no stall.
module mb_controller
  import breeze_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  input  logic intr,
  input  logic resume,
  input  logic dec_done,
  input  logic last_fired,   // the final iteration was issued this clock
  input  logic fired,        // an iteration was issued this clock
  input  logic wr_fired,     // ... and it writes a result
  input  logic ds_empty,
  output logic dec_start,
  output logic init,
  output logic run,
  output logic busy,
  output logic paused,
  output logic done
);

  typedef enum logic [2:0] {
    S_IDLE, S_DECODE, S_INIT, S_RUN, S_PAUSE, S_DRAIN
  } state_e;

  state_e state, nstate;
  logic   bnd;     // the last issued iteration ended a result (acc empty)
  logic   stop;    // interrupt taken at this result boundary

  always_comb begin
    nstate = state;
    case (state)
      S_IDLE:   if (start) nstate = S_DECODE;
      S_DECODE: if (dec_done) nstate = S_INIT;
      S_INIT:   nstate = S_RUN;
      S_RUN:    if (last_fired) nstate = S_DRAIN;
                else if (stop) nstate = S_PAUSE;
      S_PAUSE:  if (resume) nstate = S_RUN;
                else if (start && ds_empty) nstate = S_DECODE;
      S_DRAIN:  if (ds_empty) nstate = S_IDLE;
      default:  nstate = S_IDLE;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) state <= S_IDLE;
    else        state <= nstate;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     bnd <= 1'b1;
    else if (init)  bnd <= 1'b1;
    else if (fired) bnd <= wr_fired;
  end

  assign stop = intr && bnd;

  assign dec_start = start && ((state == S_IDLE) ||
                               ((state == S_PAUSE) && ds_empty && !resume));
  assign init      = (state == S_INIT);
  assign run       = (state == S_RUN) && !stop;
  assign busy      = (state != S_IDLE);
  assign paused    = (state == S_PAUSE) && ds_empty;
  assign done      = (state == S_DRAIN) && ds_empty;

endmodule
