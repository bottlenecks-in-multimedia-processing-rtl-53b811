// prefetch_engine: stream prefetcher that slips ahead of the MediaBreeze
// access side and pulls the input streams' data into the L1 cache.
//
// Because the address sequence of every stream is fully described by the
// Breeze instruction, the engine runs its own copy of the five loops and of
// the three input address generators, loaded with the same counts, start
// addresses, strides and masks, and stays up to PF_DIST iterations ahead of
// the iterations the access side has issued. For each of its iterations it
// requests, for every enabled input stream, the cache line holding the first
// byte of the SIMD_BITS-wide access and, when the access crosses a line
// boundary, the next line as well. A line equal to the last one requested for
// that stream is skipped, so consecutive accesses within one line cost a
// single request. Only lines the instruction will read are ever requested.
// Running ahead on the known strides follows the architecture; the distance,
// the line size (the 32-byte L1 block of the simulated processors), the
// duplicate filter and the request port are this design's choices.
//
// Interface: init loads the engine together with the main loops, from
// load_idx / load_addr (the start values, or the restored state); run
// enables it; main_fire counts an iteration issued by the access side.
// pf_req / pf_addr (line aligned) / pf_ready is a request/ready port into the
// L1; a request is taken when both are high. done rises after the last
// iteration's requests.
// Timing: one request per clock; an iteration without a new line takes one
// clock.
module prefetch_engine
  import breeze_pkg::*;
#(
  parameter int unsigned SIMD_BITS  = 128,
  parameter int unsigned LINE_BYTES = 32,
  parameter int unsigned PF_DIST    = 16
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        init,
  input  logic        run,
  input  logic        main_fire,
  input  breeze_cfg_t cfg,
  input  logic [NLOOPS-1:0][AW-1:0] load_idx,
  input  logic [NIN-1:0][AW-1:0]    load_addr,
  output logic        pf_req,
  output logic [AW-1:0] pf_addr,
  input  logic        pf_ready,
  output logic        done
);

  localparam int unsigned LB = $clog2(LINE_BYTES);
  localparam int unsigned NREQ = 2 * NIN;

  logic [NLOOPS-1:0][AW-1:0] idx;
  logic [NLOOPS-1:0]         at_last;
  logic                      final_iter, adv;
  logic [2:0]                inc_level;
  logic [NIN-1:0][AW-1:0]    addr;
  logic [NIN-1:0][2:0]       sel_level;

  hw_loop u_loop (
    .clk, .rst_n, .load(init), .load_idx, .en(adv), .count(cfg.count), .idx,
    .at_last, .final_iter, .inc_level
  );

  for (genvar s = 0; s < NIN; s++) begin : g_agu
    addr_gen u_agu (
      .clk, .rst_n, .load(init), .en(adv), .start_addr(load_addr[s]),
      .stride(cfg.stride[s]), .mask(cfg.mask[s]),
      .last_inner(at_last[NLOOPS-1:1]), .addr(addr[s]),
      .sel_level(sel_level[s])
    );
  end

  // requests of the current iteration: 2 per stream (first and last line)
  logic [NREQ-1:0][AW-LB-1:0] line;
  logic [NREQ-1:0]            need;      // still to be sent this iteration
  logic [NREQ-1:0]            sent;      // sent during this iteration
  logic [NIN-1:0][AW-LB-1:0]  last_line;
  logic [NIN-1:0]             last_ok;
  logic [NIN-1:0]             dup;       // first line repeats the last one
  logic signed [AW:0]         ahead;     // engine iterations minus main ones
  logic                       finished;
  int unsigned                pick;
  logic                       any;

  always_comb begin
    for (int s = 0; s < NIN; s++) begin
      line[2*s]   = addr[s][AW-1:LB];
      line[2*s+1] = (AW-LB)'((addr[s] + AW'(SIMD_BITS/8 - 1)) >> LB);
      dup[s]      = last_ok[s] && (last_line[s] == line[2*s]);
      need[2*s]   = cfg.scfg[s].en && !sent[2*s] && !dup[s];
      need[2*s+1] = cfg.scfg[s].en && !sent[2*s+1] &&
                    (line[2*s+1] != line[2*s]);
    end
    any  = 1'b0;
    pick = 0;
    for (int r = NREQ - 1; r >= 0; r--)
      if (need[r]) begin
        any  = 1'b1;
        pick = r;
      end
  end

  assign pf_req  = run && !finished && any && (ahead < $signed((AW+1)'(PF_DIST)));
  assign pf_addr = {line[pick], LB'(0)};
  // move to the next iteration once nothing is left to send
  assign adv     = run && !finished && !any &&
                   (ahead < $signed((AW+1)'(PF_DIST)));
  assign done    = finished;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sent      <= '0;
      last_line <= '0;
      last_ok   <= '0;
      ahead     <= '0;
      finished  <= 1'b0;
    end else if (init) begin
      sent      <= '0;
      last_ok   <= '0;
      ahead     <= '0;
      finished  <= 1'b0;
    end else begin
      // a skipped first line is settled at once, so that the stream's
      // second line cannot make it look new again
      for (int s = 0; s < NIN; s++)
        if (dup[s]) sent[2*s] <= 1'b1;
      if (pf_req && pf_ready) begin
        sent[pick] <= 1'b1;
        last_line[pick/2] <= line[pick];
        last_ok[pick/2]   <= 1'b1;
      end
      if (adv) begin
        sent <= '0;
        if (final_iter) finished <= 1'b1;
      end
      ahead <= ahead + ((AW+1)'(adv) - (AW+1)'(main_fire));
    end
  end

endmodule
