// mediabreeze_top: the MediaBreeze unit, hardware that feeds a SIMD unit
// with addresses, loop control and reorganized data so that the SIMD unit can
// run at its peak rate without a stream of supporting instructions.
//
// A Breeze instruction (see breeze_pkg) describes a complete loop nest of up
// to five levels over three input streams and one output stream. After the
// host writes it into the Breeze instruction memory and issues the start
// instruction, the unit runs on its own:
//
//   access side   hw_loop (5 counters) -> 4 x addr_gen -> load_store_unit
//                 (3 loads) -> 3 x data_reorg (unpack, multicast) -> push
//   data station  queue of operand bundles {a, b, c, output address, write}
//   execute side  pop -> simd_unit (op, accumulate, reduce, shift, saturate,
//                 pack) -> load_store_unit (1 store)
//   prefetch      prefetch_engine: a second copy of the loops and input
//                 address generators, up to PF_DIST iterations ahead,
//                 requesting the L1 lines the input streams will read
//
// Each clock without a stall the access side performs the work of five loop
// branches, four address computations, three loads, their reorganization and
// the SIMD operation of one iteration. A result is written whenever all loops
// inside level LL are at their bounds. A load miss stalls only the access
// side (loop indices and addresses hold) and a refused store only the execute
// side, with the data station between them. The host sees busy for the whole
// instruction (its pipeline is held meanwhile), can pause the unit with
// intr (it stops at the next result boundary; paused rises when nothing is
// in flight; loop_idx and stream_addr are then the state to save) and
// continue it with resume. A start with brz_restore set loads ctx_idx and
// ctx_addr, a previously saved state, instead of the start values.
//
// The split into units, the five loops, the four streams with five strides
// and masks each, multicast, the queue-organised data station and the
// start/interrupt instructions follow the architecture. The exact instruction
// bit layout, the port protocols, the operation set and the single-stage
// timing of loops and address generation are this design's choices.
//
// Memory ports: request/ready, read data returned combinationally in the
// clock the port is ready; SIMD_BITS read from any byte address.
module mediabreeze_top
  import breeze_pkg::*;
#(
  parameter int unsigned SIMD_BITS = 128,
  parameter int unsigned DS_DEPTH  = 8,
  parameter int unsigned NUM_INSTR = 4,
  parameter int unsigned LINE_BYTES = 32,
  parameter int unsigned PF_DIST   = 16,
  parameter int unsigned IABITS    = $clog2(NUM_INSTR * INSTR_WORDS)
) (
  input  logic                           clk,
  input  logic                           rst_n,
  // host: Breeze instruction memory write port
  input  logic                           imem_we,
  input  logic [IABITS-1:0]              imem_waddr,
  input  logic [31:0]                    imem_wdata,
  // host: start / interrupt instructions
  input  logic                           brz_start,
  input  logic [IABITS-1:0]              brz_base,
  input  logic [5:0]                     brz_len,
  input  logic                           brz_restore,
  input  logic [NLOOPS-1:0][AW-1:0]      ctx_idx,
  input  logic [NSTREAMS-1:0][AW-1:0]    ctx_addr,
  input  logic                           brz_intr,
  input  logic                           brz_resume,
  output logic                           busy,
  output logic                           paused,
  output logic                           done,
  // L1 data ports: three loads, one store
  output logic [NIN-1:0]                 rd_req,
  output logic [NIN-1:0][AW-1:0]         rd_addr,
  input  logic [NIN-1:0]                 rd_ready,
  input  logic [NIN-1:0][SIMD_BITS-1:0]  rd_data,
  output logic                           wr_req,
  output logic [AW-1:0]                  wr_addr,
  output logic [SIMD_BITS-1:0]           wr_data,
  output logic [SIMD_BITS/8-1:0]         wr_be,
  input  logic                           wr_ready,
  // L1 prefetch port (line addresses)
  output logic                           pf_req,
  output logic [AW-1:0]                  pf_addr,
  input  logic                           pf_ready,
  // loop state (for save on an exception)
  output logic [NLOOPS-1:0][AW-1:0]      loop_idx,
  output logic [NSTREAMS-1:0][AW-1:0]    stream_addr,
  // event strobes
  output logic                           evt_iter,
  output logic                           evt_ld_stall,
  output logic                           evt_ds_full,
  output logic                           evt_st_stall,
  output logic                           evt_write,
  output logic                           evt_sat,
  output logic                           evt_multicast,
  output logic                           evt_prefetch,
  output logic [$clog2(DS_DEPTH+1)-1:0]  ds_level      // iterations queued in the data station
);

  typedef struct packed {
    logic                 wr;
    logic [AW-1:0]        oaddr;
    logic [SIMD_BITS-1:0] c;
    logic [SIMD_BITS-1:0] b;
    logic [SIMD_BITS-1:0] a;
  } bundle_t;

  breeze_cfg_t cfg;
  dtype_e      cw;

  // ---------------------------------------------------------------- control
  logic dec_start, dec_done, dec_busy, init, run, last_fired, ds_empty, ds_full;
  logic fire;      // an iteration is issued this clock
  logic wr_now;    // ... and it ends a result (the LL rule below)
  logic imem_re;
  logic [IABITS-1:0] imem_raddr;
  logic [31:0]       imem_rdata;

  mb_controller u_ctrl (
    .clk, .rst_n, .start(brz_start), .intr(brz_intr), .resume(brz_resume),
    .dec_done, .last_fired, .fired(fire), .wr_fired(fire && wr_now), .ds_empty, .dec_start, .init, .run, .busy,
    .paused, .done
  );

  breeze_imem #(.NUM_INSTR(NUM_INSTR)) u_imem (
    .clk, .rst_n, .we(imem_we), .waddr(imem_waddr), .wdata(imem_wdata),
    .re(imem_re), .raddr(imem_raddr), .rdata(imem_rdata)
  );

  breeze_decoder #(.ABITS(IABITS)) u_dec (
    .clk, .rst_n, .start(dec_start), .base(brz_base), .length(brz_len),
    .re(imem_re), .raddr(imem_raddr), .rdata(imem_rdata), .cfg,
    .busy(dec_busy), .done(dec_done)
  );

  assign cw = compute_type(cfg);

  // start values of loops and streams: fresh, or the saved state
  logic                        restore_q;
  logic [NLOOPS-1:0][AW-1:0]   init_idx;
  logic [NSTREAMS-1:0][AW-1:0] init_addr;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)         restore_q <= 1'b0;
    else if (dec_start) restore_q <= brz_restore;
  end
  always_comb begin
    for (int k = 0; k < NLOOPS; k++) init_idx[k] = restore_q ? ctx_idx[k] : AW'(1);
    for (int s = 0; s < NSTREAMS; s++) init_addr[s] = restore_q ? ctx_addr[s] : cfg.start[s];
  end

  // ------------------------------------------------------------ access side
  logic [NLOOPS-1:0] at_last;
  logic              final_iter;
  logic [2:0]        inc_level;
  logic              ld_ok, ld_stall;
  logic [NIN-1:0]    ld_en;
  logic [NIN-1:0][SIMD_BITS-1:0] ld_data;
  logic [NSTREAMS-1:0][2:0]      sel_level;

  hw_loop u_loop (
    .clk, .rst_n, .load(init), .load_idx(init_idx), .en(fire), .count(cfg.count), .idx(loop_idx),
    .at_last, .final_iter, .inc_level
  );

  for (genvar s = 0; s < NSTREAMS; s++) begin : g_agu
    addr_gen u_agu (
      .clk, .rst_n, .load(init), .en(fire), .start_addr(init_addr[s]),
      .stride(cfg.stride[s]), .mask(cfg.mask[s]),
      .last_inner(at_last[NLOOPS-1:1]), .addr(stream_addr[s]),
      .sel_level(sel_level[s])
    );
  end

  for (genvar s = 0; s < NIN; s++) begin : g_en
    assign ld_en[s] = cfg.scfg[s].en;
  end

  bundle_t push_b, head_b;
  logic    st_valid, st_ok, st_stall, pop, sat_hit;
  logic [SIMD_BITS-1:0]   res_data;
  logic [SIMD_BITS/8-1:0] res_be;

  load_store_unit #(.SIMD_BITS(SIMD_BITS)) u_lsu (
    .ld_issue(run && !ds_full), .ld_en, .ld_addr(stream_addr[NIN-1:0]),
    .ld_ok, .ld_data, .ld_stall,
    .mem_rd_req(rd_req), .mem_rd_addr(rd_addr), .mem_rd_ready(rd_ready),
    .mem_rd_data(rd_data),
    .st_valid, .st_addr(head_b.oaddr), .st_data(res_data), .st_be(res_be),
    .st_ok, .st_stall,
    .mem_wr_req(wr_req), .mem_wr_addr(wr_addr), .mem_wr_data(wr_data),
    .mem_wr_be(wr_be), .mem_wr_ready(wr_ready)
  );

  assign fire       = ld_ok;
  assign last_fired = fire && final_iter;

  logic [SIMD_BITS-1:0] ops [NIN];
  for (genvar s = 0; s < NIN; s++) begin : g_reorg
    data_reorg #(.SIMD_BITS(SIMD_BITS)) u_reorg (
      .raw(ld_data[s]), .src_type(cfg.scfg[s].dtype), .cmp_type(cw),
      .sgn(cfg.sgn), .mc_en(cfg.scfg[s].mc_en), .mc_rep(cfg.scfg[s].mc_rep),
      .mc_dist(cfg.scfg[s].mc_dist), .vec(ops[s])
    );
  end

  // write when every loop inside level LL is at its bound (LL 0 or > 5 = 5)
  logic [2:0] ll_eff;
  always_comb begin
    ll_eff = ((cfg.ll == 3'd0) || (cfg.ll > 3'd5)) ? 3'd5 : cfg.ll;
    wr_now = 1'b1;
    for (int k = 0; k < NLOOPS; k++)
      if (k >= int'(ll_eff)) wr_now = wr_now & at_last[k];
  end

  assign push_b = '{wr: wr_now, oaddr: stream_addr[S_OS], c: ops[2],
                    b: ops[1], a: ops[0]};

  // ----------------------------------------------------------- data station
  data_station #(.WIDTH($bits(bundle_t)), .DEPTH(DS_DEPTH)) u_ds (
    .clk, .rst_n, .push(fire), .wdata(push_b), .pop, .rdata(head_b),
    .full(ds_full), .empty(ds_empty), .level(ds_level)
  );

  // ----------------------------------------------------------- execute side
  assign st_valid = !ds_empty && head_b.wr;
  assign pop      = !ds_empty && (!head_b.wr || st_ok);

  simd_unit #(.SIMD_BITS(SIMD_BITS)) u_simd (
    .clk, .rst_n, .clear(init), .in_valid(pop), .wr(head_b.wr),
    .a(head_b.a), .b(head_b.b), .c(head_b.c), .cmp_type(cw),
    .out_type(cfg.scfg[S_OS].dtype), .opr(cfg.opr), .redop(cfg.redop),
    .shift(cfg.shift), .sgn(cfg.sgn), .sat(cfg.sat), .res_data, .res_be,
    .sat_hit
  );

  // ------------------------------------------------------------ prefetching
  logic pf_done;
  prefetch_engine #(.SIMD_BITS(SIMD_BITS), .LINE_BYTES(LINE_BYTES),
                    .PF_DIST(PF_DIST)) u_pf (
    .clk, .rst_n, .init, .run, .main_fire(fire), .cfg, .load_idx(init_idx),
    .load_addr(init_addr[NIN-1:0]), .pf_req, .pf_addr,
    .pf_ready, .done(pf_done)
  );

  // ----------------------------------------------------------------- events
  assign evt_iter      = fire;
  assign evt_ld_stall  = ld_stall;
  assign evt_ds_full   = run && ds_full;
  assign evt_st_stall  = st_stall;
  assign evt_write     = pop && head_b.wr;
  assign evt_sat       = pop && head_b.wr && sat_hit;
  assign evt_prefetch  = pf_req && pf_ready;
  assign evt_multicast = fire && (cfg.scfg[0].mc_en || cfg.scfg[1].mc_en ||
                                  cfg.scfg[2].mc_en);

endmodule
