// tb_mediabreeze_top: end-to-end test of the MediaBreeze unit at its default
// parameters (128-bit SIMD, five loops, four streams, 8-entry data station).
//
// A behavioural L1 model (byte array, random hit/miss on every port) serves
// the three load ports and the store port. The host side writes Breeze
// instructions into the instruction memory and issues start. Seven kernels
// are run and every output byte is compared with a reference computed here
// from the same input data:
//   1. 1-D DCT pass over 8x8 blocks of a 16-bit image with multicast
//      (broadcast) coefficients, MAC, shift and signed saturation (the
//      instruction mapping of the DCT example), with an interrupt/resume in
//      the middle and random load and store misses; run a second time with
//      the interrupted DCT given up, its loop state saved, the upsampling
//      kernel run in between and the DCT then restarted from the saved state
//   2. linear scaling of 8-bit pixels: (p * f + o) >> s, three input streams,
//      unsigned saturation; once with no misses (checks one iteration per
//      clock) and once with a slow store port (data station fills)
//   3. motion-estimation SAD of a 16x16 block against four candidate
//      positions, with a sum reduction to one 32-bit result each
//   4. 2x horizontal upsampling by multicast (A,A,B,B,...)
//   5. 8x8 matrix multiply in multicast order (one element of A broadcast,
//      rows of B, eight results of a row of C at once)
//   6. 8-tap FIR filter with broadcast coefficients and unaligned loads
//   7. 5x5 2-D filter (colour-filter-array interpolation arithmetic), four
//      loop levels with four different strides on the image stream
// Each mechanism (load stall, store stall, full data station, saturation,
// multicast, reduction, pause, prefetch) is counted and must occur at least
// once. Every line the prefetch engine requests must be read by the same
// instruction, and a cold-cache run must stall less with prefetching than
// with the prefetch port refusing all requests.
module tb_mediabreeze_top;
  import breeze_pkg::*;

  localparam int unsigned SB    = 128;
  localparam int unsigned MEMSZ = 1 << 16;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic             imem_we;
  logic [6:0]       imem_waddr;
  logic [31:0]      imem_wdata;
  logic             brz_start, brz_intr, brz_resume, brz_restore;
  logic [4:0][31:0] ctx_idx;
  logic [3:0][31:0] ctx_addr;
  logic [6:0]       brz_base;
  logic [5:0]       brz_len;
  logic             busy, paused, done;
  logic [2:0]       rd_req;
  logic [2:0][31:0] rd_addr;
  logic [2:0]       rd_ready;
  logic [2:0][SB-1:0] rd_data;
  logic             wr_req;
  logic [31:0]      wr_addr;
  logic [SB-1:0]    wr_data;
  logic [SB/8-1:0]  wr_be;
  logic             wr_ready;
  logic [4:0][31:0] loop_idx;
  logic [3:0][31:0] stream_addr;
  logic evt_iter, evt_ld_stall, evt_ds_full, evt_st_stall, evt_write, evt_sat,
        evt_multicast, evt_prefetch;
  logic             pf_req, pf_ready;
  logic [31:0]      pf_addr;
  logic [3:0]       ds_level;

  mediabreeze_top dut (.*);

  // ------------------------------------------------------------ memory
  // A read port is ready when both 32-byte lines of its access are "hot"
  // (prefetched earlier in this instruction) or else with rd_hit_pct chance.
  logic [7:0] mem [MEMSZ];
  int unsigned rd_hit_pct = 100, wr_hit_pct = 100, pf_ok_pct = 100;
  bit hot  [MEMSZ/32];
  bit used [MEMSZ/32];
  int n_pf_bad = 0, n_pf = 0;

  function automatic bit is_hot(logic [31:0] a);
    return hot[(a % MEMSZ) / 32] && hot[((a + 15) % MEMSZ) / 32];
  endfunction

  task automatic cool_cache();
    for (int i = 0; i < MEMSZ/32; i++) begin hot[i] = 0; used[i] = 0; end
  endtask

  always_ff @(posedge clk) begin
    pf_ready <= ($urandom_range(99) < pf_ok_pct);
    if (pf_req && pf_ready) begin
      hot[(pf_addr % MEMSZ) / 32] <= 1'b1;
      n_pf <= n_pf + 1;
      if (pf_addr[4:0] != 5'd0) n_pf_bad <= n_pf_bad + 1;
    end
    for (int s = 0; s < 3; s++)
      if (rd_req[s]) begin
        used[(rd_addr[s] % MEMSZ) / 32] <= 1'b1;
        used[((rd_addr[s] + 15) % MEMSZ) / 32] <= 1'b1;
      end
  end

  // every prefetched line must be read by the instruction (checked at done)
  logic [31:0] pf_log [$];
  always_ff @(posedge clk) if (pf_req && pf_ready) pf_log.push_back(pf_addr);

  task automatic check_prefetches();
    int bad = 0;
    foreach (pf_log[i]) if (!used[(pf_log[i] % MEMSZ) / 32]) bad++;
    check(bad == 0, $sformatf("%0d of %0d prefetched lines never read", bad, pf_log.size()));
    pf_log.delete();
  endtask

  always_comb
    for (int s = 0; s < 3; s++)
      for (int b = 0; b < SB/8; b++)
        rd_data[s][8*b +: 8] = mem[(rd_addr[s] + 32'(b)) % MEMSZ];

  always_ff @(posedge clk) begin
    for (int s = 0; s < 3; s++)
      rd_ready[s] <= is_hot(rd_addr[s]) || ($urandom_range(99) < rd_hit_pct);
    wr_ready <= ($urandom_range(99) < wr_hit_pct);
    if (wr_req && wr_ready)
      for (int b = 0; b < SB/8; b++)
        if (wr_be[b]) mem[(wr_addr + 32'(b)) % MEMSZ] <= wr_data[8*b +: 8];
  end

  // ------------------------------------------------------------ bookkeeping
  int checks = 0, failures = 0;
  int n_ld_stall = 0, n_st_stall = 0, n_ds_full = 0, n_sat = 0, n_mc = 0,
      n_red = 0, n_pause = 0, n_iter = 0;
  always_ff @(posedge clk) begin
    n_ld_stall <= n_ld_stall + int'(evt_ld_stall);
    n_st_stall <= n_st_stall + int'(evt_st_stall);
    n_ds_full  <= n_ds_full + int'(evt_ds_full);
    n_sat      <= n_sat + int'(evt_sat);
    n_mc       <= n_mc + int'(evt_multicast);
    n_iter     <= n_iter + int'(evt_iter);
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------ host side
  logic [31:0] iw [32];

  function automatic logic [7:0] scfg(dtype_e t, bit en, bit mc, int rep, int dst);
    stream_cfg_t c;
    c.dtype = t; c.en = en; c.mc_en = mc; c.mc_rep = 2'(rep); c.mc_dist = 2'(dst);
    return 8'(c);
  endfunction

  function automatic logic [31:0] ctl(opr_e op, redop_e r, int sh, int ll, bit s, bit sat);
    return {16'd0, sat, s, 3'(ll), 5'(sh), 2'(r), 4'(op)};
  endfunction

  task automatic clear_iw();
    for (int i = 0; i < 32; i++) iw[i] = '0;
  endtask

  // level is 1..5
  task automatic set_stride(int s, int level, int value);
    iw[10 + 5*s + level - 1] = 32'(value);
    iw[30][8*s + level - 1] = 1'b1;
  endtask

  int unsigned cyc;
  always_ff @(posedge clk) cyc <= cyc + 1;

  // load iw at instruction slot 'slot' and run it; optional pause. With
  // abandon the run ends at the pause: the loop state is saved in ctx_idx /
  // ctx_addr and the unit is left paused. With restore the instruction
  // starts from the saved state.
  task automatic run_breeze(int slot, int pause_after, output int cycles,
                            input bit abandon = 0, input bit restore = 0);
    int unsigned t0;
    int nb;
    for (int i = 0; i < 32; i++) begin
      @(negedge clk);
      imem_we = 1'b1; imem_waddr = 7'(slot*32 + i); imem_wdata = iw[i];
    end
    @(negedge clk);
    imem_we = 1'b0;
    cool_cache();
    pf_log.delete();
    brz_base = 7'(slot*32); brz_len = 6'd32; brz_start = 1'b1;
    brz_restore = restore;
    t0 = cyc;
    @(negedge clk);
    brz_start = 1'b0; brz_restore = 1'b0;
    check(busy, "busy after start");
    if (pause_after > 0) begin
      nb = n_iter;
      while (n_iter - nb < pause_after) @(negedge clk);
      brz_intr = 1'b1;
      while (!paused) @(negedge clk);
      begin
        logic [4:0][31:0] li;
        logic [3:0][31:0] sa;
        li = loop_idx; sa = stream_addr;
        repeat (10) @(negedge clk);
        check(paused && (li == loop_idx) && (sa == stream_addr),
              "loop state holds while paused");
      end
      n_pause++;
      if (abandon) begin
        ctx_idx = loop_idx; ctx_addr = stream_addr;
        brz_intr = 1'b0;
        cycles = int'(cyc - t0);
        return;
      end
      brz_intr = 1'b0; brz_resume = 1'b1;
      @(negedge clk);
      brz_resume = 1'b0;
    end
    while (!done) @(negedge clk);
    cycles = int'(cyc - t0);
    @(negedge clk);
    check(!busy, "idle after done");
    check_prefetches();
  endtask

  function automatic int rd16(int a);
    return int'(signed'({mem[a+1], mem[a]}));
  endfunction
  function automatic int sat_s16(int v);
    return (v > 32767) ? 32767 : (v < -32768) ? -32768 : v;
  endfunction

  // ------------------------------------------------------------ tests
  localparam int IMG = 'h0000, COEF = 'h4000, OUT = 'h5000;
  localparam int W = 32, H = 16, RS = W * 2, J = W / 8;

  // with_restore: the DCT is interrupted, its state saved, the upsampling
  // instruction run in between, and the DCT then restarted from the saved
  // state; otherwise it is interrupted and resumed.
  task automatic test_dct(bit with_restore);
    int cycles, c2, exp, acc, bad;
    logic [31:0] iw_dct [32];
    int ref_out [H][W];
    for (int i = 0; i < W*H; i++) begin
      int v = $urandom_range(4000) - 2000;
      mem[IMG + 2*i] = 8'(v); mem[IMG + 2*i + 1] = 8'(v >> 8);
    end
    for (int i = 0; i < 64; i++) begin
      int v = $urandom_range(255) - 128;
      mem[COEF + 2*i] = 8'(v); mem[COEF + 2*i + 1] = 8'(v >> 8);
    end
    for (int i = 0; i < 2*W*H; i++) mem[OUT + i] = 8'hA5;
    // reference: out[8i+k][8j+m] = sat16((sum_l c[k][l] * img[8i+l][8j+m]) >>> 4)
    for (int bi = 0; bi < H/8; bi++)
      for (int bj = 0; bj < J; bj++)
        for (int k = 0; k < 8; k++)
          for (int m = 0; m < 8; m++) begin
            acc = 0;
            for (int l = 0; l < 8; l++)
              acc += rd16(COEF + 2*(8*k + l)) *
                     rd16(IMG + (8*bi + l)*RS + 2*(8*bj + m));
            ref_out[8*bi + k][8*bj + m] = sat_s16(acc >>> 4);
          end
    clear_iw();
    iw[0] = 0; iw[1] = H/8; iw[2] = J; iw[3] = 8; iw[4] = 8;
    iw[5] = IMG; iw[6] = COEF; iw[8] = OUT;
    iw[9] = ctl(OP_MAC, RED_NONE, 4, 4, 1, 1);
    set_stride(0, 5, RS); set_stride(0, 4, -7*RS); set_stride(0, 3, -7*RS + 16);
    set_stride(0, 2, RS - 16*(J-1));
    set_stride(1, 5, 2); set_stride(1, 4, 2); set_stride(1, 3, -126); set_stride(1, 2, -126);
    set_stride(3, 4, RS); set_stride(3, 3, -7*RS + 16); set_stride(3, 2, RS - 16*(J-1));
    iw[31] = {scfg(DT_16, 1, 0, 0, 0), 8'd0, scfg(DT_16, 1, 1, 0, 0), scfg(DT_16, 1, 0, 0, 0)};
    rd_hit_pct = 80; wr_hit_pct = 85;
    if (with_restore) begin
      iw_dct = iw;
      run_breeze(1, 173, cycles, 1'b1);
      check(paused, "left paused");
      // LL = 4: a result ends when loop 5 reaches its bound, and the pause
      // waits for that, so loop 5 is back at its first iteration
      check(ctx_idx[4] == 1, "paused at a result boundary");
      test_upsample();
      iw = iw_dct;
      rd_hit_pct = 80; wr_hit_pct = 85;
      run_breeze(1, 0, c2, 1'b0, 1'b1);
      cycles += c2;
      n_restore++;
    end else begin
      run_breeze(1, 300, cycles);
    end
    bad = 0;
    for (int r = 0; r < H; r++)
      for (int cix = 0; cix < W; cix++) begin
        exp = ref_out[r][cix];
        if (rd16(OUT + r*RS + 2*cix) != exp) bad++;
        check(rd16(OUT + r*RS + 2*cix) == exp, "dct output");
      end
    $display("dct: %0d iterations in %0d cycles, %0d mismatches", (H/8)*J*64, cycles, bad);
  endtask

  localparam int PIX = 'h8000, FAC = 'h9000, OFS = 'h9100, SOUT = 'hA000, NPIX = 256;

  task automatic test_scale(int hit_rd, int hit_wr, bit check_rate);
    int cycles, exp, t_first, t_last, n0;
    for (int i = 0; i < NPIX; i++) mem[PIX + i] = 8'($urandom);
    mem[FAC] = 8'd90; mem[OFS] = 8'd7;
    for (int i = 0; i < NPIX; i++) mem[SOUT + i] = 8'h00;
    clear_iw();
    iw[0] = 1; iw[1] = 1; iw[2] = 1; iw[3] = 1; iw[4] = NPIX/16;
    iw[5] = PIX; iw[6] = FAC; iw[7] = OFS; iw[8] = SOUT;
    iw[9] = ctl(OP_MADD, RED_NONE, 6, 5, 0, 1);
    set_stride(0, 5, 16); set_stride(3, 5, 16);
    iw[31] = {scfg(DT_8, 1, 0, 0, 0), scfg(DT_8, 1, 1, 0, 0), scfg(DT_8, 1, 1, 0, 0),
              scfg(DT_8, 1, 0, 0, 0)};
    rd_hit_pct = hit_rd; wr_hit_pct = hit_wr;
    n0 = n_iter;
    fork
      run_breeze(2, 0, cycles);
      begin
        while (n_iter == n0) @(posedge clk);
        t_first = int'(cyc);
        while (n_iter - n0 < NPIX/16) @(posedge clk);
        t_last = int'(cyc);
      end
    join
    for (int i = 0; i < NPIX; i++) begin
      exp = (int'(mem[PIX + i]) * 90 + 7) >>> 6;
      if (exp > 255) exp = 255;
      check(mem[SOUT + i] == 8'(exp), "scale output");
    end
    if (check_rate)
      check(t_last - t_first == NPIX/16 - 1, $sformatf(
            "one iteration per clock: %0d iterations over %0d clocks",
            NPIX/16, t_last - t_first + 1));
    $display("scale: %0d iterations in %0d cycles", NPIX/16, cycles);
  endtask

  localparam int CUR = 'hB000, REFB = 'hC000, SADO = 'hD000, RS8 = 64;

  task automatic test_sad();
    int cycles, exp, got, nb;
    for (int i = 0; i < 16*RS8; i++) begin
      mem[CUR + i] = 8'($urandom); mem[REFB + i] = 8'($urandom);
    end
    clear_iw();
    iw[0] = 1; iw[1] = 1; iw[2] = 1; iw[3] = 4; iw[4] = 16;
    iw[5] = CUR; iw[6] = REFB; iw[8] = SADO;
    iw[9] = ctl(OP_SAD, RED_SUM, 0, 4, 0, 0);
    set_stride(0, 5, RS8); set_stride(0, 4, -15*RS8);
    set_stride(1, 5, RS8); set_stride(1, 4, -15*RS8 + 1);
    set_stride(3, 4, 4);
    iw[31] = {scfg(DT_32, 0, 0, 0, 0), 8'd0, scfg(DT_8, 1, 0, 0, 0), scfg(DT_8, 1, 0, 0, 0)};
    rd_hit_pct = 70; wr_hit_pct = 70;
    nb = evt_cnt_write;
    run_breeze(3, 0, cycles);
    for (int d = 0; d < 4; d++) begin
      exp = 0;
      for (int r = 0; r < 16; r++)
        for (int x = 0; x < 16; x++) begin
          int a = mem[CUR + r*RS8 + x], b = mem[REFB + r*RS8 + x + d];
          exp += (a > b) ? a - b : b - a;
        end
      got = int'({mem[SADO+4*d+3], mem[SADO+4*d+2], mem[SADO+4*d+1], mem[SADO+4*d]});
      check(got == exp, $sformatf("sad[%0d] %0d vs %0d", d, got, exp));
    end
    check(evt_cnt_write - nb == 4, "sad writes once per candidate");
    n_red += evt_cnt_write - nb;
  endtask

  localparam int UPI = 'hE000, UPO = 'hE800;
  task automatic test_upsample();
    int cycles;
    for (int i = 0; i < 64; i++) mem[UPI + i] = 8'($urandom);
    clear_iw();
    iw[0] = 1; iw[1] = 1; iw[2] = 1; iw[3] = 1; iw[4] = 8;
    iw[5] = UPI; iw[8] = UPO;
    iw[9] = ctl(OP_ADD, RED_NONE, 0, 5, 0, 0);
    set_stride(0, 5, 8); set_stride(3, 5, 16);
    iw[31] = {scfg(DT_8, 0, 0, 0, 0), 8'd0, 8'd0, scfg(DT_8, 1, 1, 1, 3)};
    rd_hit_pct = 90; wr_hit_pct = 90;
    run_breeze(0, 0, cycles);
    for (int i = 0; i < 128; i++)
      check(mem[UPO + i] == mem[UPI + i/2], "upsample output");
  endtask

  // 8x8 matrix multiply by multicast: C[i][j] = sum_k A[i][k] * B[k][j].
  // Rows of B are read in row order, A[i][k] is broadcast to all eight
  // lanes, so one row of C (eight results) is built up over k.
  localparam int MA = 'hF000, MBM = 'hF100, MC = 'hF200;
  task automatic test_matmul();
    int cycles, acc;
    for (int i = 0; i < 64; i++) begin
      int va = $urandom_range(600) - 300, vb = $urandom_range(600) - 300;
      mem[MA + 2*i] = 8'(va); mem[MA + 2*i + 1] = 8'(va >> 8);
      mem[MBM + 2*i] = 8'(vb); mem[MBM + 2*i + 1] = 8'(vb >> 8);
    end
    clear_iw();
    iw[0] = 1; iw[1] = 1; iw[2] = 1; iw[3] = 8; iw[4] = 8;
    iw[5] = MBM; iw[6] = MA; iw[8] = MC;
    iw[9] = ctl(OP_MAC, RED_NONE, 2, 4, 1, 1);
    set_stride(0, 5, 16); set_stride(0, 4, -7*16);
    set_stride(1, 5, 2); set_stride(1, 4, 2);
    set_stride(3, 4, 16);
    iw[31] = {scfg(DT_16, 1, 0, 0, 0), 8'd0, scfg(DT_16, 1, 1, 0, 0), scfg(DT_16, 1, 0, 0, 0)};
    rd_hit_pct = 85; wr_hit_pct = 85;
    run_breeze(2, 0, cycles);
    for (int i = 0; i < 8; i++)
      for (int j = 0; j < 8; j++) begin
        acc = 0;
        for (int k = 0; k < 8; k++) acc += rd16(MA + 2*(8*i + k)) * rd16(MBM + 2*(8*k + j));
        check(rd16(MC + 2*(8*i + j)) == sat_s16(acc >>> 2),
              $sformatf("matmul C[%0d][%0d]", i, j));
      end
    $display("matmul: 64 iterations in %0d cycles", cycles);
  endtask

  // 8-tap FIR filter: y[n] = sat16((sum_t h[t] * x[n+t]) >>> 4). Each
  // iteration reads eight neighbouring samples at an unaligned address and
  // broadcasts one coefficient; a result vector is written after the taps.
  localparam int FX = 'h6000, FH = 'h6200, FY = 'h6400, NY = 64, NT = 8;
  task automatic test_fir();
    int cycles, acc;
    for (int i = 0; i < NY + NT; i++) begin
      int v = $urandom_range(20000) - 10000;
      mem[FX + 2*i] = 8'(v); mem[FX + 2*i + 1] = 8'(v >> 8);
    end
    for (int t = 0; t < NT; t++) begin
      int v = $urandom_range(100) - 50;
      mem[FH + 2*t] = 8'(v); mem[FH + 2*t + 1] = 8'(v >> 8);
    end
    clear_iw();
    iw[0] = 1; iw[1] = 1; iw[2] = 1; iw[3] = NY/8; iw[4] = NT;
    iw[5] = FX; iw[6] = FH; iw[8] = FY;
    iw[9] = ctl(OP_MAC, RED_NONE, 4, 4, 1, 1);
    set_stride(0, 5, 2); set_stride(0, 4, 16 - 2*(NT-1));
    set_stride(1, 5, 2); set_stride(1, 4, -2*(NT-1));
    set_stride(3, 4, 16);
    iw[31] = {scfg(DT_16, 1, 0, 0, 0), 8'd0, scfg(DT_16, 1, 1, 0, 0), scfg(DT_16, 1, 0, 0, 0)};
    rd_hit_pct = 75; wr_hit_pct = 80;
    run_breeze(3, 0, cycles);
    for (int n = 0; n < NY; n++) begin
      acc = 0;
      for (int t = 0; t < NT; t++) acc += rd16(FH + 2*t) * rd16(FX + 2*(n + t));
      check(rd16(FY + 2*n) == sat_s16(acc >>> 4), $sformatf("fir y[%0d]", n));
    end
    $display("fir: %0d iterations in %0d cycles", NY/8*NT, cycles);
  endtask

  // 5x5 2-D filter (the arithmetic of a 5x5 colour-filter-array
  // interpolation): out[r][x] = sat16((sum_ij w[i][j] * img[r+i][x+j]) >>> 6)
  // for 8 output columns per iteration. Loops: rows, column blocks, i, j;
  // the image stream uses four different strides.
  localparam int KI = 'h7000, KW = 'h7800, KO = 'h7A00, KRS = 64, KR = 6, KB = 2;
  task automatic test_filter5();
    int cycles, acc;
    for (int r = 0; r < KR + 4; r++)
      for (int x = 0; x < 8*KB + 4; x++) begin
        int v = $urandom_range(2000) - 1000;
        mem[KI + r*KRS + 2*x] = 8'(v); mem[KI + r*KRS + 2*x + 1] = 8'(v >> 8);
      end
    for (int i = 0; i < 25; i++) begin
      int v = $urandom_range(40) - 20;
      mem[KW + 2*i] = 8'(v); mem[KW + 2*i + 1] = 8'(v >> 8);
    end
    clear_iw();
    iw[0] = 1; iw[1] = KR; iw[2] = KB; iw[3] = 5; iw[4] = 5;
    iw[5] = KI; iw[6] = KW; iw[8] = KO;
    iw[9] = ctl(OP_MAC, RED_NONE, 6, 3, 1, 1);
    set_stride(0, 5, 2); set_stride(0, 4, KRS - 8); set_stride(0, 3, 16 - 4*KRS - 8);
    set_stride(0, 2, KRS - 16*(KB-1) - 4*KRS - 8);
    set_stride(1, 5, 2); set_stride(1, 4, 2); set_stride(1, 3, -48); set_stride(1, 2, -48);
    set_stride(3, 3, 16); set_stride(3, 2, KRS - 16*(KB-1));
    iw[31] = {scfg(DT_16, 1, 0, 0, 0), 8'd0, scfg(DT_16, 1, 1, 0, 0), scfg(DT_16, 1, 0, 0, 0)};
    rd_hit_pct = 80; wr_hit_pct = 80;
    run_breeze(0, 0, cycles);
    for (int r = 0; r < KR; r++)
      for (int x = 0; x < 8*KB; x++) begin
        acc = 0;
        for (int i = 0; i < 5; i++)
          for (int j = 0; j < 5; j++)
            acc += rd16(KW + 2*(5*i + j)) * rd16(KI + (r+i)*KRS + 2*(x+j));
        check(rd16(KO + r*KRS + 2*x) == sat_s16(acc >>> 6),
              $sformatf("filter out[%0d][%0d]", r, x));
      end
    $display("filter5: %0d iterations in %0d cycles", KR*KB*25, cycles);
  endtask

  // the data station never holds more than its eight entries
  int n_level_bad = 0;
  always_ff @(posedge clk) if (ds_level > 4'd8 || (evt_ds_full && ds_level != 4'd8)) n_level_bad <= n_level_bad + 1;

  int evt_cnt_write = 0;
  int n_restore = 0;
  always_ff @(posedge clk) evt_cnt_write <= evt_cnt_write + int'(evt_write);

  initial begin
    imem_we = 0; imem_waddr = 0; imem_wdata = 0; brz_start = 0; brz_intr = 0;
    brz_resume = 0; brz_base = 0; brz_len = 0; brz_restore = 0;
    ctx_idx = '0; ctx_addr = '0;
    cyc = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(!busy && !done, "idle after reset");
    test_scale(100, 100, 1);
    test_dct(0);
    test_scale(100, 30, 0);
    test_sad();
    test_upsample();
    test_dct(1);
    test_matmul();
    test_fir();
    test_filter5();
    // the same cold-cache scaling run without and with prefetching
    begin
      int s0, s1, s2;
      pf_ok_pct = 0;
      s0 = n_ld_stall;
      test_scale(20, 100, 0);
      s1 = n_ld_stall - s0;
      pf_ok_pct = 100;
      s0 = n_ld_stall;
      test_scale(20, 100, 0);
      s2 = n_ld_stall - s0;
      $display("cold scaling: %0d load stalls without prefetch, %0d with", s1, s2);
      check(s2 < s1, "prefetching removes load stalls");
    end
    check(n_pf > 0 && n_pf_bad == 0, "prefetches issued, line aligned");
    $display("events: ld_stall=%0d st_stall=%0d ds_full=%0d sat=%0d multicast=%0d reduce=%0d pause=%0d",
             n_ld_stall, n_st_stall, n_ds_full, n_sat, n_mc, n_red, n_pause);
    check(n_ld_stall > 0, "load stall happened");
    check(n_st_stall > 0, "store stall happened");
    check(n_ds_full > 0, "data station full happened");
    check(n_level_bad == 0, "data station level within 0..8, 8 when full");
    check(n_sat > 0, "saturation happened");
    check(n_mc > 0, "multicast happened");
    check(n_red > 0, "reduction happened");
    check(n_pause > 0, "pause happened");
    check(n_restore > 0, "restore from a saved state happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
