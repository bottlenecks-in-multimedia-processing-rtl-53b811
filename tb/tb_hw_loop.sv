// tb_hw_loop: checks the five hardware loops against a software loop nest.
// Several loop-count sets (including unused loops with count 0 and 1) are
// run with random stalls (en low); after every advance the five indices must
// equal the next tuple of the reference nest, final_iter must rise exactly in
// the last iteration, and with en held high the nest must take exactly one
// clock per iteration. Some runs load the indices of an iteration in the
// middle of the nest (as when a saved state is restored) and must continue
// from exactly that iteration.
module tb_hw_loop;
  import breeze_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic load, en;
  logic [4:0][31:0] count, idx, load_idx;
  logic [4:0] at_last;
  logic final_iter;
  logic [2:0] inc_level;

  hw_loop dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(int c1, int c2, int c3, int c4, int c5, int stall_pct,
                     int skip = 0);
    int b [5];
    int e [5];
    int n, clocks, lvl, t, all;
    b = '{c1, c2, c3, c4, c5};
    for (int k = 0; k < 5; k++) if (b[k] == 0) b[k] = 1;
    // indices of iteration number skip (0 = the first one)
    t = skip;
    for (int k = 4; k >= 0; k--) begin
      load_idx[k] = 32'(t % b[k] + 1);
      t = t / b[k];
    end
    @(negedge clk);
    count = {32'(c5), 32'(c4), 32'(c3), 32'(c2), 32'(c1)};
    load = 1; en = 0;
    @(negedge clk);
    load = 0;
    n = 0; clocks = 0; all = 0;
    for (int i1 = 1; i1 <= b[0]; i1++)
      for (int i2 = 1; i2 <= b[1]; i2++)
        for (int i3 = 1; i3 <= b[2]; i3++)
          for (int i4 = 1; i4 <= b[3]; i4++)
            for (int i5 = 1; i5 <= b[4]; i5++) begin
              all++;
              if (all <= skip) continue;
              e = '{i1, i2, i3, i4, i5};
              // expected level incremented next: innermost not at bound
              lvl = 0;
              for (int k = 0; k < 5; k++) if (e[k] != b[k]) lvl = k + 1;
              en = ($urandom_range(99) >= stall_pct);
              while (!en) begin
                @(negedge clk); clocks++;
                en = ($urandom_range(99) >= stall_pct);
              end
              for (int k = 0; k < 5; k++)
                check(idx[k] == 32'(e[k]), $sformatf("idx[%0d] %0d vs %0d", k, idx[k], e[k]));
              check(inc_level == 3'(lvl), "inc_level");
              check(final_iter == (lvl == 0), "final_iter");
              @(negedge clk); clocks++;
              n++;
            end
    en = 0;
    // held in the last iteration
    check(final_iter, "final_iter holds");
    if (stall_pct == 0) check(clocks == n, $sformatf("rate %0d clocks for %0d iterations", clocks, n));
  endtask

  initial begin
    load = 0; en = 0; count = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    run(0, 3, 2, 4, 5, 0);
    run(2, 1, 3, 1, 2, 30);
    run(1, 1, 1, 1, 1, 0);
    run(3, 2, 2, 2, 3, 20);
    run(0, 0, 0, 7, 8, 0);
    run(2, 3, 2, 3, 4, 0, 37);
    run(3, 2, 2, 2, 3, 25, 50);
    run(1, 1, 1, 1, 6, 0, 5);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
