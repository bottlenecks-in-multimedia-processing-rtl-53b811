// tb_mb_controller: walks the controller through start, decode, init, run,
// an interrupt with the data station still busy, resume, the last iteration
// and the drain, checking busy, run, init, paused and done in every phase
// and that done comes exactly when the data station is empty. A second
// interrupt arrives in the middle of a result (the last issued iteration did
// not write): issuing must go on until an iteration that writes a result has
// been issued, and only then stop. A third pause is ended by a new start,
// which must begin a new instruction.
module tb_mb_controller;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start, intr, resume, dec_done, last_fired, fired, wr_fired, ds_empty;
  logic dec_start, init, run, busy, paused, done;

  mb_controller dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic one_run(bit with_intr);
    @(negedge clk);
    check(!busy && !run && !done, "idle");
    start = 1;
    #1 check(dec_start, "dec_start with start");
    @(negedge clk);
    start = 0;
    check(busy && !run && !init, "decoding");
    repeat (3) begin @(negedge clk); check(busy && !run, "still decoding"); end
    dec_done = 1;
    @(negedge clk);
    dec_done = 0;
    check(init && !run, "init");
    @(negedge clk);
    check(run && busy, "running");
    repeat (4) begin @(negedge clk); check(run, "running"); end
    if (with_intr) begin
      intr = 1; ds_empty = 0;
      #1 check(!run, "run drops with intr");
      @(negedge clk);
      intr = 0;
      check(!run && !paused && busy, "pausing, station busy");
      @(negedge clk);
      ds_empty = 1;
      #1 check(paused, "paused once empty");
      @(negedge clk);
      check(paused && !run, "stays paused");
      resume = 1;
      @(negedge clk);
      resume = 0;
      check(run, "running again");
      // an iteration that does not end a result, then an interrupt
      fired = 1; wr_fired = 0;
      @(negedge clk);
      fired = 0;
      intr = 1;
      #1 check(run, "no pause in the middle of a result");
      @(negedge clk);
      check(run && !paused, "still issuing");
      fired = 1; wr_fired = 1;
      #1 check(run, "issues the writing iteration");
      @(negedge clk);
      fired = 0; wr_fired = 0;
      #1 check(!run, "stops after the result boundary");
      @(negedge clk);
      intr = 0;
      check(!run && paused, "paused at the boundary");
      resume = 1;
      @(negedge clk);
      resume = 0;
      check(run, "running after second resume");
      // a third pause, then a new start instead of resume
      intr = 1;
      #1 check(!run, "stops at once at a boundary");
      @(negedge clk);
      intr = 0;
      check(paused, "paused for the third time");
      start = 1;
      #1 check(dec_start, "start accepted while paused");
      @(negedge clk);
      start = 0;
      check(busy && !run && !paused, "decoding the new instruction");
      dec_done = 1;
      @(negedge clk);
      dec_done = 0;
      check(init, "init of the new instruction");
      @(negedge clk);
      check(run, "running the new instruction");
    end
    last_fired = 1; ds_empty = 0;
    @(negedge clk);
    last_fired = 0;
    check(!run && busy && !done, "draining");
    @(negedge clk);
    check(!done, "no done while station busy");
    ds_empty = 1;
    #1 check(done, "done when empty");
    @(negedge clk);
    check(!busy && !done, "back to idle");
  endtask

  initial begin
    start = 0; intr = 0; resume = 0; dec_done = 0; last_fired = 0; ds_empty = 1;
    fired = 0; wr_fired = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    one_run(0);
    one_run(1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
