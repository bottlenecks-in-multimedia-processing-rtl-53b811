// tb_data_station: random pushes and pops against a queue model; checks the
// head data, the full and empty flags and the fill level, and that the queue
// accepts exactly DEPTH entries before reporting full.
module tb_data_station;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic push, pop, full, empty;
  logic [15:0] wdata, rdata;
  logic [3:0] level;
  logic [15:0] model [$];

  data_station #(.WIDTH(16), .DEPTH(8)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    push = 0; pop = 0; wdata = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check(empty && !full && level == 0, "empty after reset");
    // fill completely
    for (int i = 0; i < 8; i++) begin
      check(!full, "not full before 8");
      push = 1; wdata = 16'($urandom); model.push_back(wdata);
      @(negedge clk);
    end
    push = 0;
    check(full && level == 8, "full after 8 pushes");
    for (int n = 0; n < 3000; n++) begin
      push = !full && ($urandom_range(99) < 50);
      pop  = !empty && ($urandom_range(99) < 50);
      wdata = 16'($urandom);
      if (!empty) check(rdata == model[0], "head data");
      check(level == 4'(model.size()), "level");
      check(empty == (model.size() == 0) && full == (model.size() == 8), "flags");
      @(negedge clk);
      if (pop) void'(model.pop_front());
      if (push) model.push_back(wdata);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
