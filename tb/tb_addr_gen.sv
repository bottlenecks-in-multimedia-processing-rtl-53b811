// tb_addr_gen: checks one stream's address generator. The testbench runs its
// own loop nest, drives the inner last-value flags from it and compares the
// address of every iteration with a closed form: start plus, for each level,
// the number of times that level has been entered times its stride, which is
// computed independently of the stride-selection logic. Strides, masks and
// loop counts are random; random stalls hold en low.
module tb_addr_gen;
  import breeze_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic load, en;
  logic [31:0] start_addr, addr;
  logic [4:0][31:0] stride;
  logic [4:0] mask;
  logic [3:0] last_inner;
  logic [2:0] sel_level;

  addr_gen dut (.*);

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

  task automatic run();
    int b [5];
    int e [5];
    int st [5];
    logic [31:0] exp;
    int entered [5];
    for (int k = 0; k < 5; k++) begin
      b[k] = $urandom_range(1, 3);
      st[k] = int'($urandom_range(2000)) - 1000;
      entered[k] = 0;
    end
    @(negedge clk);
    start_addr = $urandom;
    mask = 5'($urandom);
    for (int k = 0; k < 5; k++) stride[k] = 32'(st[k]);
    load = 1; en = 0; last_inner = '0;
    @(negedge clk);
    load = 0;
    for (int i1 = 1; i1 <= b[0]; i1++)
      for (int i2 = 1; i2 <= b[1]; i2++)
        for (int i3 = 1; i3 <= b[2]; i3++)
          for (int i4 = 1; i4 <= b[3]; i4++)
            for (int i5 = 1; i5 <= b[4]; i5++) begin
              e = '{i1, i2, i3, i4, i5};
              exp = start_addr;
              for (int k = 0; k < 5; k++)
                if (mask[k]) exp = exp + 32'(entered[k] * st[k]);
              check(addr == exp, $sformatf("addr %h vs %h", addr, exp));
              for (int k = 1; k < 5; k++) last_inner[k-1] = (e[k] == b[k]);
              // the level about to be incremented
              begin
                int lvl = 0;
                for (int k = 0; k < 5; k++) if (e[k] != b[k]) lvl = k;
                entered[lvl]++;
              end
              en = ($urandom_range(99) < 75);
              while (!en) begin
                @(negedge clk);
                check(addr == exp, "addr holds in stall");
                en = ($urandom_range(99) < 75);
              end
              @(negedge clk);
              en = 0;
            end
  endtask

  initial begin
    load = 0; en = 0; start_addr = 0; stride = '0; mask = '0; last_inner = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    repeat (40) run();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
