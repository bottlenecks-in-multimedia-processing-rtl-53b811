// tb_breeze_imem: writes random words into every location of the Breeze
// instruction memory, reads them back in random order and checks the data
// and its one-clock read latency, including read-during-write (old data).
module tb_breeze_imem;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic we, re;
  logic [6:0] waddr, raddr;
  logic [31:0] wdata, rdata;
  logic [31:0] model [128];
  logic [31:0] old;

  breeze_imem dut (.*);

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
    we = 0; re = 0; waddr = 0; raddr = 0; wdata = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // unwritten words read as zero
    re = 1; raddr = 7'd77;
    @(negedge clk);
    check(rdata == 32'd0, "cleared at reset");
    re = 0;
    for (int i = 0; i < 128; i++) begin
      model[i] = $urandom;
      we = 1; waddr = 7'(i); wdata = model[i];
      @(negedge clk);
    end
    we = 0;
    for (int n = 0; n < 300; n++) begin
      int a;
      a = $urandom_range(127);
      re = 1; raddr = 7'(a);
      if ($urandom_range(3) == 0) begin
        we = 1; waddr = 7'(a); wdata = $urandom;
      end
      @(negedge clk);
      check(rdata == model[a], $sformatf("read %0d", a));
      if (we) model[a] = wdata;
      old = rdata;
      we = 0;
      re = 0;
      @(negedge clk);
      check(rdata == old, "read data holds while re is low");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
