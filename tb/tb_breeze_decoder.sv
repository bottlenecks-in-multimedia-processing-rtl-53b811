// tb_breeze_decoder: a memory model returns random instruction words with
// one clock of latency; after start the decoder must fill every field of the
// configuration from its word (counts, start addresses, control word,
// strides, masks, stream types), treat words past the length as zero and
// finish in a fixed number of clocks.
module tb_breeze_decoder;
  import breeze_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start, re, busy, done;
  logic [6:0] base, raddr;
  logic [5:0] length;
  logic [31:0] rdata;
  breeze_cfg_t cfg;
  logic [31:0] mem [128];

  breeze_decoder dut (.*);

  always_ff @(posedge clk) if (re) rdata <= mem[raddr];

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

  task automatic decode(int b, int len);
    int clocks;
    logic [31:0] w [32];
    for (int i = 0; i < 32; i++) w[i] = (i < len) ? mem[b + i] : 32'd0;
    @(negedge clk);
    start = 1; base = 7'(b); length = 6'(len);
    @(negedge clk);
    start = 0;
    clocks = 1;
    while (!done) begin @(negedge clk); clocks++; end
    check(clocks == 34, $sformatf("decode takes %0d clocks", clocks));
    for (int k = 0; k < 5; k++) check(cfg.count[k] == w[k], "count");
    for (int s = 0; s < 4; s++) check(cfg.start[s] == w[5 + s], "start");
    check(cfg.opr == opr_e'(w[9][3:0]), "opr");
    check(cfg.redop == redop_e'(w[9][5:4]), "redop");
    check(cfg.shift == w[9][10:6], "shift");
    check(cfg.ll == w[9][13:11], "ll");
    check(cfg.sgn == w[9][14] && cfg.sat == w[9][15], "sgn/sat");
    for (int s = 0; s < 4; s++) begin
      for (int k = 0; k < 5; k++)
        check(cfg.stride[s][k] == w[10 + 5*s + k], $sformatf("stride %0d %0d", s, k));
      check(cfg.mask[s] == w[30][8*s +: 5], "mask");
      check(8'(cfg.scfg[s]) == w[31][8*s +: 8], "stream cfg");
    end
    check(!busy, "not busy after done");
  endtask

  initial begin
    start = 0; base = 0; length = 0;
    for (int i = 0; i < 128; i++) mem[i] = $urandom;
    repeat (2) @(negedge clk);
    rst_n = 1;
    decode(0, 32);
    decode(64, 32);
    decode(32, 20);
    decode(96, 31);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
