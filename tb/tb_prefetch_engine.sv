// tb_prefetch_engine: random Breeze loop nests, strides and stream enables.
// The testbench lists, from the loop nest and the closed-form stream
// addresses, the line requests the engine must make (per iteration and
// stream: the first line unless it repeats the stream's last requested line,
// then the second line if the access crosses into it) and compares them, in
// order, with the requests taken on the port. A simulated access side issues
// iterations at random; no request may belong to an iteration more than
// PF_DIST ahead of it. The prefetch port refuses requests at random.
module tb_prefetch_engine;
  import breeze_pkg::*;

  localparam int PF_DIST = 4;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic init, run, main_fire, pf_req, pf_ready, done;
  logic [31:0] pf_addr;
  breeze_cfg_t cfg;
  logic [4:0][31:0] load_idx;
  logic [2:0][31:0] load_addr;
  // fresh start: all loops at 1, streams at their start addresses
  assign load_idx  = {5{32'd1}};
  assign load_addr = {cfg.start[2], cfg.start[1], cfg.start[0]};

  prefetch_engine #(.PF_DIST(PF_DIST)) dut (.*);

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

  logic [31:0] exp_line [$];
  int          exp_iter [$];
  int fired, niter;

  task automatic one();
    int b [5];
    int st [3][5];
    int e [5];
    int entered [5];
    logic [31:0] a, l0, l1;
    logic [31:0] last [3];
    bit last_ok [3];
    int n;
    exp_line.delete(); exp_iter.delete();
    cfg = '0;
    for (int k = 0; k < 5; k++) begin
      b[k] = $urandom_range(1, 3); cfg.count[k] = 32'(b[k]); entered[k] = 0;
    end
    for (int s = 0; s < 3; s++) begin
      cfg.start[s] = 32'($urandom_range(4000));
      cfg.mask[s] = 5'($urandom);
      cfg.scfg[s].en = 1'($urandom_range(3) != 0);
      last_ok[s] = 0;
      for (int k = 0; k < 5; k++) begin
        st[s][k] = int'($urandom_range(80)) - 40;
        cfg.stride[s][k] = 32'(st[s][k]);
      end
    end
    // expected requests
    n = 0;
    for (int i1 = 1; i1 <= b[0]; i1++)
      for (int i2 = 1; i2 <= b[1]; i2++)
        for (int i3 = 1; i3 <= b[2]; i3++)
          for (int i4 = 1; i4 <= b[3]; i4++)
            for (int i5 = 1; i5 <= b[4]; i5++) begin
              int lvl;
              e = '{i1, i2, i3, i4, i5};
              for (int s = 0; s < 3; s++) begin
                a = cfg.start[s];
                for (int k = 0; k < 5; k++) if (cfg.mask[s][k]) a = a + 32'(entered[k] * st[s][k]);
                l0 = a >> 5; l1 = (a + 15) >> 5;
                if (cfg.scfg[s].en) begin
                  if (!(last_ok[s] && last[s] == l0)) begin
                    exp_line.push_back(l0 << 5); exp_iter.push_back(n);
                    last[s] = l0; last_ok[s] = 1;
                  end
                  if (l1 != l0) begin
                    exp_line.push_back(l1 << 5); exp_iter.push_back(n);
                    last[s] = l1; last_ok[s] = 1;
                  end
                end
              end
              lvl = 0;
              for (int k = 0; k < 5; k++) if (e[k] != b[k]) lvl = k;
              entered[lvl]++;
              n++;
            end
    niter = n;
    @(negedge clk);
    init = 1;
    @(negedge clk);
    init = 0; run = 1; fired = 0;
    while (!done || exp_line.size() != 0) begin
      main_fire = (fired < niter) && ($urandom_range(99) < 40);
      #1;
      if (pf_req && pf_ready) begin
        check(exp_line.size() != 0, "unexpected request");
        if (exp_line.size() != 0) begin
          check(pf_addr == exp_line[0], $sformatf("line %h vs %h", pf_addr, exp_line[0]));
          check(exp_iter[0] - fired < PF_DIST, "stays within the prefetch distance");
          void'(exp_line.pop_front()); void'(exp_iter.pop_front());
        end
      end
      @(negedge clk);
      if (main_fire) fired++;
      if (done && exp_line.size() != 0) begin
        check(0, "done with requests missing");
        break;
      end
    end
    check(exp_line.size() == 0, "all requests made");
    run = 0; main_fire = 0;
  endtask

  always_ff @(posedge clk) pf_ready <= ($urandom_range(99) < 70);

  initial begin
    init = 0; run = 0; main_fire = 0; cfg = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    repeat (30) one();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
