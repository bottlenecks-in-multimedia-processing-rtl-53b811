// tb_load_store_unit: random stream enables, addresses, data and ready
// patterns. Checks that only enabled streams request, that an iteration
// proceeds only when every enabled port is ready (otherwise a load stall is
// flagged), that disabled streams read as zero, and that the store port
// passes address, data and byte enables and reports ok/stall from ready.
module tb_load_store_unit;
  import breeze_pkg::*;

  logic ld_issue, ld_ok, ld_stall, st_valid, st_ok, st_stall;
  logic [2:0] ld_en, mem_rd_req, mem_rd_ready;
  logic [2:0][31:0] ld_addr, mem_rd_addr;
  logic [2:0][127:0] ld_data, mem_rd_data;
  logic [31:0] st_addr, mem_wr_addr;
  logic [127:0] st_data, mem_wr_data;
  logic [15:0] st_be, mem_wr_be;
  logic mem_wr_req, mem_wr_ready;

  load_store_unit dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n_ok = 0, n_stall = 0;
    for (int n = 0; n < 500; n++) begin
      bit all;
      ld_issue = 1'($urandom_range(3) != 0);
      ld_en = 3'($urandom);
      mem_rd_ready = 3'($urandom) | 3'($urandom);
      for (int s = 0; s < 3; s++) begin
        ld_addr[s] = $urandom;
        mem_rd_data[s] = {$urandom, $urandom, $urandom, $urandom};
      end
      st_valid = 1'($urandom); st_addr = $urandom; st_data = {$urandom, $urandom, $urandom, $urandom};
      st_be = 16'($urandom); mem_wr_ready = 1'($urandom);
      #1;
      all = 1;
      for (int s = 0; s < 3; s++) begin
        if (ld_en[s] && !mem_rd_ready[s]) all = 0;
        check(mem_rd_req[s] == (ld_issue && ld_en[s]), "request gating");
        if (ld_en[s]) check(mem_rd_addr[s] == ld_addr[s], "address");
        check(ld_data[s] == (ld_en[s] ? mem_rd_data[s] : 128'd0), "load data");
      end
      check(ld_ok == (ld_issue && all), "ld_ok");
      check(ld_stall == (ld_issue && !all), "ld_stall");
      check(mem_wr_req == st_valid, "store request");
      if (st_valid)
        check(mem_wr_addr == st_addr && mem_wr_data == st_data && mem_wr_be == st_be, "store fields");
      check(st_ok == (st_valid && mem_wr_ready) && st_stall == (st_valid && !mem_wr_ready), "store ok/stall");
      n_ok += int'(ld_ok); n_stall += int'(ld_stall);
      #1;
    end
    check(n_ok > 0 && n_stall > 0, "both outcomes seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
