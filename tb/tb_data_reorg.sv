// tb_data_reorg: random raw data through every combination of source type,
// compute type (not narrower than the source), signedness and multicast
// pattern; each lane is compared with the element picked and extended by a
// reference written from the multicast definition.
module tb_data_reorg;
  import breeze_pkg::*;

  logic [127:0] raw, vec;
  dtype_e src_type, cmp_type;
  logic sgn, mc_en;
  logic [1:0] mc_rep, mc_dist;

  data_reorg dut (.*);

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
    for (int n = 0; n < 400; n++) begin
      int sw, cwid, lanes, e;
      longint v, got;
      raw = {$urandom, $urandom, $urandom, $urandom};
      src_type = dtype_e'($urandom_range(2));
      cmp_type = dtype_e'($urandom_range(2, int'(src_type)));
      sgn = 1'($urandom); mc_en = 1'($urandom);
      mc_rep = 2'($urandom); mc_dist = 2'($urandom);
      #1;
      sw = 8 << int'(src_type); cwid = 8 << int'(cmp_type); lanes = 128 / cwid;
      for (int i = 0; i < lanes; i++) begin
        e = mc_en ? ((i / (1 << mc_rep)) % (1 << mc_dist)) : i;
        if (e >= 128 / sw) e = 0;
        v = 0;
        for (int bit_i = 0; bit_i < sw; bit_i++) v[bit_i] = raw[sw*e + bit_i];
        if (sgn && v[sw-1]) v = v - (64'd1 << sw);
        v = v & ((64'd1 << cwid) - 1);
        got = 0;
        for (int bit_i = 0; bit_i < cwid; bit_i++) got[bit_i] = vec[cwid*i + bit_i];
        check(got == v, $sformatf("lane %0d src %0d cmp %0d mc %0d/%0d/%0d", i, sw, cwid,
                                  mc_en, mc_rep, mc_dist));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
