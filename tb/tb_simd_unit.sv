// tb_simd_unit: random operand bundles for every operation, reduction,
// compute type, output type, shift, signedness and saturation setting. The
// expected result of each written bundle is computed here lane by lane from
// the operation definitions (32-bit wrap-around working values, arithmetic
// shift, clamp to the output range) and compared with res_data, res_be and
// sat_hit. Accumulating operations are given runs of 1 to 6 bundles.
module tb_simd_unit;
  import breeze_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic clear, in_valid, wr, sgn, sat, sat_hit;
  logic [127:0] a, b, c, res_data;
  logic [15:0] res_be;
  dtype_e cmp_type, out_type;
  opr_e opr;
  redop_e redop;
  logic [4:0] shift;

  simd_unit dut (.*);

  int checks = 0, failures = 0;
  int n_sat = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int lane_of(logic [127:0] d, int i, int w, bit s);
    longint v = 0;
    for (int k = 0; k < w; k++) v[k] = d[w*i + k];
    if (s && v[w-1]) v = v - (64'd1 << w);
    return int'(v);
  endfunction

  int acc [16];

  initial begin
    clear = 0; in_valid = 0; wr = 0; a = 0; b = 0; c = 0; sgn = 0; sat = 0;
    cmp_type = DT_16; out_type = DT_16; opr = OP_ADD; redop = RED_NONE; shift = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 600; n++) begin
      int runlen, cw, ow, lanes, nres, r0, v, lo, hi;
      bit is_acc, clip;
      int term [16];
      int res [16];
      logic [127:0] exp_d;
      logic [15:0] exp_be;
      opr = opr_e'($urandom_range(8));
      redop = redop_e'($urandom_range(3));
      cmp_type = dtype_e'($urandom_range(2));
      out_type = dtype_e'($urandom_range(2));
      shift = 5'($urandom_range(12));
      sgn = 1'($urandom); sat = 1'($urandom);
      is_acc = (opr == OP_MAC) || (opr == OP_SAD) || (opr == OP_ACC);
      runlen = is_acc ? $urandom_range(1, 6) : 1;
      cw = 8 << int'(cmp_type); ow = 8 << int'(out_type); lanes = 128 / cw;
      for (int i = 0; i < 16; i++) acc[i] = 0;
      for (int r = 0; r < runlen; r++) begin
        a = {$urandom, $urandom, $urandom, $urandom};
        b = {$urandom, $urandom, $urandom, $urandom};
        c = {$urandom, $urandom, $urandom, $urandom};
        in_valid = 1; wr = (r == runlen - 1);
        #1;
        for (int i = 0; i < 16; i++) begin
          int x, y, z;
          x = lane_of(a, i, cw, sgn); y = lane_of(b, i, cw, sgn); z = lane_of(c, i, cw, sgn);
          if (i >= lanes) term[i] = 0;
          else case (opr)
            OP_ADD:  term[i] = x + y;
            OP_SUB:  term[i] = x - y;
            OP_MUL:  term[i] = x * y;
            OP_MADD: term[i] = x * y + z;
            OP_MAC:  term[i] = acc[i] + x * y;
            OP_SAD:  term[i] = acc[i] + ((x > y) ? x - y : y - x);
            OP_MIN:  term[i] = (x < y) ? x : y;
            OP_MAX:  term[i] = (x > y) ? x : y;
            default: term[i] = acc[i] + x;
          endcase
        end
        if (wr) begin
          nres = lanes;
          for (int i = 0; i < 16; i++) res[i] = term[i];
          if (redop != RED_NONE) begin
            r0 = term[0];
            for (int i = 1; i < lanes; i++)
              if (redop == RED_SUM) r0 += term[i];
              else if (redop == RED_MAX) r0 = (term[i] > r0) ? term[i] : r0;
              else r0 = (term[i] < r0) ? term[i] : r0;
            res[0] = r0; nres = 1;
          end
          if (nres * ow > 128) nres = 128 / ow;
          exp_d = '0; exp_be = '0; clip = 0;
          if (ow == 32) begin
            hi = sgn ? 32'h7FFF_FFFF : 32'h7FFF_FFFF; lo = sgn ? 32'h8000_0000 : 0;
          end else begin
            hi = sgn ? (1 << (ow-1)) - 1 : (1 << ow) - 1; lo = sgn ? -(1 << (ow-1)) : 0;
          end
          for (int i = 0; i < nres; i++) begin
            v = res[i] >>> shift;
            if (sat && v > hi) begin v = hi; clip = 1; end
            if (sat && v < lo) begin v = lo; clip = 1; end
            for (int k = 0; k < ow; k++) exp_d[ow*i + k] = v[k];
            for (int k = 0; k < ow/8; k++) exp_be[i*ow/8 + k] = 1'b1;
          end
          check(res_data == exp_d, $sformatf("data op %0d red %0d cw %0d ow %0d", opr, redop, cw, ow));
          check(res_be == exp_be, "byte enables");
          check(sat_hit == clip, "sat_hit");
          n_sat += int'(clip);
        end
        @(negedge clk);
        for (int i = 0; i < 16; i++) acc[i] = wr ? 0 : term[i];
        in_valid = 0;
        if ($urandom_range(3) == 0) @(negedge clk);
      end
    end
    check(n_sat > 0, "saturation exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
