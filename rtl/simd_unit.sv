// simd_unit: SIMD computation of the MediaBreeze unit, with accumulation,
// reduction, shifting, saturation and packing of the result.
//
// Operands a, b, c arrive as lanes of the compute width (8, 16 or 32 bits,
// i.e. 16, 8 or 4 lanes of a 128-bit datapath). Each lane is extended to a
// 32-bit signed working value and the operation OPR is applied. The
// accumulating operations (MAC, SAD, ACC) add into a per-lane 32-bit
// accumulator that is cleared each time a result is written, so that, for
// example, a dot product or a multicast matrix multiply is accumulated
// across the loop levels inside LL and written once per LL iteration. At the
// write the optional reduction combines all lanes into element 0, the value
// is shifted right arithmetically by SHIFT, then saturated (signed or
// unsigned range of the output type) or truncated, and packed at the output
// element width. The operation set, the 32-bit working width and the packing
// rules are this design's choices; the architecture names MAC, reductions,
// signed/unsigned arithmetic, saturation and shifting of final results.
// Results wider than the datapath keep only the elements that fit.
//
// Interface: in_valid consumes one operand bundle; wr marks the bundle whose
// result is written. res_data/res_be are combinational from the operands and
// the accumulator, valid when in_valid && wr. sat_hit flags that saturation
// clipped at least one element of the written result.
// Timing: one bundle per clock; the accumulator updates on the clock edge.
module simd_unit
  import breeze_pkg::*;
#(
  parameter int unsigned SIMD_BITS = 128
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   clear,
  input  logic                   in_valid,
  input  logic                   wr,
  input  logic [SIMD_BITS-1:0]   a,
  input  logic [SIMD_BITS-1:0]   b,
  input  logic [SIMD_BITS-1:0]   c,
  input  dtype_e                 cmp_type,
  input  dtype_e                 out_type,
  input  opr_e                   opr,
  input  redop_e                 redop,
  input  logic [4:0]             shift,
  input  logic                   sgn,
  input  logic                   sat,
  output logic [SIMD_BITS-1:0]   res_data,
  output logic [SIMD_BITS/8-1:0] res_be,
  output logic                   sat_hit
);

  localparam int unsigned LMAX = SIMD_BITS / 8;

  logic signed [31:0] acc  [LMAX];
  logic signed [31:0] term [LMAX];
  logic signed [31:0] res  [LMAX];
  logic signed [31:0] x, y, z, sh;
  int unsigned        lanes, nres, ow, ob;
  logic               accum;

  function automatic logic signed [31:0] lane(logic [SIMD_BITS-1:0] d,
                                              int unsigned i, dtype_e t,
                                              logic s);
    case (t)
      DT_8:    return s ? 32'(signed'(d[8*i +: 8]))   : 32'(d[8*i +: 8]);
      DT_16:   return s ? 32'(signed'(d[16*i +: 16])) : 32'(d[16*i +: 16]);
      default: return d[32*i +: 32];
    endcase
  endfunction

  // saturate or truncate v to an element of w bits; returns the element
  // zero-extended to 32 bits and whether it was clipped
  function automatic logic [32:0] fit(logic signed [31:0] v, int unsigned w,
                                      logic s, logic do_sat);
    logic signed [32:0] hi, lo;
    logic [31:0]        m;
    logic               clip;
    m = (w >= 32) ? 32'hFFFF_FFFF : ((32'd1 << w) - 32'd1);
    if (s) begin
      hi = (w >= 32) ? 33'sh0_7FFF_FFFF : 33'((33'sd1 <<< (w - 1)) - 33'sd1);
      lo = (w >= 32) ? -33'sh0_8000_0000 : 33'(-(33'sd1 <<< (w - 1)));
    end else begin
      hi = (w >= 32) ? 33'sh0_7FFF_FFFF : 33'((33'sd1 <<< w) - 33'sd1);
      lo = '0;
    end
    clip = 1'b0;
    if (do_sat && (33'(v) > hi)) begin
      v = 32'(hi);
      clip = 1'b1;
    end else if (do_sat && (33'(v) < lo)) begin
      v = 32'(lo);
      clip = 1'b1;
    end
    return {clip, v & m};
  endfunction

  always_comb begin
    lanes = SIMD_BITS / dt_bits(cmp_type);
    accum = (opr == OP_MAC) || (opr == OP_SAD) || (opr == OP_ACC);
    for (int unsigned i = 0; i < LMAX; i++) begin
      x = lane(a, i, cmp_type, sgn);
      y = lane(b, i, cmp_type, sgn);
      z = lane(c, i, cmp_type, sgn);
      case (opr)
        OP_ADD:  term[i] = x + y;
        OP_SUB:  term[i] = x - y;
        OP_MUL:  term[i] = x * y;
        OP_MADD: term[i] = x * y + z;
        OP_MAC:  term[i] = acc[i] + x * y;
        OP_SAD:  term[i] = acc[i] + ((x > y) ? (x - y) : (y - x));
        OP_MIN:  term[i] = (x < y) ? x : y;
        OP_MAX:  term[i] = (x > y) ? x : y;
        OP_ACC:  term[i] = acc[i] + x;
        default: term[i] = x;
      endcase
      if (i >= lanes) term[i] = '0;
    end
  end

  // reduction, shift, saturation and packing
  logic [32:0] f;
  always_comb begin
    for (int unsigned i = 0; i < LMAX; i++) res[i] = term[i];
    nres = lanes;
    if (redop != RED_NONE) begin
      res[0] = term[0];
      for (int unsigned i = 1; i < LMAX; i++)
        if (i < lanes)
          case (redop)
            RED_SUM: res[0] = res[0] + term[i];
            RED_MAX: res[0] = (term[i] > res[0]) ? term[i] : res[0];
            default: res[0] = (term[i] < res[0]) ? term[i] : res[0];
          endcase
      for (int unsigned i = 1; i < LMAX; i++) res[i] = '0;
      nres = 1;
    end
    ow = dt_bits(out_type);
    ob = ow / 8;
    if (nres * ow > SIMD_BITS) nres = SIMD_BITS / ow;
    res_data = '0;
    res_be   = '0;
    sat_hit  = 1'b0;
    for (int unsigned i = 0; i < LMAX; i++) begin
      sh = res[i] >>> shift;
      f  = fit(sh, ow, sgn, sat);
      if (i < nres) begin
        sat_hit = sat_hit | f[32];
        case (out_type)
          DT_8:    res_data[8*i +: 8]   = f[7:0];
          DT_16:   if (i < LMAX/2) res_data[16*i +: 16] = f[15:0];
          default: if (i < LMAX/4) res_data[32*i +: 32] = f[31:0];
        endcase
      end
    end
    for (int unsigned j = 0; j < LMAX; j++)
      res_be[j] = (j < nres * ob);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < LMAX; i++) acc[i] <= '0;
    end else if (clear) begin
      for (int i = 0; i < LMAX; i++) acc[i] <= '0;
    end else if (in_valid && accum) begin
      for (int i = 0; i < LMAX; i++) acc[i] <= wr ? 32'sd0 : term[i];
    end
  end

endmodule
