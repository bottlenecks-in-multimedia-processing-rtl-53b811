// data_reorg: data reorganization of one input stream (address transformation
// and multicast).
//
// The load unit delivers SIMD_BITS of raw data starting at the stream's
// current address. This block turns it into one SIMD operand at the compute
// width, which is the widest element type among the enabled input streams:
// narrower elements are unpacked and sign- or zero-extended, so that the
// parallelism is the minimum over the streams (e.g. 8 lanes when an 8-bit and
// a 16-bit stream are combined in 128 bits). With multicast enabled lane i
// takes element ((i >> mc_rep) mod 2**mc_dist) instead of element i, which
// covers broadcast (A,A,A,...) and many-to-many patterns such as A,A,B,B,...
// or A,B,A,B,... without any transpose or pack instructions. Unpacking and
// multicast follow the architecture; the (rep, dist) encoding of the
// multicast pattern is this design's own.
//
// Interface: purely combinational; raw in, vec out (lanes of compute width
// packed from bit 0). Unused upper bits of vec are zero.
module data_reorg
  import breeze_pkg::*;
#(
  parameter int unsigned SIMD_BITS = 128
) (
  input  logic [SIMD_BITS-1:0] raw,
  input  dtype_e               src_type,
  input  dtype_e               cmp_type,
  input  logic                 sgn,
  input  logic                 mc_en,
  input  logic [1:0]           mc_rep,
  input  logic [1:0]           mc_dist,
  output logic [SIMD_BITS-1:0] vec
);

  localparam int unsigned LMAX = SIMD_BITS / 8;

  // element e of the raw data at type t, extended to 32 bits
  function automatic logic [31:0] get_elem(logic [SIMD_BITS-1:0] d,
                                           int unsigned e, dtype_e t,
                                           logic s);
    logic [31:0] v;
    case (t)
      DT_8:    v = s ? {{24{d[8*e+7]}}, d[8*e +: 8]}
                     : {24'd0, d[8*e +: 8]};
      DT_16:   v = s ? {{16{d[16*e+15]}}, d[16*e +: 16]}
                     : {16'd0, d[16*e +: 16]};
      default: v = d[32*e +: 32];
    endcase
    return v;
  endfunction

  int unsigned lanes;
  int unsigned e;
  logic [31:0] v;

  always_comb begin
    lanes = SIMD_BITS / dt_bits(cmp_type);
    vec   = '0;
    for (int unsigned i = 0; i < LMAX; i++) begin
      e = mc_en ? ((i >> mc_rep) & ((1 << mc_dist) - 1)) : i;
      if (e >= SIMD_BITS / dt_bits(src_type)) e = 0;
      v = get_elem(raw, e, src_type, sgn);
      if (i < lanes) begin
        case (cmp_type)
          DT_8:    vec[8*i +: 8]   = v[7:0];
          DT_16:   vec[16*i +: 16] = v[15:0];
          default: vec[32*i +: 32] = v;
        endcase
      end
    end
  end

endmodule
