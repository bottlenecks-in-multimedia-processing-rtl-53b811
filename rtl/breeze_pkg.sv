// breeze_pkg: types and constants shared by the MediaBreeze unit.
//
// The MediaBreeze unit executes one "Breeze instruction" at a time: a
// multidimensional vector instruction that describes up to five nested loops,
// three input streams (IS1..IS3) and one output stream (OS), each with its own
// start address and one stride per loop level, plus the SIMD operation,
// reduction, shift, saturation, element types and multicast patterns.
//
// Loop levels are numbered 1 (outermost) to 5 (innermost) as in the
// architecture description; in the packed arrays below index 0 is level 1.
// Streams are indexed 0 = IS1, 1 = IS2, 2 = IS3, 3 = OS.
//
// Instruction word layout (32-bit words, word index in brackets). The field
// list follows the published instruction structure; the exact bit packing of
// the control, mask and type words is this design's own choice.
//   [0..4]   loop1..loop5 count (0 and 1 both mean a single iteration)
//   [5..8]   start address of IS1, IS2, IS3, OS (byte addresses)
//   [9]      control: [3:0] OPR, [5:4] RedOp, [10:6] shift, [13:11] LL,
//            [14] signed, [15] saturate
//   [10..14] stride level 1..5 of IS1 (signed bytes), [15..19] IS2,
//   [20..24] IS3, [25..29] OS
//   [30]     masks: [4:0] IS1, [12:8] IS2, [20:16] IS3, [28:24] OS;
//            bit k-1 enables the level-k stride
//   [31]     per stream s, byte s: stream_cfg_t (type, enable, multicast)
package breeze_pkg;

  localparam int unsigned NLOOPS      = 5;
  localparam int unsigned NSTREAMS    = 4;
  localparam int unsigned NIN         = 3;
  localparam int unsigned AW          = 32;   // address / stride / count width
  localparam int unsigned INSTR_WORDS = 32;   // words per Breeze instruction

  localparam int unsigned S_IS1 = 0;
  localparam int unsigned S_IS2 = 1;
  localparam int unsigned S_IS3 = 2;
  localparam int unsigned S_OS  = 3;

  typedef enum logic [1:0] {
    DT_8  = 2'd0,
    DT_16 = 2'd1,
    DT_32 = 2'd2
  } dtype_e;

  typedef enum logic [3:0] {
    OP_ADD  = 4'd0,   // a + b
    OP_SUB  = 4'd1,   // a - b
    OP_MUL  = 4'd2,   // a * b
    OP_MADD = 4'd3,   // a * b + c
    OP_MAC  = 4'd4,   // acc += a * b
    OP_SAD  = 4'd5,   // acc += |a - b|
    OP_MIN  = 4'd6,   // min(a, b)
    OP_MAX  = 4'd7,   // max(a, b)
    OP_ACC  = 4'd8    // acc += a
  } opr_e;

  typedef enum logic [1:0] {
    RED_NONE = 2'd0,
    RED_SUM  = 2'd1,  // all lanes summed into element 0
    RED_MAX  = 2'd2,
    RED_MIN  = 2'd3
  } redop_e;

  // Per-stream type and multicast control (one byte of word 31).
  // With mc_en set, lane i reads element ((i >> mc_rep) mod 2**mc_dist):
  // mc_dist = 0 broadcasts element 0 (A,A,A,...), mc_rep = 1 / mc_dist = 1
  // gives A,A,B,B,..., mc_rep = 0 / mc_dist = 1 gives A,B,A,B,...
  typedef struct packed {
    logic [1:0] mc_dist;
    logic [1:0] mc_rep;
    logic       mc_en;
    logic       en;
    dtype_e     dtype;
  } stream_cfg_t;

  typedef struct packed {
    logic [NLOOPS-1:0][AW-1:0]                 count;
    logic [NSTREAMS-1:0][AW-1:0]               start;
    logic [NSTREAMS-1:0][NLOOPS-1:0][AW-1:0]   stride;
    logic [NSTREAMS-1:0][NLOOPS-1:0]           mask;
    stream_cfg_t [NSTREAMS-1:0]                scfg;
    opr_e                                      opr;
    redop_e                                    redop;
    logic [4:0]                                shift;
    logic [2:0]                                ll;
    logic                                      sgn;
    logic                                      sat;
  } breeze_cfg_t;

  // Element width in bits of a data type.
  function automatic int unsigned dt_bits(dtype_e t);
    case (t)
      DT_8:    return 8;
      DT_16:   return 16;
      default: return 32;
    endcase
  endfunction

  // Compute width: the widest type among the enabled input streams, which
  // sets the SIMD parallelism to the minimum over the streams.
  function automatic dtype_e compute_type(breeze_cfg_t c);
    dtype_e t;
    t = DT_8;
    for (int s = 0; s < NIN; s++)
      if (c.scfg[s].en && (c.scfg[s].dtype > t)) t = c.scfg[s].dtype;
    return t;
  endfunction

endpackage
