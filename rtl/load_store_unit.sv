// load_store_unit: the loads and the store issued for the MediaBreeze unit.
//
// Each iteration of the Breeze instruction needs up to three loads (one per
// enabled input stream) and at most one store. The loads of an iteration are
// presented together at the addresses produced by the address generators;
// the iteration proceeds only when every enabled port answers ready in the
// same clock (a cache hit). A port that is not ready (a miss or a memory
// conflict) stalls the access side in order, as the in-order MediaBreeze
// pipeline does; the loads are simply presented again the next clock.
// Disabled streams issue no request and read as zero. The store port works
// the same way for the execute side. Using the host's existing load/store
// ports follows the architecture; the port protocol (request/ready with data
// returned in the same clock and SIMD_BITS read from any byte address) is
// this design's assumption about the L1 interface.
//
// Interface: ld_issue / ld_addr / ld_en from the access side, ld_ok and
// ld_data back; st_valid / st_addr / st_data / st_be from the execute side,
// st_ok back; mem_* are the three read and one write port of the L1.
module load_store_unit
  import breeze_pkg::*;
#(
  parameter int unsigned SIMD_BITS = 128
) (
  input  logic                               ld_issue,
  input  logic [NIN-1:0]                     ld_en,
  input  logic [NIN-1:0][AW-1:0]             ld_addr,
  output logic                               ld_ok,
  output logic [NIN-1:0][SIMD_BITS-1:0]      ld_data,
  output logic                               ld_stall,
  output logic [NIN-1:0]                     mem_rd_req,
  output logic [NIN-1:0][AW-1:0]             mem_rd_addr,
  input  logic [NIN-1:0]                     mem_rd_ready,
  input  logic [NIN-1:0][SIMD_BITS-1:0]      mem_rd_data,
  input  logic                               st_valid,
  input  logic [AW-1:0]                      st_addr,
  input  logic [SIMD_BITS-1:0]               st_data,
  input  logic [SIMD_BITS/8-1:0]             st_be,
  output logic                               st_ok,
  output logic                               st_stall,
  output logic                               mem_wr_req,
  output logic [AW-1:0]                      mem_wr_addr,
  output logic [SIMD_BITS-1:0]               mem_wr_data,
  output logic [SIMD_BITS/8-1:0]             mem_wr_be,
  input  logic                               mem_wr_ready
);

  logic all_ready;

  always_comb begin
    all_ready = 1'b1;
    for (int s = 0; s < NIN; s++) begin
      mem_rd_req[s]  = ld_issue && ld_en[s];
      mem_rd_addr[s] = ld_addr[s];
      ld_data[s]     = ld_en[s] ? mem_rd_data[s] : '0;
      if (ld_en[s] && !mem_rd_ready[s]) all_ready = 1'b0;
    end
    ld_ok    = ld_issue && all_ready;
    ld_stall = ld_issue && !all_ready;

    mem_wr_req  = st_valid;
    mem_wr_addr = st_addr;
    mem_wr_data = st_data;
    mem_wr_be   = st_be;
    st_ok       = st_valid && mem_wr_ready;
    st_stall    = st_valid && !mem_wr_ready;
  end

endmodule
