// breeze_decoder: stand-alone decoder of the Breeze instruction.
//
// A Breeze instruction is decoded only once: the decoder reads its words
// from the Breeze instruction memory, one per clock, and stores every field in
// the control registers (cfg) that drive the loops, the address generators,
// the data reorganization and the SIMD unit for the whole run. The host's
// start instruction gives the first word and the length; words at or past
// the length are taken as zero (an unused field). The word layout is listed
// in breeze_pkg. In the architecture the decoder is merged into the looping
// and address generation logic; here it is a separate module.
//
// Interface: start (pulse) with base/length; imem read port (re, raddr,
// rdata with one clock of latency); done pulses in the clock after the last
// field is written; busy is high in between.
// Timing: done is high INSTR_WORDS + 2 clocks after the clock of start.
module breeze_decoder
  import breeze_pkg::*;
#(
  parameter int unsigned ABITS = 7
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic [ABITS-1:0]  base,
  input  logic [5:0]        length,
  output logic              re,
  output logic [ABITS-1:0]  raddr,
  input  logic [31:0]       rdata,
  output breeze_cfg_t       cfg,
  output logic              busy,
  output logic              done
);

  logic [5:0]       cnt;        // word being requested
  logic             rvalid;     // rdata holds word widx
  logic [4:0]       widx;
  logic             wzero;      // word past the length
  logic [ABITS-1:0] base_q;
  logic [5:0]       len_q;

  assign re    = busy && (cnt < 6'(INSTR_WORDS)) && (cnt < len_q);
  assign raddr = base_q + ABITS'(cnt);

  // Write one 32-bit word into its field of the configuration.
  function automatic breeze_cfg_t put_word(breeze_cfg_t c, int unsigned i,
                                           logic [31:0] d);
    breeze_cfg_t r;
    r = c;
    if (i < 5)       r.count[i] = d;
    else if (i < 9)  r.start[i-5] = d;
    else if (i == 9) begin
      r.opr   = opr_e'(d[3:0]);
      r.redop = redop_e'(d[5:4]);
      r.shift = d[10:6];
      r.ll    = d[13:11];
      r.sgn   = d[14];
      r.sat   = d[15];
    end
    else if (i < 30) r.stride[(i-10)/5][(i-10)%5] = d;
    else if (i == 30) begin
      for (int s = 0; s < NSTREAMS; s++) r.mask[s] = d[8*s +: NLOOPS];
    end
    else begin
      for (int s = 0; s < NSTREAMS; s++) r.scfg[s] = stream_cfg_t'(d[8*s +: 8]);
    end
    return r;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy   <= 1'b0;
      done   <= 1'b0;
      cnt    <= '0;
      rvalid <= 1'b0;
      widx   <= '0;
      wzero  <= 1'b0;
      base_q <= '0;
      len_q  <= '0;
      cfg    <= '0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        busy   <= 1'b1;
        cnt    <= '0;
        base_q <= base;
        len_q  <= length;
        rvalid <= 1'b0;
      end else if (busy) begin
        // request stage
        if (cnt < 6'(INSTR_WORDS)) begin
          rvalid <= 1'b1;
          widx   <= cnt[4:0];
          wzero  <= !(cnt < len_q);
          cnt    <= cnt + 6'd1;
        end else begin
          rvalid <= 1'b0;
        end
        // write stage
        if (rvalid) begin
          cfg <= put_word(cfg, int'(widx), wzero ? 32'd0 : rdata);
          if (widx == 5'(INSTR_WORDS - 1)) begin
            busy <= 1'b0;
            done <= 1'b1;
          end
        end
      end
    end
  end

endmodule
