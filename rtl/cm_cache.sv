// Context-model (CM) cache of the arithmetic decoder.
//
// The probability models (context models) of all layers live in the
// single-port CM memory (cm_mem, outside this module) with NLAYER sections of
// NCTX models each, reached through the mem_* port. The decoder
// works on a small register cache of NGROUP groups of GSIZE models, which it
// can read at three places and write at two places in the same cycle: that is
// what lets it look up every model the next two bins may need at once.
//
// A group is (re)loaded with load_valid/load_ready, naming the layer and the
// first context index of the GSIZE models it should hold. If the group
// already holds exactly those models nothing happens. Otherwise only the
// models of the group that were changed since they were loaded are written
// back (adaptive write-back), one per cycle, and the new models are then read,
// one per cycle. With layer-interleaved decoding a group is reloaded on every
// layer change, so the saving of unchanged models matters.
//
// The CM cache, its groups, the layered CM memory and the write-back of only
// the changed models follow the published design; the group count and size
// follow its figure (four groups of eight). The memory size, the load
// handshake and the sequential (one model per cycle) transfer are this
// design's own choices. mem_reads/mem_writes count this cache's accesses.
//
// Timing: a load that misses keeps the cache busy (ready low) for
// (changed models) + GSIZE + 2 cycles after its acceptance; reads
// are combinational from the registers, writes take effect at the next edge.
module cm_cache
  import cabac_pkg::*;
#(
  parameter int unsigned NGROUP = 4,
  parameter int unsigned GSIZE  = 8,
  parameter int unsigned NLAYER = 4,
  parameter int unsigned NCTX   = 512,
  localparam int unsigned IDXW  = $clog2(NGROUP*GSIZE),
  localparam int unsigned CTXW  = $clog2(NCTX),
  localparam int unsigned LAYW  = $clog2(NLAYER),
  localparam int unsigned GRPW  = $clog2(NGROUP)
) (
  input  logic            clk,
  input  logic            rst_n,
  // group load
  input  logic            load_valid,
  output logic            load_ready,
  input  logic [GRPW-1:0] load_grp,
  input  logic [LAYW-1:0] load_layer,
  input  logic [CTXW-1:0] load_base,
  // CM memory port (read data one cycle after mem_re)
  output logic            mem_we,
  output logic            mem_re,
  output logic [LAYW+CTXW-1:0] mem_addr,
  output ctx_t            mem_wdata,
  input  ctx_t            mem_rdata,
  // decoder access
  output logic            ready,       // no load in progress
  input  logic [IDXW-1:0] rd_idx [3],
  output ctx_t            rd_ctx [3],
  input  logic [1:0]      wr_en,
  input  logic [IDXW-1:0] wr_idx [2],
  input  ctx_t            wr_ctx [2],
  // CM memory access counters
  output logic [31:0]     mem_reads,
  output logic [31:0]     mem_writes
);

  localparam int unsigned NENT = NGROUP*GSIZE;
  localparam int unsigned GIW  = $clog2(GSIZE);

  typedef enum logic [1:0] {S_IDLE, S_WB, S_LD} state_e;
  state_e state;

  ctx_t            ent     [NENT];
  logic [NENT-1:0] changed;
  logic            gvalid  [NGROUP];
  logic [LAYW-1:0] glayer  [NGROUP];
  logic [CTXW-1:0] gbase   [NGROUP];


  logic [GRPW-1:0] cur_grp;
  logic [LAYW-1:0] new_layer;
  logic [CTXW-1:0] new_base;
  logic [GIW:0]    ld_i;

  // lowest changed entry of the group being reloaded
  logic            wb_any;
  logic [GIW-1:0]  wb_i;
  always_comb begin
    wb_any = 1'b0;
    wb_i   = '0;
    for (int i = GSIZE-1; i >= 0; i--)
      if (changed[int'(cur_grp)*GSIZE + i]) begin
        wb_any = 1'b1;
        wb_i   = GIW'(i);
      end
  end

  assign ready      = (state == S_IDLE);
  assign load_ready = (state == S_IDLE);

  always_comb
    for (int p = 0; p < 3; p++) rd_ctx[p] = ent[rd_idx[p]];

  // CM memory accesses: write-back of a changed model, or load read
  always_comb begin
    mem_we    = (state == S_WB) && wb_any;
    mem_re    = (state == S_LD) && (ld_i < (GIW+1)'(GSIZE));
    mem_wdata = ent[{cur_grp, wb_i}];
    mem_addr  = (state == S_WB) ? {glayer[cur_grp], gbase[cur_grp] + CTXW'(wb_i)}
                                : {new_layer, new_base + CTXW'(ld_i)};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      changed    <= '0;
      cur_grp    <= '0;
      new_layer  <= '0;
      new_base   <= '0;
      ld_i       <= '0;
      mem_reads  <= '0;
      mem_writes <= '0;
      for (int g = 0; g < NGROUP; g++) begin
        gvalid[g] <= 1'b0;
        glayer[g] <= '0;
        gbase[g]  <= '0;
      end
      for (int i = 0; i < NENT; i++) ent[i] <= '0;
    end else begin
      case (state)
        S_IDLE: begin
          for (int w = 0; w < 2; w++)
            if (wr_en[w]) begin
              ent[wr_idx[w]]     <= wr_ctx[w];
              changed[wr_idx[w]] <= 1'b1;
            end
          if (load_valid && !(gvalid[load_grp] && glayer[load_grp] == load_layer &&
                              gbase[load_grp] == load_base)) begin
            cur_grp   <= load_grp;
            new_layer <= load_layer;
            new_base  <= load_base;
            ld_i      <= '0;
            state     <= S_WB;
          end
        end
        S_WB: begin
          if (wb_any) begin
            changed[{cur_grp, wb_i}] <= 1'b0;
            mem_writes <= mem_writes + 1;
          end else begin
            state <= S_LD;
          end
        end
        S_LD: begin
          if (ld_i < (GIW+1)'(GSIZE)) mem_reads <= mem_reads + 1;
          if (ld_i != '0) ent[{cur_grp, GIW'(ld_i - 1)}] <= mem_rdata;
          if (ld_i == (GIW+1)'(GSIZE)) begin
            gvalid[cur_grp] <= 1'b1;
            glayer[cur_grp] <= new_layer;
            gbase[cur_grp]  <= new_base;
            state           <= S_IDLE;
          end
          ld_i <= ld_i + 1;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // the decoder may only write models while no load is running
  a_no_write_during_load: assert property (@(posedge clk) disable iff (!rst_n)
      (state != S_IDLE) |-> (wr_en == 2'b00));

endmodule
