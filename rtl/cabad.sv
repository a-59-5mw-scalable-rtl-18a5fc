// Two-bin-per-cycle context-adaptive binary arithmetic decoder (CABAD) with
// branch selection and a context-model cache.
//
// The arithmetic decoding of one bin needs the context model (CM) of that
// bin, and which model the next bin needs depends on the value of this one.
// The decoder is therefore given, with every request, the model of the first
// bin and both possible models of the second bin: the one to use if the first
// bin decodes to 0 and the one to use if it decodes to 1. All three are read
// from the CM cache in the same cycle, two binary arithmetic decoders (BADs)
// run back to back in that cycle, and the value of the first bin selects the
// model of the second (branch selection). Each cycle thus decodes two bins.
// If both bins use the same model, the second sees the first one's update.
//
// Each BAD is the standard H.264 regular-bin decoding step: split the 9-bit
// range by the LPS range of the model's state, compare the offset, update the
// model, renormalise the range to at least 256 while shifting new bitstream
// bits into the offset. A 48-bit bit window feeds the two renormalisations.
//
// There are two CM caches of the same kind: the main one, and an extra one
// for the texture models of quality enhancement layers, which are the most
// used models in quality-scalable decoding, so that switching layers does not
// evict them. Each request and each group load names its cache. Both caches
// share one single-port layered CM memory (cm_mem); the init port writes it
// while no load runs; cm_mem_reads/writes count the caches' accesses to it.
//
// Bypass bins (req_mode = BIN_BYPASS) use no model: one or two of them are
// decoded per cycle, one stream bit each. A terminating bin (BIN_TERM) is
// decoded alone; after a terminating bin of value 1 the slice's arithmetic
// code has ended and the decoder must be restarted with `start`.
//
// The branch selection of two bins, the two CM caches and the layered CM
// memory follow the published design. The bypass and terminating processes
// are the standard's. The request format and the bit window are this
// design's own choices (the published design does not describe them).
//
// Interface: pulse `start` at a slice start; the decoder reads the first
// 9 bits into the offset. Then a request (req_valid/req_ready) carries the
// bin mode, three CM-cache indices and req_two (second bin wanted; ignored
// for a terminating bin). The bins come out one cycle after acceptance on
// bin_valid with bin_cnt (1 or 2) and bin_val[0] (first bin) and bin_val[1].
// A request is accepted when no group load runs and at least 14 bits are in
// the window. Bitstream words enter MSB first on bs_*.
module cabad
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
  input  logic            start,
  // bitstream
  input  logic            bs_valid,
  output logic            bs_ready,
  input  logic [15:0]     bs_data,
  // bin requests
  input  logic            req_valid,
  output logic            req_ready,
  input  bin_mode_e       req_mode,
  input  logic            req_two,
  input  logic [IDXW-1:0] req_idx0,    // model of bin 1
  input  logic [IDXW-1:0] req_idx1_0,  // model of bin 2 if bin 1 = 0
  input  logic [IDXW-1:0] req_idx1_1,  // model of bin 2 if bin 1 = 1
  input  logic            req_cm2,     // models are in the extra CM cache
  output logic            bin_valid,
  output logic [1:0]      bin_cnt,
  output logic [1:0]      bin_val,
  // CM cache group loads
  input  logic            load_valid,
  output logic            load_ready,
  input  logic            load_cache,  // 0: main CM cache, 1: extra CM cache
  input  logic [GRPW-1:0] load_grp,
  input  logic [LAYW-1:0] load_layer,
  input  logic [CTXW-1:0] load_base,
  // CM memory initialisation
  input  logic            init_we,
  output logic            init_ready,
  input  logic [LAYW-1:0] init_layer,
  input  logic [CTXW-1:0] init_addr,
  input  ctx_t            init_data,
  output logic [31:0]     cm_mem_reads,
  output logic [31:0]     cm_mem_writes
);

  localparam int unsigned WIN = 48;

  // ------------------------------------------------ CM caches and memory
  // cache 0 holds the models in general use; cache 1 is the extra cache for
  // the texture models of quality enhancement layers. A request or a load
  // names its cache; both share the one CM memory.
  localparam int unsigned MAW = LAYW + CTXW;

  logic            c_ready  [2];
  logic            c_lready [2];
  logic            c_lvalid [2];
  logic [IDXW-1:0] rd_idx [3];
  ctx_t            c_rd   [2][3];
  ctx_t            rd_ctx [3];
  logic [1:0]      wr_en;
  logic [1:0]      c_wr_en [2];
  logic [IDXW-1:0] wr_idx [2];
  ctx_t            wr_ctx [2];
  logic            c_mwe [2], c_mre [2];
  logic [MAW-1:0]  c_maddr [2];
  ctx_t            c_mwdata [2];
  ctx_t            m_rdata;
  logic [31:0]     c_reads [2], c_writes [2];
  logic            m_we, m_re;
  logic [MAW-1:0]  m_addr;
  ctx_t            m_wdata;
  logic            cm_ready;

  for (genvar c = 0; c < 2; c++) begin : g_cm
    assign c_lvalid[c] = load_valid && (load_cache == 1'(c)) && cm_ready;
    assign c_wr_en[c]  = (req_cm2 == 1'(c)) ? wr_en : 2'b00;
    cm_cache #(.NGROUP(NGROUP), .GSIZE(GSIZE), .NLAYER(NLAYER), .NCTX(NCTX)) u_cm (
      .clk, .rst_n,
      .load_valid(c_lvalid[c]), .load_ready(c_lready[c]), .load_grp, .load_layer, .load_base,
      .mem_we(c_mwe[c]), .mem_re(c_mre[c]), .mem_addr(c_maddr[c]), .mem_wdata(c_mwdata[c]),
      .mem_rdata(m_rdata),
      .ready(c_ready[c]), .rd_idx, .rd_ctx(c_rd[c]), .wr_en(c_wr_en[c]), .wr_idx, .wr_ctx,
      .mem_reads(c_reads[c]), .mem_writes(c_writes[c])
    );
  end

  assign cm_ready      = c_ready[0] && c_ready[1];
  assign load_ready    = c_lready[0] && c_lready[1];
  assign init_ready    = cm_ready;
  assign cm_mem_reads  = c_reads[0] + c_reads[1];
  assign cm_mem_writes = c_writes[0] + c_writes[1];

  always_comb begin
    for (int p = 0; p < 3; p++) rd_ctx[p] = req_cm2 ? c_rd[1][p] : c_rd[0][p];
    // one CM memory port: the cache that is loading, else initialisation
    if (!c_ready[0]) begin
      m_we = c_mwe[0]; m_re = c_mre[0]; m_addr = c_maddr[0]; m_wdata = c_mwdata[0];
    end else if (!c_ready[1]) begin
      m_we = c_mwe[1]; m_re = c_mre[1]; m_addr = c_maddr[1]; m_wdata = c_mwdata[1];
    end else begin
      m_we = init_we; m_re = 1'b0; m_addr = {init_layer, init_addr}; m_wdata = init_data;
    end
  end

  cm_mem #(.NLAYER(NLAYER), .NCTX(NCTX)) u_mem (
    .clk, .we(m_we), .re(m_re), .addr(m_addr), .wdata(m_wdata), .rdata(m_rdata)
  );

  // ------------------------------------------------------------ decoder state
  logic [8:0]     range_q, offset_q;
  logic           active, init_pend;
  logic [WIN-1:0] win;   // next bitstream bits, MSB first
  logic [6:0]     cnt;   // valid bits in win

  // one regular-bin decoding step with renormalisation; `bits` are the next
  // seven stream bits, `used` how many of them the renormalisation consumed
  typedef struct packed {
    logic       bin;
    ctx_t       ctx;
    logic [8:0] range;
    logic [8:0] offset;
    logic [2:0] used;
  } bad_t;

  function automatic bad_t bad_step(ctx_t c, logic [8:0] rng, logic [8:0] ofs, logic [6:0] bits);
    bad_t       r;
    logic [7:0] rlps;
    logic [8:0] rmps, rn;
    logic [15:0] cat;  // offset followed by the next bits, before the shift
    logic [2:0] sh;
    rlps = range_lps(c.state, rng[7:6]);
    rmps = rng - 9'(rlps);
    if (ofs >= rmps) begin
      r.bin        = ~c.mps;
      ofs          = ofs - rmps;
      rn           = 9'(rlps);
      r.ctx.mps    = (c.state == 6'd0) ? ~c.mps : c.mps;
      r.ctx.state  = next_state_lps(c.state);
    end else begin
      r.bin        = c.mps;
      rn           = rmps;
      r.ctx.mps    = c.mps;
      r.ctx.state  = next_state_mps(c.state);
    end
    sh = 3'd0;
    for (int i = 1; i <= 7; i++) if (rn < (9'd256 >> (i - 1))) sh = 3'(i);
    cat      = {ofs[8:0], bits} << sh;
    r.offset = cat[15:7];  // the low bits of cat are the unused stream bits
    r.range  = rn << sh;
    r.used   = sh;
    return r;
  endfunction

  // one bypass bin: the offset takes one more stream bit
  function automatic bad_t byp_step(logic [8:0] rng, logic [8:0] ofs, logic b);
    bad_t        r;
    logic [9:0]  o2;
    o2       = {ofs, b};
    r.bin    = (o2 >= {1'b0, rng});
    r.offset = r.bin ? 9'(o2 - {1'b0, rng}) : o2[8:0];
    r.range  = rng;
    r.ctx    = '0;
    r.used   = 3'd1;
    return r;
  endfunction

  // a terminating bin: the range loses 2; a 0 renormalises by at most one bit
  function automatic bad_t term_step(logic [8:0] rng, logic [8:0] ofs, logic b);
    bad_t        r;
    logic [8:0]  rn;
    rn     = rng - 9'd2;
    r.ctx  = '0;
    r.bin  = (ofs >= rn);
    r.used = 3'd0;
    r.range  = rn;
    r.offset = ofs;
    if (!r.bin && !rn[8]) begin
      r.range  = rn << 1;
      r.offset = {ofs[7:0], b};
      r.used   = 3'd1;
    end
    return r;
  endfunction

  // --------------------------------------------------------- the two BADs
  bad_t        b1, b2, r1, r2;
  logic        two;
  logic [5:0]  used_bits;
  logic        fire;
  logic [IDXW-1:0] idx2;
  ctx_t        ctx2;

  assign rd_idx[0] = req_idx0;
  assign rd_idx[1] = req_idx1_0;
  assign rd_idx[2] = req_idx1_1;

  assign req_ready = active && cm_ready && (cnt >= 7'd14);
  assign fire      = req_valid && req_ready;

  always_comb begin
    b1   = bad_step(rd_ctx[0], range_q, offset_q, win[WIN-1 -: 7]);
    // branch selection: the first bin picks the model of the second
    idx2 = b1.bin ? req_idx1_1 : req_idx1_0;
    ctx2 = b1.bin ? rd_ctx[2] : rd_ctx[1];
    if (idx2 == req_idx0) ctx2 = b1.ctx;
    b2   = bad_step(ctx2, b1.range, b1.offset, 7'(win >> (WIN - 7 - int'(b1.used))));
    // the result of the requested mode
    two = req_two && (req_mode != BIN_TERM);
    case (req_mode)
      BIN_BYPASS: begin
        r1 = byp_step(range_q, offset_q, win[WIN-1]);
        r2 = byp_step(range_q, r1.offset, win[WIN-2]);
      end
      BIN_TERM: begin
        r1 = term_step(range_q, offset_q, win[WIN-1]);
        r2 = r1;
      end
      default: begin
        r1 = b1;
        r2 = b2;
      end
    endcase
    used_bits = two ? 6'(r1.used) + 6'(r2.used) : 6'(r1.used);
    wr_en     = (req_mode == BIN_REGULAR) ? {fire && two, fire} : 2'b00;
    wr_idx[0] = req_idx0;
    wr_ctx[0] = b1.ctx;
    wr_idx[1] = idx2;
    wr_ctx[1] = b2.ctx;
  end

  // ------------------------------------------------------------- bit window
  logic [5:0] consume;
  logic       take_word;
  logic [6:0] left;
  logic [WIN-1:0] win_next;
  always_comb begin
    consume   = '0;
    if (init_pend && cnt >= 7'd9) consume = 6'd9;
    else if (fire)                consume = used_bits;
    left      = cnt - 7'(consume);
    take_word = bs_valid && bs_ready;
    win_next  = win << consume;
    if (take_word) win_next = win_next | (WIN'(bs_data) << (WIN - 16 - int'(left)));
  end
  assign bs_ready = (cnt <= 7'd32);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      range_q   <= 9'd510;
      offset_q  <= '0;
      active    <= 1'b0;
      init_pend <= 1'b0;
      win       <= '0;
      cnt       <= '0;
      bin_valid <= 1'b0;
      bin_cnt   <= '0;
      bin_val      <= '0;
    end else begin
      if (start) begin
        // a new slice restarts the bit window
        win       <= '0;
        cnt       <= '0;
        active    <= 1'b0;
        init_pend <= 1'b1;
      end else begin
        win <= win_next;
        cnt <= left + (take_word ? 7'd16 : 7'd0);
      end
      if (!start && init_pend && cnt >= 7'd9) begin
        offset_q  <= win[WIN-1 -: 9];
        range_q   <= 9'd510;
        init_pend <= 1'b0;
        active    <= 1'b1;
      end
      bin_valid <= fire;
      if (fire) begin
        bin_val  <= {two && r2.bin, r1.bin};
        bin_cnt  <= two ? 2'd2 : 2'd1;
        range_q  <= two ? r2.range  : r1.range;
        offset_q <= two ? r2.offset : r1.offset;
      end
    end
  end

endmodule
