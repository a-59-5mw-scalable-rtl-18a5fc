// Scalable / multi-view H.264 video decoder core: the parts of the decoder
// that are specific to this architecture, wired as a three-stage
// asynchronous macroblock (MB) pipeline.
//
//   stage 0  entropy decoding: bitstream buffer -> two-bin CABAC decoder
//            with two context-model caches (the syntax parser that issues bin
//            requests and reports the end of an MB is outside this core)
//   stage 1  prediction: the MB's reference window is fetched through the
//            reference pixel cache; cache misses go to the DRAM controller.
//            The stage ends when the last line of the window has been handed
//            to the interpolator (outside this core). The residual buffer
//            with zero/DC block rejection sits beside it, between the
//            texture decoder and reconstruction (both outside).
//   stage 2  deblocking and padding (outside this core: start/done ports)
//
// mb_pipeline_ctrl starts each stage on its own as soon as its input is
// ready, and issues jobs layer-interleaved for quality-scalable streams
// (num_layers > 1): all layers of an MB before the next MB.
//
// Stage 1 takes one window request (mv_*) per job: it is accepted only while
// that stage has been started and has not yet issued its window. All
// handshakes are valid/ready; the DRAM port is the command/data interface of
// dram_ctrl. The grouping into stages and the blocks follow the published
// design; one reference window per MB job and the port-level split are this
// design's own choices.
module svcd_top
  import svcd_pkg::*;
  import cabac_pkg::*;
#(
  parameter int unsigned MB_BITS    = 16,   // 4096x2160: 34560 MBs
  parameter int unsigned LAYER_BITS = 3,
  parameter int unsigned CM_NGROUP  = 4,
  parameter int unsigned CM_GSIZE   = 8,
  parameter int unsigned CM_NLAYER  = 4,
  parameter int unsigned CM_NCTX    = 512,
  parameter int unsigned BS_DEPTH   = 32,
  parameter int unsigned DRAM_QDEPTH = 8,
  localparam int unsigned IDXW = $clog2(CM_NGROUP*CM_GSIZE),
  localparam int unsigned CTXW = $clog2(CM_NCTX),
  localparam int unsigned LAYW = $clog2(CM_NLAYER),
  localparam int unsigned GRPW = $clog2(CM_NGROUP),
  localparam int unsigned ROW_BITS = 1 + REF_BITS + (YL_BITS - 4) + (XL_BITS - 3)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // frame control
  input  logic                  go,
  input  logic [MB_BITS-1:0]    num_mb,
  input  logic [LAYER_BITS-1:0] num_layers,
  output logic                  busy,
  output logic                  frame_done,
  output logic [31:0]           frame_cycles,
  output logic [2:0]            stage_start,
  output logic [MB_BITS-1:0]    stage_mb    [3],
  output logic [LAYER_BITS-1:0] stage_layer [3],
  input  logic                  ed_done,     // stage 0 finished its MB (syntax parser)
  input  logic                  db_done,     // stage 2 finished its MB (deblocking/padding)
  // bitstream
  input  logic                  bs_valid,
  output logic                  bs_ready,
  input  logic [15:0]           bs_data,
  output logic [$clog2(BS_DEPTH+1)-1:0] bs_level,    // words in the bitstream buffer
  // CABAC bin requests and results
  input  logic                  slice_start,
  input  logic                  req_valid,
  output logic                  req_ready,
  input  bin_mode_e             req_mode,
  input  logic                  req_two,
  input  logic [IDXW-1:0]       req_idx0,
  input  logic [IDXW-1:0]       req_idx1_0,
  input  logic [IDXW-1:0]       req_idx1_1,
  input  logic                  req_cm2,
  output logic                  bin_valid,
  output logic [1:0]            bin_cnt,
  output logic [1:0]            bin_val,
  input  logic                  cm_load_valid,
  output logic                  cm_load_ready,
  input  logic                  cm_load_cache,
  input  logic [GRPW-1:0]       cm_load_grp,
  input  logic [LAYW-1:0]       cm_load_layer,
  input  logic [CTXW-1:0]       cm_load_base,
  input  logic                  cm_init_we,
  output logic                  cm_init_ready,
  input  logic [LAYW-1:0]       cm_init_layer,
  input  logic [CTXW-1:0]       cm_init_addr,
  input  ctx_t                  cm_init_data,
  // reference window of the MB in stage 1
  input  logic                  mv_valid,
  output logic                  mv_ready,
  input  logic                  mv_list,
  input  logic [REF_BITS-1:0]   mv_ref,
  input  logic [XL_BITS-1:0]    mv_xl,
  input  logic [YL_BITS-1:0]    mv_yl,
  input  logic [2:0]            mv_wl,
  input  logic [4:0]            mv_hl,
  // reference lines to the interpolator
  output logic                  pix_valid,
  input  logic                  pix_ready,
  output line_t                 pix_line,
  output logic [XL_BITS-1:0]    pix_xl,
  output logic [YL_BITS-1:0]    pix_yl,
  output logic                  pix_last,
  // residual buffer (texture decoder writes, reconstruction reads)
  input  logic                  res_wr_valid,
  input  logic                  res_wr_slot,
  input  logic [4:0]            res_wr_blk,
  input  logic signed [8:0]     res_wr_res [16],
  input  logic                  res_rd_valid,
  input  logic                  res_rd_slot,
  input  logic [4:0]            res_rd_blk,
  output logic                  res_rd_out_valid,
  output logic signed [8:0]     res_rd_res [16],
  // DRAM
  output dram_cmd_e             dram_cmd,
  output logic [1:0]            dram_bank,
  output logic [ROW_BITS-1:0]   dram_row,
  output logic [4:0]            dram_col,
  input  logic                  dq_valid,
  input  line_t                 dq_data,
  // statistics
  output logic [31:0]           cm_mem_reads,
  output logic [31:0]           cm_mem_writes,
  output logic [31:0]           mc_hits,
  output logic [31:0]           mc_misses,
  output logic [31:0]           n_act,
  output logic [31:0]           n_pre,
  output logic [31:0]           n_rd,
  output logic [31:0]           res_sram_writes,
  output logic [31:0]           res_sram_reads,
  output logic [31:0]           res_zero_blocks,
  output logic [31:0]           res_dc_blocks
);

  // ------------------------------------------------------- MB pipeline
  logic [2:0] stage_done;

  mb_pipeline_ctrl #(.NSTAGE(3), .DEPTH(2), .MB_BITS(MB_BITS), .LAYER_BITS(LAYER_BITS)) u_sched (
    .clk, .rst_n, .go, .num_mb, .num_layers,
    .stage_start, .stage_mb, .stage_layer, .stage_done,
    .busy, .frame_done, .frame_cycles
  );

  // ------------------------------------------------------- stage 0
  logic        fb_valid, fb_ready;
  logic [15:0] fb_data;

  bs_fifo #(.W(16), .DEPTH(BS_DEPTH)) u_bsbuf (
    .clk, .rst_n, .clear(slice_start),
    .in_valid(bs_valid), .in_ready(bs_ready), .in_data(bs_data),
    .out_valid(fb_valid), .out_ready(fb_ready), .out_data(fb_data),
    .level(bs_level)
  );

  cabad #(.NGROUP(CM_NGROUP), .GSIZE(CM_GSIZE), .NLAYER(CM_NLAYER), .NCTX(CM_NCTX)) u_cabad (
    .clk, .rst_n, .start(slice_start),
    .bs_valid(fb_valid), .bs_ready(fb_ready), .bs_data(fb_data),
    .req_valid, .req_ready, .req_mode, .req_two, .req_idx0, .req_idx1_0, .req_idx1_1, .req_cm2,
    .bin_valid, .bin_cnt, .bin_val,
    .load_valid(cm_load_valid), .load_ready(cm_load_ready), .load_cache(cm_load_cache),
    .load_grp(cm_load_grp),
    .load_layer(cm_load_layer), .load_base(cm_load_base),
    .init_we(cm_init_we), .init_ready(cm_init_ready), .init_layer(cm_init_layer),
    .init_addr(cm_init_addr), .init_data(cm_init_data),
    .cm_mem_reads, .cm_mem_writes
  );

  // ------------------------------------------------------- stage 1
  logic       s1_pend;   // stage 1 started, window not yet issued
  logic       blk_ready;
  logic       rq_valid, rq_ready;
  line_addr_t rq_addr;
  logic [6:0] rq_id;
  logic       fl_valid;
  logic [6:0] fl_id;
  line_t      fl_data;

  assign mv_ready = s1_pend && blk_ready;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)                  s1_pend <= 1'b0;
    else if (stage_start[1])     s1_pend <= 1'b1;
    else if (mv_valid && mv_ready) s1_pend <= 1'b0;

  mc_cache u_mcc (
    .clk, .rst_n,
    .blk_valid(mv_valid && s1_pend), .blk_ready, .blk_list(mv_list), .blk_ref(mv_ref),
    .blk_xl(mv_xl), .blk_yl(mv_yl), .blk_wl(mv_wl), .blk_hl(mv_hl),
    .out_valid(pix_valid), .out_ready(pix_ready), .out_line(pix_line),
    .out_xl(pix_xl), .out_yl(pix_yl), .out_last(pix_last),
    .rq_valid, .rq_ready, .rq_addr, .rq_id,
    .fl_valid, .fl_id, .fl_data,
    .hits(mc_hits), .misses(mc_misses)
  );

  dram_ctrl #(.QDEPTH(DRAM_QDEPTH), .IDW(7)) u_dram (
    .clk, .rst_n,
    .rq_valid, .rq_ready, .rq_addr, .rq_id,
    .fl_valid, .fl_id, .fl_data,
    .dram_cmd, .dram_bank, .dram_row, .dram_col, .dq_valid, .dq_data,
    .n_act, .n_pre, .n_rd
  );

  residual_buf #(.NBLK(24), .SLOTS(2), .RW(9)) u_res (
    .clk, .rst_n,
    .wr_valid(res_wr_valid), .wr_slot(res_wr_slot), .wr_blk(res_wr_blk), .wr_res(res_wr_res),
    .rd_valid(res_rd_valid), .rd_slot(res_rd_slot), .rd_blk(res_rd_blk),
    .rd_out_valid(res_rd_out_valid), .rd_res(res_rd_res),
    .sram_writes(res_sram_writes), .sram_reads(res_sram_reads),
    .zero_blocks(res_zero_blocks), .dc_blocks(res_dc_blocks)
  );

  // ------------------------------------------------------- stage ends
  assign stage_done[0] = ed_done;
  assign stage_done[1] = pix_valid && pix_ready && pix_last;
  assign stage_done[2] = db_done;

endmodule
