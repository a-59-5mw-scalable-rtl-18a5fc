// Residual buffer with rejection of all-zero and DC-only blocks.
//
// The texture decoder writes the residual of each 4x4 block of a macroblock
// (MB) here, and reconstruction reads it back. Many blocks carry no residual
// at all, and many carry only a DC term, which after the inverse transform is
// one value repeated 16 times. The buffer detects both cases when a block is
// written: an all-zero block only sets a flag, a constant block stores its one
// value in a small register file, and only the remaining blocks are written to
// (and later read from) the residual SRAM. This saves SRAM accesses, which is
// the purpose the published design gives for its all-zero/DC detection; the
// detection on the residual samples, the storage layout and the two-MB depth
// are this design's own choices.
//
// Interface: a write (wr_valid) stores the 16 residual samples of block
// wr_blk of MB slot wr_slot. A read (rd_valid) of block rd_blk of slot rd_slot
// returns its 16 samples one cycle later on rd_res with rd_out_valid. A block
// must be written before it is read. sram_writes/sram_reads count SRAM
// accesses; zero_blocks/dc_blocks count rejected blocks.
module residual_buf #(
  parameter int unsigned NBLK  = 24,  // 4x4 blocks per MB: 16 luma + 8 chroma (4:2:0)
  parameter int unsigned SLOTS = 2,   // MBs held
  parameter int unsigned RW    = 9,   // bits per residual sample, signed
  localparam int unsigned BKW  = $clog2(NBLK),
  localparam int unsigned SLW  = (SLOTS > 1) ? $clog2(SLOTS) : 1
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  wr_valid,
  input  logic [SLW-1:0]        wr_slot,
  input  logic [BKW-1:0]        wr_blk,
  input  logic signed [RW-1:0]  wr_res [16],
  input  logic                  rd_valid,
  input  logic [SLW-1:0]        rd_slot,
  input  logic [BKW-1:0]        rd_blk,
  output logic                  rd_out_valid,
  output logic signed [RW-1:0]  rd_res [16],
  output logic [31:0]           sram_writes,
  output logic [31:0]           sram_reads,
  output logic [31:0]           zero_blocks,
  output logic [31:0]           dc_blocks
);

  localparam int unsigned NENT = SLOTS*NBLK;

  typedef enum logic [1:0] {K_ZERO = 2'd0, K_DC = 2'd1, K_FULL = 2'd2} kind_e;

  kind_e                kind [NENT];
  logic signed [RW-1:0] dcval [NENT];
  logic [16*RW-1:0]     sram [NENT];
  logic [16*RW-1:0]     sram_q;

  kind_e                rkind;
  logic signed [RW-1:0] rdc;

  // classification of the block being written
  logic is_zero, is_dc;
  logic [16*RW-1:0] wr_flat;
  always_comb begin
    is_zero = 1'b1;
    is_dc   = 1'b1;
    for (int i = 0; i < 16; i++) begin
      wr_flat[i*RW +: RW] = wr_res[i];
      if (wr_res[i] != '0)        is_zero = 1'b0;
      if (wr_res[i] != wr_res[0]) is_dc   = 1'b0;
    end
  end

  function automatic int unsigned ent(logic [SLW-1:0] s, logic [BKW-1:0] b);
    return int'(s) * NBLK + int'(b);
  endfunction

  // residual SRAM: written and read only for full blocks
  always_ff @(posedge clk) begin
    if (wr_valid && !is_zero && !is_dc) sram[ent(wr_slot, wr_blk)] <= wr_flat;
    if (rd_valid && kind[ent(rd_slot, rd_blk)] == K_FULL) sram_q <= sram[ent(rd_slot, rd_blk)];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_out_valid <= 1'b0;
      rkind        <= K_ZERO;
      rdc          <= '0;
      sram_writes  <= '0;
      sram_reads   <= '0;
      zero_blocks  <= '0;
      dc_blocks    <= '0;
      for (int i = 0; i < NENT; i++) begin
        kind[i]  <= K_ZERO;
        dcval[i] <= '0;
      end
    end else begin
      if (wr_valid) begin
        if (is_zero) begin
          kind[ent(wr_slot, wr_blk)] <= K_ZERO;
          zero_blocks <= zero_blocks + 1;
        end else if (is_dc) begin
          kind[ent(wr_slot, wr_blk)]  <= K_DC;
          dcval[ent(wr_slot, wr_blk)] <= wr_res[0];
          dc_blocks <= dc_blocks + 1;
        end else begin
          kind[ent(wr_slot, wr_blk)] <= K_FULL;
          sram_writes <= sram_writes + 1;
        end
      end
      rd_out_valid <= rd_valid;
      if (rd_valid) begin
        rkind <= kind[ent(rd_slot, rd_blk)];
        rdc   <= dcval[ent(rd_slot, rd_blk)];
        if (kind[ent(rd_slot, rd_blk)] == K_FULL) sram_reads <= sram_reads + 1;
      end
    end
  end

  always_comb
    for (int i = 0; i < 16; i++)
      case (rkind)
        K_FULL:  rd_res[i] = sram_q[i*RW +: RW];
        K_DC:    rd_res[i] = rdc;
        default: rd_res[i] = '0;
      endcase

endmodule
