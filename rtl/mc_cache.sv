// Reference pixel cache of the motion compensation (MC) engine.
//
// Motion compensation reads, for every prediction block, a window of
// reference-picture pixels around the motion vector, and neighbouring blocks
// read overlapping windows. This cache keeps recently loaded reference pixels
// so that overlapping windows are fetched from DRAM once.
//
// Organisation (from the published design): the cache is 2D-mapped and
// two-way set associative with 64 banks of two lines. A line holds 8x2 luma
// pixels and the 4x1 Cb and 4x1 Cr pixels of the same area; luma and chroma
// share one tag, so one tag check serves all three components. A line at line
// coordinates (xl, yl) (xl = x/8, yl = y/2) lives in bank
// {yl mod 16, xl mod 4}: the 64 banks tile a 32x32-pixel area of the picture,
// so any window of up to 4 lines across and 16 lines down (32x32 pixels)
// touches every bank at most once and never evicts its own lines. The tag is
// {list, reference index, xl / 4, yl / 16}. The bank arrangement (16 rows of
// 4 banks), the LRU replacement of the two ways and the whole request flow
// are this design's reading of the published figure or its own choice.
//
// Flow of one window request (blk_valid/blk_ready):
//   CHECK  one line per cycle: tag compare in its bank; a hit refreshes the
//          LRU bit, a miss claims the LRU way, writes the new tag and sends
//          the line address with a {bank, way} id to the DRAM controller.
//   WAIT   until every missed line has been filled (fl_valid, fl_id).
//   OUT    the window's lines in raster order, one per cycle, on out_*.
// Fills may arrive during CHECK. hits/misses count line lookups.
module mc_cache
  import svcd_pkg::*;
#(
  parameter int unsigned BANKS_X = 4,   // bank columns (lines across)
  parameter int unsigned BANKS_Y = 16,  // bank rows (lines down)
  parameter int unsigned WAYS    = 2,
  localparam int unsigned NBANK  = BANKS_X*BANKS_Y,
  localparam int unsigned BXW    = $clog2(BANKS_X),
  localparam int unsigned BYW    = $clog2(BANKS_Y),
  localparam int unsigned BW     = BXW + BYW,
  localparam int unsigned IDW    = BW + 1
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // window request
  input  logic                  blk_valid,
  output logic                  blk_ready,
  input  logic                  blk_list,
  input  logic [REF_BITS-1:0]   blk_ref,
  input  logic [XL_BITS-1:0]    blk_xl,   // top-left line
  input  logic [YL_BITS-1:0]    blk_yl,
  input  logic [BXW:0]          blk_wl,   // 1 .. BANKS_X lines across
  input  logic [BYW:0]          blk_hl,   // 1 .. BANKS_Y lines down
  // window data
  output logic                  out_valid,
  input  logic                  out_ready,
  output line_t                 out_line,
  output logic [XL_BITS-1:0]    out_xl,
  output logic [YL_BITS-1:0]    out_yl,
  output logic                  out_last,
  // miss requests to the DRAM controller
  output logic                  rq_valid,
  input  logic                  rq_ready,
  output line_addr_t            rq_addr,
  output logic [IDW-1:0]        rq_id,
  // line fills from the DRAM controller
  input  logic                  fl_valid,
  input  logic [IDW-1:0]        fl_id,
  input  line_t                 fl_data,
  // statistics
  output logic [31:0]           hits,
  output logic [31:0]           misses
);

  localparam int unsigned TAGX = XL_BITS - BXW;
  localparam int unsigned TAGY = YL_BITS - BYW;

  typedef struct packed {
    logic                list;
    logic [REF_BITS-1:0] ref_idx;
    logic [TAGY-1:0]     ty;
    logic [TAGX-1:0]     tx;
  } tag_t;

  typedef enum logic [1:0] {S_IDLE, S_CHECK, S_WAIT, S_OUT} state_e;
  state_e state;

  tag_t                 tag   [NBANK][WAYS];
  logic                 tvld  [NBANK][WAYS];
  logic [NBANK-1:0]     lru;                 // way to replace next (two ways)
  line_t                data  [NBANK*WAYS];
  logic [NBANK*WAYS-1:0] pending;
  logic [NBANK-1:0]     use_way;             // way that holds each bank's line of this window

  // window registers
  logic                 w_list;
  logic [REF_BITS-1:0]  w_ref;
  logic [XL_BITS-1:0]   w_x0;
  logic [YL_BITS-1:0]   w_y0;
  logic [BXW:0]         w_wl, cx;
  logic [BYW:0]         w_hl, cy;

  // current line
  logic [XL_BITS-1:0]   cur_xl;
  logic [YL_BITS-1:0]   cur_yl;
  logic [BW-1:0]        cur_bank;
  tag_t                 cur_tag;
  logic                 hit0, hit1, is_hit, vway;
  logic                 last_line;

  always_comb begin
    cur_xl   = w_x0 + XL_BITS'(cx);
    cur_yl   = w_y0 + YL_BITS'(cy);
    cur_bank = {cur_yl[BYW-1:0], cur_xl[BXW-1:0]};
    cur_tag  = '{list: w_list, ref_idx: w_ref, ty: cur_yl[YL_BITS-1:BYW], tx: cur_xl[XL_BITS-1:BXW]};
    hit0     = tvld[cur_bank][0] && tag[cur_bank][0] == cur_tag;
    hit1     = tvld[cur_bank][1] && tag[cur_bank][1] == cur_tag;
    is_hit   = hit0 || hit1;
    // victim: an invalid way first, else the least recently used one
    if (!tvld[cur_bank][0])      vway = 1'b0;
    else if (!tvld[cur_bank][1]) vway = 1'b1;
    else                         vway = lru[cur_bank];
    last_line = (cx == w_wl - 1) && (cy == w_hl - 1);
  end

  assign blk_ready = (state == S_IDLE);

  assign rq_valid  = (state == S_CHECK) && !is_hit;
  assign rq_addr   = '{list: w_list, ref_idx: w_ref, yl: cur_yl, xl: cur_xl};
  assign rq_id     = {cur_bank, vway};

  assign out_valid = (state == S_OUT);
  assign out_line  = data[{cur_bank, use_way[cur_bank]}];
  assign out_xl    = cur_xl;
  assign out_yl    = cur_yl;
  assign out_last  = last_line;

  logic step;  // current line done in CHECK or OUT
  assign step = (state == S_CHECK && (is_hit || rq_ready)) || (state == S_OUT && out_ready);

  // line data: written by fills only
  always_ff @(posedge clk)
    if (fl_valid) data[fl_id] <= fl_data;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      lru     <= '0;
      pending <= '0;
      use_way <= '0;
      hits    <= '0;
      misses  <= '0;
      w_list  <= '0;
      w_ref   <= '0;
      w_x0    <= '0;
      w_y0    <= '0;
      w_wl    <= '0;
      w_hl    <= '0;
      cx      <= '0;
      cy      <= '0;
      for (int b = 0; b < NBANK; b++)
        for (int w = 0; w < WAYS; w++) begin
          tvld[b][w] <= 1'b0;
          tag[b][w]  <= '0;
        end
    end else begin
      if (fl_valid) pending[fl_id] <= 1'b0;
      case (state)
        S_IDLE:
          if (blk_valid) begin
            w_list <= blk_list;
            w_ref  <= blk_ref;
            w_x0   <= blk_xl;
            w_y0   <= blk_yl;
            w_wl   <= blk_wl;
            w_hl   <= blk_hl;
            cx     <= '0;
            cy     <= '0;
            state  <= S_CHECK;
          end
        S_CHECK:
          if (step) begin
            if (is_hit) begin
              hits              <= hits + 1;
              use_way[cur_bank] <= hit1;
              lru[cur_bank]     <= ~hit1;
            end else begin
              misses                        <= misses + 1;
              use_way[cur_bank]             <= vway;
              lru[cur_bank]                 <= ~vway;
              tag[cur_bank][vway]           <= cur_tag;
              tvld[cur_bank][vway]          <= 1'b1;
              pending[{cur_bank, vway}]     <= 1'b1;
            end
            if (last_line) begin
              cx    <= '0;
              cy    <= '0;
              state <= S_WAIT;
            end else if (cx == w_wl - 1) begin
              cx <= '0;
              cy <= cy + 1;
            end else begin
              cx <= cx + 1;
            end
          end
        S_WAIT:
          if (pending == '0 || (fl_valid && (pending & ~((NBANK*WAYS)'(1) << fl_id)) == '0))
            state <= S_OUT;
        S_OUT:
          if (step) begin
            if (last_line) state <= S_IDLE;
            else if (cx == w_wl - 1) begin
              cx <= '0;
              cy <= cy + 1;
            end else begin
              cx <= cx + 1;
            end
          end
        default: state <= S_IDLE;
      endcase
    end
  end

  // a window must fit the bank array, so that it never evicts its own lines
  a_window_fits: assert property (@(posedge clk) disable iff (!rst_n)
      (blk_valid && blk_ready) |-> (blk_wl >= 1 && blk_wl <= (BXW+1)'(BANKS_X) &&
                                    blk_hl >= 1 && blk_hl <= (BYW+1)'(BANKS_Y)));

endmodule
