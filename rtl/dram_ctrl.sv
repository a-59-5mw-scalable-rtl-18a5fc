// DRAM controller for reference-picture line fills.
//
// Every request is one cache line of a reference picture. The controller
// maps it to a DRAM bank, row and column, keeps up to QDEPTH requests, and
// issues one DRAM command per cycle:
//
//  * Bank-interleaved mapping. A row holds a 32x16-pixel tile
//    (4 x 8 lines; column = {yl mod 8, xl mod 4}). Neighbouring tiles
//    alternate between the four banks, bank = {yl[3], xl[2]}, and the banks
//    of backward-list (list 1) pictures are the complement of those of
//    forward-list pictures, so the two reference windows of a bi-predicted
//    block tend to fall in different banks instead of fighting over one.
//    row = {list, ref_idx, yl / 16, xl / 8}.
//  * Access pattern reordering. A READ is issued for the oldest queued
//    request whose row is open, before older requests that still need their
//    row opened: lines of the same bank and row are read together.
//  * Out-of-order PRECHARGE/ACTIVE. When no READ can go, the controller opens
//    (or first closes) the row of the oldest request that needs one, in any
//    bank that is free, while reads of other banks are still waiting. So the
//    row latency of one bank is hidden behind the data transfers of others.
//    A row that a queued request still wants is not closed.
//
// The three techniques come from the published design, as does the inversion
// of the bank mapping between the two reference lists. The exact bit
// mapping, the queue, the timing parameters and the command priority are this
// design's own choices. Timing parameters are in controller cycles: T_RCD
// (ACTIVE to READ), T_RP (PRECHARGE to ACTIVE), T_BURST (READ to READ, the
// data-bus time of one line). Read data come back from the DRAM in the order
// of the READs, dq_valid marking a whole line; they leave as a fill with the
// requester's id in the same cycle: fl_valid and fl_data are dq_valid and
// dq_data passed through, only fl_id is added here.
module dram_ctrl
  import svcd_pkg::*;
#(
  parameter int unsigned QDEPTH   = 8,
  parameter int unsigned IDW      = 7,
  parameter int unsigned NBANK    = 4,
  parameter int unsigned T_RCD    = 3,
  parameter int unsigned T_RP     = 3,
  parameter int unsigned T_BURST  = 3,
  localparam int unsigned COL_BITS = 5,
  localparam int unsigned ROW_BITS = 1 + REF_BITS + (YL_BITS - 4) + (XL_BITS - 3),
  localparam int unsigned BKW      = $clog2(NBANK)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // line requests
  input  logic                 rq_valid,
  output logic                 rq_ready,
  input  line_addr_t           rq_addr,
  input  logic [IDW-1:0]       rq_id,
  // fills
  output logic                 fl_valid,
  output logic [IDW-1:0]       fl_id,
  output line_t                fl_data,
  // DRAM command and data
  output dram_cmd_e            dram_cmd,
  output logic [BKW-1:0]       dram_bank,
  output logic [ROW_BITS-1:0]  dram_row,
  output logic [COL_BITS-1:0]  dram_col,
  input  logic                 dq_valid,
  input  line_t                dq_data,
  // statistics
  output logic [31:0]          n_act,
  output logic [31:0]          n_pre,
  output logic [31:0]          n_rd
);

  localparam int unsigned QW = $clog2(QDEPTH + 1);  // counts 0 .. QDEPTH
  localparam int unsigned QI = $clog2(QDEPTH);      // indexes 0 .. QDEPTH-1
  localparam int unsigned TW = 4;

  typedef struct packed {
    logic [BKW-1:0]      bank;
    logic [ROW_BITS-1:0] row;
    logic [COL_BITS-1:0] col;
    logic [IDW-1:0]      id;
  } qent_t;

  // request queue, oldest first
  qent_t           q [QDEPTH];
  logic [QW-1:0]   qn;

  // bank state
  logic [NBANK-1:0] open;
  logic [ROW_BITS-1:0] open_row [NBANK];
  logic [TW-1:0]    btimer [NBANK];
  logic [TW-1:0]    rtimer;             // data bus

  // ids of issued reads, in order
  logic [IDW-1:0]  rdq [QDEPTH];
  logic [QW-1:0]   rdq_n;

  // ---------------------------------------------------------------- mapping
  qent_t new_ent;
  always_comb begin
    logic [1:0] bk;
    bk = {rq_addr.yl[3], rq_addr.xl[2]} ^ {2{rq_addr.list}};
    new_ent.bank = BKW'(bk);
    new_ent.row  = {rq_addr.list, rq_addr.ref_idx, rq_addr.yl[YL_BITS-1:4], rq_addr.xl[XL_BITS-1:3]};
    new_ent.col  = {rq_addr.yl[2:0], rq_addr.xl[1:0]};
    new_ent.id   = rq_id;
  end

  // --------------------------------------------------------------- schedule
  logic          do_rd, do_pa;
  logic [QI-1:0] rd_sel, pa_sel;
  logic          pa_is_pre;

  logic wanted;  // the open row of a bank is still wanted by a queued request
  always_comb begin
    wanted    = 1'b0;
    do_rd     = 1'b0;
    do_pa     = 1'b0;
    rd_sel    = '0;
    pa_sel    = '0;
    pa_is_pre = 1'b0;
    // oldest request whose row is open and ready
    for (int i = QDEPTH-1; i >= 0; i--)
      if (QW'(i) < qn && open[q[i].bank] && open_row[q[i].bank] == q[i].row &&
          btimer[q[i].bank] == '0 && rtimer == '0 && rdq_n < QW'(QDEPTH)) begin
        do_rd  = 1'b1;
        rd_sel = QI'(i);
      end
    // oldest request that needs a row opened in a free bank
    if (!do_rd)
      for (int i = QDEPTH-1; i >= 0; i--)
        if (QW'(i) < qn && btimer[q[i].bank] == '0 &&
            !(open[q[i].bank] && open_row[q[i].bank] == q[i].row)) begin
          wanted = 1'b0;
          for (int j = 0; j < QDEPTH; j++)
            if (QW'(j) < qn && q[j].bank == q[i].bank && open[q[i].bank] &&
                q[j].row == open_row[q[i].bank])
              wanted = 1'b1;
          if (!wanted) begin
            do_pa     = 1'b1;
            pa_sel    = QI'(i);
            pa_is_pre = open[q[i].bank];
          end
        end
  end

  always_comb begin
    dram_cmd  = DRAM_NOP;
    dram_bank = '0;
    dram_row  = '0;
    dram_col  = '0;
    if (do_rd) begin
      dram_cmd  = DRAM_RD;
      dram_bank = q[rd_sel].bank;
      dram_row  = q[rd_sel].row;
      dram_col  = q[rd_sel].col;
    end else if (do_pa) begin
      dram_cmd  = pa_is_pre ? DRAM_PRE : DRAM_ACT;
      dram_bank = q[pa_sel].bank;
      dram_row  = q[pa_sel].row;
    end
  end

  assign rq_ready = (qn < QW'(QDEPTH)) || do_rd;
  assign fl_valid = dq_valid;
  assign fl_id    = rdq[0];
  assign fl_data  = dq_data;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      qn     <= '0;
      open   <= '0;
      rtimer <= '0;
      rdq_n  <= '0;
      n_act  <= '0;
      n_pre  <= '0;
      n_rd   <= '0;
      for (int i = 0; i < QDEPTH; i++) begin
        q[i]   <= '0;
        rdq[i] <= '0;
      end
      for (int b = 0; b < NBANK; b++) begin
        open_row[b] <= '0;
        btimer[b]   <= '0;
      end
    end else begin
      // queue: remove the read one (compacting), append the new one
      begin
        logic [QW-1:0] n;
        n = qn;
        if (do_rd) begin
          for (int i = 0; i < QDEPTH-1; i++)
            if (QI'(i) >= rd_sel) q[i] <= q[i+1];
          n = n - 1;
        end
        if (rq_valid && rq_ready) q[QI'(n)] <= new_ent;
        qn <= n + QW'(rq_valid && rq_ready);
      end
      // timers
      for (int b = 0; b < NBANK; b++)
        if (btimer[b] != '0) btimer[b] <= btimer[b] - 1;
      if (rtimer != '0) rtimer <= rtimer - 1;
      // commands
      if (do_rd) begin
        rtimer <= TW'(T_BURST - 1);
        n_rd   <= n_rd + 1;
      end else if (do_pa && pa_is_pre) begin
        open[q[pa_sel].bank]   <= 1'b0;
        btimer[q[pa_sel].bank] <= TW'(T_RP - 1);
        n_pre                  <= n_pre + 1;
      end else if (do_pa) begin
        open[q[pa_sel].bank]     <= 1'b1;
        open_row[q[pa_sel].bank] <= q[pa_sel].row;
        btimer[q[pa_sel].bank]   <= TW'(T_RCD - 1);
        n_act                    <= n_act + 1;
      end
      // read-id FIFO
      begin
        logic [QW-1:0] m;
        m = rdq_n;
        if (dq_valid) begin
          for (int i = 0; i < QDEPTH-1; i++) rdq[i] <= rdq[i+1];
          m = m - 1;
        end
        if (do_rd) rdq[QI'(m)] <= q[rd_sel].id;
        rdq_n <= m + QW'(do_rd);
      end
    end
  end

  a_data_expected: assert property (@(posedge clk) disable iff (!rst_n)
      dq_valid |-> (rdq_n != '0));

endmodule
