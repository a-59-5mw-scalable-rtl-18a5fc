// End-to-end testbench of svcd_top at its default parameters.
//
// It decodes two frames through the three-stage MB pipeline:
//   frame 1: 99 MBs (a QCIF picture), one layer;
//   frame 2: 16 MBs with four quality layers, decoded layer-interleaved.
// The blocks outside the core are modelled here:
//   * syntax parser (stage 0): for each job it issues a planned list of
//     CM-cache group loads, one-/two-bin regular or bypass requests and a
//     terminating bin at the end of each MB, then reports the MB
//     done once all its bins came back. The bins were chosen in advance and
//     encoded into the slice bitstream by an H.264 arithmetic encoder written
//     here, so every decoded bin is checked.
//   * motion vector source and texture decoder (stage 1): a reference window
//     around the MB (random motion, forward or backward list, two reference
//     pictures) and 24 residual blocks per MB.
//   * interpolator: takes the reference lines with random back-pressure and
//     checks each against the DRAM contents at the address the testbench maps
//     independently.
//   * deblocking (stage 2): reads the MB's residual blocks back, checks them,
//     and finishes after a random time.
//   * DRAM: checks command legality and timing, returns data CL cycles later.
// Each mechanism of the design is counted and must occur at least once.
module tb_svcd_top;
  import svcd_pkg::*;
  import cabac_pkg::*;

  localparam int CL = 4, T_RCD = 3, T_RP = 3, T_BURST = 3;
  localparam int RB = 1 + REF_BITS + (YL_BITS - 4) + (XL_BITS - 3);
  localparam int NG = 4, GS = 8, NL = 4, NC = 512;

  logic clk = 0, rst_n = 0;
  logic go = 0;
  logic [15:0] num_mb;
  logic [2:0] num_layers;
  logic busy, frame_done;
  logic [31:0] frame_cycles;
  logic [2:0] stage_start;
  logic [15:0] stage_mb [3];
  logic [2:0] stage_layer [3];
  logic ed_done = 0, db_done = 0;
  logic bs_valid, bs_ready;
  logic [15:0] bs_data;
  logic [5:0] bs_level;
  logic slice_start = 0;
  logic req_valid = 0, req_ready, req_two;
  bin_mode_e req_mode = BIN_REGULAR;
  logic [4:0] req_idx0, req_idx1_0, req_idx1_1;
  logic req_cm2 = 0, cm_load_cache = 0;
  logic bin_valid;
  logic [1:0] bin_cnt, bin_val;
  logic cm_load_valid = 0, cm_load_ready;
  logic [1:0] cm_load_grp, cm_load_layer;
  logic [8:0] cm_load_base;
  logic cm_init_we = 0, cm_init_ready;
  logic [1:0] cm_init_layer;
  logic [8:0] cm_init_addr;
  ctx_t cm_init_data;
  logic mv_valid = 0, mv_ready, mv_list;
  logic [REF_BITS-1:0] mv_ref;
  logic [XL_BITS-1:0] mv_xl;
  logic [YL_BITS-1:0] mv_yl;
  logic [2:0] mv_wl;
  logic [4:0] mv_hl;
  logic pix_valid, pix_ready = 0, pix_last;
  line_t pix_line;
  logic [XL_BITS-1:0] pix_xl;
  logic [YL_BITS-1:0] pix_yl;
  logic res_wr_valid = 0, res_wr_slot;
  logic [4:0] res_wr_blk;
  logic signed [8:0] res_wr_res [16];
  logic res_rd_valid = 0, res_rd_slot;
  logic [4:0] res_rd_blk;
  logic res_rd_out_valid;
  logic signed [8:0] res_rd_res [16];
  dram_cmd_e dram_cmd;
  logic [1:0] dram_bank;
  logic [RB-1:0] dram_row;
  logic [4:0] dram_col;
  logic dq_valid;
  line_t dq_data;
  logic [31:0] cm_mem_reads, cm_mem_writes, mc_hits, mc_misses, n_act, n_pre, n_rd;
  logic [31:0] res_sram_writes, res_sram_reads, res_zero_blocks, res_dc_blocks;

  svcd_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 30) $display("FAIL: %s", msg); end
  endtask

  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // ===================================================== mechanism counters
  int m_overlap = 0, m_room_stall = 0, m_interleaved = 0, m_two_bin = 0;
  int m_bypass = 0, m_term = 0;
  int m_cm_reload = 0, m_cm_keep = 0, m_mc_hit = 0, m_mc_miss = 0, m_list1 = 0;
  int m_ooo_act = 0, m_zero = 0, m_dc = 0, m_bs_full = 0, m_cm2 = 0;

  // ============================================================= DRAM model
  function automatic line_t dram_cell(int bank, int row, int col);
    line_t d;
    for (int k = 0; k < 6; k++) d[k*32 +: 32] = 32'(row * 131 + col * 7 + bank * 100003 + k * 977) * 32'h9E3779B1;
    return d;
  endfunction
  function automatic line_t expect_line(bit l, int r, int xl, int yl);
    int bank = (((yl / 8) % 2) * 2 + (xl / 4) % 2) ^ (l ? 3 : 0);
    int row  = ((int'(l) * 16 + r) * 128 + yl / 16) * 64 + xl / 8;
    int col  = (yl % 8) * 4 + xl % 4;
    return dram_cell(bank, row, col);
  endfunction

  bit b_open [4], act_unread [4];
  int b_row [4], t_act [4], t_pre [4];
  int t_rd = -100;
  line_t rdpipe [$];
  int rddue [$];
  always @(posedge clk) if (rst_n) begin
    case (dram_cmd)
      DRAM_ACT: begin
        check(!b_open[dram_bank] && cyc - t_pre[dram_bank] >= T_RP, "ACTIVE timing/state");
        b_open[dram_bank] = 1; b_row[dram_bank] = int'(dram_row); t_act[dram_bank] = cyc;
        // a row opened while another bank's freshly opened row is still
        // waiting for its first READ: the ACTIVE was issued ahead
        for (int b = 0; b < 4; b++) if (b != int'(dram_bank) && act_unread[b]) begin m_ooo_act++; break; end
        act_unread[dram_bank] = 1;
      end
      DRAM_PRE: begin
        check(b_open[dram_bank], "PRECHARGE of a closed bank");
        b_open[dram_bank] = 0; t_pre[dram_bank] = cyc;
      end
      DRAM_RD: begin
        check(b_open[dram_bank] && b_row[dram_bank] == int'(dram_row) &&
              cyc - t_act[dram_bank] >= T_RCD && cyc - t_rd >= T_BURST, "READ timing/state");
        t_rd = cyc;
        act_unread[dram_bank] = 0;
        rdpipe.push_back(dram_cell(dram_bank, int'(dram_row), dram_col));
        rddue.push_back(cyc + CL);
      end
      default: ;
    endcase
  end
  always @(negedge clk) begin
    dq_valid = 0;
    if (rddue.size() > 0 && rddue[0] <= cyc) begin
      dq_valid = 1; dq_data = rdpipe.pop_front(); void'(rddue.pop_front());
    end
  end

  // ====================================================== CABAC plan/encoder
  ctx_t mem_m [NL][NC];
  int   g_layer [2][NG], g_base [2][NG];
  bit   g_valid [2][NG];
  typedef struct { bit is_load; int cache, grp, layer, base; bin_mode_e mode; bit two; int i0, i10, i11; } op_t;
  op_t  job_ops [$][$];      // per job
  int   job_bins [$];
  bit   exp_bins [$];

  int low, rng, bo;
  bit first;
  bit stream [$];
  function automatic void put_bit(bit b);
    if (first) first = 0; else stream.push_back(b);
    while (bo > 0) begin stream.push_back(!b); bo--; end
  endfunction
  function automatic void renorm();
    while (rng < 256) begin
      if (low < 256) put_bit(0);
      else if (low >= 512) begin low -= 512; put_bit(1); end
      else begin low -= 256; bo++; end
      rng <<= 1; low <<= 1;
    end
  endfunction
  function automatic void encode_bypass(bit bin);
    low <<= 1;
    if (bin) low += rng;
    if (low >= 1024) begin put_bit(1); low -= 1024; end
    else if (low < 512) put_bit(0);
    else begin low -= 512; bo++; end
  endfunction
  function automatic bit encode_pick(int cs, int idx);
    int g = idx / GS;
    ctx_t c = mem_m[g_layer[cs][g]][g_base[cs][g] + idx % GS];
    bit bin = ($urandom % 100 < 75) ? c.mps : !c.mps;
    int rl = int'(range_lps(c.state, 2'((rng >> 6) & 3)));
    rng -= rl;
    if (bin != c.mps) begin
      low += rng; rng = rl;
      if (c.state == 0) c.mps = !c.mps;
      c.state = next_state_lps(c.state);
    end else c.state = next_state_mps(c.state);
    mem_m[g_layer[cs][g]][g_base[cs][g] + idx % GS] = c;
    renorm();
    return bin;
  endfunction

  logic [15:0] words [$];
  int word_i = 0;
  bit feed_on = 0;
  always @(posedge clk) if (bs_valid && bs_ready) word_i <= word_i + 1;
  always_comb begin
    bs_valid = rst_n && feed_on && (word_i < words.size());
    bs_data  = (word_i < words.size()) ? words[word_i] : 16'h0;
  end
  always @(posedge clk) if (rst_n && feed_on && !bs_ready) m_bs_full++;

  // plan every job of a frame and encode its bins into one slice
  function automatic void plan_frame(int mbs, int layers);
    job_ops.delete(); job_bins.delete(); exp_bins.delete(); stream.delete(); words.delete();
    low = 0; rng = 510; bo = 0; first = 1;
    for (int j = 0; j < mbs * layers; j++) begin
      op_t ops [$];
      automatic int nb = 0;
      automatic int layer = j % layers;
      op_t o;
      // the layer's models of group 0 of the main cache; the other groups,
      // and the extra cache (enhancement-layer texture models), once per frame
      o.is_load = 1; o.cache = 0; o.grp = 0; o.layer = layer; o.base = 8 * (j % 3 == 2 ? 1 : 0);
      if (layers == 1) o.base = 8 * ((j / 4) % 2);
      ops.push_back(o);
      if (g_valid[0][0] && g_layer[0][0] == o.layer && g_base[0][0] == o.base) m_cm_keep++; else m_cm_reload++;
      g_valid[0][0] = 1; g_layer[0][0] = o.layer; g_base[0][0] = o.base;
      if (j == 0)
        for (int cs = 0; cs < 2; cs++)
          for (int g = cs == 0 ? 1 : 0; g < NG; g++) begin
            o.cache = cs; o.grp = g; o.layer = cs; o.base = cs * 64 + g * 128;
            ops.push_back(o);
            g_valid[cs][g] = 1; g_layer[cs][g] = o.layer; g_base[cs][g] = o.base;
          end
      repeat (4 + $urandom % 10) begin
        automatic bit b0;
        o.is_load = 0;
        o.mode = BIN_REGULAR;
        if ($urandom % 100 < 15) begin
          // bypass bins (suffixes of large values, signs)
          o.mode = BIN_BYPASS; o.two = 1'($urandom); o.cache = 0;
          o.i0 = 0; o.i10 = 0; o.i11 = 0;
          b0 = 1'($urandom); encode_bypass(b0); exp_bins.push_back(b0); nb++;
          if (o.two) begin b0 = 1'($urandom); encode_bypass(b0); exp_bins.push_back(b0); nb++; end
          ops.push_back(o);
          m_bypass++;
          continue;
        end
        o.cache = (layer > 0 && $urandom % 2 == 0) ? 1 : 0;
        if (o.cache == 1) m_cm2++;
        o.two = ($urandom % 100) < 80;
        o.i0 = $urandom % (NG*GS); o.i10 = $urandom % (NG*GS); o.i11 = $urandom % (NG*GS);
        b0 = encode_pick(o.cache, o.i0);
        exp_bins.push_back(b0); nb++;
        if (o.two) begin exp_bins.push_back(encode_pick(o.cache, b0 ? o.i11 : o.i10)); nb++; end
        ops.push_back(o);
      end
      // end of the MB: a terminating bin, 1 after the last MB of the slice
      o.is_load = 0; o.mode = BIN_TERM; o.two = 0; o.cache = 0; o.i0 = 0; o.i10 = 0; o.i11 = 0;
      ops.push_back(o);
      rng -= 2;
      if (j == mbs * layers - 1) begin low += rng; exp_bins.push_back(1); end
      else begin renorm(); exp_bins.push_back(0); end
      nb++;
      m_term++;
      job_ops.push_back(ops);
      job_bins.push_back(nb);
    end
    rng = 2; renorm();
    put_bit(1'((low >> 9) & 1));
    stream.push_back(1'((low >> 8) & 1)); stream.push_back(1);
    repeat (32) stream.push_back(0);
    while (stream.size() % 16 != 0) stream.push_back(0);
    for (int i = 0; i < stream.size(); i += 16) begin
      logic [15:0] w;
      for (int k = 0; k < 16; k++) w[15-k] = stream[i+k];
      words.push_back(w);
    end
  endfunction

  // bins coming back
  int n_bins_out = 0;
  always @(posedge clk) if (rst_n && bin_valid) begin
    if (bin_cnt == 2) m_two_bin++;
    for (int k = 0; k < int'(bin_cnt); k++) begin
      automatic bit e = exp_bins.pop_front();
      check(bin_val[k] == e, $sformatf("bin %0d", n_bins_out));
      n_bins_out++;
    end
  end

  // ========================================================= stage 0: parser
  int jobs_total = 0, jobs_ed = 0, bins_due = 0;
  always @(posedge clk) if (rst_n && stage_start[0]) begin
    automatic int j = jobs_ed;
    jobs_ed++;
    check(int'(stage_mb[0]) * int'(num_layers) + int'(stage_layer[0]) == j, "stage 0 job order");
    if (stage_layer[0] != 0) m_interleaved++;
    fork run_parser(j); join_none
  end
  task automatic run_parser(int j);
    @(negedge clk);
    foreach (job_ops[j][n]) begin
      automatic op_t o = job_ops[j][n];
      if (o.is_load) begin
        while (!cm_load_ready) @(negedge clk);
        cm_load_valid = 1; cm_load_cache = 1'(o.cache); cm_load_grp = 2'(o.grp); cm_load_layer = 2'(o.layer); cm_load_base = 9'(o.base);
        @(negedge clk);
        cm_load_valid = 0;
        @(negedge clk);
        while (!cm_load_ready) @(negedge clk);
      end else begin
        req_valid = 1; req_mode = o.mode; req_two = o.two; req_cm2 = 1'(o.cache);
        req_idx0 = 5'(o.i0); req_idx1_0 = 5'(o.i10); req_idx1_1 = 5'(o.i11);
        @(posedge clk);
        while (!req_ready) @(posedge clk);
        @(negedge clk);
        req_valid = 0;
      end
    end
    bins_due += job_bins[j];
    while (n_bins_out < bins_due) @(negedge clk);
    ed_done = 1;
    @(negedge clk);
    ed_done = 0;
  endtask

  // ================================================ stage 1: window + texture
  int mb_w = 11;
  logic signed [8:0] res_m [2][24][16];
  int jobs_mc = 0, lines_ok = 0;
  always @(posedge clk) if (rst_n && stage_start[1]) begin
    automatic int j = jobs_mc;
    jobs_mc++;
    fork run_stage1(j, int'(stage_mb[1])); join_none
  end
  task automatic run_stage1(int j, int mb);
    automatic int x = (mb % mb_w) * 16 + ($urandom % 17) - 8;
    automatic int y = (mb / mb_w) * 16 + ($urandom % 17) - 8;
    automatic int x0, y0, wl, hl, got = 0;
    automatic bit l = ($urandom % 3) == 0;
    automatic int r = $urandom % 2;
    if (x < 2) x = 2;
    if (y < 2) y = 2;
    x0 = (x - 2) / 8; y0 = (y - 2) / 2;
    wl = (x + 18) / 8 - x0 + 1; hl = (y + 18) / 2 - y0 + 1;
    // the window stays inside the picture (mb_w MBs = 2 * mb_w lines across)
    if (x0 + wl > 2 * mb_w) x0 = 2 * mb_w - wl;
    if (l) m_list1++;
    @(negedge clk);
    mv_valid = 1; mv_list = l; mv_ref = REF_BITS'(r);
    mv_xl = XL_BITS'(x0); mv_yl = YL_BITS'(y0); mv_wl = 3'(wl); mv_hl = 5'(hl);
    @(posedge clk);
    while (!mv_ready) @(posedge clk);
    @(negedge clk);
    mv_valid = 0;
    // residual of this MB into slot j % 2
    for (int b = 0; b < 24; b++) begin
      automatic int k = $urandom % 3;
      automatic logic signed [8:0] v = 9'(1 + $urandom % 200);
      for (int i = 0; i < 16; i++) res_m[j % 2][b][i] = (k == 0) ? 9'sd0 : (k == 1) ? v : 9'($urandom);
      res_m[j % 2][b][3] = (k == 2) ? res_m[j % 2][b][0] + 9'sd1 : res_m[j % 2][b][3];
      if (k == 0) m_zero++; else if (k == 1) m_dc++;
      res_wr_valid = 1; res_wr_slot = 1'(j % 2); res_wr_blk = 5'(b);
      for (int i = 0; i < 16; i++) res_wr_res[i] = res_m[j % 2][b][i];
      @(negedge clk);
    end
    res_wr_valid = 0;
    // reference lines to the interpolator
    while (got < wl * hl) begin
      pix_ready = ($urandom % 4) != 0;
      @(posedge clk);
      if (pix_valid && pix_ready) begin
        automatic int ex = x0 + got % wl, ey = y0 + got / wl;
        check(int'(pix_xl) == ex && int'(pix_yl) == ey && pix_last == (got == wl*hl - 1),
              $sformatf("job %0d line %0d position", j, got));
        check(pix_line == expect_line(l, r, ex, ey), $sformatf("job %0d line %0d data", j, got));
        got++;
        lines_ok++;
      end
      @(negedge clk);
    end
    pix_ready = 0;
  endtask

  // =============================================================== stage 2
  int jobs_db = 0;
  always @(posedge clk) if (rst_n && stage_start[2]) begin
    automatic int j = jobs_db;
    jobs_db++;
    fork run_stage2(j); join_none
  end
  task automatic run_stage2(int j);
    @(negedge clk);
    for (int b = 0; b < 24; b++) begin
      res_rd_valid = 1; res_rd_slot = 1'(j % 2); res_rd_blk = 5'(b);
      @(negedge clk);
      res_rd_valid = 0;
      for (int i = 0; i < 16; i++)
        check(res_rd_res[i] == res_m[j % 2][b][i], $sformatf("job %0d residual block %0d", j, b));
    end
    repeat ($urandom % 30) @(negedge clk);
    db_done = 1;
    @(negedge clk);
    db_done = 0;
  endtask

  // ====================================================== pipeline overlap
  bit wk [3];
  logic [2:0] sdone;
  assign sdone = {db_done, pix_valid && pix_ready && pix_last, ed_done};
  int st_n [3], fi_n [3];
  always @(posedge clk) if (rst_n && busy) begin
    automatic int nwk = 0;
    for (int k = 0; k < 3; k++) if (wk[k]) nwk++;
    if (nwk >= 2) m_overlap++;
    // a stage has its input but the buffer behind it is full
    if (!wk[1] && st_n[1] < fi_n[0] && st_n[1] - fi_n[2] >= 2) m_room_stall++;
    if (!wk[0] && st_n[0] < int'(num_mb) * int'(num_layers) && st_n[0] - fi_n[1] >= 2) m_room_stall++;
    for (int k = 0; k < 3; k++)
      if (stage_start[k]) begin wk[k] = 1; st_n[k]++; end
      else if (sdone[k] && wk[k]) begin wk[k] = 0; fi_n[k]++; end
  end

  // ================================================================= frames
  task automatic run_frame(int mbs, int layers);
    automatic int t0;
    plan_frame(mbs, layers);
    jobs_ed = 0; jobs_mc = 0; jobs_db = 0; n_bins_out = 0; bins_due = 0;
    foreach (st_n[k]) begin st_n[k] = 0; fi_n[k] = 0; wk[k] = 0; end
    @(negedge clk);
    slice_start = 1; feed_on = 0; word_i = 0;
    @(negedge clk);
    slice_start = 0; feed_on = 1;
    num_mb = 16'(mbs); num_layers = 3'(layers);
    repeat (4) @(negedge clk);
    go = 1; t0 = cyc;
    @(negedge clk);
    go = 0;
    wait (frame_done);
    @(negedge clk);
    check(jobs_db == mbs * layers && jobs_mc == mbs * layers && jobs_ed == mbs * layers, "every job through every stage");
    check(exp_bins.size() == 0, $sformatf("%0d bins not decoded", exp_bins.size()));
    $display("frame %0d MBs x %0d layers: %0d cycles", mbs, layers, frame_cycles);
  endtask

  initial begin
    foreach (b_open[b]) begin b_open[b] = 0; act_unread[b] = 0; t_pre[b] = -100; t_act[b] = -100; end
    foreach (g_valid[c, g]) g_valid[c][g] = 0;
    foreach (mem_m[l, a]) begin
      mem_m[l][a].state = 6'($urandom % 63);
      mem_m[l][a].mps   = 1'($urandom);
    end
    num_mb = 0; num_layers = 1;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    foreach (mem_m[l, a]) begin
      cm_init_we = 1; cm_init_layer = 2'(l); cm_init_addr = 9'(a); cm_init_data = mem_m[l][a];
      @(negedge clk);
    end
    cm_init_we = 0;

    run_frame(99, 1);   // QCIF picture, single layer
    mb_w = 5;
    run_frame(16, 4);   // four quality layers, layer-interleaved

    m_mc_hit = int'(mc_hits); m_mc_miss = int'(mc_misses);
    check(cm_mem_writes > 0, "CM write-back happened");
    check(m_cm2 > 0, "extra CM cache used");
    check(n_rd == mc_misses, "one DRAM read per cache miss");
    $display("lines %0d, MC cache hits %0d misses %0d; DRAM ACT %0d PRE %0d RD %0d; CM memory reads %0d writes %0d",
             lines_ok, mc_hits, mc_misses, n_act, n_pre, n_rd, cm_mem_reads, cm_mem_writes);
    $display("residual SRAM writes %0d reads %0d, zero blocks %0d, DC blocks %0d",
             res_sram_writes, res_sram_reads, res_zero_blocks, res_dc_blocks);
    check(res_zero_blocks == 32'(m_zero) && res_dc_blocks == 32'(m_dc), "rejected residual blocks");
    // every mechanism must have happened
    check(m_overlap > 0,     "stages overlapped (asynchronous pipeline)");
    check(m_room_stall > 0,  "a stage waited for room in the buffer behind it");
    check(m_interleaved > 0, "layer-interleaved jobs");
    check(m_two_bin > 0,     "two bins in one cycle");
    check(m_bypass > 0 && m_term > 0, "bypass and terminating bins");
    check(m_cm_reload > 0,   "CM group reload");
    check(m_cm_keep > 0,     "CM group load that kept the cache");
    check(m_mc_hit > 0,      "MC cache hit");
    check(m_mc_miss > 0,     "MC cache miss");
    check(m_list1 > 0,       "backward-list window");
    check(m_ooo_act > 0,     "ACTIVE issued ahead of another bank's READ");
    check(m_zero > 0 && m_dc > 0, "zero and DC residual blocks");
    check(m_bs_full > 0,     "bitstream buffer full");
    $display("overlap %0d, room stalls %0d, interleaved jobs %0d, two-bin cycles %0d, CM reload %0d keep %0d, list1 %0d, out-of-order ACT %0d, bs full %0d, bypass requests %0d, terminating bins %0d",
             m_overlap, m_room_stall, m_interleaved, m_two_bin, m_cm_reload, m_cm_keep, m_list1, m_ooo_act, m_bs_full, m_bypass, m_term);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
