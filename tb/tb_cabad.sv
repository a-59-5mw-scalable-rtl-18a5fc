// Self-checking testbench of cabad (and of the cm_cache inside it).
//
// The testbench holds its own copy of every context model, plans a random
// sequence of CM-cache group loads and one- or two-bin requests, picks the
// bin values, and encodes them with an H.264 arithmetic encoder written here.
// Some requests are bypass bins (one or two) or terminating bins of value 0,
// and the stream ends with a terminating bin of value 1.
// The decoder is then fed that bitstream and must return exactly the planned
// bin_val, which checks the branch selection (the second bin's model depends on
// the first bin) and the model updates. It also checks that a stream of
// requests is accepted one per cycle (two bin_val per cycle), and that the CM
// memory sees exactly the reads and write-backs the adaptive write-back rule
// predicts: only changed models are written back, and a load of a group that
// already holds the wanted models costs nothing.
module tb_cabad;
  import cabac_pkg::*;

  localparam int NG = 4, GS = 8, NL = 4, NC = 512, NOPS = 4000;

  logic clk = 0, rst_n = 0, start = 0;
  logic bs_valid, bs_ready;
  logic [15:0] bs_data;
  logic req_valid = 0, req_ready, req_two;
  bin_mode_e req_mode = BIN_REGULAR;
  logic [4:0] req_idx0, req_idx1_0, req_idx1_1;
  logic req_cm2, load_cache;
  logic bin_valid;
  logic [1:0] bin_cnt, bin_val;
  logic load_valid = 0, load_ready;
  logic [1:0] load_grp, load_layer;
  logic [8:0] load_base;
  logic init_we = 0, init_ready;
  logic [1:0] init_layer;
  logic [8:0] init_addr;
  ctx_t init_data;
  logic [31:0] cm_mem_reads, cm_mem_writes;

  cabad dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", msg); end
  endtask

  // ---------------------------------------------------------- reference model
  ctx_t mem_m [NL][NC];
  int   g_layer [2][NG], g_base [2][NG];
  bit   g_valid [2][NG];
  bit   chg [2][NG*GS];
  int   exp_reads = 0, exp_writes = 0;

  typedef struct { bit is_load; int cache, grp, layer, base; bin_mode_e mode; bit two; int i0, i10, i11; bit b0, b1; } op_t;
  op_t ops [$];
  ctx_t init_mem [NL][NC];  // models as first written into the CM memory

  // encoder
  int low = 0, rng = 510, bo = 0;
  bit first = 1;
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
  function automatic void encode(int cs, int idx, bit bin);
    int g = idx / GS;
    ctx_t c = mem_m[g_layer[cs][g]][g_base[cs][g] + idx % GS];
    int rl = int'(range_lps(c.state, 2'((rng >> 6) & 3)));
    rng -= rl;
    if (bin != c.mps) begin
      low += rng; rng = rl;
      if (c.state == 0) c.mps = !c.mps;
      c.state = next_state_lps(c.state);
    end else c.state = next_state_mps(c.state);
    mem_m[g_layer[cs][g]][g_base[cs][g] + idx % GS] = c;
    chg[cs][idx] = 1;
    renorm();
  endfunction
  function automatic void encode_bypass(bit bin);
    low <<= 1;
    if (bin) low += rng;
    if (low >= 1024) begin put_bit(1); low -= 1024; end
    else if (low < 512) put_bit(0);
    else begin low -= 512; bo++; end
  endfunction
  function automatic bit pick(int cs, int idx);
    int g = idx / GS;
    ctx_t c = mem_m[g_layer[cs][g]][g_base[cs][g] + idx % GS];
    return ($urandom % 100 < 75) ? c.mps : !c.mps;
  endfunction
  // group bases keep the two caches and their groups on separate models:
  // cache cs, group g uses models cs*64 + g*128 + 8*k, k < 8
  function automatic void plan_load(int cs, int g, int l, int k);
    automatic op_t o;
    int b = cs * 64 + g * 128 + 8 * k;
    o.is_load = 1; o.cache = cs; o.grp = g; o.layer = l; o.base = b;
    ops.push_back(o);
    if (!(g_valid[cs][g] && g_layer[cs][g] == l && g_base[cs][g] == b)) begin
      for (int i = 0; i < GS; i++) if (chg[cs][g*GS+i]) begin exp_writes++; chg[cs][g*GS+i] = 0; end
      exp_reads += GS;
      g_valid[cs][g] = 1; g_layer[cs][g] = l; g_base[cs][g] = b;
    end
  endfunction

  // --------------------------------------------------------------- stimulus
  int word_i = 0;
  logic [15:0] words [$];
  always @(posedge clk) if (bs_valid && bs_ready) word_i <= word_i + 1;
  always_comb begin
    bs_valid = rst_n && (word_i < words.size()) && feed_on;
    bs_data  = (word_i < words.size()) ? words[word_i] : 16'h0;
  end
  bit feed_on = 0;

  // bin_val out
  bit exp_bins [$];
  int n_out = 0;
  always @(posedge clk) if (rst_n && bin_valid) begin
    for (int k = 0; k < int'(bin_cnt); k++) begin
      automatic bit e = exp_bins.pop_front();
      check(bin_val[k] == e, $sformatf("bin %0d: got %0b expected %0b", n_out, bin_val[k], e));
      n_out++;
    end
  end

  int req_cycles = 0, req_acc = 0, two_bins = 0;
  always @(posedge clk) if (req_valid) begin
    req_cycles++;
    if (req_ready) req_acc++;
  end

  initial begin
    automatic int dec_bins = 0;
    // random initial models of every layer
    foreach (mem_m[l, a]) begin
      mem_m[l][a].state = 6'($urandom % 63);
      mem_m[l][a].mps   = 1'($urandom);
      init_mem[l][a]    = mem_m[l][a];
    end
    // plan: load all groups, then decode with occasional reloads
    for (int cs = 0; cs < 2; cs++)
      for (int g = 0; g < NG; g++) plan_load(cs, g, $urandom % NL, $urandom % 8);
    for (int n = 0; n < NOPS; n++) begin
      if ($urandom % 100 < 4) begin
        automatic int g = $urandom % NG;
        automatic int cs = $urandom % 2;
        if ($urandom % 3 == 0) plan_load(cs, g, g_layer[cs][g], (g_base[cs][g] % 64) / 8);   // same models
        else plan_load(cs, g, $urandom % NL, $urandom % 8);
      end else begin
        automatic op_t o;
        automatic int m = $urandom % 100;
        o.is_load = 0;
        o.cache = $urandom % 2;
        o.two = (n > NOPS/2) ? 1 : ($urandom % 100 < 80);
        o.mode = (m < 2) ? BIN_TERM : (m < 17) ? BIN_BYPASS : BIN_REGULAR;
        o.i0 = $urandom % (NG*GS); o.i10 = $urandom % (NG*GS); o.i11 = $urandom % (NG*GS);
        if ($urandom % 8 == 0) o.i10 = o.i0;   // same model twice
        if (o.mode == BIN_TERM) begin
          // terminating bin of value 0
          o.two = 0; o.b0 = 0;
          rng -= 2; renorm();
          exp_bins.push_back(0);
          ops.push_back(o);
          continue;
        end
        if (o.mode == BIN_BYPASS) begin
          o.b0 = 1'($urandom); o.b1 = 1'($urandom);
          encode_bypass(o.b0); exp_bins.push_back(o.b0);
          if (o.two) begin encode_bypass(o.b1); exp_bins.push_back(o.b1); end
          ops.push_back(o);
          continue;
        end
        o.b0 = pick(o.cache, o.i0);
        encode(o.cache, o.i0, o.b0);
        exp_bins.push_back(o.b0);
        if (o.two) begin
          automatic int i2 = o.b0 ? o.i11 : o.i10;
          o.b1 = pick(o.cache, i2);
          encode(o.cache, i2, o.b1);
          exp_bins.push_back(o.b1);
        end
        ops.push_back(o);
      end
    end
    // a terminating bin of value 1 ends the slice, then the encoder flushes
    begin
      automatic op_t o;
      o.is_load = 0; o.cache = 0; o.mode = BIN_TERM; o.two = 1; o.b0 = 1;
      o.i0 = 0; o.i10 = 0; o.i11 = 0;
      ops.push_back(o);
      exp_bins.push_back(1);
      rng -= 2; low += rng;
    end
    rng = 2; renorm();
    put_bit(1'((low >> 9) & 1));
    stream.push_back(1'((low >> 8) & 1)); stream.push_back(1);
    repeat (64) stream.push_back(0);
    while (stream.size() % 16 != 0) stream.push_back(0);
    for (int i = 0; i < stream.size(); i += 16) begin
      automatic logic [15:0] w;
      for (int j = 0; j < 16; j++) w[15-j] = stream[i+j];
      words.push_back(w);
    end

    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int l = 0; l < NL; l++)
      for (int a = 0; a < NC; a++) begin
        init_we = 1; init_layer = 2'(l); init_addr = 9'(a); init_data = init_mem[l][a];
        @(negedge clk);
      end
    init_we = 0;
    start = 1; @(negedge clk); start = 0; feed_on = 1;
    repeat (5) @(negedge clk);

    foreach (ops[n]) begin
      if (ops[n].is_load) begin
        while (!load_ready) @(negedge clk);
        load_valid = 1; load_cache = 1'(ops[n].cache); load_grp = 2'(ops[n].grp); load_layer = 2'(ops[n].layer); load_base = 9'(ops[n].base);
        @(negedge clk);
        load_valid = 0;
        @(negedge clk);
        while (!load_ready) @(negedge clk);
      end else begin
        req_valid = 1; req_two = ops[n].two; req_mode = ops[n].mode; req_cm2 = 1'(ops[n].cache);
        req_idx0 = 5'(ops[n].i0); req_idx1_0 = 5'(ops[n].i10); req_idx1_1 = 5'(ops[n].i11);
        @(posedge clk);
        while (!req_ready) @(posedge clk);
        dec_bins += (ops[n].two && ops[n].mode != BIN_TERM) ? 2 : 1;
        @(negedge clk);
        req_valid = 0;
        if (n + 1 < ops.size() && !ops[n+1].is_load) req_valid = 1;
      end
    end
    req_valid = 0;
    repeat (4) @(negedge clk);
    check(exp_bins.size() == 0 && n_out == dec_bins, $sformatf("%0d bin_val decoded of %0d", n_out, dec_bins));
    check(req_acc == req_cycles, $sformatf("requests accepted in %0d of %0d cycles", req_acc, req_cycles));
    $display("decoded %0d bins in %0d request cycles: %0.2f bins/cycle", dec_bins, req_cycles, real'(dec_bins)/real'(req_cycles));
    // about nine requests in ten ask for two bins, so no stall means at least 1.8 bins per cycle
    check(real'(dec_bins) >= 1.8 * real'(req_cycles), "throughput below 1.8 bins/cycle");
    check(cm_mem_reads == 32'(exp_reads), $sformatf("CM memory reads %0d expected %0d", cm_mem_reads, exp_reads));
    check(cm_mem_writes == 32'(exp_writes), $sformatf("CM memory writes %0d expected %0d", cm_mem_writes, exp_writes));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end


  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
