// Self-checking testbench of cm_cache.
//
// The CM memory (a cm_mem) is filled with random models while the cache is
// idle. Then
// groups are loaded and reloaded with random layers and base indices, while
// random models in the cache are overwritten through the two write ports.
// After every load the testbench reads all cache entries through the three
// read ports and compares them with its own model of memory plus cache, so a
// changed model that is not written back, or an unchanged one written back
// with wrong data, shows up when its group is loaded again. The CM memory
// read and write counts must equal what the adaptive write-back rule predicts,
// and a miss load must keep the cache busy for (changed models) + GSIZE + 2 cycles.
module tb_cm_cache;
  import cabac_pkg::*;

  localparam int NG = 4, GS = 8, NL = 4, NC = 512;

  logic clk = 0, rst_n = 0;
  logic load_valid = 0, load_ready;
  logic [1:0] load_grp, load_layer;
  logic [8:0] load_base;
  logic init_we = 0;
  logic [1:0] init_layer;
  logic [8:0] init_addr;
  ctx_t init_data;
  logic mem_we, mem_re;
  logic [10:0] mem_addr;
  ctx_t mem_wdata, mem_rdata;
  logic ready;
  logic [4:0] rd_idx [3];
  ctx_t rd_ctx [3];
  logic [1:0] wr_en = 0;
  logic [4:0] wr_idx [2];
  ctx_t wr_ctx [2];
  logic [31:0] mem_reads, mem_writes;

  cm_cache dut (.*);

  // the CM memory; the testbench fills it while the cache is idle
  cm_mem u_mem (
    .clk,
    .we(ready ? init_we : mem_we), .re(mem_re),
    .addr(ready ? {init_layer, init_addr} : mem_addr),
    .wdata(ready ? init_data : mem_wdata), .rdata(mem_rdata)
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", msg); end
  endtask

  ctx_t mm [NL][NC];
  ctx_t cc [NG*GS];
  bit   chg [NG*GS];
  bit   gv [NG];
  int   gl [NG], gb [NG];
  int   exp_rd = 0, exp_wr = 0;

  initial begin
    rd_idx[0] = 0; rd_idx[1] = 0; rd_idx[2] = 0;
    foreach (gv[g]) gv[g] = 0;
    foreach (chg[i]) chg[i] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    foreach (mm[l, a]) begin
      mm[l][a] = ctx_t'($urandom);
      init_we = 1; init_layer = 2'(l); init_addr = 9'(a); init_data = mm[l][a];
      @(negedge clk);
    end
    init_we = 0;
    for (int n = 0; n < 400; n++) begin
      automatic int g = $urandom % NG;
      automatic int l = (n % 5 == 4 && gv[g]) ? gl[g] : $urandom % NL;
      automatic int b = (n % 5 == 4 && gv[g]) ? gb[g] : g * 128 + 8 * ($urandom % 16);
      automatic bit miss = !(gv[g] && gl[g] == l && gb[g] == b);
      automatic int nchg = 0, t0, t1;
      // model of the load
      if (miss) begin
        for (int i = 0; i < GS; i++) begin
          if (gv[g] && chg[g*GS+i]) begin mm[gl[g]][gb[g]+i] = cc[g*GS+i]; exp_wr++; nchg++; end
          chg[g*GS+i] = 0;
        end
        for (int i = 0; i < GS; i++) cc[g*GS+i] = mm[l][b+i];
        exp_rd += GS;
        gv[g] = 1; gl[g] = l; gb[g] = b;
      end
      load_valid = 1; load_grp = 2'(g); load_layer = 2'(l); load_base = 9'(b);
      t0 = $time;
      @(negedge clk);
      load_valid = 0;
      while (!load_ready) @(negedge clk);
      t1 = $time;
      if (miss) check((t1 - t0) / 10 == nchg + GS + 3, $sformatf("load took %0d cycles, %0d changed", (t1 - t0) / 10, nchg));
      // read back every valid group
      for (int i = 0; i < NG*GS; i += 3) begin
        for (int p = 0; p < 3; p++) rd_idx[p] = 5'((i + p) % (NG*GS));
        #1;
        for (int p = 0; p < 3; p++)
          if (gv[((i + p) % (NG*GS)) / GS])
            check(rd_ctx[p] == cc[(i + p) % (NG*GS)], $sformatf("entry %0d after load %0d", (i + p) % (NG*GS), n));
      end
      @(negedge clk);
      // a few model updates, on two ports at once
      repeat ($urandom % 4) begin
        for (int w = 0; w < 2; w++) begin
          automatic int idx = $urandom % (NG*GS);
          wr_idx[w] = 5'(idx); wr_ctx[w] = ctx_t'($urandom);
        end
        wr_en = 2'b11;
        for (int w = 0; w < 2; w++)
          if (gv[wr_idx[w] / GS]) begin cc[wr_idx[w]] = wr_ctx[w]; chg[wr_idx[w]] = 1; end
        if (wr_idx[0] == wr_idx[1]) cc[wr_idx[0]] = wr_ctx[1];
        // only write groups that are loaded
        if (!gv[wr_idx[0] / GS]) wr_en[0] = 0;
        if (!gv[wr_idx[1] / GS]) wr_en[1] = 0;
        if (wr_idx[0] == wr_idx[1] && !wr_en[1]) wr_en[0] = 0;
        @(negedge clk);
        wr_en = 0;
      end
    end
    check(mem_reads == 32'(exp_rd) && mem_writes == 32'(exp_wr),
          $sformatf("CM memory reads %0d writes %0d, expected %0d %0d", mem_reads, mem_writes, exp_rd, exp_wr));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
