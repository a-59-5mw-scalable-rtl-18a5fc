// Self-checking testbench of mc_cache.
//
// Random reference windows (mostly overlapping, over two lists and two
// reference pictures) are requested. A DRAM stand-in answers every miss
// after a random delay, in random order, with data that is a fixed function
// of the line address. The testbench checks that every window comes out in
// raster order with the right coordinates and the right luma/chroma data,
// and that the number of hits and misses matches its own model of a 2-way
// LRU cache with 64 banks indexed by {yl mod 16, xl mod 4}.
module tb_mc_cache;
  import svcd_pkg::*;

  logic clk = 0, rst_n = 0;
  logic blk_valid = 0, blk_ready, blk_list;
  logic [REF_BITS-1:0] blk_ref;
  logic [XL_BITS-1:0] blk_xl;
  logic [YL_BITS-1:0] blk_yl;
  logic [2:0] blk_wl;
  logic [4:0] blk_hl;
  logic out_valid, out_ready, out_last;
  line_t out_line;
  logic [XL_BITS-1:0] out_xl;
  logic [YL_BITS-1:0] out_yl;
  logic rq_valid, rq_ready;
  line_addr_t rq_addr;
  logic [6:0] rq_id;
  logic fl_valid;
  logic [6:0] fl_id;
  line_t fl_data;
  logic [31:0] hits, misses;

  mc_cache dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", msg); end
  endtask

  function automatic line_t line_data(line_addr_t a);
    line_t d;
    for (int k = 0; k < 6; k++) d[k*32 +: 32] = (32'(a) * 32'h9E3779B1) ^ (32'(k) * 32'h85EBCA77) ^ 32'(a >> 7);
    return d;
  endfunction

  // DRAM stand-in: random delay, random order
  typedef struct { line_addr_t a; logic [6:0] id; int due; } fill_t;
  fill_t fq [$];
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;
  always @(negedge clk) begin
    fl_valid = 0;
    rq_ready = ($urandom % 4) != 0;
    if (fq.size() > 0) begin
      int i = $urandom % fq.size();
      if (fq[i].due <= cyc) begin
        fl_valid = 1; fl_id = fq[i].id; fl_data = line_data(fq[i].a);
        fq.delete(i);
      end
    end
  end
  always @(posedge clk) if (rst_n && rq_valid && rq_ready) begin
    fill_t f;
    f.a = rq_addr; f.id = rq_id; f.due = cyc + 3 + $urandom % 12;
    fq.push_back(f);
  end

  // reference cache model
  typedef struct packed { logic v; logic [REF_BITS:0] lr; logic [YL_BITS-5:0] ty; logic [XL_BITS-3:0] tx; } mtag_t;
  mtag_t mt [64][2];
  bit mlru [64];
  int exp_hits = 0, exp_misses = 0;
  function automatic void model_line(bit l, int r, int x, int y);
    int b = (y % 16) * 4 + (x % 4);
    mtag_t t = '{v: 1, lr: {l, REF_BITS'(r)}, ty: (YL_BITS-4)'(y / 16), tx: (XL_BITS-2)'(x / 4)};
    if (mt[b][0] == t) begin exp_hits++; mlru[b] = 1; end
    else if (mt[b][1] == t) begin exp_hits++; mlru[b] = 0; end
    else begin
      int w = !mt[b][0].v ? 0 : !mt[b][1].v ? 1 : mlru[b];
      mt[b][w] = t; mlru[b] = !w; exp_misses++;
    end
  endfunction

  initial begin
    foreach (mt[b, w]) mt[b][w] = '0;
    foreach (mlru[b]) mlru[b] = 0;
    out_ready = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 300; n++) begin
      automatic bit l = 1'($urandom % 2);
      automatic int r = $urandom % 2;
      automatic int x = 10 + $urandom % 8, y = 100 + $urandom % 24;
      automatic int w = 1 + $urandom % 4, h = 1 + $urandom % 16;
      automatic int got = 0;
      for (int j = 0; j < h; j++) for (int i = 0; i < w; i++) model_line(l, r, x + i, y + j);
      @(negedge clk);
      while (!blk_ready) @(negedge clk);
      blk_valid = 1; blk_list = l; blk_ref = REF_BITS'(r);
      blk_xl = XL_BITS'(x); blk_yl = YL_BITS'(y); blk_wl = 3'(w); blk_hl = 5'(h);
      @(negedge clk);
      blk_valid = 0;
      while (got < w*h) begin
        out_ready = ($urandom % 3) != 0;
        @(posedge clk);
        if (out_valid && out_ready) begin
          automatic int ex = x + got % w, ey = y + got / w;
          automatic line_addr_t a = '{list: l, ref_idx: REF_BITS'(r), yl: YL_BITS'(ey), xl: XL_BITS'(ex)};
          check(int'(out_xl) == ex && int'(out_yl) == ey, $sformatf("window %0d line %0d at (%0d,%0d)", n, got, out_xl, out_yl));
          check(out_line == line_data(a), $sformatf("window %0d line %0d data", n, got));
          check(out_last == (got == w*h - 1), "last flag");
          got++;
        end
        @(negedge clk);
      end
      out_ready = 0;
    end
    repeat (3) @(negedge clk);
    check(hits == 32'(exp_hits) && misses == 32'(exp_misses),
          $sformatf("hits %0d misses %0d, expected %0d %0d", hits, misses, exp_hits, exp_misses));
    $display("lookups %0d, hit rate %0d%%", exp_hits + exp_misses, 100 * exp_hits / (exp_hits + exp_misses));
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
