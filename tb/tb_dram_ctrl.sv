// Self-checking testbench of dram_ctrl.
//
// Requests are the lines of random reference windows of bi-predicted blocks:
// a forward-list window, then a backward-list window, each read in raster
// order. A DRAM model checks every command against the bank state and the
// timing rules (READ only to the open row and T_RCD after ACTIVE, ACTIVE
// only to a closed bank and T_RP after PRECHARGE, READs T_BURST apart), and
// returns data, CL cycles after each READ, that is a fixed function of bank,
// row and column. The testbench maps each request itself and checks the data
// of every fill against it. It also checks that the controller opened no
// more rows than serving the requests in arrival order would, and that it did
// issue ACTIVE/PRECHARGE for a request while an older one was still waiting.
module tb_dram_ctrl;
  import svcd_pkg::*;

  localparam int CL = 4, T_RCD = 3, T_RP = 3, T_BURST = 3, QD = 8;
  localparam int RB = 1 + REF_BITS + (YL_BITS - 4) + (XL_BITS - 3);

  logic clk = 0, rst_n = 0;
  logic rq_valid = 0, rq_ready;
  line_addr_t rq_addr;
  logic [6:0] rq_id;
  logic fl_valid;
  logic [6:0] fl_id;
  line_t fl_data;
  dram_cmd_e dram_cmd;
  logic [1:0] dram_bank;
  logic [RB-1:0] dram_row;
  logic [4:0] dram_col;
  logic dq_valid;
  line_t dq_data;
  logic [31:0] n_act, n_pre, n_rd;

  dram_ctrl #(.QDEPTH(QD), .T_RCD(T_RCD), .T_RP(T_RP), .T_BURST(T_BURST)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", msg); end
  endtask

  function automatic line_t dram_cell(int bank, int row, int col);
    line_t d;
    for (int k = 0; k < 6; k++) d[k*32 +: 32] = 32'(row * 131 + col * 7 + bank * 100003 + k * 977) * 32'h9E3779B1;
    return d;
  endfunction

  // independent mapping: tile of 4x8 lines per row, checkerboard of banks,
  // complemented for list 1
  function automatic line_t expect_data(line_addr_t a);
    int bank = (((a.yl / 8) % 2) * 2 + (a.xl / 4) % 2) ^ (a.list ? 3 : 0);
    int row  = ((int'(a.list) * 16 + int'(a.ref_idx)) * 128 + int'(a.yl) / 16) * 64 + int'(a.xl) / 8;
    int col  = (a.yl % 8) * 4 + a.xl % 4;
    return dram_cell(bank, row, col);
  endfunction

  // DRAM model
  bit   b_open [4];
  int   b_row [4], t_act [4], t_pre [4];
  int   t_rd = -100, cyc = 0;
  line_t rdpipe [$];
  int    rddue [$];
  int   waiting_rows [$];  // {bank,row} of requests not yet read, arrival order
  int   ooo_pa = 0;
  always @(posedge clk) if (rst_n) begin
    cyc++;
    case (dram_cmd)
      DRAM_ACT: begin
        check(!b_open[dram_bank] && cyc - t_pre[dram_bank] >= T_RP, "ACTIVE timing/state");
        b_open[dram_bank] = 1; b_row[dram_bank] = int'(dram_row); t_act[dram_bank] = cyc;
      end
      DRAM_PRE: begin
        check(b_open[dram_bank], "PRECHARGE of a closed bank");
        b_open[dram_bank] = 0; t_pre[dram_bank] = cyc;
      end
      DRAM_RD: begin
        check(b_open[dram_bank] && b_row[dram_bank] == int'(dram_row) &&
              cyc - t_act[dram_bank] >= T_RCD && cyc - t_rd >= T_BURST, "READ timing/state");
        t_rd = cyc;
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

  // outstanding requests by id
  line_t exp_by_id [128];
  bit    live [128];
  int    n_fill = 0;
  always @(posedge clk) if (rst_n && fl_valid) begin
    check(live[fl_id] && fl_data == exp_by_id[fl_id], $sformatf("fill id %0d", fl_id));
    live[fl_id] = 0;
    n_fill++;
  end
  // out-of-order ACTIVE: issued for a request that is not the oldest waiting one
  int arrival_bank [$];
  int arrival_row [$];
  always @(posedge clk) if (rst_n) begin
    if ((dram_cmd == DRAM_ACT) && arrival_bank.size() > 0 &&
        !(arrival_bank[0] == int'(dram_bank) && arrival_row[0] == int'(dram_row))) ooo_pa++;
    if (dram_cmd == DRAM_RD)
      foreach (arrival_bank[i])
        if (arrival_bank[i] == int'(dram_bank) && arrival_row[i] == int'(dram_row)) begin
          arrival_bank.delete(i); arrival_row.delete(i); break;
        end
  end

  int inorder_act = 0;
  int io_open [4];
  initial begin
    automatic int next_id = 0, sent = 0;
    foreach (b_open[b]) begin b_open[b] = 0; t_pre[b] = -100; t_act[b] = -100; io_open[b] = -1; end
    foreach (live[i]) live[i] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 60; n++) begin
      automatic int r = $urandom % 3;
      automatic int x0 = $urandom % 60, y0 = $urandom % 200;
      automatic line_addr_t win [$];
      // first half: forward then backward window of a bi-predicted block;
      // second half: lines of two reference pictures of one list interleaved
      for (int l = 0; l < 2; l++)
        for (int j = 0; j < 11; j++)
          for (int i = 0; i < 3; i++)
            if (n < 30) win.push_back('{list: 1'(l), ref_idx: REF_BITS'(r), yl: YL_BITS'(y0 + j), xl: XL_BITS'(x0 + i)});
            else        win.push_back('{list: 1'b0, ref_idx: REF_BITS'(r + l), yl: YL_BITS'(y0 + j), xl: XL_BITS'(x0 + i)});
      if (n >= 30) begin
        automatic line_addr_t mix [$];
        for (int k = 0; k < 33; k++) begin mix.push_back(win[k]); mix.push_back(win[k + 33]); end
        win = mix;
      end
      foreach (win[k]) begin
            automatic line_addr_t a = win[k];
            automatic int bank = (((a.yl / 8) % 2) * 2 + (a.xl / 4) % 2) ^ (a.list ? 3 : 0);
            automatic int row  = ((int'(a.list) * 16 + int'(a.ref_idx)) * 128 + int'(a.yl) / 16) * 64 + int'(a.xl) / 8;
            if (io_open[bank] != row) begin inorder_act++; io_open[bank] = row; end
            while (live[next_id]) @(negedge clk);
            @(negedge clk);
            rq_valid = 1; rq_addr = a; rq_id = 7'(next_id);
            exp_by_id[next_id] = expect_data(a); live[next_id] = 1;
            arrival_bank.push_back(bank); arrival_row.push_back(row);
            @(posedge clk);
            while (!rq_ready) @(posedge clk);
            sent++;
            next_id = (next_id + 1) % 128;
            @(negedge clk);
            rq_valid = 0;
          end
    end
    while (n_fill < sent) @(negedge clk);
    check(n_rd == 32'(sent), "one READ per request");
    check(n_act < 32'(inorder_act), $sformatf("ACTIVE count %0d, in arrival order %0d", n_act, inorder_act));
    check(ooo_pa > 0, "out-of-order ACTIVE issued");
    $display("%0d lines: %0d ACTIVE (in-order %0d), %0d PRECHARGE, %0d out-of-order ACTIVE", sent, n_act, inorder_act, n_pre, ooo_pa);
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
