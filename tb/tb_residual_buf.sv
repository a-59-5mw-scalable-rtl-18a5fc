// Self-checking testbench of residual_buf: writes random 4x4 residual blocks
// (a third all-zero, a third constant, a third general) into both MB slots,
// reads them back in random order and compares the samples. Checks that the
// SRAM is written and read only for the general blocks and that the zero and
// DC blocks are counted as rejected.
module tb_residual_buf;
  localparam int NB = 24, RW = 9;
  logic clk = 0, rst_n = 0;
  logic wr_valid = 0, rd_valid = 0, rd_out_valid;
  logic wr_slot, rd_slot;
  logic [4:0] wr_blk, rd_blk;
  logic signed [RW-1:0] wr_res [16];
  logic signed [RW-1:0] rd_res [16];
  logic [31:0] sram_writes, sram_reads, zero_blocks, dc_blocks;

  residual_buf dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", msg); end
  endtask

  logic signed [RW-1:0] ref_res [2][NB][16];
  int ref_kind [2][NB];
  int n_full_w = 0, n_full_r = 0, n_zero = 0, n_dc = 0;

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int mb = 0; mb < 60; mb++) begin
      automatic int s = mb % 2;
      for (int b = 0; b < NB; b++) begin
        automatic int k = $urandom % 3;
        automatic logic signed [RW-1:0] v = RW'($urandom);
        if (k == 1 && v == 0) v = 1;
        for (int i = 0; i < 16; i++)
          ref_res[s][b][i] = (k == 0) ? '0 : (k == 1) ? v : RW'($urandom);
        if (k == 2) ref_res[s][b][5] = ref_res[s][b][0] + 1;  // surely not constant
        ref_kind[s][b] = k;
        if (k == 0) n_zero++; else if (k == 1) n_dc++; else n_full_w++;
        @(negedge clk);
        wr_valid = 1; wr_slot = 1'(s); wr_blk = 5'(b);
        for (int i = 0; i < 16; i++) wr_res[i] = ref_res[s][b][i];
      end
      @(negedge clk);
      wr_valid = 0;
      // read the MB back in a scrambled order
      for (int j = 0; j < NB; j++) begin
        automatic int b = (j * 7) % NB;
        rd_valid = 1; rd_slot = 1'(s); rd_blk = 5'(b);
        if (ref_kind[s][b] == 2) n_full_r++;
        @(negedge clk);
        rd_valid = 0;
        check(rd_out_valid, "read data valid after one cycle");
        for (int i = 0; i < 16; i++)
          check(rd_res[i] == ref_res[s][b][i], $sformatf("MB %0d block %0d sample %0d", mb, b, i));
      end
    end
    check(sram_writes == 32'(n_full_w) && sram_reads == 32'(n_full_r),
          $sformatf("SRAM writes %0d reads %0d, expected %0d %0d", sram_writes, sram_reads, n_full_w, n_full_r));
    check(zero_blocks == 32'(n_zero) && dc_blocks == 32'(n_dc), "rejected block counts");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
