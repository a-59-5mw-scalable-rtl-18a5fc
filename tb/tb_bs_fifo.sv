// Self-checking testbench of bs_fifo: random pushes and pops, compared with
// a queue; checks order, the level output, that a full buffer refuses words
// that it fills up to exactly DEPTH words, and that clear empties it.
module tb_bs_fifo;
  localparam int D = 32;
  logic clk = 0, rst_n = 0, clear = 0;
  logic in_valid = 0, in_ready, out_valid, out_ready = 0;
  logic [15:0] in_data, out_data;
  logic [5:0] level;

  bs_fifo dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, fulls = 0;
  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", msg); end
  endtask

  logic [15:0] q [$];
  initial begin
    in_data = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 5000; n++) begin
      @(negedge clk);
      // phases: mostly filling, then mostly draining
      in_valid  = ($urandom % 100) < ((n / 500) % 2 ? 30 : 80);
      out_ready = ($urandom % 100) < ((n / 500) % 2 ? 80 : 30);
      in_data   = 16'($urandom);
      @(posedge clk);
      check(int'(level) == q.size(), "level");
      check(in_ready == (q.size() < D), "in_ready");
      if (q.size() == D) fulls++;
      check(out_valid == (q.size() > 0), "out_valid");
      if (out_valid && out_ready) check(out_data == q.pop_front(), "data order");
      if (in_valid && in_ready) q.push_back(in_data);
    end
    check(fulls > 0, "buffer was full at least once");
    // clear empties it
    @(negedge clk); in_valid = 0; out_ready = 0; clear = 1;
    @(negedge clk); clear = 0;
    check(level == 0 && !out_valid, "cleared");
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
