// Self-checking testbench of mb_pipeline_ctrl.
//
// Three stage models answer each start with a done after a random latency.
// The testbench keeps its own counters of started and finished jobs and
// checks, every cycle, that a stage is started exactly when its input is ready,
// it is idle and the buffer behind it has room (so no start is early and none
// is late), that jobs come in layer-interleaved order, and that the whole
// frame takes fewer cycles than a lock-step schedule in which every MB slot
// lasts as long as its slowest stage.
module tb_mb_pipeline_ctrl;
  localparam int NS = 3, DEPTH = 2, MBB = 16, LB = 3;

  logic clk = 0, rst_n = 0, go = 0;
  logic [MBB-1:0] num_mb;
  logic [LB-1:0]  num_layers;
  logic [NS-1:0]  stage_start, stage_done;
  logic [MBB-1:0] stage_mb [NS];
  logic [LB-1:0]  stage_layer [NS];
  logic busy, frame_done;
  logic [31:0] frame_cycles;

  mb_pipeline_ctrl #(.NSTAGE(NS), .DEPTH(DEPTH), .MB_BITS(MBB), .LAYER_BITS(LB)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int st[NS], fi[NS], remain[NS], lat[NS][];
  bit wk[NS];
  int total, lockstep;

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // stage models and the independent legality model
  always @(posedge clk) if (rst_n && busy) begin
    for (int k = 0; k < NS; k++) begin
      bit legal;
      legal = !wk[k] && st[k] < total && (k == 0 || st[k] < fi[k-1]) &&
              (k == NS-1 || st[k] - fi[k+1] < DEPTH);
      check(stage_start[k] == legal, $sformatf("stage %0d start=%0b expected %0b (st=%0d)", k, stage_start[k], legal, st[k]));
      if (stage_start[k]) begin
        check(int'(stage_mb[k]) == st[k] / int'(num_layers) && int'(stage_layer[k]) == st[k] % int'(num_layers),
              $sformatf("stage %0d job %0d order", k, st[k]));
        remain[k] = lat[k][st[k]];
      end
    end
    // apply start/done effects after all stages were checked
    for (int k = 0; k < NS; k++) begin
      if (stage_start[k]) begin wk[k] = 1; st[k]++; end
      else if (stage_done[k]) begin wk[k] = 0; fi[k]++; end
    end
  end

  always @(negedge clk) begin
    for (int k = 0; k < NS; k++) begin
      stage_done[k] = 0;
      if (wk[k]) begin
        if (remain[k] <= 1) stage_done[k] = 1; else remain[k]--;
      end
    end
  end

  task automatic run_frame(int mbs, int layers);
    num_mb = MBB'(mbs); num_layers = LB'(layers);
    total = mbs * layers;
    lockstep = 0;
    for (int k = 0; k < NS; k++) begin
      lat[k] = new[total];
      st[k] = 0; fi[k] = 0; wk[k] = 0;
      foreach (lat[k][j]) lat[k][j] = 1 + ($urandom % 40);
    end
    for (int j = 0; j < total + NS - 1; j++) begin
      int m = 0;
      for (int k = 0; k < NS; k++) if (j - k >= 0 && j - k < total) m = (lat[k][j-k] > m) ? lat[k][j-k] : m;
      lockstep += m + 1;
    end
    @(negedge clk) go = 1;
    @(negedge clk) go = 0;
    wait (frame_done);
    @(posedge clk);
    check(fi[NS-1] == total, "all jobs finished");
    check(total == 1 ? frame_cycles <= lockstep : frame_cycles < lockstep, $sformatf("async %0d cycles vs lock-step %0d", frame_cycles, lockstep));
    $display("frame %0d MBs x %0d layers: %0d cycles, lock-step %0d", mbs, layers, frame_cycles, lockstep);
  endtask

  initial begin
    stage_done = 0; num_mb = 0; num_layers = 1;
    repeat (3) @(posedge clk);
    rst_n = 1;
    run_frame(20, 1);
    run_frame(12, 3);
    run_frame(10, 4);
    run_frame(1, 1);
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
