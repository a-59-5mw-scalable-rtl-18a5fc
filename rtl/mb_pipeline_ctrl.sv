// Asynchronous macroblock pipeline controller.
//
// The decoder splits each macroblock (MB) into NSTAGE pipeline stages: entropy
// decoding, texture decoding with prediction, and deblocking with padding.
// Instead of moving every stage forward on a common MB-time boundary, each
// stage is started on its own as soon as (a) it is idle, (b) the previous
// stage has finished the MB it needs, and (c) the buffer behind it has room.
// A fast stage therefore never waits for a slow stage of another MB, which is
// the point of the scheme.
//
// A job is one MB in one layer. For quality-scalable streams the jobs are
// issued layer-interleaved: every layer of MB n is decoded before MB n+1,
// so the inter-layer data of an MB never leave the chip. With num_layers = 1
// this is plain MB order. Both come from the published design; the buffer
// depth between stages (DEPTH, a ping-pong pair by default), the counters and
// the handshake are this design's own choices.
//
// Interface: pulse `go` with num_mb and num_layers stable; stage k then gets a
// one-cycle stage_start[k] with the job's MB index and layer, and answers with
// a one-cycle stage_done[k] (any later cycle) when it has finished.
// frame_done pulses when the last stage finishes the last job; frame_cycles
// then holds the cycles from go to that point.
// Timing: a start may follow the done that enables it by one cycle.
module mb_pipeline_ctrl #(
  parameter int unsigned NSTAGE     = 3,
  parameter int unsigned DEPTH      = 2,
  parameter int unsigned MB_BITS    = 16,
  parameter int unsigned LAYER_BITS = 3
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  go,
  input  logic [MB_BITS-1:0]    num_mb,
  input  logic [LAYER_BITS-1:0] num_layers,  // 1 .. 2**LAYER_BITS-1
  output logic [NSTAGE-1:0]     stage_start,
  output logic [MB_BITS-1:0]    stage_mb    [NSTAGE],
  output logic [LAYER_BITS-1:0] stage_layer [NSTAGE],
  input  logic [NSTAGE-1:0]     stage_done,
  output logic                  busy,
  output logic                  frame_done,
  output logic [31:0]           frame_cycles
);

  localparam int unsigned JB = MB_BITS + LAYER_BITS;  // job counter width

  logic [JB-1:0]         total_jobs;
  logic [JB-1:0]         started  [NSTAGE];  // jobs started by each stage
  logic [JB-1:0]         finished [NSTAGE];  // jobs finished by each stage
  logic [NSTAGE-1:0]     working;
  logic [MB_BITS-1:0]    mb_q    [NSTAGE];
  logic [LAYER_BITS-1:0] layer_q [NSTAGE];

  always_comb begin
    for (int k = 0; k < NSTAGE; k++) begin
      logic in_ready, out_room;
      in_ready = (k == 0) ? 1'b1 : (started[k] < finished[k-1]);
      out_room = (k == NSTAGE-1) ? 1'b1 : ((started[k] - finished[k+1]) < JB'(DEPTH));
      stage_start[k] = busy && !working[k] && (started[k] < total_jobs) && in_ready && out_room;
      stage_mb[k]    = mb_q[k];
      stage_layer[k] = layer_q[k];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy         <= 1'b0;
      frame_done   <= 1'b0;
      frame_cycles <= '0;
      total_jobs   <= '0;
      working      <= '0;
      for (int k = 0; k < NSTAGE; k++) begin
        started[k]  <= '0;
        finished[k] <= '0;
        mb_q[k]     <= '0;
        layer_q[k]  <= '0;
      end
    end else begin
      frame_done <= 1'b0;
      if (go && !busy) begin
        busy         <= 1'b1;
        frame_cycles <= '0;
        total_jobs   <= JB'(num_mb * num_layers);
        working      <= '0;
        for (int k = 0; k < NSTAGE; k++) begin
          started[k]  <= '0;
          finished[k] <= '0;
          mb_q[k]     <= '0;
          layer_q[k]  <= '0;
        end
      end else if (busy) begin
        frame_cycles <= frame_cycles + 1;
        for (int k = 0; k < NSTAGE; k++) begin
          if (stage_start[k]) begin
            working[k] <= 1'b1;
            started[k] <= started[k] + 1;
          end else if (working[k] && stage_done[k]) begin
            working[k]  <= 1'b0;
            finished[k] <= finished[k] + 1;
            // advance to the next job: next layer of this MB, else next MB
            if (layer_q[k] + 1 >= num_layers) begin
              layer_q[k] <= '0;
              mb_q[k]    <= mb_q[k] + 1;
            end else begin
              layer_q[k] <= layer_q[k] + 1;
            end
            if (k == NSTAGE-1 && finished[k] + 1 == total_jobs) begin
              busy       <= 1'b0;
              frame_done <= 1'b1;
            end
          end
        end
      end
    end
  end

  // a stage may only report done while it works on a job
  a_done_only_when_working: assert property (@(posedge clk) disable iff (!rst_n)
      busy |-> ((stage_done & ~working) == '0));

endmodule
