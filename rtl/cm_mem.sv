// Context-model (CM) memory: the probability models of every layer.
//
// A single-port synchronous SRAM of NLAYER sections with NCTX models each,
// addressed by {layer, context index}. One access per cycle: a write, or a
// read whose data appear on rdata in the next cycle. The layered memory is
// the published design's; its size per layer (512 models, enough for the
// context indices of the 4:2:0 profiles) is this design's choice.
module cm_mem
  import cabac_pkg::*;
#(
  parameter int unsigned NLAYER = 4,
  parameter int unsigned NCTX   = 512,
  localparam int unsigned AW    = $clog2(NLAYER*NCTX)
) (
  input  logic          clk,
  input  logic          we,
  input  logic          re,
  input  logic [AW-1:0] addr,
  input  ctx_t          wdata,
  output ctx_t          rdata
);

  ctx_t mem [NLAYER*NCTX];

  always_ff @(posedge clk) begin
    if (we)      mem[addr] <= wdata;
    else if (re) rdata     <= mem[addr];
  end

endmodule
