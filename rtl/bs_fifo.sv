// Bitstream buffer: a first-in first-out queue of 16-bit bitstream words
// between the DRAM side and the entropy decoder.
//
// The published design shows a bitstream buffer in front of the entropy
// decoder but gives no size or structure; this is the plainest buffer that
// does the job: a circular array of DEPTH words with a valid/ready handshake
// on both sides. Words written in a cycle can be read from the next cycle.
// `clear` empties the buffer (a new slice restarts the bitstream).
module bs_fifo #(
  parameter int unsigned W     = 16,
  parameter int unsigned DEPTH = 32
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clear,
  input  logic         in_valid,
  output logic         in_ready,
  input  logic [W-1:0] in_data,
  output logic         out_valid,
  input  logic         out_ready,
  output logic [W-1:0] out_data,
  output logic [$clog2(DEPTH+1)-1:0] level
);

  localparam int unsigned AW = $clog2(DEPTH);

  logic [W-1:0]  mem [DEPTH];
  logic [AW-1:0] rp, wp;

  assign in_ready  = (level < ($clog2(DEPTH+1))'(DEPTH));
  assign out_valid = (level != '0);
  assign out_data  = mem[rp];

  always_ff @(posedge clk)
    if (in_valid && in_ready) mem[wp] <= in_data;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rp    <= '0;
      wp    <= '0;
      level <= '0;
    end else if (clear) begin
      rp    <= '0;
      wp    <= '0;
      level <= '0;
    end else begin
      if (in_valid && in_ready)   wp <= (wp == AW'(DEPTH-1)) ? '0 : wp + 1;
      if (out_valid && out_ready) rp <= (rp == AW'(DEPTH-1)) ? '0 : rp + 1;
      level <= level + ($clog2(DEPTH+1))'(in_valid && in_ready)
                     - ($clog2(DEPTH+1))'(out_valid && out_ready);
    end
  end

endmodule
