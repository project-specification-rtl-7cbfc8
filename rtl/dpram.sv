// dpram - dual-port RAM holding the RoI history (128 words x 40 bits by default).
//
// Port A writes, port B reads.  The write enable is split into three lanes
// (bits 15:0, 31:16 and 39:32) so that the 16-bit slow-control bus can write a
// part of a word; the algorithm writes all three lanes every bunch crossing.
// Port B is a synchronous read: rdata holds mem[raddr] sampled on the previous
// clock edge.  Depth and width follow the specification; the lane split and the
// registered read are this design's choices (a block RAM maps onto both).
module dpram #(
  parameter int unsigned DEPTH = 128,
  parameter int unsigned W     = 40,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic [2:0]    we,       // lanes: [0] bits 15:0, [1] 31:16, [2] 39:32
  input  logic [AW-1:0] waddr,
  input  logic [W-1:0]  wdata,
  input  logic [AW-1:0] raddr,
  output logic [W-1:0]  rdata
);
  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    for (int b = 0; b < W; b++)
      if (we[b < 16 ? 0 : (b < 32 ? 1 : 2)]) mem[waddr][b] <= wdata[b];
    rdata <= mem[raddr];
  end
endmodule
