// roi_fifo - FIFO of RoI words between the history RAM and the output shift
// registers (64 entries x 40 bits by default).
//
// `push` writes `din` at the tail unless the FIFO is full; `pop` removes the head
// unless it is empty.  `dout` always shows the head entry, so a pop and the use
// of its data happen on the same clock edge.  `empty` and `full` drive the
// FIFO-EF and FIFO-FF pins (high when empty / full).  The slow-control bus can
// read any entry by index and overwrite it lane by lane (15:0, 31:16, 39:32)
// without moving the pointers (a push in the same clock takes precedence).  Depth, width and flags follow the specification;
// dropping a push when full and the slow-control access details are this
// design's choices.
module roi_fifo #(
  parameter int unsigned DEPTH = 64,
  parameter int unsigned W     = 40,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          push,
  input  logic [W-1:0]  din,
  input  logic          pop,
  output logic [W-1:0]  dout,
  output logic          empty,
  output logic          full,
  input  logic [AW-1:0] vme_idx,
  input  logic [2:0]    vme_we,
  input  logic [W-1:0]  vme_wdata,
  output logic [W-1:0]  vme_rdata
);
  logic [W-1:0] mem [DEPTH];
  logic [AW:0]  wptr, rptr;      // one extra bit tells full from empty

  assign empty     = (wptr == rptr);
  assign full      = (wptr[AW-1:0] == rptr[AW-1:0]) && (wptr[AW] != rptr[AW]);
  assign dout      = mem[rptr[AW-1:0]];
  assign vme_rdata = mem[vme_idx];

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      wptr <= '0;
      rptr <= '0;
    end else begin
      if (push && !full) wptr <= wptr + 1'b1;
      if (pop && !empty) rptr <= rptr + 1'b1;
    end

  logic [W-1:0] lane_mask;
  always_comb
    for (int b = 0; b < W; b++) lane_mask[b] = vme_we[b < 16 ? 0 : (b < 32 ? 1 : 2)];

  always_ff @(posedge clk)
    if (push && !full)
      mem[wptr[AW-1:0]] <= din;
    else if (|vme_we)
      mem[vme_idx] <= (mem[vme_idx] & ~lane_mask) | (vme_wdata & lane_mask);
endmodule
