// readout_seq - read-out sequencer (ROS) of the RoI read-out logic.
//
// Two 7-bit address counters advance every bunch crossing and wrap at 128: the
// write counter addresses the RAM word written by the algorithm, the read
// counter the word offered for read-out.  `rst_load` (Reset/Load Counters)
// clears the write counter and loads the read counter with `offset`, so the
// read address is the write address plus the offset, modulo 128; in normal
// running the pulse arrives when the write counter is about to wrap and changes
// nothing.  En-readout and Load-ShiftReg are sampled on the rising clock edge:
//   en_readout high  -> the RAM word at the current read address is pushed into
//                       the FIFO one clock later (the RAM read is registered);
//   load_shift high  -> the FIFO head is popped into the shift registers.
// Counter widths and the reset/load behaviour follow the specification; the
// one-clock push delay follows from the registered RAM read chosen here.
module readout_seq #(
  parameter int unsigned AW = 7
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          rst_load,
  input  logic          en_readout,
  input  logic          load_shift,
  input  logic [AW-1:0] offset,
  input  logic          fifo_empty,
  output logic [AW-1:0] wr_addr,
  output logic [AW-1:0] rd_addr,
  output logic          fifo_push,
  output logic          fifo_pop
);
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      wr_addr   <= '0;
      rd_addr   <= '0;
      fifo_push <= 1'b0;
    end else begin
      if (rst_load) begin
        wr_addr <= '0;
        rd_addr <= offset;
      end else begin
        wr_addr <= wr_addr + 1'b1;
        rd_addr <= rd_addr + 1'b1;
      end
      fifo_push <= en_readout;
    end

  assign fifo_pop = load_shift && !fifo_empty;
endmodule
