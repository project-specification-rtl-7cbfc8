// roi_readout - RoI read-out logic: history RAM, FIFO, sequencer and the two
// serial output shift registers.
//
// Every bunch crossing the L and R RoI records ({R, L}, 40 bits) are written to
// the dual-port RAM at the write counter.  On En-readout the word at the read
// counter (write counter + offset) is copied into the FIFO; FIFO-EF goes low when
// it holds data.  On Load-ShiftReg the head of the FIFO is loaded into the two
// 20-bit shift registers, which send the L and R records out MSB first on
// RoI-Data_L and RoI-Data_R, one bit per 40 MHz clock, followed by zeros.
// The read-out controller must wait 20 crossings before the next Load-ShiftReg.
// Slow-control access: RAM words can be written lane by lane (the write port is
// taken for that clock) and read through the read port while En-readout is low;
// FIFO entries can be read and written by index.
// The structure follows the read-out block diagram of the specification; the
// word layout and the sharing of the RAM ports with slow control are this
// design's choices.
module roi_readout
  import cp_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  roi_t        roi_l,
  input  roi_t        roi_r,
  input  logic        rst_load,
  input  logic        en_readout,
  input  logic        load_shift,
  input  logic [6:0]  offset,
  output logic        roi_data_l,
  output logic        roi_data_r,
  output logic        fifo_ef,
  output logic        fifo_ff,
  output logic [6:0]  wr_addr,
  output logic [6:0]  rd_addr,
  // slow control
  input  logic [2:0]  vme_ram_we,
  input  logic        vme_ram_re,
  input  logic [6:0]  vme_ram_addr,
  input  logic [2:0]  vme_fifo_we,
  input  logic [5:0]  vme_fifo_idx,
  input  logic [39:0] vme_wdata,
  output logic [39:0] ram_rdata,
  output logic [39:0] fifo_rdata
);
  logic [2:0]  ram_we;
  logic [6:0]  ram_waddr, ram_raddr;
  logic [39:0] ram_wdata, fifo_dout;
  logic        push, pop, empty;

  readout_seq u_ros (
    .clk, .rst_n, .rst_load, .en_readout, .load_shift, .offset,
    .fifo_empty(empty), .wr_addr, .rd_addr,
    .fifo_push(push), .fifo_pop(pop)
  );

  always_comb begin
    if (|vme_ram_we) begin
      ram_we    = vme_ram_we;
      ram_waddr = vme_ram_addr;
      ram_wdata = vme_wdata;
    end else begin
      ram_we    = 3'b111;
      ram_waddr = wr_addr;
      ram_wdata = {roi_r, roi_l};
    end
    ram_raddr = (vme_ram_re && !en_readout) ? vme_ram_addr : rd_addr;
  end

  dpram #(.DEPTH(RAM_DEPTH), .W(40)) u_ram (
    .clk, .we(ram_we), .waddr(ram_waddr), .wdata(ram_wdata),
    .raddr(ram_raddr), .rdata(ram_rdata)
  );

  roi_fifo #(.DEPTH(FIFO_DEPTH), .W(40)) u_fifo (
    .clk, .rst_n, .push, .din(ram_rdata), .pop, .dout(fifo_dout),
    .empty, .full(fifo_ff),
    .vme_idx(vme_fifo_idx), .vme_we(vme_fifo_we), .vme_wdata, .vme_rdata(fifo_rdata)
  );

  roi_shiftreg #(.W(ROI_W)) u_sr_l (
    .clk, .rst_n, .load(pop), .din(fifo_dout[19:0]), .sout(roi_data_l)
  );
  roi_shiftreg #(.W(ROI_W)) u_sr_r (
    .clk, .rst_n, .load(pop), .din(fifo_dout[39:20]), .sout(roi_data_r)
  );

  assign fifo_ef = empty;
endmodule
