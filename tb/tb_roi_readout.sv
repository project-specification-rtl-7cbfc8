// tb_roi_readout - RoI history, FIFO and serial read-out end to end.
//
// New random L and R records are offered every clock; the testbench keeps its
// own copy of what was written at each write address.  It then follows the
// read-out controller procedure: Reset/Load Counters with an offset, En-readout
// (the record at the read address is remembered), wait for FIFO-EF low, one
// Load-ShiftReg, and 20 clocks of serial data on both pins, which must equal the
// remembered records MSB first.  Several En-readouts in a row queue records in
// the FIFO; 64 of them without loads make FIFO-FF rise.  Slow-control lane writes
// and reads of the RAM are checked too.
module tb_roi_readout;
  import cp_pkg::*;
  logic clk = 0, rst_n = 0;
  roi_t roi_l = '0, roi_r = '0;
  logic rst_load = 0, en_readout = 0, load_shift = 0;
  logic [6:0] offset = 0, wr_addr, rd_addr;
  logic roi_data_l, roi_data_r, fifo_ef, fifo_ff;
  logic [2:0] vme_ram_we = 0, vme_fifo_we = 0;
  logic vme_ram_re = 0;
  logic [6:0] vme_ram_addr = 0;
  logic [5:0] vme_fifo_idx = 0;
  logic [39:0] vme_wdata = 0, ram_rdata, fifo_rdata;
  logic [39:0] shadow [128];
  logic [39:0] expq [$];
  int checks = 0, failures = 0, readouts = 0;

  roi_readout dut (.*);
  always #12.5 clk = ~clk;

  // new records each crossing; remember what the RAM stores
  always @(negedge clk) begin
    roi_l <= roi_t'($urandom);
    roi_r <= roi_t'($urandom);
  end
  always @(posedge clk)
    if (rst_n && vme_ram_we == 0) shadow[wr_addr] = {roi_r, roi_l};

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  task automatic request();                    // one En-readout clock
    @(negedge clk); en_readout = 1;
    @(posedge clk); expq.push_back(shadow[rd_addr]);
    @(negedge clk); en_readout = 0;
  endtask

  task automatic read_one();                   // Load-ShiftReg and 20 bits out
    logic [19:0] l, r;
    logic [39:0] e;
    int waitc = 0;
    while (fifo_ef && waitc < 10) begin @(negedge clk); waitc++; end
    check(!fifo_ef, "FIFO-EF low after En-readout");
    @(negedge clk); load_shift = 1;
    @(negedge clk); load_shift = 0;
    for (int b = 19; b >= 0; b--) begin
      l[b] = roi_data_l; r[b] = roi_data_r;
      @(negedge clk);
    end
    e = expq.pop_front();
    check({r, l} == e, $sformatf("serial RoI got %h exp %h", {r, l}, e));
    check(roi_data_l == 0 && roi_data_r == 0, "zeros after the record");
    readouts++;
  endtask

  initial begin
    #10000000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    repeat (130) @(negedge clk);               // fill the history
    offset = 7'd120;                           // read 8 crossings behind the writes
    rst_load = 1;
    @(negedge clk) rst_load = 0;
    check(wr_addr == 0 && rd_addr == 120, "counters reset/loaded");
    for (int n = 0; n < 10; n++) begin
      request();
      read_one();
    end
    // queue three, read three
    repeat (3) request();
    repeat (3) read_one();
    check(fifo_ef, "FIFO empty again");
    // fill the FIFO
    repeat (64) request();
    @(negedge clk);
    check(fifo_ff, "FIFO-FF after 64 requests");
    repeat (64) read_one();
    // slow control: write lane 0 of RAM word 5, then read it back
    @(negedge clk); vme_ram_we = 3'b001; vme_ram_addr = 5; vme_wdata = 40'h00_0000_1234;
    @(negedge clk); vme_ram_we = 0; vme_ram_re = 1;
    @(negedge clk); @(negedge clk);
    check(ram_rdata[15:0] == 16'h1234, $sformatf("RAM lane write/read %h", ram_rdata));
    vme_ram_re = 0;
    check(readouts == 77, "all read-outs done");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
