// tb_readout_seq - address counters and read-out control.
//
// Checks that both counters advance by one per clock and wrap at 128, that
// Reset/Load clears the write counter and loads the read counter with the
// offset (read = write + offset afterwards), that a push follows En-readout by
// one clock, and that a pop needs Load-ShiftReg and a non-empty FIFO.
module tb_readout_seq;
  logic clk = 0, rst_n = 0, rst_load = 0, en_readout = 0, load_shift = 0, fifo_empty = 1;
  logic [6:0] offset = 0, wr_addr, rd_addr;
  logic fifo_push, fifo_pop;
  int checks = 0, failures = 0;

  readout_seq dut (.*);
  always #12.5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  initial begin
    #10000000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [6:0] w0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk); w0 = wr_addr;
    for (int n = 1; n <= 300; n++) begin
      @(negedge clk);
      check(wr_addr == 7'(w0 + n) && rd_addr == wr_addr, "counting and wrap");
    end
    offset = 7'd100;
    rst_load = 1;
    @(negedge clk); rst_load = 0;
    check(wr_addr == 0 && rd_addr == 100, "reset/load");
    repeat (200) begin
      @(negedge clk);
      check(rd_addr == 7'(wr_addr + 7'd100), "read = write + offset");
    end
    for (int n = 0; n < 200; n++) begin
      logic e;
      e = 1'($urandom);
      en_readout = e; load_shift = 1'($urandom); fifo_empty = 1'($urandom);
      #1 check(fifo_pop == (load_shift && !fifo_empty), "pop");
      @(negedge clk);
      check(fifo_push == e, "push one clock after En-readout");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
