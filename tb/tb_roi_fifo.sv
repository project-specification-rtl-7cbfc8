// tb_roi_fifo - FIFO against a queue model: random pushes and pops, filling to
// full (pushes then dropped) and draining to empty, the empty/full flags, and
// slow-control reads and lane writes of entries.
module tb_roi_fifo;
  logic clk = 0, rst_n = 0, push = 0, pop = 0;
  logic [39:0] din = 0, dout, vme_wdata = 0, vme_rdata;
  logic empty, full;
  logic [5:0] vme_idx = 0;
  logic [2:0] vme_we = 0;
  logic [39:0] q [$];
  int checks = 0, failures = 0, fulls = 0;

  roi_fifo dut (.*);
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
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 6000; n++) begin
      int bias;
      bias = (n / 500) % 2;              // alternate filling and draining phases
      @(negedge clk);
      check(empty == (q.size() == 0), "empty flag");
      check(full == (q.size() == 64), "full flag");
      if (q.size() > 0) check(dout == q[0], "head");
      if (full) fulls++;
      push = ($urandom_range(9) < (bias ? 7 : 3));
      pop  = ($urandom_range(9) < (bias ? 3 : 7));
      din  = {$urandom, $urandom};
      @(posedge clk);
      begin
        bit acc;
        acc = push && q.size() < 64;        // a push into a full FIFO is dropped
        if (pop && q.size() > 0) void'(q.pop_front());
        if (acc) q.push_back(din);
      end
    end
    check(fulls > 10, "FIFO reached full");
    // slow-control access to entries: read each entry, then rewrite lane 1 of entry 3
    @(negedge clk); push = 0; pop = 0;
    for (int i = 0; i < 64; i++) begin
      vme_idx = 6'(i); #1;
      check(vme_rdata == dut.mem[i], "entry read");
    end
    vme_idx = 3; vme_we = 3'b010; vme_wdata = 40'h00_BEEF_0000;
    @(posedge clk); #1 vme_we = 0;
    check(vme_rdata[31:16] == 16'hBEEF, $sformatf("lane write %h", vme_rdata));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
