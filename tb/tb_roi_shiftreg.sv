// tb_roi_shiftreg - loads random 20-bit records and checks that they come out
// MSB first, one bit per clock starting right after the load edge, followed by
// zeros.
module tb_roi_shiftreg;
  logic clk = 0, rst_n = 0, load = 0, sout;
  logic [19:0] din = 0;
  int checks = 0, failures = 0;

  roi_shiftreg dut (.*);
  always #12.5 clk = ~clk;

  initial begin
    #1000000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 200; n++) begin
      logic [19:0] v;
      v = 20'($urandom);
      @(negedge clk); load = 1; din = v;
      @(negedge clk); load = 0;
      for (int b = 19; b >= 0; b--) begin
        checks++;
        if (sout !== v[b]) begin failures++; $display("FAIL rec %0d bit %0d", n, b); end
        @(negedge clk);
      end
      repeat (3) begin
        checks++;
        if (sout !== 1'b0) begin failures++; $display("FAIL zero fill"); end
        @(negedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
