// tb_s2p_align - serial-to-parallel converter with every delay setting.
//
// A random bit stream is sent at 160 Mbit/s, changing half a bit after the
// sampling edge, so 160 MHz edge e (counted from 1) samples bit e-1.  The
// expected nibble after the 40 MHz edge that coincides with 160 MHz edge m, for
// delay d, is {b[m-6-d], b[m-5-d], b[m-4-d], b[m-3-d]} (one sampling stage,
// d delay stages, the 4-bit shifter and the capture register).
// The clear input is also checked.
`timescale 1ns/1ps
module tb_s2p_align;
  logic clk160 = 0, clk40 = 0, rst_n = 0, s2p_clr = 0, din = 0;
  logic [1:0] dly = 0;
  logic [3:0] nibble;
  int checks = 0, failures = 0;
  bit b [2000];
  int n = 0;                       // index of the next clk160 edge

  s2p_align dut (.*);

  always #3.125 clk160 = ~clk160;
  initial begin
    #3.125;                        // clk40 rises together with every 4th clk160 edge
    forever begin clk40 = 1; #12.5; clk40 = 0; #12.5; end
  end

  initial begin
    #50000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // stimulus: bit n is present around clk160 edge n
  initial begin
    foreach (b[i]) b[i] = 1'($urandom);
    #0.1 din = b[0];
    forever begin
      @(posedge clk160); n++;
      #3.125 din = b[n];
    end
  end

  initial begin
    int m;
    #20 rst_n = 1;
    for (int d = 0; d < 4; d++) begin
      @(negedge clk40); dly = 2'(d);
      repeat (3) @(posedge clk40);
      for (int k = 0; k < 60; k++) begin
        @(negedge clk40); m = n - 2;     // index of the clk160 edge at the capture
        checks++;
        if (nibble !== {b[m-6-d], b[m-5-d], b[m-4-d], b[m-3-d]}) begin
          failures++;
          $display("FAIL d=%0d m=%0d got %h", d, m, nibble);
        end
      end
    end
    // clear: hold for a full 40 MHz period, the next capture is all zero
    @(negedge clk40); s2p_clr = 1;
    @(negedge clk40); s2p_clr = 0;
    @(posedge clk40); #1;
    checks++;
    if (nibble !== 4'h0) begin failures++; $display("FAIL clear"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
