// tb_clk_phase_mux - drives four 160 MHz phases and checks that the output
// follows the selected phase for every select value.
`timescale 1ns/1ps
module tb_clk_phase_mux;
  logic [3:0] clk_ph;
  logic [1:0] sel;
  logic       clk_out;
  int checks = 0, failures = 0;

  clk_phase_mux dut (.*);

  initial begin
    clk_ph = 4'b0011;
    forever #1.5625 clk_ph = {clk_ph[2:0], ~clk_ph[3]};   // 90-degree steps
  end

  initial begin
    #1000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int s = 0; s < 4; s++) begin
      sel = 2'(s);
      for (int k = 0; k < 40; k++) begin
        #0.5;
        checks++;
        if (clk_out !== clk_ph[s]) begin failures++; $display("FAIL sel %0d", s); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
