// tb_clock_calib - calibration controller against a model of a misaligned line.
//
// The model sends the calibration pattern 10100101 and returns, each 40 MHz
// clock, the nibble of bits 4t-L .. 4t-L+3 where the lateness L is the line skew
// of the selected phase plus the selected delay.  Phases 0 and 1 return random
// words (data edge at the sampling point), phases 2 and 3 sample cleanly with
// skew k.  Expected: phase 2 (first of the best), delay (4-k) mod 4 so that the
// total lateness is a whole nibble, sync done high, and a `done` pulse.
// A second case makes every phase noisy: sync done must stay low.
// The run length is checked against the schedule: 1 (start) + 4 x (1 clear +
// 4 pause + 7 samples + 1) + 1 + 4 + 1 (stage 2) + 4 + 8 (check) clocks.
module tb_clock_calib;
  logic clk = 0, rst_n = 0, en_cal = 0;
  logic [3:0] nibble = 0;
  logic [1:0] phase, dly;
  logic s2p_clr, busy, done, sync_ok;
  int checks = 0, failures = 0;
  int k = 1;
  bit all_noisy = 0;
  int t = 0;

  clock_calib dut (.*);

  always #12.5 clk = ~clk;

  function automatic bit pat(int i);
    localparam logic [7:0] P = 8'b10100101;
    return P[7 - (((i % 8) + 8) % 8)];
  endfunction

  always @(posedge clk) begin
    int L;
    t <= t + 1;
    L = k + int'(dly);
    if (all_noisy || phase < 2) nibble <= 4'($urandom);
    else nibble <= {pat(4*t-L), pat(4*t-L+1), pat(4*t-L+2), pat(4*t-L+3)};
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #200000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cyc;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int run = 0; run < 5; run++) begin
      k = run % 4;
      all_noisy = (run == 4);
      @(negedge clk) en_cal = 1;
      cyc = 0;
      do begin @(posedge clk); #1; cyc++; end while (!done && cyc < 500);
      check(done, $sformatf("run %0d finished", run));
      if (!all_noisy) begin
        check(phase == 2'd2, $sformatf("run %0d phase %0d", run, phase));
        check(dly == 2'((4 - k) % 4), $sformatf("run %0d k=%0d dly %0d", run, k, dly));
        check(sync_ok, $sformatf("run %0d sync", run));
        check(cyc == 1 + 4*13 + 1 + 4 + 1 + 4 + 8,
              $sformatf("run %0d took %0d clocks", run, cyc));
      end else begin
        check(!sync_ok, "noisy line must not report sync");
      end
      @(negedge clk) en_cal = 0;
      repeat (3) @(posedge clk);
      check(!busy, "idle after run");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
