// tb_scan_path - records 16 slices of random 432-bit input data after a rising
// En-Scan and reads all 432 words back through the read pointer, comparing with
// the slices the testbench applied; checks busy, wrap-around and pointer clear.
module tb_scan_path;
  logic clk = 0, rst_n = 0, en_scan = 0, rd = 0, clr = 0, busy;
  logic [431:0] data = '0;
  logic [15:0] word;
  logic [431:0] slice [16];
  int checks = 0, failures = 0;

  scan_path dut (.*);
  always #12.5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  function automatic logic [431:0] rnd();
    logic [431:0] v;
    for (int i = 0; i < 432; i += 32) v[i +: 32] = $urandom;
    return v;
  endfunction

  initial begin
    #10000000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int run = 0; run < 2; run++) begin
      int s = 0;
      @(negedge clk); en_scan = 1; data = rnd();
      check(!busy, "idle before the run");
      // the rising edge is seen on this clock; recording starts on the next
      @(negedge clk); data = rnd();
      for (s = 0; s < 16; s++) begin
        check(busy, "busy while recording");
        slice[s] = data;
        @(negedge clk); data = rnd();
      end
      check(!busy, "done after 16 slices");
      en_scan = 0;
      for (int w = 0; w < 432; w++) begin
        check(word == slice[w / 27][16 * (w % 27) +: 16], $sformatf("run %0d word %0d", run, w));
        rd = 1; @(negedge clk); rd = 0;
      end
      check(word == slice[0][15:0], "pointer wraps to word 0");
      rd = 1; @(negedge clk); rd = 0; clr = 1; @(negedge clk); clr = 0;
      check(word == slice[0][15:0], "clear restarts at word 0");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
