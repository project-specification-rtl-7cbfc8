// tb_cp_pkg - checks the saturating adders and constants of cp_pkg.
//
// Every 7th value of the 12-bit range goes through sat8 and sat6 and is compared
// with a plain min(); the empty-slot code, RoI width and line/channel counts are
// checked against the values the chip is built for (counts from the
// specification, the empty-slot code and record packing this design's choice).
module tb_cp_pkg;
  import cp_pkg::*;
  int checks = 0, failures = 0;

  initial begin            // watchdog
    #10000000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    for (int v = 0; v < 4096; v += 7) begin
      check(sat8(12'(v)) == ((v > 255) ? 8'hFF : 8'(v)), $sformatf("sat8 %0d", v));
      check(sat6(12'(v)) == ((v > 63) ? 6'h3F : 6'(v)), $sformatf("sat6 %0d", v));
    end
    check(^NO_DATA == 1'b1, "NO_DATA has odd parity");
    check(NO_DATA[7:0] == 8'd0, "NO_DATA is zero data");
    check($bits(roi_t) == ROI_W, "RoI width");
    check(N_LINES == 108 && N_CH == 42, "line and channel counts");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
