// tb_roi_group - RoI selection within a 2x2 group of windows.
//
// Directed cases: no window passing (zero record, flags still reported), one
// window passing, several passing with different core sums (largest wins, ties to
// the lower index), and the OR of the hit bits.  Then random cases against a
// straightforward selection written here.
module tb_roi_group;
  import cp_pkg::*;
  logic [15:0] pass [4];
  logic [10:0] core [4];
  logic err, sat;
  roi_t roi;
  logic [15:0] hit;
  int checks = 0, failures = 0;

  initial begin            // watchdog
    #10000000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  roi_group dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  initial begin
    pass = '{0, 0, 0, 0}; core = '{100, 200, 300, 400}; err = 1; sat = 0;
    #1 check(roi == {2'b00, 1'b1, 1'b0, 16'h0} && hit == 0, "no RoI: zero record, error flag");
    pass[2] = 16'h00F0; sat = 1; err = 0;
    #1 check(roi == {2'b10, 1'b0, 1'b1, 16'h00F0} && hit == 16'h00F0, "window 21 alone");
    pass[1] = 16'h0001; pass[3] = 16'h8000;
    #1 check(roi.loc == 2'b11 && roi.thr == 16'h8000 && hit == 16'h80F1, "largest core wins");
    core[1] = 400;
    #1 check(roi.loc == 2'b01 && roi.thr == 16'h0001, "tie goes to the lower index");
    for (int n = 0; n < 2000; n++) begin
      int bw, bc;
      logic [15:0] h;
      bw = -1; bc = -1; h = 0;
      for (int w = 0; w < 4; w++) begin
        pass[w] = ($urandom_range(2) == 0) ? 16'($urandom) : 16'h0;
        core[w] = 11'($urandom_range(20));
        h |= pass[w];
        if (pass[w] != 0 && int'(core[w]) > bc) begin bw = w; bc = core[w]; end
      end
      err = 1'($urandom); sat = 1'($urandom);
      #1;
      check(hit == h && roi.err == err && roi.sat == sat &&
            roi.loc == ((bw < 0) ? 2'd0 : 2'(bw)) &&
            roi.thr == ((bw < 0) ? 16'h0 : pass[bw]), $sformatf("random %0d", n));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
