// tb_cp_regs - slow-control bus and register file.
//
// Bus cycles follow the documented timing: address, data and Rd/Wr* set up, a
// rising strobe with CS* low, the write lands one clock later; reads return data
// two clocks after the address.  Checked: version, write/read-back of the
// control, offset, threshold, isolation, mask, phase and delay registers and
// their decoded outputs; calibration results overriding phase and delay; sync
// done and status words; write-1-to-clear pulses for the error register and the
// counter clear; the RAM, FIFO and scan windows; Reset-Global keeping and
// power-up reset clearing the control registers.
module tb_cp_regs;
  import cp_pkg::*;
  logic clk = 0, por_n = 0, rst_n = 0;
  logic cs_n = 1, rw_n = 1, strobe = 0;
  logic [9:0] addr = 0;
  logic [15:0] wdata = 0, rdata;
  logic rdata_oe;
  ctrl_t ctrl;
  tower_t cthr [16];
  logic [5:0] ithr [16][3];
  logic [N_CH-1:0] err_mask, link_mask, err_reg = '0, err_clr;
  logic [6:0] offset, wr_addr = 7'h12, rd_addr = 7'h34;
  logic [1:0] phase_sel [N_LINES], dly_sel [N_LINES];
  logic [N_LINES-1:0] cal_done = '0, sync_ok = '0;
  logic [1:0] cal_phase [N_LINES], cal_dly [N_LINES];
  logic fifo_ef = 1, fifo_ff = 0, error_pin = 0, cnt_clr, scan_rd, scan_clr, scan_busy = 0, ram_re;
  logic [15:0] err_cnt = 16'h0042, scan_word = 16'h5A5A;
  logic [2:0] ram_we, fifo_we;
  logic [6:0] ram_addr;
  logic [5:0] fifo_idx;
  logic [39:0] wdata40, ram_rdata = 40'hAB_CDEF_0123, fifo_rdata = 40'h12_3456_789A;
  int checks = 0, failures = 0, clr_pulses = 0, scan_pulses = 0;
  logic [N_CH-1:0] clr_seen = '0;

  cp_regs dut (.*);
  always #12.5 clk = ~clk;

  always @(posedge clk) begin
    if (cnt_clr) clr_pulses++;
    clr_seen |= err_clr;
    if (scan_rd) scan_pulses++;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  task automatic wr(logic [9:0] a, logic [15:0] d);
    @(negedge clk); addr = a; wdata = d; rw_n = 0; cs_n = 0;
    @(negedge clk); strobe = 1;
    @(negedge clk); strobe = 0;
    @(negedge clk); cs_n = 1; rw_n = 1;
  endtask

  task automatic rd(logic [9:0] a, output logic [15:0] d);
    @(negedge clk); addr = a; rw_n = 1; cs_n = 0;
    @(negedge clk); strobe = 1;
    @(negedge clk); strobe = 0;
    d = rdata;
    check(rdata_oe, "bus driven during a read");
    @(negedge clk); cs_n = 1;
  endtask

  task automatic rw_check(logic [9:0] a, logic [15:0] d, logic [15:0] mask, string what);
    logic [15:0] q;
    wr(a, d);
    rd(a, q);
    check(q == (d & mask), $sformatf("%s: read %h exp %h", what, q, d & mask));
  endtask

  initial begin
    #10000000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] q;
    foreach (cal_phase[i]) begin cal_phase[i] = 2'(i); cal_dly[i] = 2'(i + 1); end
    repeat (2) @(posedge clk);
    por_n = 1; rst_n = 1;
    rd(A_VERSION, q);  check(q == 16'h0100, "version");
    rw_check(A_CONTROL, 16'hA501, 16'hFF01, "control");
    check(ctrl.mux_on && ctrl.tau_sel == 8'hA5, "control decoded");
    rw_check(A_OFFSET, 16'h0077, 16'h007F, "offset");
    check(offset == 7'h77, "offset output");
    for (int i = 0; i < 16; i++) rw_check(A_CTHR + 10'(i), 16'(3 * i + 1), 16'h00FF, "cluster threshold");
    check(cthr[7] == 8'd22, "threshold 8 output");
    for (int i = 0; i < 48; i++) rw_check(A_ITHR + 10'(i), 16'(i + 1), 16'h0FFF, "isolation threshold");
    check(ithr[5][0] == 6'd16 && ithr[5][1] == 6'd17 && ithr[5][2] == 6'd18, "isolation set 6 output");
    rw_check(A_ERRMASK + 2, 16'hFFFF, 16'hFFFF, "error mask word 3");
    check(err_mask == {10'h3FF, 32'h0}, "error mask output");
    rw_check(A_LINKMASK, 16'h8001, 16'hFFFF, "link mask word 1");
    check(link_mask[0] && link_mask[15] && !link_mask[16], "link mask output");
    rw_check(A_PHASE + 3, 16'h02E4, 16'h03FF, "phase word 4");   // lines 15..19
    check(phase_sel[15] == 0 && phase_sel[16] == 1 && phase_sel[17] == 2 &&
          phase_sel[18] == 3 && phase_sel[19] == 2, "phase outputs");
    rw_check(A_DELAY + 21, 16'h0003, 16'h03FF, "delay word 22");  // lines 105..107
    check(dly_sel[105] == 3 && dly_sel[106] == 0, "delay outputs");
    // calibration results override
    @(negedge clk); cal_done[16] = 1; @(negedge clk); cal_done = '0;
    check(phase_sel[16] == 2'(16) && dly_sel[16] == 2'(17), "calibration result stored");
    sync_ok = '1; sync_ok[13] = 0;
    rd(A_SYNC + 1, q); check(q == 16'h03F7, $sformatf("sync word 2 %h", q));
    rd(A_SYNC + 10, q); check(q == 16'h00FF, $sformatf("sync word 11 %h", q));
    rd(A_STATUS, q);   check(q == 16'h0001, "status");
    rd(A_ERRCNT, q);   check(q == 16'h0042, "error counter");
    rd(A_COUNTERS, q); check(q == 16'h1234, "address counters");
    err_reg = 42'h300_0000_0001;
    rd(A_ERRREG + 2, q); check(q == 16'h0300, "error register word 3");
    wr(A_ERRREG, 16'h0001);
    check(clr_seen == 42'h1 && clr_pulses == 1, "error clear pulse");
    // RAM and FIFO windows
    rd(A_RAM1 + 5, q);  check(q == 16'hCDEF && ram_addr == 5, "RAM lane 1 read");
    rd(A_RAM2 + 5, q);  check(q == 16'h00AB, "RAM lane 2 read");
    rd(A_FIFO0 + 9, q); check(q == 16'h789A && fifo_idx == 9, "FIFO lane 0 read");
    fork
      wr(A_RAM2 + 7, 16'h00EE);
      begin
        @(posedge ram_we[2]); #1;
        check(ram_addr == 7 && wdata40[39:32] == 8'hEE, "RAM lane 2 write");
      end
    join
    rd(A_SCAN, q); check(q == 16'h5A5A && scan_pulses == 1, "scan read");
    // Reset-Global keeps control registers, power-up reset clears them
    @(negedge clk); rst_n = 0; @(negedge clk); rst_n = 1;
    rd(A_CONTROL, q); check(q == 16'hA501, "control kept over Reset-Global");
    @(negedge clk); por_n = 0; @(negedge clk); por_n = 1;
    rd(A_CONTROL, q); check(q == 16'h0000, "control cleared at power-up");
    check(cthr[7] == 0 && phase_sel[16] == 0, "all control registers cleared");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
