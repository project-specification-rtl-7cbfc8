// tb_bc_demux - BC de-multiplexing and error detection of one field.
//
// A random slot stream (empty slots, valid data with odd parity, occasional
// parity errors, random BC flags) is applied.  The expected towers of slot e are
// worked out from the whole stream: the pair phase of every slot, the tower A / B
// assignment rules, and the zeroing of corrupt data (slot in error, first slot of
// a pair whose second slot is in error, everything after an error up to the next
// empty slot).  Slot e is sampled on clock edge e; its towers must be on the
// outputs after edge e+1.
// A directed pair (A then B, both with flag 0) checks the common case by hand.
// Sections with error checking off, link masked and BC mux off follow.
module tb_bc_demux;
  import cp_pkg::*;
  logic clk = 0, rst_n = 0, mux_on = 1, chk_en = 1, link_en = 1;
  field_t data_next = NO_DATA;
  logic   bcf_next = 0;
  tower_t tower_a, tower_b;
  logic   err;
  int checks = 0, failures = 0;
  int errors_seen = 0;

  bc_demux dut (.*);
  always #12.5 clk = ~clk;

  localparam int N = 3000;
  field_t D [N+2];
  bit     F [N+2];

  function automatic field_t mk(int unsigned v);
    return {~^v[7:0], v[7:0]};
  endfunction

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  initial begin
    #2000000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected towers for slot e given the stream, in mode (mux, chk, link)
  task automatic expect_slot(int e, bit mux, bit chk, bit lnk, output tower_t ea, output tower_t eb,
                             output bit ee);
    bit ph [N+2];
    bit perr_e, perr_n, sticky, zero;
    ph[0] = 1'b1;
    for (int i = 0; i <= e; i++) begin
      bit prev = (i == 0) ? 1'b1 : ph[i-1];
      ph[i] = (D[i] == NO_DATA) ? 1'b1 : !prev;
    end
    perr_e = !(^D[e]);
    perr_n = !(^D[e+1]);
    sticky = 0;
    for (int i = e; i >= 0; i--) begin
      if (D[i] == NO_DATA) break;
      if (!(^D[i])) begin sticky = 1; break; end
    end
    zero = chk && (perr_e || sticky || (mux && !ph[e] && perr_n));
    ea = 0; eb = 0;
    if (!mux) ea = D[e][7:0];
    else begin
      bit f = F[e], fp = (e == 0) ? 1'b0 : F[e-1], fn = F[e+1];
      if (!ph[e] && !f)            ea = D[e][7:0];
      if (ph[e] && f && fp)        ea = D[e][7:0];
      if (!ph[e] && f)             eb = D[e][7:0];
      else if (ph[e] && f && !fp)  eb = D[e][7:0];
      else if (!ph[e] && !f && !fn) eb = D[e+1][7:0];
    end
    if (zero || !lnk) begin ea = 0; eb = 0; end
    ee = zero;
  endtask

  task automatic run_stream(bit mux, bit chk, bit lnk, int perr_pct);
    tower_t ea, eb;
    bit ee;
    for (int i = 0; i < N + 2; i++) begin
      int r = $urandom_range(99);
      if (r < 35)                 D[i] = NO_DATA;
      else                        D[i] = mk($urandom_range(255, 1));
      if ($urandom_range(99) < perr_pct) D[i][8] = ~D[i][8];
      F[i] = 1'($urandom);
    end
    // reset so the phase starts from an empty slot
    @(negedge clk); rst_n = 0; mux_on = mux; chk_en = chk; link_en = lnk;
    @(negedge clk); rst_n = 1;
    for (int i = 0; i < N + 2; i++) begin
      data_next = D[i]; bcf_next = F[i];
      @(posedge clk); #1;
      if (i >= 1 && i - 1 < N) begin
        expect_slot(i - 1, mux, chk, lnk, ea, eb, ee);
        check(tower_a == ea && tower_b == eb && err == ee,
              $sformatf("mode %b%b%b slot %0d got %h/%h/%b exp %h/%h/%b", mux, chk, lnk, i-1,
                        tower_a, tower_b, err, ea, eb, ee));
        if (ee) errors_seen++;
      end
      @(negedge clk);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    // directed: empty, A=0x11 flag 0, B=0x22 flag 0, empty: both towers together
    @(negedge clk); data_next = mk(8'h11); bcf_next = 0;
    @(negedge clk); data_next = mk(8'h22); bcf_next = 0;
    @(posedge clk); #1;
    check(tower_a == 8'h11 && tower_b == 8'h22, "pair A,B with flag 0 (both at once)");
    @(negedge clk); data_next = NO_DATA;   bcf_next = 0;
    @(posedge clk); #1;
    check(tower_a == 8'h00 && tower_b == 8'h00, "second slot of the pair is empty");
    run_stream(1, 1, 1, 5);
    run_stream(1, 0, 1, 5);
    run_stream(1, 1, 0, 5);
    run_stream(0, 1, 1, 5);
    check(errors_seen > 20, "parity errors were exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
