// tb_cp_chip - end-to-end test of the cluster processor chip at its default size.
//
// Time unit: 1 = 62.5 ps, so a crossing is 400 units and a serial bit 100.  The
// four 160 MHz phases are 25 units apart; clk40 rises together with phase 0.
// A model of the transmitters drives all 108 lines, each with its own skew
// (0..2 whole bits plus a fraction) and a 30-unit window of random data around
// every bit transition, so some clock phases sample garbage.  The sequence:
//   1. calibration pattern 10100101 on every line, En-Calibration: Sync-Done must
//      rise, and the phase and delay read back over the bus must give a clean
//      sampling point and the word alignment that the skew requires;
//   2. thresholds, isolation limits, tau selection and offset are written over
//      the bus; the parity errors caused by the pattern are cleared;
//   3. 150 events, each a BC-multiplexed pair (tower A, tower B, empty slot) with
//      non-zero towers, clusters, sometimes a saturated tower, one with a parity
//      error; the hit outputs of every crossing are compared with the reference
//      model six clk40 edges after the first slot of the pair started;
//   4. RoI read-out of every fourth event (offset = -10), and a burst of 64
//      read-outs that fills the FIFO (FIFO-FF, one push ignored); records are
//      compared bit by bit on RoI-Data_L / RoI-Data_R;
//   5. error pin, error counter and error register, scan path contents, RAM
//      counters;
//   6. 40 maps sent with BC multiplexing switched off (one tower per field and
//      crossing), hits checked as above;
//   7. Reset-Global keeping the control registers.
// Each mechanism is counted and must have happened.  The stimulus plan is this
// testbench's own; pin behaviour follows the specification.
module tb_cp_chip;
  import cp_pkg::*;
  import tb_ref_pkg::*;

  localparam int BC = 400, H = 4096, N_EV = 150, EV0 = 700, EV_GAP = 8;
  localparam int ERR_EV = 20, ERR_CH = 4, BURST0 = 1500, SCAN0 = 1100;
  localparam int MUXOFF0 = 2000, MUXOFF_N = 40;

  logic clk40 = 0, por_n = 0, rst_global = 0, en_cal = 0, en_scan = 0;
  logic [3:0] clk160_ph = '0;
  logic [N_LINES-1:0] din = '0;
  logic rst_load = 0, en_readout = 0, load_shift = 0;
  logic fifo_ef, fifo_ff, roi_data_l, roi_data_r, error, sync_done, data_oe;
  logic [31:0] hits;
  logic cs_n = 1, rw_n = 1, strobe = 0;
  logic [9:0] addr = '0;
  logic [15:0] data_in = '0, data_out;

  cp_chip dut (.*);

  int checks = 0, failures = 0;
  int n_cal = 0, n_hit_bc = 0, n_two = 0, n_tau = 0, n_sat = 0, n_err = 0;
  int n_roi = 0, n_full = 0, n_scan = 0, n_vme = 0, n_phase_moved = 0, n_muxoff = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 40) $display("FAIL @%0t %s", $time, what); end
  endtask

  // ---------------- clocks ----------------
  initial begin
    #BC;
    forever begin clk40 = 1; #(BC/2); clk40 = 0; #(BC/2); end
  end
  for (genvar p = 0; p < 4; p++) begin : g_ph
    initial begin
      #(BC + 25 * p);
      forever begin clk160_ph[p] = 1; #50; clk160_ph[p] = 0; #50; end
    end
  end

  // ---------------- transmitted words ----------------
  logic [3:0] tx [H][N_LINES];     // nibble of every line in every crossing
  int skew_bits [N_LINES], skew_frac [N_LINES];

  // serialiser of line l: bit j of the stream starts at 100*j + skew
  for (genvar l = 0; l < N_LINES; l++) begin : g_tx
    localparam int SB = l % 3;
    localparam int SF = 11 + 25 * (l % 4) + 2 * (l % 5);   // never on a phase edge
    initial begin
      int j;
      skew_bits[l] = SB;
      skew_frac[l] = SF;
      #(100 + 100 * SB + SF - 15);
      j = 1;
      forever begin
        din[l] = 1'($urandom);  #15;
        din[l] = 1'($urandom);  #15;
        din[l] = tx[(j / 4) % H][l][3 - j % 4];
        #70;
        j++;
      end
    end
  end

  // ---------------- event encoder ----------------
  function automatic field_t mk(int v);
    return {~^8'(v), 8'(v)};
  endfunction

  task automatic put(int bc, int ch, field_t f, bit flag);
    int l, c, b, g, k;
    l = ch / 21; c = ch % 21;
    if (c < 18) begin
      g = c / 2; k = c % 2;
      b = 54 * l + 5 * g;
      tx[bc][b + 2*k]     = f[7:4];
      tx[bc][b + 2*k + 1] = f[3:0];
      tx[bc][b + 4][3 - 2*k] = f[8];
      tx[bc][b + 4][2 - 2*k] = flag;
    end else begin
      b = 54 * l + 45 + 3 * (c - 18);
      tx[bc][b]     = f[7:4];
      tx[bc][b + 1] = f[3:0];
      tx[bc][b + 2] = {f[8], flag, 2'b00};
    end
  endtask

  task automatic pair_of(int ch, output int l, output int ra, output int ca,
                         output int rb, output int cb);
    int c, g, k;
    c = ch % 21;
    l = ch / 21;
    if (c < 18) begin
      g = c / 2; k = c % 2;
      ra = 2 * (g / 3) + k; ca = 2 * (g % 3);
      rb = ra;              cb = ca + 1;
    end else begin
      ra = 2 * (c - 18); ca = 6;
      rb = ra + 1;       cb = 6;
    end
  endtask

  // ---------------- expectations ----------------
  int cthr_i [16], ithr_i [16][3];
  localparam int TAU_SEL = 'hF0, OFFSET = 128 - 10;
  logic [31:0] exp_hits [H];
  logic [19:0] exp_l [H], exp_r [H];
  bit rd_sched [H];

  task automatic build_stimulus();
    map_t  tw;
    fmap_t te;
    for (int b = 0; b < H; b++) begin
      exp_hits[b] = '0; exp_l[b] = '0; exp_r[b] = '0; rd_sched[b] = 0;
      for (int l = 0; l < N_LINES; l++) tx[b][l] = (b < 200) ? ((b % 2 != 0) ? 4'h5 : 4'hA) : 4'h0;
      if (b >= 200) for (int ch = 0; ch < N_CH; ch++) put(b, ch, NO_DATA, 1'b0);
    end
    for (int e = 0; e < N_EV; e++) begin
      int n, l, ra, ca, rb, cb;
      n = EV0 + EV_GAP * e;
      foreach (tw[a, r, c]) begin tw[a][r][c] = $urandom_range(3, 1); te[a][r][c] = 0; end
      for (int q = 0; q < 1 + (e % 2); q++)
        tw[0][1 + $urandom_range(1)][1 + $urandom_range(3)] = $urandom_range(140, 10);
      tw[1][1 + $urandom_range(1)][1 + $urandom_range(3)] = $urandom_range(40);
      if (tw[1][1][1] == 0) tw[1][1][1] = 1;
      foreach (tw[a, r, c]) if (tw[a][r][c] == 0) tw[a][r][c] = 1;
      if (e % 7 == 3) tw[$urandom_range(1)][$urandom_range(4)][$urandom_range(6)] = 255;
      for (int ch = 0; ch < N_CH; ch++) begin
        field_t fa, fb;
        pair_of(ch, l, ra, ca, rb, cb);
        fa = mk(tw[l][ra][ca]);
        fb = mk(tw[l][rb][cb]);
        if (e == ERR_EV && ch == ERR_CH) begin
          fa[8] = ~fa[8];
          tw[l][ra][ca] = 0; tw[l][rb][cb] = 0;
          te[l][ra][ca] = 1; te[l][rb][cb] = 1;
        end
        put(n, ch, fa, 1'b0);
        put(n + 1, ch, fb, 1'b0);
      end
      ref_chip(tw, te, cthr_i, ithr_i, TAU_SEL, exp_hits[n], exp_l[n], exp_r[n]);
      // the RAM word of crossing n is written on edge n+7 and read with
      // offset -10 on edge n+17
      if (e % 4 == 0 && n + 17 < BURST0 - 40) rd_sched[n + 17] = 1;
    end
    for (int x = BURST0; x < BURST0 + 65; x++) rd_sched[x] = 1;
    // BC multiplexing switched off: every crossing carries a full map, each
    // field sends only its tower A, tower B stays zero
    for (int e = 0; e < MUXOFF_N; e++) begin
      int n, l, ra, ca, rb, cb;
      n = MUXOFF0 + e;
      foreach (tw[a, r, c]) begin tw[a][r][c] = $urandom_range(3, 1); te[a][r][c] = 0; end
      tw[0][1 + $urandom_range(1)][1 + 2 * $urandom_range(1)] = $urandom_range(140, 10);
      for (int ch = 0; ch < N_CH; ch++) begin
        pair_of(ch, l, ra, ca, rb, cb);
        put(n, ch, mk(tw[l][ra][ca]), 1'b0);
        tw[l][rb][cb] = 0;
      end
      ref_chip(tw, te, cthr_i, ithr_i, TAU_SEL, exp_hits[n], exp_l[n], exp_r[n]);
      if (exp_hits[n] != 0) n_muxoff++;
    end
  endtask

  // ---------------- slow control ----------------
  task automatic vme_wr(logic [9:0] a, logic [15:0] d);
    @(negedge clk40); addr = a; data_in = d; rw_n = 0; cs_n = 0;
    @(negedge clk40); strobe = 1;
    @(negedge clk40); strobe = 0;
    @(negedge clk40); cs_n = 1; rw_n = 1;
  endtask

  task automatic vme_rd(logic [9:0] a, output logic [15:0] d);
    @(negedge clk40); addr = a; rw_n = 1; cs_n = 0;
    @(negedge clk40); strobe = 1;
    @(negedge clk40); strobe = 0;
    d = data_out;
    check(data_oe, "data bus driven during a read");
    @(negedge clk40); cs_n = 1;
  endtask

  // ---------------- hits checker ----------------
  int edge_no = 0;
  bit hits_chk = 1;
  always @(posedge clk40) edge_no <= edge_no + 1;   // value after edge E is E

  always @(negedge clk40) begin
    if (hits_chk && edge_no >= 600 && edge_no < H) begin
      logic [31:0] e;
      e = exp_hits[edge_no - 6];
      check(hits == e, $sformatf("hits after edge %0d: %h exp %h", edge_no, hits, e));
      if (e != 0) n_hit_bc++;
      for (int t = 0; t < 16; t++) begin
        if (e[2*t +: 2] == 2) n_two++;
        if (t >= 8 && TAU_SEL[t-8] && e[2*t +: 2] != 0) n_tau++;
      end
    end
  end

  // ---------------- read-out request driver and serial receiver ----------------
  logic [39:0] exp_q [$];
  bit hold_reader = 0;

  always @(negedge clk40) begin
    int x;
    x = edge_no + 1;                      // the edge that samples what we drive now
    en_readout <= (x < H) && rd_sched[x] && por_n;
    if (x < H && rd_sched[x] && x < BURST0 + 64) exp_q.push_back({exp_r[x - 17], exp_l[x - 17]});
  end

  initial begin
    logic [19:0] l, r;
    logic [39:0] ex;
    forever begin
      @(negedge clk40);
      if (!fifo_ef && !hold_reader) begin
        load_shift = 1;
        @(negedge clk40); load_shift = 0;
        for (int b = 19; b >= 0; b--) begin
          l[b] = roi_data_l; r[b] = roi_data_r;
          @(negedge clk40);
        end
        ex = (exp_q.size() > 0) ? exp_q.pop_front() : 'x;
        check({r, l} == ex, $sformatf("RoI L %h exp %h, R %h exp %h", l, ex[19:0], r, ex[39:20]));
        n_roi++;
        if (l[17] || r[17]) n_err++;
        if (l[16] || r[16]) n_sat++;
      end
    end
  end

  // ---------------- main sequence ----------------
  initial begin
    #(BC * (H - 100)) failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wait_edge(int e);
    while (edge_no < e) @(negedge clk40);
  endtask

  initial begin
    logic [15:0] d;
    foreach (cthr_i[t]) begin
      cthr_i[t] = 8 * t + 5;
      for (int k = 0; k < 3; k++) ithr_i[t][k] = (t % 3 == 0) ? 63 : 12 + t - 2 * k;
    end
    build_stimulus();
    #(3 * BC) por_n = 1;

    // 1. calibration
    wait_edge(20); en_cal = 1;
    wait_edge(110); en_cal = 0;
    check(sync_done, "Sync-Done after calibration");
    vme_rd(A_STATUS, d);
    check(d[3], "status: all lines in sync");
    for (int w = 0; w < 22; w++) begin
      logic [15:0] ph, dl;
      vme_rd(A_PHASE + 10'(w), ph);
      vme_rd(A_DELAY + 10'(w), dl);
      for (int k = 0; k < 5 && 5 * w + k < N_LINES; k++) begin
        int i, p, f, margin, d_exp;
        i = 5 * w + k;
        p = int'(ph[2*k +: 2]);
        f = skew_frac[i];
        margin = (25 * p - f + 200) % 100;          // sampling point after the transition
        d_exp = 3 - skew_bits[i] - ((25 * p < f) ? 1 : 0);
        check(margin >= 15 && margin <= 85, $sformatf("line %0d phase %0d on a transition", i, p));
        check(dl[2*k +: 2] == 2'(d_exp), $sformatf("line %0d delay %0d exp %0d", i, dl[2*k +: 2], d_exp));
        if (p != 0) n_phase_moved++;
      end
    end
    n_cal++;

    // 2. configuration
    vme_wr(A_CONTROL, 16'(TAU_SEL << 8) | 16'h1);
    for (int t = 0; t < 16; t++) begin
      vme_wr(A_CTHR + 10'(t), 16'(cthr_i[t]));
      for (int k = 0; k < 3; k++) vme_wr(A_ITHR + 10'(3 * t + k), 16'(ithr_i[t][k]));
    end
    vme_wr(A_OFFSET, 16'(OFFSET));
    vme_rd(A_CTHR + 10'd7, d);
    check(d == 16'(cthr_i[7]), "threshold read-back");
    check(edge_no < EV0 - 50, "configuration done before the events");
    for (int w = 0; w < 3; w++) vme_wr(A_ERRREG + 10'(w), 16'hFFFF);
    @(negedge clk40);
    check(!error, "Error pin low after clearing");
    vme_rd(A_ERRCNT, d);
    check(d == 0, $sformatf("error counter cleared: %0d", d));
    @(negedge clk40) rst_load = 1;
    @(negedge clk40) rst_load = 0;
    vme_rd(A_COUNTERS, d);
    check(7'(d[6:0] - d[14:8]) == 7'(OFFSET), $sformatf("read/write counters %h", d));
    n_vme++;

    // 3. parity error of event ERR_EV
    wait_edge(EV0 + EV_GAP * ERR_EV + 8);
    check(error, "Error pin after a parity error");
    wait_edge(EV0 + EV_GAP * ERR_EV + 12);
    vme_rd(A_ERRCNT, d);
    check(d == 2, $sformatf("error counter %0d", d));
    vme_rd(A_ERRREG, d);
    check(d == 16'(1 << ERR_CH), $sformatf("error register %h", d));
    vme_wr(A_ERRREG, 16'(1 << ERR_CH));
    @(negedge clk40);
    check(!error, "Error pin cleared");

    // 4. scan path: records the nibbles of crossings S-2 .. S+13
    wait_edge(SCAN0 - 1); en_scan = 1;
    @(negedge clk40);
    @(negedge clk40); en_scan = 0;
    vme_rd(A_STATUS, d);
    check(d[4], "scan recording busy");
    wait_edge(SCAN0 + 30);
    for (int s = 0; s < 2; s++)
      for (int w = 0; w < 27; w++) begin
        vme_rd(A_SCAN, d);
        check(d == {tx[SCAN0 - 2 + s][4*w+3], tx[SCAN0 - 2 + s][4*w+2], tx[SCAN0 - 2 + s][4*w+1], tx[SCAN0 - 2 + s][4*w]},
              $sformatf("scan slice %0d word %0d: %h", s, w, d));
        n_scan++;
      end

    // 5. FIFO burst: hold the receiver, 65 requests, FIFO-FF after 64
    wait_edge(BURST0 - 5); hold_reader = 1;
    check(fifo_ef, "FIFO empty before the burst");
    wait_edge(BURST0 + 66);
    check(fifo_ff, "FIFO-FF after 64 requests");
    if (fifo_ff) n_full++;
    hold_reader = 0;

    // 6. BC multiplexing off for the crossings MUXOFF0 .. MUXOFF0 + MUXOFF_N - 1
    wait_edge(MUXOFF0 - 40);
    vme_wr(A_CONTROL, 16'(TAU_SEL << 8));
    wait_edge(MUXOFF0 + MUXOFF_N + 20);
    vme_wr(A_CONTROL, 16'(TAU_SEL << 8) | 16'h1);
    wait_edge(BURST0 + 66 + 64 * 22 + 40);
    check(fifo_ef && exp_q.size() == 0, $sformatf("all records read, %0d left", exp_q.size()));

    // 7. Reset-Global keeps the configuration
    hits_chk = 0;
    @(negedge clk40) rst_global = 1;
    @(negedge clk40) rst_global = 0;
    vme_rd(A_CONTROL, d);
    check(d == (16'(TAU_SEL << 8) | 16'h1), "control kept over Reset-Global");
    vme_rd(A_OFFSET, d);
    check(d == 16'(OFFSET), "offset kept over Reset-Global");

    $display("mechanisms: calibration %0d (lines on phase>0: %0d), crossings with hits %0d, two-group hits %0d, tau hits %0d",
             n_cal, n_phase_moved, n_hit_bc, n_two, n_tau);
    $display("            RoI records %0d, saturated %0d, error-flagged %0d, FIFO full %0d, scan words %0d, bus %0d, BC mux off hits %0d",
             n_roi, n_sat, n_err, n_full, n_scan, n_vme, n_muxoff);
    $display("latency: hits of a crossing leave the chip 6 clk40 edges after its first serial bit");
    check(n_cal > 0 && n_phase_moved > 0, "calibration moved some phases");
    check(n_hit_bc > 50, "crossings with hits");
    check(n_two > 0, "two-group hits");
    check(n_tau > 0, "tau hits");
    check(n_roi > 80, $sformatf("RoI records read: %0d", n_roi));
    check(n_sat > 0, "saturation flag read out");
    check(n_err > 0, "error flag read out");
    check(n_full > 0, "FIFO full");
    check(n_scan > 0 && n_vme > 0, "scan and bus");
    check(n_muxoff > 0, "crossings with hits while BC multiplexing was off");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
