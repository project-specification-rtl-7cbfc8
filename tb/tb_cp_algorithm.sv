// tb_cp_algorithm - the eight windows, RoI records and hit counts.
//
// Random 6x7x2 tower maps (mostly quiet, with one or two clusters planted in the
// 2x4 core, sometimes a saturated tower or a tower flagged in error) are applied
// every clock.  For each map the reference model evaluates the eight windows;
// from them the testbench forms the expected hit counts per threshold set and
// the L and R RoI records, which must appear two clocks later.
module tb_cp_algorithm;
  import cp_pkg::*;
  import tb_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  tower_map_t towers;
  flag_map_t  tower_err;
  tower_t     cthr [16];
  logic [5:0] ithr [16][3];
  logic [7:0] tau_sel;
  logic [31:0] hits;
  roi_t roi_l, roi_r;
  int checks = 0, failures = 0, two_hits = 0, sat_seen = 0;

  cp_algorithm dut (.*);
  always #12.5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  // expected outputs of the current inputs
  task automatic expected(output logic [31:0] eh, output roi_t el, output roi_t er);
    int ct [16], it [16][3];
    int unsigned p [8];
    int c [8];
    bit sat [2], er_f [2];
    foreach (ct[t]) begin ct[t] = cthr[t]; for (int k = 0; k < 3; k++) it[t][k] = ithr[t][k]; end
    for (int k = 0; k < 8; k++) begin
      win_t e, h;
      int r0 = (k % 4) / 2, c0 = 2 * (k / 4) + (k % 2);   // window origin
      for (int i = 0; i < 4; i++)
        for (int j = 0; j < 4; j++) begin
          e[i][j] = towers[0][r0 + i][c0 + j];
          h[i][j] = towers[1][r0 + i][c0 + j];
        end
      p[k] = ref_window(e, h, ct, it, tau_sel, c[k]);
    end
    for (int g = 0; g < 2; g++) begin
      sat[g] = 0; er_f[g] = 0;
      for (int l = 0; l < 2; l++)
        for (int r = 0; r < 5; r++)
          for (int cc = 2 * g; cc < 2 * g + 5; cc++) begin
            sat[g] |= (towers[l][r][cc] == 255);
            er_f[g] |= tower_err[l][r][cc];
          end
    end
    eh = 0;
    for (int t = 0; t < 16; t++) begin
      int n = 0;
      for (int g = 0; g < 2; g++) begin
        bit any = 0;
        for (int w = 0; w < 4; w++) any |= p[4*g + w][t];
        n += any;
      end
      eh[2*t +: 2] = 2'(n);
    end
    for (int g = 0; g < 2; g++) begin
      roi_t rr;
      int bw = -1, bc = -1;
      for (int w = 0; w < 4; w++)
        if (p[4*g + w] != 0 && c[4*g + w] > bc) begin bw = w; bc = c[4*g + w]; end
      rr.loc = (bw < 0) ? 2'd0 : 2'(bw);
      rr.err = er_f[g];
      rr.sat = sat[g];
      rr.thr = (bw < 0) ? 16'h0 : 16'(p[4*g + bw]);
      if (g == 0) el = rr; else er = rr;
    end
  endtask

  logic [31:0] eh_q [3];
  roi_t el_q [3], er_q [3];

  initial begin
    #5000000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (cthr[t]) begin
      cthr[t] = 8'(8 * t + 5);
      ithr[t] = (t % 3 == 0) ? '{6'h3F, 6'h3F, 6'h3F} : '{6'(10 + t), 6'(8 + t), 6'(5 + t)};
    end
    tau_sel = 8'hF0;
    foreach (towers[l, r, c]) begin towers[l][r][c] = 0; tower_err[l][r][c] = 0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 4000; n++) begin
      @(negedge clk);
      foreach (towers[l, r, c]) begin
        towers[l][r][c] = 8'($urandom_range(3));
        tower_err[l][r][c] = ($urandom_range(200) == 0);
      end
      for (int q = 0; q < 1 + (n % 2); q++)
        towers[0][1 + $urandom_range(1)][1 + $urandom_range(3)] = 8'($urandom_range(140, 10));
      towers[1][1 + $urandom_range(1)][1 + $urandom_range(3)] = 8'($urandom_range(30));
      if (n % 17 == 0) towers[$urandom_range(1)][$urandom_range(4)][$urandom_range(6)] = 8'hFF;
      if (n % 50 == 0) tau_sel = 8'($urandom);
      #1;
      eh_q[2] = eh_q[1]; el_q[2] = el_q[1]; er_q[2] = er_q[1];
      eh_q[1] = eh_q[0]; el_q[1] = el_q[0]; er_q[1] = er_q[0];
      expected(eh_q[0], el_q[0], er_q[0]);
      if (n >= 2) begin
        check(hits == eh_q[2] && roi_l == el_q[2] && roi_r == er_q[2],
              $sformatf("map %0d: hits %h exp %h L %h/%h R %h/%h", n - 2, hits, eh_q[2],
                        roi_l, el_q[2], roi_r, er_q[2]));
        for (int t = 0; t < 16; t++) if (hits[2*t +: 2] == 2) two_hits++;
        if (roi_l.sat || roi_r.sat) sat_seen++;
      end
    end
    check(two_hits > 100, $sformatf("two hits for one threshold: %0d", two_hits));
    check(sat_seen > 50, $sformatf("saturation flags: %0d", sat_seen));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
