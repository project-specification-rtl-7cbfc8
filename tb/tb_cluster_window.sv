// tb_cluster_window - one algorithm window against the reference model.
//
// Random windows are drawn from several distributions (quiet with one cluster,
// busy, saturated towers) with random thresholds and random em/tau selection;
// the 16 pass bits and the core sum must equal the reference model's.  A few
// hand-worked cases check the cluster/isolation/de-cluster rules directly.
module tb_cluster_window;
  import cp_pkg::*;
  import tb_ref_pkg::*;
  tower_t     em [4][4], had [4][4], cthr [16];
  logic [5:0] ithr [16][3];
  logic [7:0] tau_sel;
  logic [15:0] pass;
  logic [10:0] core;
  int checks = 0, failures = 0;

  initial begin            // watchdog
    #10000000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  int n_pass = 0, n_tau = 0, n_sat = 0, n_decl_fail = 0;

  cluster_window dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  task automatic compare(string what);
    win_t e, h;
    int ct [16], it [16][3], c;
    int unsigned exp_pass;
    #1;
    foreach (em[i, j]) begin e[i][j] = em[i][j]; h[i][j] = had[i][j]; end
    foreach (ct[t]) begin ct[t] = cthr[t]; for (int k = 0; k < 3; k++) it[t][k] = ithr[t][k]; end
    exp_pass = ref_window(e, h, ct, it, tau_sel, c);
    check(pass == 16'(exp_pass) && core == 11'(c),
          $sformatf("%s: pass %h exp %h core %0d exp %0d", what, pass, exp_pass, core, c));
    if (pass != 0) n_pass++;
    if ((pass[15:8] & tau_sel) != 0) n_tau++;
  endtask

  initial begin
    // hand case: one em cluster 30+20 in towers 11, 12, nothing else
    foreach (em[i, j]) begin em[i][j] = 0; had[i][j] = 0; end
    foreach (cthr[t]) begin cthr[t] = 8'(10 * t); ithr[t] = '{6'd63, 6'd63, 6'd63}; end
    tau_sel = 8'h00;
    em[1][1] = 30; em[1][2] = 20;
    #1;
    // 50 > 10*t for t <= 4
    check(pass == 16'h001F, $sformatf("hand cluster: %h", pass));
    check(core == 50, "hand core");
    // em isolation 10 in the ring: sets with em isolation threshold < 10 fail
    em[0][0] = 10; ithr[2][0] = 6'd9; ithr[3][0] = 6'd10;
    #1 check(pass == 16'h001B, $sformatf("hand isolation: %h", pass));
    // an equal 2x2 cluster at offset (2,2) ('>' side): no local maximum
    em[0][0] = 0; em[3][3] = 50;
    #1 check(pass == 16'h0000, $sformatf("equal cluster on the > side: %h", pass));
    // an equal 2x2 cluster at offset (0,0) ('>=' side): still a maximum,
    // but the 20 in the ring now fails the isolation of sets 2 and 3
    em[3][3] = 0; em[0][0] = 20;
    #1 check(pass == 16'h0013, $sformatf("equal cluster on the >= side: %h", pass));
    // random
    for (int n = 0; n < 20000; n++) begin
      int mode = n % 4;
      foreach (em[i, j]) begin
        case (mode)
          0: begin em[i][j] = 8'($urandom_range(3)); had[i][j] = 8'($urandom_range(2)); end
          1: begin em[i][j] = 8'($urandom_range(40)); had[i][j] = 8'($urandom_range(20)); end
          2: begin em[i][j] = 8'($urandom); had[i][j] = 8'($urandom); end
          default: begin em[i][j] = 8'($urandom_range(6)); had[i][j] = 8'($urandom_range(4)); end
        endcase
      end
      if (mode == 0 || mode == 3) begin
        em[1 + $urandom_range(1)][1 + $urandom_range(1)] = 8'($urandom_range(255, 100));
        if (mode == 3) had[1][1] = 8'hFF;
      end
      foreach (cthr[t]) begin
        cthr[t] = 8'($urandom_range(mode == 2 ? 255 : 120));
        for (int k = 0; k < 3; k++) ithr[t][k] = 6'($urandom);
        if (t % 4 == 0) ithr[t] = '{6'h3F, 6'h3F, 6'h3F};
      end
      tau_sel = 8'($urandom);
      compare($sformatf("random %0d", n));
    end
    check(n_pass > 1000, $sformatf("windows passing some threshold: %0d", n_pass));
    check(n_tau > 100, $sformatf("windows passing a tau threshold: %0d", n_tau));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
