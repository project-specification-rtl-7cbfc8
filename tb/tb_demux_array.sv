// tb_demux_array - field assembly, tower placement and error bookkeeping.
//
// The testbench has its own encoder for the line layout: for every crossing
// with data it sends each pair as slot 1 = tower A (flag 0), slot 2 = tower B
// (flag 0), then an empty slot, with random non-zero towers everywhere.  The
// whole 6x7x2 map must come out one clock after the first slot of the pair.
// Then a parity error is put on one channel: its two towers are zeroed, its
// error register bit and the error counter count it, the Error pin rises; the
// error mask and the link mask are checked, and clearing through err_clr and
// cnt_clr is checked.
module tb_demux_array;
  import cp_pkg::*;
  logic clk = 0, rst_n = 0, mux_on = 1, cnt_clr = 0;
  logic [N_CH-1:0] err_mask = '0, link_mask = '0, err_clr = '0, err_reg;
  logic [3:0] nibble [N_LINES];
  tower_map_t towers;
  flag_map_t  tower_err;
  logic [15:0] err_cnt;
  logic error_pin;
  int checks = 0, failures = 0;

  demux_array dut (.*);
  always #12.5 clk = ~clk;

  tower_t T [2][6][7];

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  function automatic field_t mk(tower_t v);
    return {~^v, v};
  endfunction

  // put field f with flag on channel ch
  task automatic put(int ch, field_t f, bit flag);
    int l = ch / 21, c = ch % 21, b;
    if (c < 18) begin
      int g = c / 2, k = c % 2;
      b = 54 * l + 5 * g;
      nibble[b + 2*k]     = f[7:4];
      nibble[b + 2*k + 1] = f[3:0];
      nibble[b + 4][3 - 2*k] = f[8];
      nibble[b + 4][2 - 2*k] = flag;
    end else begin
      b = 54 * l + 45 + 3 * (c - 18);
      nibble[b]     = f[7:4];
      nibble[b + 1] = f[3:0];
      nibble[b + 2] = {f[8], flag, 2'b00};
    end
  endtask

  // towers A and B of channel ch in the map
  task automatic pair_of(int ch, output int l, output int ra, output int ca,
                         output int rb, output int cb);
    int c = ch % 21;
    l = ch / 21;
    if (c < 18) begin
      int g = c / 2, k = c % 2;
      ra = 2 * (g / 3) + k; ca = 2 * (g % 3);
      rb = ra;              cb = ca + 1;
    end else begin
      ra = 2 * (c - 18); ca = 6;
      rb = ra + 1;       cb = 6;
    end
  endtask

  // send one event; bad_ch gets a parity error in its first slot (-1: none)
  task automatic send_event(int bad_ch);
    int l, ra, ca, rb, cb;
    foreach (T[a, b, c]) T[a][b][c] = tower_t'($urandom_range(255, 1));
    for (int ch = 0; ch < N_CH; ch++) begin
      field_t f;
      pair_of(ch, l, ra, ca, rb, cb);
      f = mk(T[l][ra][ca]);
      if (ch == bad_ch) f[8] = ~f[8];
      put(ch, f, 1'b0);
    end
    @(negedge clk);
    for (int ch = 0; ch < N_CH; ch++) begin
      pair_of(ch, l, ra, ca, rb, cb);
      put(ch, mk(T[l][rb][cb]), 1'b0);
    end
    @(negedge clk);
    for (int ch = 0; ch < N_CH; ch++) put(ch, NO_DATA, 1'b0);
  endtask

  // compare the map with T, except channel zch which must be zero
  task automatic check_map(int zch, bit zch_err, string what);
    int l, ra, ca, rb, cb, bad = 0;
    for (int ch = 0; ch < N_CH; ch++) begin
      pair_of(ch, l, ra, ca, rb, cb);
      if (ch == zch) begin
        if (towers[l][ra][ca] != 0 || towers[l][rb][cb] != 0) bad++;
        if (tower_err[l][ra][ca] != zch_err) bad++;
      end else begin
        if (towers[l][ra][ca] != T[l][ra][ca] || towers[l][rb][cb] != T[l][rb][cb]) bad++;
        if (tower_err[l][ra][ca]) bad++;
      end
    end
    check(bad == 0, $sformatf("%s: %0d mismatches", what, bad));
  endtask

  initial begin
    #1000000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int ch = 0; ch < N_CH; ch++) put(ch, NO_DATA, 1'b0);
    repeat (2) @(posedge clk);
    rst_n = 1;
    repeat (2) @(negedge clk);
    // clean events: the map is on the outputs right after the B slot is sampled
    for (int e = 0; e < 20; e++) begin
      send_event(-1);
      check_map(-1, 0, "clean event");
      @(negedge clk);
    end
    check(err_reg == '0 && err_cnt == 0 && !error_pin, "no errors on clean data");
    // parity error on channel 5 (slot A): A and the B slot after it are zeroed
    send_event(5);
    check_map(5, 1, "parity error on channel 5");
    repeat (3) @(negedge clk);
    check(err_reg == (42'd1 << 5), $sformatf("error register %h", err_reg));
    check(err_cnt == 2, $sformatf("error counter %0d", err_cnt));
    check(error_pin, "Error pin set");
    // clear
    err_clr[5] = 1; cnt_clr = 1;
    @(negedge clk); err_clr = '0; cnt_clr = 0;
    check(err_reg == '0 && err_cnt == 0 && !error_pin, "cleared");
    // masked error: data pass unchanged, nothing recorded
    err_mask[5] = 1;
    send_event(5);
    check_map(-1, 0, "masked error passes");
    repeat (3) @(negedge clk);
    check(err_reg == '0 && err_cnt == 0, "masked error not recorded");
    err_mask = '0;
    // link mask on channel 30 (a had column pair when >= 39; 30 is a had 2x2 pair)
    link_mask[30] = 1;
    send_event(-1);
    check_map(30, 0, "link masked");
    @(negedge clk);
    link_mask = '0;
    // the last column pair of the had layer
    send_event(41);
    check_map(41, 1, "parity error on channel 41");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
