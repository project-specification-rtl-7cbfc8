// cp_chip - cluster processor chip of the calorimeter first-level trigger.
//
// The chip finds isolated electron/photon and tau/hadron clusters in a 2 x 4
// region of trigger towers.  It receives 108 serial lines at 160 Mbit/s which
// carry, BC-multiplexed, the 6 x 7 x 2 towers around that region (row 5 is
// brought in but not used), and each 25 ns bunch crossing it produces:
//   - hits[31:0]: for each of 16 threshold sets, how many of the two 2x2
//     window groups passed it (2 bits per set);
//   - two 20-bit Region-of-Interest records (L and R), stored for 128 crossings
//     and read out serially on RoI-Data_L / RoI-Data_R when the read-out
//     controller asks for them.
// Data path: clock phase mux + serial-to-parallel converter per line (s2p_align)
// with its calibration controller (clock_calib) -> BC de-multiplexing and parity
// error detection (demux_array, 42 channels) -> algorithm (cp_algorithm) ->
// RoI read-out (roi_readout).  cp_regs holds all slow-control registers and
// scan_path records raw input nibbles for checking the synchronisation.
// Clocks: clk40 is the system clock; clk160_ph are the four phases of the 160 MHz
// clock, which the on-chip DLL would produce and which are inputs here.
// Latency: with calibrated lines the nibble of a crossing is on the converter
// outputs after the second clk40 edge following the start of its first bit; the
// hits of that crossing leave the chip 4 edges later (2 de-multiplexing + 2
// algorithm), 6 crossings (150 ns) after the data started to arrive.  The RoI
// records appear together with the hits and are written into the history RAM on
// the next edge.
// Reset: por_n (power-up) clears everything; rst_global clears everything but
// the control registers.  The block structure follows the chip block diagram of
// the specification; the DLL, JTAG and pads are not part of this RTL.
module cp_chip
  import cp_pkg::*;
(
  input  logic                clk40,
  input  logic [3:0]          clk160_ph,
  input  logic                por_n,
  input  logic                rst_global,
  input  logic [N_LINES-1:0]  din,
  input  logic                en_cal,
  input  logic                en_scan,
  // RoI read-out control
  input  logic                rst_load,
  input  logic                en_readout,
  input  logic                load_shift,
  output logic                fifo_ef,
  output logic                fifo_ff,
  output logic                roi_data_l,
  output logic                roi_data_r,
  // real-time outputs
  output logic [31:0]         hits,
  output logic                error,
  output logic                sync_done,
  // slow control
  input  logic                cs_n,
  input  logic                rw_n,
  input  logic                strobe,
  input  logic [9:0]          addr,
  input  logic [15:0]         data_in,
  output logic [15:0]         data_out,
  output logic                data_oe
);
  logic rst_n;
  assign rst_n = por_n && !rst_global;

  // ---------------- configuration ----------------
  ctrl_t             ctrl;
  tower_t            cthr [16];
  logic [5:0]        ithr [16][3];
  logic [N_CH-1:0]   err_mask, link_mask, err_clr, err_reg;
  logic              cnt_clr;
  logic [15:0]       err_cnt;
  logic [6:0]        offset, wr_addr, rd_addr;
  logic [1:0]        phase_sel [N_LINES];
  logic [1:0]        dly_sel   [N_LINES];

  // ---------------- serial inputs ----------------
  logic [3:0]         nibble  [N_LINES];
  logic [1:0]         cal_phase [N_LINES];
  logic [1:0]         cal_dly   [N_LINES];
  logic [N_LINES-1:0] cal_busy, cal_done, sync_ok;

  for (genvar i = 0; i < N_LINES; i++) begin : g_line
    logic       clr, clk_line;
    logic [1:0] ph, dl;
    assign ph = cal_busy[i] ? cal_phase[i] : phase_sel[i];
    assign dl = cal_busy[i] ? cal_dly[i]   : dly_sel[i];
    clk_phase_mux u_mux (.clk_ph(clk160_ph), .sel(ph), .clk_out(clk_line));
    s2p_align u_s2p (
      .clk160(clk_line), .clk40, .rst_n, .s2p_clr(clr),
      .din(din[i]), .dly(dl), .nibble(nibble[i])
    );
    clock_calib u_cal (
      .clk(clk40), .rst_n, .en_cal, .nibble(nibble[i]),
      .phase(cal_phase[i]), .dly(cal_dly[i]), .s2p_clr(clr),
      .busy(cal_busy[i]), .done(cal_done[i]), .sync_ok(sync_ok[i])
    );
  end
  assign sync_done = &sync_ok;

  // ---------------- de-multiplexing and error detection ----------------
  tower_map_t towers;
  flag_map_t  tower_err;

  demux_array u_dmx (
    .clk(clk40), .rst_n, .mux_on(ctrl.mux_on), .err_mask, .link_mask,
    .err_clr, .cnt_clr, .nibble, .towers, .tower_err,
    .err_reg, .err_cnt, .error_pin(error)
  );

  // ---------------- algorithm ----------------
  roi_t roi_l, roi_r;

  cp_algorithm u_alg (
    .clk(clk40), .rst_n, .towers, .tower_err, .cthr, .ithr,
    .tau_sel(ctrl.tau_sel), .hits, .roi_l, .roi_r
  );

  // ---------------- RoI read-out ----------------
  logic [2:0]  ram_we, fifo_we;
  logic        ram_re;
  logic [6:0]  ram_addr;
  logic [5:0]  fifo_idx;
  logic [39:0] wdata40, ram_rdata, fifo_rdata;

  roi_readout u_ro (
    .clk(clk40), .rst_n, .roi_l, .roi_r, .rst_load, .en_readout, .load_shift,
    .offset, .roi_data_l, .roi_data_r, .fifo_ef, .fifo_ff, .wr_addr, .rd_addr,
    .vme_ram_we(ram_we), .vme_ram_re(ram_re), .vme_ram_addr(ram_addr),
    .vme_fifo_we(fifo_we), .vme_fifo_idx(fifo_idx), .vme_wdata(wdata40),
    .ram_rdata, .fifo_rdata
  );

  // ---------------- scan path ----------------
  logic [N_LINES*4-1:0] scan_data;
  logic                 scan_rd, scan_clr, scan_busy;
  logic [15:0]          scan_word;
  for (genvar i = 0; i < N_LINES; i++) begin : g_scan
    assign scan_data[4*i +: 4] = nibble[i];
  end

  scan_path #(.SLICES(16), .SLICE_W(N_LINES*4)) u_scan (
    .clk(clk40), .rst_n, .en_scan, .data(scan_data), .rd(scan_rd), .clr(scan_clr),
    .word(scan_word), .busy(scan_busy)
  );

  // ---------------- slow control ----------------
  cp_regs u_regs (
    .clk(clk40), .por_n, .rst_n, .cs_n, .rw_n, .strobe, .addr,
    .wdata(data_in), .rdata(data_out), .rdata_oe(data_oe),
    .ctrl, .cthr, .ithr, .err_mask, .link_mask, .offset, .phase_sel, .dly_sel,
    .cal_done, .cal_phase, .cal_dly, .sync_ok,
    .fifo_ef, .fifo_ff, .error_pin(error), .err_reg, .err_cnt, .wr_addr, .rd_addr,
    .err_clr, .cnt_clr,
    .ram_we, .ram_re, .ram_addr, .fifo_we, .fifo_idx, .wdata40, .ram_rdata, .fifo_rdata,
    .scan_rd, .scan_clr, .scan_word, .scan_busy
  );
endmodule
