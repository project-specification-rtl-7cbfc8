// cp_regs - slow-control (VME) slave and register file of the chip.
//
// Bus: CS* (cs_n), Rd/Wr* (rw_n, high = read), Rd/Wr-Strobe, a 10-bit word
// address and a 16-bit data bus split into wdata / rdata / rdata_oe (the pad
// drives the bus while rdata_oe is high).  All signals are taken as synchronous
// to the 40 MHz clock.  A write is performed on the clock after a rising strobe
// edge with CS* and Rd/Wr* low.  Read data follow the address two clocks later
// and are driven while CS* is low and Rd/Wr* high; a read of the scan register
// advances its pointer at the rising strobe edge.
// Map (word addresses, see cp_pkg): version, control (bit 0 BC mux on, bits 15:8
// make threshold sets 9-16 tau), status (0 FIFO-EF, 1 FIFO-FF, 2 Error, 3 all lines
// in sync, 4 scan recording), error counter, RAM address counters (read 6:0, write 14:8), offset,
// 3 words each of error mask, error register (write 1 to clear; any write also
// clears the error counter) and link mask for the 42 channels (bit n-1 of the
// 48-bit span = channel n), 16 cluster thresholds (8 bit), 48 isolation
// thresholds (set*3 + {em ring, had ring, had core}, 6 bits used of 12), 22 clock
// phase and 22 clock delay words (5 lines x 2 bits each), 11 sync-done words
// (10 lines each), the scan register, and windows onto the RAM and FIFO lanes.
// Power-up reset (por_n) clears every register; Reset-Global leaves the control
// registers (everything written by software) alone.  A calibration run that
// finishes writes its phase and delay into the line's registers.
// Register list and widths follow the specification's memory map; the addresses,
// bit layouts, bus timing and clearing rules are this design's choices.
module cp_regs
  import cp_pkg::*;
#(
  parameter logic [15:0] VERSION = 16'h0100
) (
  input  logic              clk,
  input  logic              por_n,
  input  logic              rst_n,
  // bus
  input  logic              cs_n,
  input  logic              rw_n,
  input  logic              strobe,
  input  logic [9:0]        addr,
  input  logic [15:0]       wdata,
  output logic [15:0]       rdata,
  output logic              rdata_oe,
  // configuration
  output ctrl_t             ctrl,
  output tower_t            cthr [16],
  output logic [5:0]        ithr [16][3],
  output logic [N_CH-1:0]   err_mask,
  output logic [N_CH-1:0]   link_mask,
  output logic [6:0]        offset,
  output logic [1:0]        phase_sel [N_LINES],
  output logic [1:0]        dly_sel   [N_LINES],
  // calibration results
  input  logic [N_LINES-1:0] cal_done,
  input  logic [1:0]        cal_phase [N_LINES],
  input  logic [1:0]        cal_dly   [N_LINES],
  input  logic [N_LINES-1:0] sync_ok,
  // status
  input  logic              fifo_ef,
  input  logic              fifo_ff,
  input  logic              error_pin,
  input  logic [N_CH-1:0]   err_reg,
  input  logic [15:0]       err_cnt,
  input  logic [6:0]        wr_addr,
  input  logic [6:0]        rd_addr,
  output logic [N_CH-1:0]   err_clr,
  output logic              cnt_clr,
  // RAM / FIFO / scan windows
  output logic [2:0]        ram_we,
  output logic              ram_re,
  output logic [6:0]        ram_addr,
  output logic [2:0]        fifo_we,
  output logic [5:0]        fifo_idx,
  output logic [39:0]       wdata40,
  input  logic [39:0]       ram_rdata,
  input  logic [39:0]       fifo_rdata,
  output logic              scan_rd,
  output logic              scan_clr,
  input  logic [15:0]       scan_word,
  input  logic              scan_busy
);
  logic        strobe_q, wr_q, wr_ok;
  logic [9:0]  waddr;
  logic [15:0] wd;
  logic [11:0] ithr_raw [48];
  logic [47:0] emask48, lmask48;
  logic [15:0] rd_n;

  // --- bus capture: the write is performed one clock after the strobe edge ---
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      strobe_q <= 1'b0;
      wr_q     <= 1'b0;
      waddr    <= '0;
      wd       <= '0;
      rdata    <= '0;
    end else begin
      strobe_q <= strobe;
      wr_q     <= strobe && !strobe_q && !cs_n && !rw_n;
      waddr    <= addr;
      wd       <= wdata;
      rdata    <= rd_n;
    end
  assign wr_ok    = wr_q;
  assign rdata_oe = !cs_n && rw_n;
  assign scan_rd  = strobe && !strobe_q && !cs_n && rw_n && (addr == A_SCAN);
  assign scan_clr = wr_ok && (waddr == A_SCAN);

  // --- control registers (power-up reset only) ---
  always_ff @(posedge clk or negedge por_n)
    if (!por_n) begin
      ctrl    <= '0;
      offset  <= '0;
      emask48 <= '0;
      lmask48 <= '0;
      for (int i = 0; i < 16; i++) cthr[i] <= '0;
      for (int i = 0; i < 48; i++) ithr_raw[i] <= '0;
      for (int i = 0; i < N_LINES; i++) begin phase_sel[i] <= '0; dly_sel[i] <= '0; end
    end else begin
      if (wr_ok) begin
        if (waddr == A_CONTROL) ctrl   <= '{mux_on: wd[0], tau_sel: wd[15:8]};
        if (waddr == A_OFFSET)  offset <= wd[6:0];
        for (int w = 0; w < 3; w++) begin
          if (waddr == A_ERRMASK + 10'(w))  emask48[16*w +: 16] <= wd;
          if (waddr == A_LINKMASK + 10'(w)) lmask48[16*w +: 16] <= wd;
        end
        for (int i = 0; i < 16; i++) if (waddr == A_CTHR + 10'(i)) cthr[i] <= wd[7:0];
        for (int i = 0; i < 48; i++) if (waddr == A_ITHR + 10'(i)) ithr_raw[i] <= wd[11:0];
        for (int i = 0; i < N_LINES; i++) begin
          if (waddr == A_PHASE + 10'(i / 5)) phase_sel[i] <= wd[2*(i%5) +: 2];
          if (waddr == A_DELAY + 10'(i / 5)) dly_sel[i]   <= wd[2*(i%5) +: 2];
        end
      end
      for (int i = 0; i < N_LINES; i++)
        if (cal_done[i]) begin
          phase_sel[i] <= cal_phase[i];
          dly_sel[i]   <= cal_dly[i];
        end
    end

  always_comb
    for (int s = 0; s < 16; s++)
      for (int k = 0; k < 3; k++) ithr[s][k] = ithr_raw[3*s+k][5:0];

  assign err_mask  = emask48[N_CH-1:0];
  assign link_mask = lmask48[N_CH-1:0];

  // --- clears of the error register and counter ---
  always_comb begin
    err_clr = '0;
    for (int n = 0; n < N_CH; n++)
      if (wr_ok && waddr == A_ERRREG + 10'(n / 16)) err_clr[n] = wd[n % 16];
    cnt_clr = wr_ok && (waddr >= A_ERRREG) && (waddr < A_ERRREG + 10'd3);
  end

  // --- RAM and FIFO windows ---
  always_comb begin
    ram_we   = '0;
    fifo_we  = '0;
    ram_addr = wr_ok ? waddr[6:0] : addr[6:0];
    fifo_idx = wr_ok ? waddr[5:0] : addr[5:0];
    wdata40  = {wd[7:0], wd, wd};
    if (wr_ok) begin
      if (waddr >= A_RAM0  && waddr < A_RAM0  + 10'd128) ram_we[0]  = 1'b1;
      if (waddr >= A_RAM1  && waddr < A_RAM1  + 10'd128) ram_we[1]  = 1'b1;
      if (waddr >= A_RAM2  && waddr < A_RAM2  + 10'd128) ram_we[2]  = 1'b1;
      if (waddr >= A_FIFO0 && waddr < A_FIFO0 + 10'd64)  fifo_we[0] = 1'b1;
      if (waddr >= A_FIFO1 && waddr < A_FIFO1 + 10'd64)  fifo_we[1] = 1'b1;
      if (waddr >= A_FIFO2 && waddr < A_FIFO2 + 10'd64)  fifo_we[2] = 1'b1;
    end
    ram_re = !cs_n && rw_n && (addr >= A_RAM0) && (addr < A_RAM2 + 10'd128);
  end

  // --- read multiplexer ---
  always_comb begin
    logic [47:0] er48;
    logic [9:0]  v;
    er48 = 48'(err_reg);
    v    = '0;
    rd_n = '0;
    if (addr == A_VERSION)  rd_n = VERSION;
    if (addr == A_CONTROL)  rd_n = {ctrl.tau_sel, 7'd0, ctrl.mux_on};
    if (addr == A_STATUS)   rd_n = {11'd0, scan_busy, &sync_ok, error_pin, fifo_ff, fifo_ef};
    if (addr == A_ERRCNT)   rd_n = err_cnt;
    if (addr == A_COUNTERS) rd_n = {1'b0, wr_addr, 1'b0, rd_addr};
    if (addr == A_OFFSET)   rd_n = {9'd0, offset};
    if (addr == A_SCAN)     rd_n = scan_word;
    for (int w = 0; w < 3; w++) begin
      if (addr == A_ERRMASK + 10'(w))  rd_n = emask48[16*w +: 16];
      if (addr == A_ERRREG + 10'(w))   rd_n = er48[16*w +: 16];
      if (addr == A_LINKMASK + 10'(w)) rd_n = lmask48[16*w +: 16];
    end
    for (int i = 0; i < 16; i++) if (addr == A_CTHR + 10'(i)) rd_n = {8'd0, cthr[i]};
    for (int i = 0; i < 48; i++) if (addr == A_ITHR + 10'(i)) rd_n = {4'd0, ithr_raw[i]};
    for (int w = 0; w < 22; w++) begin
      if (addr == A_PHASE + 10'(w) || addr == A_DELAY + 10'(w)) begin
        v = '0;
        for (int k = 0; k < 5; k++)
          if (5*w + k < N_LINES)
            v[2*k +: 2] = (addr < A_DELAY) ? phase_sel[5*w+k] : dly_sel[5*w+k];
        rd_n = {6'd0, v};
      end
    end
    for (int w = 0; w < 11; w++)
      if (addr == A_SYNC + 10'(w)) begin
        v = '0;
        for (int k = 0; k < 10; k++) if (10*w + k < N_LINES) v[k] = sync_ok[10*w+k];
        rd_n = {6'd0, v};
      end
    if (addr >= A_RAM0  && addr < A_RAM1)        rd_n = ram_rdata[15:0];
    if (addr >= A_RAM1  && addr < A_RAM2)        rd_n = ram_rdata[31:16];
    if (addr >= A_RAM2  && addr < A_RAM2 + 10'd128) rd_n = {8'd0, ram_rdata[39:32]};
    if (addr >= A_FIFO0 && addr < A_FIFO1)       rd_n = fifo_rdata[15:0];
    if (addr >= A_FIFO1 && addr < A_FIFO2)       rd_n = fifo_rdata[31:16];
    if (addr >= A_FIFO2 && addr < A_FIFO2 + 10'd64) rd_n = {8'd0, fifo_rdata[39:32]};
  end
endmodule
