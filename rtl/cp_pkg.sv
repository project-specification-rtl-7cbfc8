// cp_pkg - shared constants and types of the cluster processor chip.
//
// The chip receives 108 serial lines at 160 Mbit/s carrying 42 BC-multiplexed
// fields per bunch crossing (21 per calorimeter layer).  Each field holds one
// 8-bit tower value, an odd-parity bit and a BC flag, and de-multiplexes into two
// towers, giving a 6 (phi) x 7 (eta) x 2 (layer) tower map.  The algorithm runs
// eight 4x4 windows and produces two 20-bit RoI records (L and R) and 32 hit bits.
//
// The line/channel counts, widths, RoI fields and register list follow the chip
// specification; the register addresses and the RoI bit order are this design's
// own choice (the specification lists registers but gives no addresses).
package cp_pkg;

  localparam int unsigned N_LINES   = 108;  // serial inputs DIN[107:0]
  localparam int unsigned N_CH      = 42;   // BC-multiplexed fields (tower pairs)
  localparam int unsigned N_PHI     = 6;    // tower rows brought in (row 5 unused)
  localparam int unsigned N_ETA     = 7;    // tower columns
  localparam int unsigned N_THR     = 16;   // threshold sets
  localparam int unsigned ROI_W     = 20;   // RoI record width
  localparam int unsigned RAM_DEPTH = 128;  // RoI history depth
  localparam int unsigned FIFO_DEPTH = 64;

  typedef logic [7:0] tower_t;     // transverse energy of one trigger tower
  typedef logic [8:0] field_t;     // {odd parity, data}
  localparam field_t NO_DATA = 9'h100;  // zero data with odd parity

  // towers[layer][phi][eta], layer 0 = em, 1 = had
  typedef tower_t tower_map_t [2][N_PHI][N_ETA];
  typedef logic   flag_map_t  [2][N_PHI][N_ETA];

  // RoI record, MSB first on the serial output.
  typedef struct packed {
    logic [1:0]  loc;        // {phi, eta} of the winning window in its 2x2 group
    logic        err;        // error detected in the input data
    logic        sat;        // a tower arrived saturated (FF hex)
    logic [15:0] thr;        // threshold sets passed
  } roi_t;

  // Configuration held in the register file.
  typedef struct packed {
    logic        mux_on;               // BC multiplexing on
    logic [7:0]  tau_sel;              // sets 9..16: 1 = tau, 0 = em
  } ctrl_t;

  // Register map (10-bit VME word addresses).
  localparam logic [9:0] A_VERSION  = 10'h000;
  localparam logic [9:0] A_CONTROL  = 10'h001;
  localparam logic [9:0] A_STATUS   = 10'h002;
  localparam logic [9:0] A_ERRCNT   = 10'h003;
  localparam logic [9:0] A_COUNTERS = 10'h004;
  localparam logic [9:0] A_OFFSET   = 10'h005;
  localparam logic [9:0] A_ERRMASK  = 10'h008;  // 3 words
  localparam logic [9:0] A_ERRREG   = 10'h00C;  // 3 words
  localparam logic [9:0] A_LINKMASK = 10'h010;  // 3 words
  localparam logic [9:0] A_CTHR     = 10'h020;  // 16 words
  localparam logic [9:0] A_ITHR     = 10'h040;  // 48 words: set*3 + {em, had ring, had core}
  localparam logic [9:0] A_PHASE    = 10'h080;  // 22 words, 5 lines x 2 bits
  localparam logic [9:0] A_DELAY    = 10'h0A0;  // 22 words
  localparam logic [9:0] A_SYNC     = 10'h0C0;  // 11 words, 10 lines each
  localparam logic [9:0] A_SCAN     = 10'h0D0;  // read: next scan word, write: restart
  localparam logic [9:0] A_RAM0     = 10'h100;  // 128 words each: RAM bits 15:0
  localparam logic [9:0] A_RAM1     = 10'h180;  //                 RAM bits 31:16
  localparam logic [9:0] A_RAM2     = 10'h200;  //                 RAM bits 39:32
  localparam logic [9:0] A_FIFO0    = 10'h280;  // 64 words each
  localparam logic [9:0] A_FIFO1    = 10'h2C0;
  localparam logic [9:0] A_FIFO2    = 10'h300;

  // Saturating add helpers.
  function automatic logic [7:0] sat8(input logic [11:0] v);
    return (v > 12'd255) ? 8'hFF : v[7:0];
  endfunction
  function automatic logic [5:0] sat6(input logic [11:0] v);
    return (v > 12'd63) ? 6'h3F : v[5:0];
  endfunction

endpackage
