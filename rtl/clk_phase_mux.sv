// clk_phase_mux - selects one of the four 160 MHz clock phases for one serial line.
//
// Each 160 Mbit/s input is captured on whichever phase of the 160 MHz clock
// samples it best; the calibration logic (or software) sets the 2-bit select.
// This is a plain 4:1 multiplexer: it is not glitch-free, so whoever changes
// `sel` also clears the serial-to-parallel converter fed by this clock, as the
// calibration sequence does after every phase change.
module clk_phase_mux (
  input  logic [3:0] clk_ph,   // phases 0, 90, 180, 270 degrees
  input  logic [1:0] sel,
  output logic       clk_out
);
  assign clk_out = clk_ph[sel];
endmodule
