// roi_shiftreg - parallel-load output shift register for one RoI record.
//
// The register shifts on every clock (40 MHz); zeros are shifted in, so once the
// 20 valid bits have left, the output stays low.  `load` copies `din` in; the
// MSB appears on `sout` right after the loading edge and the LSB 19 clocks
// later.  Width and the zero fill follow the specification; MSB-first order is
// this design's choice.
module roi_shiftreg #(
  parameter int unsigned W = 20
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,
  input  logic [W-1:0] din,
  output logic         sout
);
  logic [W-1:0] sr;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)    sr <= '0;
    else if (load) sr <= din;
    else           sr <= {sr[W-2:0], 1'b0};

  assign sout = sr[W-1];
endmodule
