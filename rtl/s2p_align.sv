// s2p_align - serial to parallel conversion of one 160 Mbit/s line.
//
// The serial bit is sampled on the selected 160 MHz clock phase, passed through a
// chain of three one-bit-period (6.25 ns) delay flip-flops, and the delay mux
// picks tap 0..3.  A 4-bit shift register collects the delayed stream, and on
// every rising edge of the 40 MHz system clock the last four bits are captured
// as the nibble of that bunch crossing (first received bit in nibble[3]).
// Changing `dly` moves the nibble boundary by whole bit periods, which is how the
// calibration aligns the word to the 25 ns period.
//
// Timing: nibble changes on clk40; it holds the four bits sampled on the four
// clk160 edges before that clk40 edge (after the selected delay).
// The structure follows the alignment diagram of the specification; building the
// 6.25 ns elements as flip-flops on the selected clock is this design's choice.
module s2p_align (
  input  logic       clk160,
  input  logic       clk40,
  input  logic       rst_n,
  input  logic       s2p_clr,   // synchronous clear of the delay chain and shifter
  input  logic       din,
  input  logic [1:0] dly,       // delay in 6.25 ns steps
  output logic [3:0] nibble
);
  logic       samp;
  logic [2:0] chain;     // delay elements
  logic       tap;
  logic [3:0] shreg;

  always_ff @(posedge clk160 or negedge rst_n)
    if (!rst_n) begin
      samp  <= 1'b0;
      chain <= '0;
      shreg <= '0;
    end else if (s2p_clr) begin
      samp  <= 1'b0;
      chain <= '0;
      shreg <= '0;
    end else begin
      samp  <= din;
      chain <= {chain[1:0], samp};
      shreg <= {shreg[2:0], tap};
    end

  always_comb
    unique case (dly)
      2'd0: tap = samp;
      2'd1: tap = chain[0];
      2'd2: tap = chain[1];
      default: tap = chain[2];
    endcase

  always_ff @(posedge clk40 or negedge rst_n)
    if (!rst_n) nibble <= '0;
    else        nibble <= shreg;
endmodule
