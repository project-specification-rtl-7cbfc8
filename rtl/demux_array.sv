// demux_array - BC de-multiplexing and error detection for all 42 input fields.
//
// The 108 synchronised nibbles form 42 ten-bit fields (21 per layer, lines 0-53
// em, 54-107 had).  Per layer, each of the nine 2x2 tower groups uses five lines
// and each of the three tower pairs of the last eta column uses three:
//   2x2 group g (rows 2*(g/3)..+1, cols 2*(g%3)..+1), lines 5g..5g+4:
//     line 0/1 = data high/low nibble of field 0 (row 2*(g/3)),
//     line 2/3 = the same for field 1 (the row above),
//     line 4   = {parity0, flag0, parity1, flag1}
//     each field pairs the towers at eta c (tower A) and c+1 (tower B).
//   column pair p (towers (2p,6) = A and (2p+1,6) = B), lines 45+3p..47+3p:
//     line 0/1 = data high/low nibble, line 2 = {parity, flag, unused x2}.
// Channel numbering (error, mask and link-mask bit n-1 for channel n): group g
// gives channels 2g and 2g+1, column pair p channel 18+p, plus 21 for had.
// The block also keeps the 42-bit error register (bits set by an error, cleared
// by writing 1s through `err_clr`) and a saturating 16-bit count of crossings in
// which any channel reported an error; `error_pin` is high while that count is
// non-zero.  Towers and errors appear two clocks after the nibbles.
// Field and line counts follow the specification; the line-to-bit assignment,
// pairing orientation and counter clearing are this design's choices.
module demux_array
  import cp_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             mux_on,
  input  logic [N_CH-1:0]  err_mask,    // 1 = error checking disabled
  input  logic [N_CH-1:0]  link_mask,   // 1 = channel forced to zero
  input  logic [N_CH-1:0]  err_clr,     // clear these error register bits
  input  logic             cnt_clr,     // clear the error counter
  input  logic [3:0]       nibble [N_LINES],
  output tower_map_t       towers,
  output flag_map_t        tower_err,
  output logic [N_CH-1:0]  err_reg,
  output logic [15:0]      err_cnt,
  output logic             error_pin
);
  field_t           fld  [N_CH];
  logic             flag [N_CH];
  tower_t           ta   [N_CH];
  tower_t           tb   [N_CH];
  logic [N_CH-1:0]  ch_err;

  // field assembly and tower placement
  for (genvar l = 0; l < 2; l++) begin : g_layer
    for (genvar g = 0; g < 9; g++) begin : g_grp
      localparam int B = 54 * l + 5 * g;
      localparam int R = 2 * (g / 3);
      localparam int C = 2 * (g % 3);
      for (genvar f = 0; f < 2; f++) begin : g_fld
        localparam int CH = 21 * l + 2 * g + f;
        assign fld[CH]  = {nibble[B+4][3-2*f], nibble[B+2*f], nibble[B+2*f+1]};
        assign flag[CH] = nibble[B+4][2-2*f];
        assign towers[l][R+f][C]      = ta[CH];
        assign towers[l][R+f][C+1]    = tb[CH];
        assign tower_err[l][R+f][C]   = ch_err[CH];
        assign tower_err[l][R+f][C+1] = ch_err[CH];
      end
    end
    for (genvar p = 0; p < 3; p++) begin : g_col
      localparam int B  = 54 * l + 45 + 3 * p;
      localparam int CH = 21 * l + 18 + p;
      assign fld[CH]  = {nibble[B+2][3], nibble[B], nibble[B+1]};
      assign flag[CH] = nibble[B+2][2];
      assign towers[l][2*p][6]      = ta[CH];
      assign towers[l][2*p+1][6]    = tb[CH];
      assign tower_err[l][2*p][6]   = ch_err[CH];
      assign tower_err[l][2*p+1][6] = ch_err[CH];
    end
  end

  for (genvar ch = 0; ch < N_CH; ch++) begin : g_ch
    bc_demux u_dmx (
      .clk, .rst_n, .mux_on,
      .chk_en   (!err_mask[ch]),
      .link_en  (!link_mask[ch]),
      .data_next(fld[ch]),
      .bcf_next (flag[ch]),
      .tower_a  (ta[ch]),
      .tower_b  (tb[ch]),
      .err      (ch_err[ch])
    );
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      err_reg <= '0;
      err_cnt <= '0;
    end else begin
      err_reg <= (err_reg & ~err_clr) | ch_err;
      if (cnt_clr)                         err_cnt <= '0;
      else if (|ch_err && err_cnt != '1)   err_cnt <= err_cnt + 1'b1;
    end

  assign error_pin = (err_cnt != '0);
endmodule
