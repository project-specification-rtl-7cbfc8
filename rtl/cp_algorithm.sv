// cp_algorithm - the e/gamma and tau/hadron trigger logic of the chip.
//
// From the 6x7x2 tower map it applies the 4x4x2 window at the eight reference
// towers 11..14 and 21..24 (rows 1-2, columns 1-4; row 5 is not used).  Windows
// 11, 12, 21, 22 form RoI group L and 13, 14, 23, 24 group R.
//   Clock 1: all eight windows are evaluated and registered, together with the
//            saturation flag (a tower equal to FF hex, as sent by the
//            pre-processor for analogue saturation) and the error flag of the
//            towers each group reads (rows 0-4; columns 0-4 for L, 2-6 for R).
//   Clock 2: the RoI records of L and R and the hit outputs are registered.
// hits[2t+1:2t] is the number of groups (0..2) that passed threshold set t.
// Window geometry, group split, RoI contents and two hit bits per set follow
// the specification; the flag regions and the 2-bit count coding of the hit
// bits are this design's choices.
module cp_algorithm
  import cp_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  tower_map_t  towers,
  input  flag_map_t   tower_err,
  input  tower_t      cthr [16],
  input  logic [5:0]  ithr [16][3],
  input  logic [7:0]  tau_sel,
  output logic [31:0] hits,
  output roi_t        roi_l,
  output roi_t        roi_r
);
  logic [15:0] pass   [8];
  logic [10:0] core   [8];
  logic [15:0] pass_q [8];
  logic [10:0] core_q [8];
  logic [1:0]  sat_n, err_n, sat_q, err_q;   // [0] = L, [1] = R
  roi_t        roi_n [2];
  logic [15:0] hit_n [2];

  // window k: group g = k/4, w = k%4 = {phi, eta} within the group
  for (genvar k = 0; k < 8; k++) begin : g_win
    localparam int R = 1 + (k % 4) / 2;          // reference row
    localparam int C = 1 + 2 * (k / 4) + (k % 2); // reference column
    tower_t em [4][4];
    tower_t had[4][4];
    for (genvar i = 0; i < 4; i++) begin : g_i
      for (genvar j = 0; j < 4; j++) begin : g_j
        assign em[i][j]  = towers[0][R-1+i][C-1+j];
        assign had[i][j] = towers[1][R-1+i][C-1+j];
      end
    end
    cluster_window u_win (
      .em, .had, .cthr, .ithr, .tau_sel,
      .pass(pass[k]), .core(core[k])
    );
  end

  always_comb begin
    sat_n = '0;
    err_n = '0;
    for (int l = 0; l < 2; l++)
      for (int r = 0; r < 5; r++)
        for (int c = 0; c < 7; c++) begin
          if (c <= 4) begin
            sat_n[0] |= (towers[l][r][c] == 8'hFF);
            err_n[0] |= tower_err[l][r][c];
          end
          if (c >= 2) begin
            sat_n[1] |= (towers[l][r][c] == 8'hFF);
            err_n[1] |= tower_err[l][r][c];
          end
        end
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      for (int k = 0; k < 8; k++) begin pass_q[k] <= '0; core_q[k] <= '0; end
      sat_q <= '0;
      err_q <= '0;
    end else begin
      pass_q <= pass;
      core_q <= core;
      sat_q  <= sat_n;
      err_q  <= err_n;
    end

  for (genvar g = 0; g < 2; g++) begin : g_grp
    roi_group u_grp (
      .pass('{pass_q[4*g], pass_q[4*g+1], pass_q[4*g+2], pass_q[4*g+3]}),
      .core('{core_q[4*g], core_q[4*g+1], core_q[4*g+2], core_q[4*g+3]}),
      .err (err_q[g]),
      .sat (sat_q[g]),
      .roi (roi_n[g]),
      .hit (hit_n[g])
    );
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      hits  <= '0;
      roi_l <= '0;
      roi_r <= '0;
    end else begin
      for (int t = 0; t < 16; t++)
        hits[2*t +: 2] <= 2'(hit_n[0][t]) + 2'(hit_n[1][t]);
      roi_l <= roi_n[0];
      roi_r <= roi_n[1];
    end
endmodule
