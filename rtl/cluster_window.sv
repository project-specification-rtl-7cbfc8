// cluster_window - e/gamma and tau/hadron algorithm for one 4x4x2 window.
//
// The window is indexed [phi][eta], 0..3 each, so [1][1] is the reference tower
// "11" and the 2x2 core is towers 11, 12, 21, 22.  From the em and had towers it
// forms:
//   - four em cluster sums (11+12, 11+21, 21+22, 12+22), saturated at FF hex;
//   - four tau sums: each em pair plus the had core, saturated at FF hex;
//   - isolation sums over the 12-tower ring (em and had) and the had core,
//     each saturated at 3F hex;
//   - the de-cluster test: the em+had sum of the core (11 bits) must be >= the
//     2x2 clusters at offsets (0,0), (1,0), (2,0), (0,1) and > those at (2,1),
//     (0,2), (1,2), (2,2), so two neighbouring windows can never both pass.
// Threshold set t (0..15) passes if some cluster sum is above cthr[t], the
// isolation sums are at or below ithr[t][0] (em ring), ithr[t][1] (had ring) and,
// for e/gamma only, ithr[t][2] (had core), and the de-cluster test holds.  Sets
// 0..7 are e/gamma; set 8+k is tau/hadron when tau_sel[k] is set.
// Purely combinational; the caller registers the result.
// The sums, ranges, saturation values and comparisons are the specification's;
// keeping the tau sum at full width before saturation is this design's choice.
module cluster_window
  import cp_pkg::*;
(
  input  tower_t     em   [4][4],
  input  tower_t     had  [4][4],
  input  tower_t     cthr [16],
  input  logic [5:0] ithr [16][3],
  input  logic [7:0] tau_sel,
  output logic [15:0] pass,
  output logic [10:0] core
);
  logic [7:0]  clus [4];
  logic [7:0]  tau  [4];
  logic [5:0]  iso_em, iso_had, core_had;
  logic [10:0] c2x2 [3][3];
  logic        decl;

  function automatic logic [11:0] ring(input tower_t t [4][4]);
    logic [11:0] s = '0;
    for (int j = 0; j < 4; j++) s += 12'(t[0][j]) + 12'(t[3][j]);
    for (int i = 1; i < 3; i++) s += 12'(t[i][0]) + 12'(t[i][3]);
    return s;
  endfunction

  always_comb begin
    logic [11:0] pair [4];
    logic [11:0] hcore;
    pair[0] = 12'(em[1][1]) + 12'(em[1][2]);
    pair[1] = 12'(em[1][1]) + 12'(em[2][1]);
    pair[2] = 12'(em[2][1]) + 12'(em[2][2]);
    pair[3] = 12'(em[1][2]) + 12'(em[2][2]);
    hcore   = 12'(had[1][1]) + 12'(had[1][2]) + 12'(had[2][1]) + 12'(had[2][2]);
    for (int k = 0; k < 4; k++) begin
      clus[k] = sat8(pair[k]);
      tau[k]  = sat8(pair[k] + hcore);
    end
    iso_em   = sat6(ring(em));
    iso_had  = sat6(ring(had));
    core_had = sat6(hcore);
    for (int a = 0; a < 3; a++)
      for (int b = 0; b < 3; b++)
        c2x2[a][b] = 11'(em[a][b]) + 11'(em[a][b+1]) + 11'(em[a+1][b]) + 11'(em[a+1][b+1])
                   + 11'(had[a][b]) + 11'(had[a][b+1]) + 11'(had[a+1][b]) + 11'(had[a+1][b+1]);
    core = c2x2[1][1];
    decl = (core >= c2x2[0][0]) && (core >= c2x2[1][0]) && (core >= c2x2[2][0]) &&
           (core >= c2x2[0][1]) &&
           (core >  c2x2[2][1]) && (core >  c2x2[0][2]) && (core >  c2x2[1][2]) &&
           (core >  c2x2[2][2]);
  end

  always_comb
    for (int t = 0; t < 16; t++) begin
      logic is_tau, clus_ok, iso_ok;
      is_tau  = (t >= 8) && tau_sel[t % 8];
      clus_ok = 1'b0;
      for (int k = 0; k < 4; k++)
        clus_ok |= is_tau ? (tau[k] > cthr[t]) : (clus[k] > cthr[t]);
      iso_ok  = (iso_em <= ithr[t][0]) && (iso_had <= ithr[t][1]) &&
                (is_tau || core_had <= ithr[t][2]);
      pass[t] = clus_ok && iso_ok && decl;
    end
endmodule
