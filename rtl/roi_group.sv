// roi_group - Region-of-Interest selection for one 2x2 group of windows.
//
// The four windows of a group are numbered w = {phi, eta}: 0 = reference tower
// 11 (0,0), 1 = 12 (0,1), 2 = 21 (1,0), 3 = 22 (1,1) for group L (13, 14, 23, 24
// for group R).  Among the windows that passed at least one threshold set, the
// one with the largest em+had core sum is the RoI (ties go to the lower w).  The
// 20-bit record carries its position, the group's error and saturation flags
// and its 16 threshold bits; with no RoI the position and threshold bits are
// zero.  `hit` is the OR of the four windows' threshold bits; because the
// de-cluster test is asymmetric at most one window of a group can pass.
// Combinational.  Record fields follow the specification's RoI format; the tie
// rule and the zero position without an RoI are this design's choices.
module roi_group
  import cp_pkg::*;
(
  input  logic [15:0] pass [4],
  input  logic [10:0] core [4],
  input  logic        err,
  input  logic        sat,
  output roi_t        roi,
  output logic [15:0] hit
);
  always_comb begin
    logic        found;
    logic [1:0]  sel;
    logic [10:0] best;
    found = 1'b0;
    sel   = 2'd0;
    best  = '0;
    hit   = '0;
    for (int w = 0; w < 4; w++) begin
      hit |= pass[w];
      if (|pass[w] && (!found || core[w] > best)) begin
        found = 1'b1;
        sel   = 2'(w);
        best  = core[w];
      end
    end
    roi.loc = found ? sel : 2'd0;
    roi.err = err;
    roi.sat = sat;
    roi.thr = found ? pass[sel] : 16'h0;
  end
endmodule
