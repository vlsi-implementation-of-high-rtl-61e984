// acs_node: one add-compare-select node of the trellis.
//
// A state p has two predecessors, i (decision 0) and j (decision 1). The node
// adds each predecessor's path metric to the metric of the branch from it,
// compares, and keeps the smaller sum: if pm_i + bm_i < pm_j + bm_j the new
// metric is the i sum and the decision bit is 0, otherwise the j sum with
// decision 1 (a tie goes to j). This is the flowchart of the algorithm. The
// kept sum has the current smallest path metric (norm) subtracted, so all
// metrics stay small; the subtraction is this design's choice of metric
// normalisation. Combinational.
module acs_node #(
  parameter int unsigned PMW = viterbi_pkg::PMW,
  parameter int unsigned BMW = viterbi_pkg::BMW
) (
  input  logic [PMW-1:0] pm_i,     // path metric of predecessor i
  input  logic [PMW-1:0] pm_j,     // path metric of predecessor j
  input  logic [BMW-1:0] bm_i,     // branch metric i -> p
  input  logic [BMW-1:0] bm_j,     // branch metric j -> p
  input  logic [PMW-1:0] norm,     // value subtracted from the result
  output logic [PMW-1:0] pm_new,   // new path metric of p
  output logic           dec       // 0: survivor from i, 1: from j
);

  logic [PMW-1:0] sum_i, sum_j;

  always_comb begin
    sum_i  = pm_i + PMW'(bm_i);
    sum_j  = pm_j + PMW'(bm_j);
    dec    = !(sum_i < sum_j);
    pm_new = (dec ? sum_j : sum_i) - norm;
  end

endmodule
