// decision_unit: finds the best state, the one with the smallest path metric.
//
// A balanced tree of comparators halves the candidates at each of SW levels;
// on a tie the lower state index wins. Two results leave the unit: min_pm,
// which the add-compare-select unit subtracts from every new metric to keep
// the metrics bounded, and best, the state from which the trace-back starts
// at the end of a frame. Combinational. The document shows this unit beside
// the add-compare-select unit without its insides; the minimum search is this
// design's reading of it.
module decision_unit #(
  parameter int unsigned NS  = viterbi_pkg::NSTATES,
  parameter int unsigned PMW = viterbi_pkg::PMW,
  localparam int unsigned SW = $clog2(NS)
) (
  input  logic [PMW-1:0] pm [NS],
  output logic [PMW-1:0] min_pm,
  output logic [SW-1:0]  best
);

  logic [PMW-1:0] val [SW+1][NS];
  logic [SW-1:0]  idx [SW+1][NS];

  always_comb begin
    for (int s = 0; s < NS; s++) begin
      val[0][s] = pm[s];
      idx[0][s] = SW'(s);
    end
    for (int l = 1; l <= SW; l++) begin
      for (int s = 0; s < NS; s++) begin
        val[l][s] = '0;
        idx[l][s] = '0;
      end
      for (int s = 0; s < (NS >> l); s++) begin
        if (val[l-1][2*s+1] < val[l-1][2*s]) begin
          val[l][s] = val[l-1][2*s+1];
          idx[l][s] = idx[l-1][2*s+1];
        end else begin
          val[l][s] = val[l-1][2*s];
          idx[l][s] = idx[l-1][2*s];
        end
      end
    end
    min_pm = val[SW][0];
    best   = idx[SW][0];
  end

endmodule
