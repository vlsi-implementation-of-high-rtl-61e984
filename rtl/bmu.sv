// bmu: branch metric unit.
//
// For a rate-1/2 code each received symbol is two hard-decision bits. The
// branch metric of a trellis branch is the Hamming distance between the
// received symbol and the codeword the branch carries, so only four metrics
// exist per step, one per possible codeword. bm[c] is the distance from sym
// to codeword c (0, 1 or 2). Purely combinational; the add-compare-select
// unit picks the metric of each branch by the branch's codeword.
// Hamming distance follows the document; taking the metric in this 4-entry
// form is a choice of this design.
module bmu #(
  parameter int unsigned BMW = viterbi_pkg::BMW
) (
  input  logic [1:0]     sym,        // received symbol {first, second code bit}
  output logic [BMW-1:0] bm [4]      // distance to codeword 0..3
);

  always_comb begin
    for (int c = 0; c < 4; c++) begin
      logic [1:0] diff;
      diff  = sym ^ 2'(c);
      bm[c] = BMW'(diff[1]) + BMW'(diff[0]);
    end
  end

endmodule
