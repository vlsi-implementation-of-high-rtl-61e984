// acsu: add-compare-select unit, one acs_node per trellis state.
//
// State p (newest information bit in the MSB) is reached from
// i = {p[SW-2:0],0} and j = {p[SW-2:0],1} with input bit p[SW-1]. The branch
// from predecessor q carries the codeword of encoder register {p[SW-1], q}
// under generators G0 and G1; the node takes that codeword's metric from the
// branch metric unit. All NS nodes work in parallel, so one trellis step is
// done per clock; the unit itself is combinational and the path metric
// memory registers its results. The radix-2, fully parallel structure
// follows the document; the state numbering is this design's.
module acsu #(
  parameter int unsigned K   = viterbi_pkg::K,
  parameter int unsigned PMW = viterbi_pkg::PMW,
  parameter int unsigned BMW = viterbi_pkg::BMW,
  parameter logic [K-1:0] G0 = viterbi_pkg::G0,
  parameter logic [K-1:0] G1 = viterbi_pkg::G1,
  localparam int unsigned SW = K - 1,
  localparam int unsigned NS = 1 << SW
) (
  input  logic [PMW-1:0] pm     [NS],   // current path metrics
  input  logic [BMW-1:0] bm     [4],    // branch metrics by codeword
  input  logic [PMW-1:0] norm,          // smallest current path metric
  output logic [PMW-1:0] pm_new [NS],   // next path metrics
  output logic [NS-1:0]  dec            // decision bit per state
);

  function automatic logic [1:0] cw(input logic [K-1:0] r);
    return {^(r & G0), ^(r & G1)};
  endfunction

  for (genvar p = 0; p < NS; p++) begin : g_state
    localparam logic [SW-1:0] PS = SW'(p);
    localparam logic [SW-1:0] PI = {PS[SW-2:0], 1'b0};
    localparam logic [SW-1:0] PJ = {PS[SW-2:0], 1'b1};
    localparam logic [1:0]    CI = cw({PS[SW-1], PI});
    localparam logic [1:0]    CJ = cw({PS[SW-1], PJ});

    acs_node #(.PMW(PMW), .BMW(BMW)) u_acs (
      .pm_i  (pm[PI]),
      .pm_j  (pm[PJ]),
      .bm_i  (bm[CI]),
      .bm_j  (bm[CJ]),
      .norm  (norm),
      .pm_new(pm_new[p]),
      .dec   (dec[p])
    );
  end

endmodule
