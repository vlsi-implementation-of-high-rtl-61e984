// pmm: path metric memory.
//
// One PMW-bit register per trellis state. On reset or init the memory is
// loaded with the start-of-frame metrics: 0 for state 0 (the encoder starts
// in the all-zero state) and PM_INIT for every other state. On en (one
// trellis step) it takes the new metrics from the add-compare-select unit;
// otherwise it holds, which is the clock enable that keeps the unit idle
// between frames. The register array is what the document names; its reset
// values are this design's choice.
module pmm #(
  parameter int unsigned   NS      = viterbi_pkg::NSTATES,
  parameter int unsigned   PMW     = viterbi_pkg::PMW,
  parameter logic [PMW-1:0] PM_INIT = viterbi_pkg::PM_INIT
) (
  input  logic           clk,
  input  logic           rst,          // synchronous, active high
  input  logic           init,         // load start-of-frame metrics
  input  logic           en,           // store pm_in
  input  logic [PMW-1:0] pm_in [NS],
  output logic [PMW-1:0] pm    [NS]
);

  always_ff @(posedge clk) begin
    if (rst || init) begin
      for (int s = 0; s < NS; s++) pm[s] <= (s == 0) ? '0 : PM_INIT;
    end else if (en) begin
      pm <= pm_in;
    end
  end

endmodule
