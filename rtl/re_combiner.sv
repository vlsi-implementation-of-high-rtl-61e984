// re_combiner: the register-exchange half of the hybrid survivor scheme.
//
// Instead of storing one decision bit per state per step, the decoder stores
// for each state the best two-step path into it. The decisions of the first
// step of a pair are held in a register (dec_prev). On the second step, for
// each state p, the new decision d1 = dec[p] names the predecessor
// q = {p[SW-2:0], d1}; a 2:1 multiplexer takes d0 = dec_prev[q]. The pair
// {d1, d0} is all the trace-back needs: the state two steps before p is
// {p[SW-3:0], d1, d0}. So every second step one column of NS 2-bit entries
// (2*NS bits, 256 for 128 states) is written to the survivor memory.
// The upper bit of each entry is the new decision itself, passed straight
// through; only the lower bit needs the register and the multiplexer.
//
// Timing: step marks a trellis step whose decisions are on dec. col_we is
// high in the cycle of every second step of a frame, with col_data valid in
// the same cycle. clear (start of a frame) puts the pair phase back to the
// first step. The two-step pairing and the register plus 2:1 mux structure
// follow the document; the bit order within an entry is this design's.
module re_combiner #(
  parameter int unsigned NS = viterbi_pkg::NSTATES,
  localparam int unsigned SW = $clog2(NS)
) (
  input  logic            clk,
  input  logic            rst,
  input  logic            clear,
  input  logic            step,
  input  logic [NS-1:0]   dec,
  output logic            col_we,
  output logic [2*NS-1:0] col_data   // entry of state p at [2p+1:2p] = {d1, d0}
);

  logic          odd;       // next step is the second of a pair
  logic [NS-1:0] dec_prev;

  always_ff @(posedge clk) begin
    if (rst || clear) begin
      odd <= 1'b0;
    end else if (step) begin
      odd <= !odd;
    end
  end

  always_ff @(posedge clk) begin
    if (step && !odd) dec_prev <= dec;
  end

  always_comb begin
    col_we = step && odd;
    for (int p = 0; p < NS; p++) begin
      logic [SW-1:0] q;
      q = SW'(p << 1) | SW'(dec[p]);
      col_data[2*p+1] = dec[p];
      col_data[2*p]   = dec_prev[q];
    end
  end

endmodule
