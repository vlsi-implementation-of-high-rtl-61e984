// survivor_ram: trace-back memory with mixed port widths.
//
// Written one whole column at a time (2*NS bits: a 2-bit two-step survivor
// for every state) and read one 2-bit entry at a time, addressed by column
// and state. This is a block RAM used with different widths on its two ports:
// the 2:1 selection over all NS states that a trace-back needs is done by the
// RAM's read addressing instead of a wide multiplexer. The read is
// synchronous (data one clock after the address), as in a block RAM; a write
// and a read of the same column in one cycle return the old data.
// The mixed-width use and the use of block RAM follow the document. Its depth
// of NCOLS = 128 columns (32 Kbit, two 16 Kbit block RAMs) is this design's
// reading of the two block RAMs the implementation reports.
module survivor_ram #(
  parameter int unsigned NS    = viterbi_pkg::NSTATES,
  parameter int unsigned NCOLS = viterbi_pkg::TB_COLS,
  localparam int unsigned SW = $clog2(NS),
  localparam int unsigned CW = $clog2(NCOLS)
) (
  input  logic            clk,
  input  logic            we,
  input  logic [CW-1:0]   wcol,
  input  logic [2*NS-1:0] wdata,
  input  logic [CW-1:0]   rcol,
  input  logic [SW-1:0]   rstate,
  output logic [1:0]      rdata
);

  logic [2*NS-1:0] mem [NCOLS];

  always_ff @(posedge clk) begin
    if (we) mem[wcol] <= wdata;
  end

  always_ff @(posedge clk) begin
    rdata <= mem[rcol][2*rstate +: 2];
  end

endmodule
