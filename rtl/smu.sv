// smu: survivor management unit, the hybrid register-exchange / trace-back
// survivor store.
//
// Decisions from the add-compare-select unit enter re_combiner, which turns
// every two trellis steps into one column of 2-bit two-step survivors. A
// column counter writes the columns one after another into survivor_ram,
// which is written 2*NS bits wide and read 2 bits wide. When the frame ends
// (start), traceback walks the columns backwards from the best state and
// plays the decoded bits out in order, two per valid cycle.
//
// Interface: step and dec come with every accepted symbol; start is a
// one-cycle pulse after the frame's last symbol, with best the best final
// state; it also resets the pair phase and the column counter for the next
// frame. A frame holds an even number of steps, at most 2*NCOLS. Output
// timing is that of traceback: with start in cycle X, valid is high in
// cycles X+ncols+2 .. X+2*ncols+1 for a frame of ncols columns.
module smu #(
  parameter int unsigned NS    = viterbi_pkg::NSTATES,
  parameter int unsigned NCOLS = viterbi_pkg::TB_COLS,
  localparam int unsigned SW = $clog2(NS),
  localparam int unsigned CW = $clog2(NCOLS)
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          step,
  input  logic [NS-1:0] dec,
  input  logic          start,
  input  logic [SW-1:0] best,
  output logic          busy,
  output logic          valid,
  output logic [1:0]    data
);

  logic            col_we;
  logic [2*NS-1:0] col_data;
  logic [CW:0]     ncols;       // columns written in this frame
  logic [CW-1:0]   rcol;
  logic [SW-1:0]   rstate;
  logic [1:0]      rdata;

  re_combiner #(.NS(NS)) u_re (
    .clk, .rst, .clear(start), .step, .dec, .col_we, .col_data
  );

  always_ff @(posedge clk) begin
    if (rst || start)  ncols <= '0;
    else if (col_we)   ncols <= ncols + 1'b1;
  end

  survivor_ram #(.NS(NS), .NCOLS(NCOLS)) u_ram (
    .clk, .we(col_we), .wcol(ncols[CW-1:0]), .wdata(col_data),
    .rcol, .rstate, .rdata
  );

  traceback #(.NS(NS), .NCOLS(NCOLS)) u_tb (
    .clk, .rst, .start, .last_col(CW'(ncols - 1'b1)), .best,
    .rcol, .rstate, .rdata, .busy, .valid, .data
  );

  // The survivor memory holds NCOLS columns; a frame may not exceed it.
  a_no_overflow: assert property (@(posedge clk) disable iff (rst)
    col_we |-> ncols < (CW+1)'(NCOLS));
  // A frame must end on a complete column (an even number of steps).
  a_even_frame: assert property (@(posedge clk) disable iff (rst)
    start |-> ncols != '0 && !u_re.odd);

endmodule
