// traceback: trace-back controller and output re-ordering buffer.
//
// At the end of a frame (start pulse) the controller walks the survivor
// memory backwards from the best final state, two trellis steps per clock.
// In the cycle it visits column c with state p (the state after step 2c+1),
// the two information bits of that column are read straight off the state,
// u(2c) = p[SW-2] and u(2c+1) = p[SW-1], and the 2-bit entry {d1, d0} read
// from the memory gives the state before step 2c: {p[SW-3:0], d1, d0}. The
// memory read is synchronous, so the address of the next visit is formed
// combinationally from the entry just read and presented in the same cycle;
// the walk thus moves one column per clock.
//
// The bits come out last first. They are stored in a small buffer indexed by
// column and then played out in frame order: valid is high for one cycle per
// column with data = {u(2c), u(2c+1)}, the earlier bit in data[1].
//
// Timing, with start in cycle X: columns are visited in cycles X+1 ..
// X+ncols; valid is high in cycles X+ncols+2 .. X+2*ncols+1. busy is high
// from X+1 until the last valid cycle. Trace-back from the best state over
// the whole frame follows the document; the buffer and all timing are this
// design's choice.
module traceback #(
  parameter int unsigned NS    = viterbi_pkg::NSTATES,
  parameter int unsigned NCOLS = viterbi_pkg::TB_COLS,
  localparam int unsigned SW = $clog2(NS),
  localparam int unsigned CW = $clog2(NCOLS)
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          start,      // frame finished: begin trace-back
  input  logic [CW-1:0] last_col,   // index of the frame's last column
  input  logic [SW-1:0] best,       // best state at the end of the frame
  output logic [CW-1:0] rcol,       // survivor memory read address
  output logic [SW-1:0] rstate,
  input  logic [1:0]    rdata,      // entry read one clock after the address
  output logic          busy,
  output logic          valid,
  output logic [1:0]    data
);

  typedef enum logic [1:0] {S_IDLE, S_TRACE, S_OUT} tb_state_e;

  tb_state_e     st;
  logic [CW-1:0] col, ocol, last_q;
  logic [SW-1:0] cur, nxt;
  logic [1:0]    obuf [NCOLS];

  assign nxt  = {cur[SW-3:0], rdata};
  assign busy = (st != S_IDLE) || valid;

  always_comb begin
    rcol   = col - CW'(1);
    rstate = nxt;
    if (st == S_IDLE) begin
      rcol   = last_col;
      rstate = best;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      st    <= S_IDLE;
      valid <= 1'b0;
      data  <= '0;
      col   <= '0;
      ocol  <= '0;
      last_q <= '0;
      cur   <= '0;
    end else begin
      valid <= 1'b0;
      unique case (st)
        S_IDLE: if (start) begin
          st     <= S_TRACE;
          col    <= last_col;
          last_q <= last_col;
          cur    <= best;
        end
        S_TRACE: begin
          obuf[col] <= {cur[SW-2], cur[SW-1]};
          cur       <= nxt;
          col       <= col - CW'(1);
          if (col == '0) begin
            st   <= S_OUT;
            ocol <= '0;
          end
        end
        S_OUT: begin
          valid <= 1'b1;
          data  <= obuf[ocol];
          ocol  <= ocol + CW'(1);
          if (ocol == last_q) st <= S_IDLE;
        end
        default: st <= S_IDLE;
      endcase
    end
  end

  // A frame must not be started while the previous one is still in here.
  a_no_restart: assert property (@(posedge clk) disable iff (rst)
    start |-> st == S_IDLE);

endmodule
