// viterbi_decoder: frame-based hard-decision Viterbi decoder for a rate-1/2,
// constraint length 8 (128-state) convolutional code.
//
// Data flow: the branch metric unit (bmu) turns each received 2-bit symbol
// into four Hamming distances; the add-compare-select unit (acsu, 128
// acs_node) forms the new path metrics and one decision bit per state; the
// path metric memory (pmm) holds the metrics; the decision unit finds the
// smallest metric, which normalises the next step and marks the best state;
// the survivor management unit (smu) stores two-step survivors and traces
// back at the end of the frame.
//
// Interface (the pin list of the decoder): while Wr is high one symbol Msg
// is taken per clock rising edge, Msg[1] being the code bit of generator
// 247 and Msg[0] that of generator 371 (octal). The frame ends at the first
// clock with Wr low. The decoder then traces back (one clock per two
// symbols) and presents the decoded bits in order, two per clock with Valid
// high: Data[1] is the earlier bit. For a frame of L symbols (L even, 2 to
// 256) whose first Wr-low cycle is X, Valid is high in cycles X+L/2+2 to
// X+L+1. While the decoder is tracing back or presenting data it ignores Wr.
// Rst is synchronous and active high. The encoder is assumed to start in
// state 0; the frame need not be terminated, as trace-back starts from the
// best final state. Each trellis step takes one clock, so the decoder reads
// one symbol per clock.
//
// The block structure, the pins and the hybrid survivor store follow the
// document; the code generators, the frame protocol and the timing are this
// design's choices.
module viterbi_decoder #(
  parameter int unsigned K     = viterbi_pkg::K,
  parameter int unsigned PMW   = viterbi_pkg::PMW,
  parameter int unsigned NCOLS = viterbi_pkg::TB_COLS,
  parameter logic [K-1:0] G0   = viterbi_pkg::G0,
  parameter logic [K-1:0] G1   = viterbi_pkg::G1,
  parameter logic [PMW-1:0] PM_INIT = viterbi_pkg::PM_INIT,
  localparam int unsigned SW = K - 1,
  localparam int unsigned NS = 1 << SW,
  localparam int unsigned BMW = 2
) (
  input  logic       Clk,
  input  logic       Rst,
  input  logic       Wr,
  input  logic [1:0] Msg,
  output logic       Valid,
  output logic [1:0] Data
);

  logic [BMW-1:0] bm [4];
  logic [PMW-1:0] pm [NS];
  logic [PMW-1:0] pm_new [NS];
  logic [NS-1:0]  dec;
  logic [PMW-1:0] min_pm;
  logic [SW-1:0]  best;
  logic           busy, step, frame_end, in_frame;

  assign step      = Wr && !busy;
  assign frame_end = in_frame && !Wr && !busy;

  always_ff @(posedge Clk) begin
    if (Rst || frame_end) in_frame <= 1'b0;
    else if (step)        in_frame <= 1'b1;
  end

  bmu #(.BMW(BMW)) u_bmu (.sym(Msg), .bm);

  acsu #(.K(K), .PMW(PMW), .BMW(BMW), .G0(G0), .G1(G1)) u_acsu (
    .pm, .bm, .norm(min_pm), .pm_new, .dec
  );

  pmm #(.NS(NS), .PMW(PMW), .PM_INIT(PM_INIT)) u_pmm (
    .clk(Clk), .rst(Rst), .init(frame_end), .en(step), .pm_in(pm_new), .pm
  );

  decision_unit #(.NS(NS), .PMW(PMW)) u_du (.pm, .min_pm, .best);

  smu #(.NS(NS), .NCOLS(NCOLS)) u_smu (
    .clk(Clk), .rst(Rst), .step, .dec, .start(frame_end), .best,
    .busy, .valid(Valid), .data(Data)
  );

endmodule
