// vit_ref_pkg: reference model for the testbenches.
//
// A plain software model of the code and of Viterbi decoding, written
// without the hardware's structure: an encoder, and a decoder that keeps
// unbounded integer path metrics and every decision bit, then traces back one
// step at a time from the best final state. It uses the same code
// (generators 247/371 octal, K = 8), the same start metrics (0 for state 0,
// 32 elsewhere) and the same tie rules as the hardware: in a compare the
// decision-1 predecessor wins a tie, and the lowest state wins a tie for best.
// Under these rules the hardware must decode bit for bit what this model
// decodes, errors or not.
package vit_ref_pkg;

  localparam int K  = 8;
  localparam int SW = K - 1;
  localparam int NS = 1 << SW;
  localparam logic [K-1:0] G0 = 8'o247;
  localparam logic [K-1:0] G1 = 8'o371;
  localparam int INIT = 32;
  localparam int MAXL = 1024;

  // Codeword for encoder register {u, s}.
  function automatic logic [1:0] cw(input int u, input int s);
    logic [K-1:0] r;
    r = K'((u << SW) | s);
    return {^(r & G0), ^(r & G1)};
  endfunction

  // Encode bits[0..n-1] from state 0.
  function automatic void encode(input logic bits [MAXL], input int n,
                                 output logic [1:0] sym [MAXL]);
    int s;
    s = 0;
    for (int t = 0; t < n; t++) begin
      sym[t] = cw(int'(bits[t]), s);
      s = (int'(bits[t]) << (SW - 1)) | (s >> 1);
    end
  endfunction

  function automatic int hd(input logic [1:0] a, input logic [1:0] b);
    logic [1:0] d;
    d = a ^ b;
    return int'(d[1]) + int'(d[0]);
  endfunction

  // Decode n symbols; returns decoded bits in out[0..n-1].
  function automatic void decode(input logic [1:0] sym [MAXL], input int n,
                                 output logic out [MAXL]);
    int pm [NS];
    int nw [NS];
    logic dec [MAXL][NS];
    int best, s;
    for (int i = 0; i < NS; i++) pm[i] = (i == 0) ? 0 : INIT;
    for (int t = 0; t < n; t++) begin
      for (int p = 0; p < NS; p++) begin
        int u, pi, pj, a, b;
        u  = p >> (SW - 1);
        pi = (p << 1) & (NS - 1);
        pj = pi | 1;
        a  = pm[pi] + hd(sym[t], cw(u, pi));
        b  = pm[pj] + hd(sym[t], cw(u, pj));
        if (a < b) begin nw[p] = a; dec[t][p] = 1'b0; end
        else       begin nw[p] = b; dec[t][p] = 1'b1; end
      end
      pm = nw;
    end
    best = 0;
    for (int p = 1; p < NS; p++) if (pm[p] < pm[best]) best = p;
    s = best;
    for (int t = n - 1; t >= 0; t--) begin
      out[t] = logic'(s >> (SW - 1));
      s = ((s << 1) & (NS - 1)) | int'(dec[t][s]);
    end
  endfunction

endpackage
