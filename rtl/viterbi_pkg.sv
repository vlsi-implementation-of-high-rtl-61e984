// viterbi_pkg: constants and types shared by the Viterbi decoder.
//
// The code is a rate-1/2 convolutional code: every trellis step takes one
// 2-bit received symbol. The trellis has 128 states, as the two-step survivor
// store of 256 bits per two steps (128 states x 2 bits) implies, so the
// constraint length is 8. The generator polynomials, the path metric width
// and the survivor memory depth are choices of this design:
//   - generators 247 and 371 (octal), the maximum free distance rate-1/2 K=8 pair
//   - 6-bit path metrics, enough for hard decisions with per-step normalisation
//   - 128 survivor columns of two steps each, which is what two 16 Kbit
//     block RAMs hold, so a frame is at most 256 symbols long.
//
// State convention: state = the last K-1 information bits, newest in the MSB.
// Input bit u moves state s to {u, s[K-2:1]}; the dropped LSB is the decision
// bit, so the predecessors of state p are {p[K-3:0],0} (decision 0) and
// {p[K-3:0],1} (decision 1).
package viterbi_pkg;

  parameter int unsigned K        = 8;            // constraint length
  parameter int unsigned M        = K - 1;        // encoder memory
  parameter int unsigned NSTATES  = 1 << M;       // trellis states (128)
  parameter int unsigned SW       = M;            // state index width
  parameter int unsigned BMW      = 2;            // branch metric width (0..2)
  parameter int unsigned PMW      = 6;            // path metric width
  parameter int unsigned TB_COLS  = 128;          // survivor columns, 2 steps each
  parameter logic [K-1:0] G0      = 8'o247;       // generator of Msg[1]
  parameter logic [K-1:0] G1      = 8'o371;       // generator of Msg[0]
  // Path metric loaded into every state but state 0 at the start of a frame.
  parameter logic [PMW-1:0] PM_INIT = 6'd32;

  typedef logic [BMW-1:0] bm_t;
  typedef logic [PMW-1:0] pm_t;
  typedef logic [SW-1:0]  state_t;

  // Codeword emitted for encoder register {u, s}: bit 1 from G0, bit 0 from G1.
  function automatic logic [1:0] codeword(input logic [K-1:0] reg_bits);
    return {^(reg_bits & G0), ^(reg_bits & G1)};
  endfunction

endpackage
