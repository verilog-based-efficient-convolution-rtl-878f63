// viterbi_pkg: constants and helper functions shared by the convolutional
// encoder and the Viterbi decoder.
//
// Trellis convention used everywhere in this design: the encoder state is the
// K-1 most recent input bits {D1, D2, ..., D(K-1)}, D1 (newest) in the MSB.
// On input u the next state is {u, D1 .. D(K-2)}; the oldest bit D(K-1) falls
// out, and it is exactly the bit the add-compare-select stores as its
// decision, so a traceback step is  prev_state = {state[K-3:0], decision}.
// The encoder output for input u from state s uses the K-bit register
// {u, s}: y1 = ^({u,s} & G1), y0 = ^({u,s} & G0). With the defaults
// G1 = 3'b111 and G0 = 3'b101 this is y1 = u^D1^D2, y0 = u^D2, the
// three-tap code of the reference encoder.
package viterbi_pkg;

  // Default code: constraint length 3, generators 7 and 5 (octal).
  localparam int unsigned K_DEFAULT  = 3;
  localparam int unsigned G1_DEFAULT = 'b111;
  localparam int unsigned G0_DEFAULT = 'b101;

  // Expected code symbol {y1, y0} for input u leaving state s.
  function automatic logic [1:0] code_symbol(input int unsigned k,
                                             input int unsigned g1,
                                             input int unsigned g0,
                                             input int unsigned s,
                                             input logic u);
    int unsigned r;
    r = (int'(u) << (k - 1)) | s;
    return {logic'($countones(r & g1) % 2), logic'($countones(r & g0) % 2)};
  endfunction

endpackage
