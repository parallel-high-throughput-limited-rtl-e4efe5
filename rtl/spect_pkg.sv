// Shared trellis helpers for the SPEC-T convolutional decoder.
//
// The decoder works on the trellis of a rate-1/2 feed-forward convolutional
// code with constraint length K, so it has N = 2**(K-1) states. A state holds
// the last K-1 information bits with the newest bit in the MSB. From state p an
// input bit u leads to state (u << (K-2)) | (p >> 1); the encoder register is
// then {u, p} (K bits, u in the MSB) and each code bit is the parity of that
// register masked by one generator polynomial (octal, MSB tap on the newest
// bit). The two predecessors of state s are ((s << 1) & mask) | b for b = 0, 1;
// b (the oldest bit, dropped by the transition) is the decision bit of an
// add-compare-select unit. This numbering is a choice of this design; the code
// generators are the ones of the decoder being modelled.
//
// Branch symbols are numbered sym = {c0, c1}: code bit of G0 in the MSB.
// All functions are constant functions usable in parameter expressions.
package spect_pkg;

  // Number of trellis states for constraint length k.
  function automatic int unsigned n_states(int unsigned k);
    return 32'd1 << (k - 1);
  endfunction

  // Predecessor of state s through decision bit b.
  function automatic int unsigned pred_state(int unsigned k, int unsigned s, int unsigned b);
    return ((s << 1) & (n_states(k) - 1)) | (b & 1);
  endfunction

  // Information bit carried by every branch that enters state s.
  function automatic int unsigned state_ubit(int unsigned k, int unsigned s);
    return (s >> (k - 2)) & 1;
  endfunction

  // Branch symbol {c0, c1} produced when bit u leaves state p.
  function automatic int unsigned branch_sym(int unsigned k, int unsigned g0, int unsigned g1,
                                             int unsigned p, int unsigned u);
    int unsigned r;
    r = ((u & 1) << (k - 1)) | p;
    return (($countones(g0 & r) & 1) << 1) | ($countones(g1 & r) & 1);
  endfunction

  // The two states of the survivor guard ring (deadlock prevention): the
  // alternating bit patterns 0101.. and 1010.., which form a two-state cycle
  // of the trellis for every K.
  function automatic int unsigned guard_state_a(int unsigned k);
    int unsigned a;
    a = 0;
    for (int i = 0; i < 32; i += 2) a |= (32'd1 << i);
    return a & (n_states(k) - 1);
  endfunction

  function automatic int unsigned guard_state_b(int unsigned k);
    return ~guard_state_a(k) & (n_states(k) - 1);
  endfunction

endpackage
