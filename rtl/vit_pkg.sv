// vit_pkg: constants, types and trellis functions shared by the K=3, rate-1/2
// Viterbi decoder and its convolutional encoder.
//
// Code: Out0 = u ^ FF1 ^ FF0, Out1 = u ^ FF0, where u is the input bit, FF1 holds
// the previous input and FF0 the one before it. A code symbol is packed as
// {Out1, Out0}, the order in which the encoder state diagram prints its labels.
// A state is packed as {FF0, FF1}, so S1 is "FF1 = 1, FF0 = 0" and the two bits
// of a state name are the last two input bits, oldest first. This packing is
// this design's choice; it reproduces every transition label of the state
// diagram (S0 -1/11-> S1, S1 -0/01-> S2, S3 -1/01-> S3, ...).
package vit_pkg;

  parameter int unsigned K         = 3;          // constraint length
  parameter int unsigned MEM       = K - 1;      // encoder memory m
  parameter int unsigned NSTATES   = 1 << MEM;   // 2^m trellis states
  parameter int unsigned BLOCK_LEN = 12;         // decoded bits per block
  parameter int unsigned PM_W      = 4;          // path metric width
  parameter int unsigned THRESH    = 2;          // error-correcting capability t

  typedef logic [1:0] sym_t;    // {Out1, Out0}
  typedef logic [1:0] state_t;  // {FF0, FF1}
  typedef logic [1:0] bm_t;     // branch metric 0..2

  // Code symbol produced on the branch from state s with input u.
  function automatic sym_t branch_sym(state_t s, logic u);
    logic o0, o1;
    o0 = u ^ s[0] ^ s[1];
    o1 = u ^ s[1];
    return {o1, o0};
  endfunction

  // Predecessor j (0 or 1) of state n: the state whose FF1 bit is n's FF0 bit
  // and whose FF0 bit (the bit about to be dropped) is j.
  function automatic state_t pred_state(state_t n, logic j);
    return {j, n[1]};
  endfunction

endpackage
