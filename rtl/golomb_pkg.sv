// Shared types of the Golomb-code test decompressor.
//
// dec_state_e is the state of the per-core Golomb decoder. It folds the
// state diagram of the decoder for m = 4 into five states that work for any
// power-of-two group size m: DEC_RESET is the reset state S0, DEC_READ the
// two bit-reading states S1 and S3 (their outgoing transitions are the same),
// DEC_PREFIX the state S2 that emits the m zeros of a prefix one, DEC_TAIL
// the tail states S4..S7 and S9..S11 (the position inside the tail is held in
// the decoder's log2(m)-bit counter) and DEC_END the state S8 that emits the
// one closing the run.
//
// sel_state_e is the state of the SOC channel selector FSM. SEL_PREFIX
// stands for S0 and S9 (identical outgoing transitions), SEL_TAIL for S1..S8,
// the m cycles during which clk_stop is high; the tail position is again a
// log2(m)-bit counter.
package golomb_pkg;

  typedef enum logic [2:0] {
    DEC_RESET  = 3'd0,
    DEC_READ   = 3'd1,
    DEC_PREFIX = 3'd2,
    DEC_TAIL   = 3'd3,
    DEC_END    = 3'd4
  } dec_state_e;

  typedef enum logic {
    SEL_PREFIX = 1'b0,
    SEL_TAIL   = 1'b1
  } sel_state_e;

  // Width of a counter over 0..m-1, at least one bit.
  function automatic int unsigned log2m(input int unsigned m);
    return (m < 2) ? 1 : $clog2(m);
  endfunction

endpackage
