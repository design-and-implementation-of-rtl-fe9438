// Shared constants, types and code functions of the adaptive Viterbi decoder.
//
// The decoder works on a rate-1/2 convolutional code with constraint length K.
// The code is described by two generator masks in "delay order": bit i of a
// mask taps the input bit that is i stages old, bit 0 being the current input.
// The encoder state holds the K-1 previous input bits, state[0] the newest, so
// the state reached from state s on input b is {s[K-3:0], b}.  The default
// code is the usual K=4 pair (15,17) in octal, written here as 4'b1011 and
// 4'b1111.  K, the code, the 3-bit soft symbol width and all metric widths are
// choices of this design; the 8-state trellis (3-bit state labels) and the
// 3-bit quantizer follow the decoder's specification.
//
// Soft symbols are unsigned QW-bit numbers: 0 is a confident '0' (BPSK +1),
// 2**QW-1 a confident '1' (BPSK -1).
package ava_pkg;

  parameter int K   = 4;                 // constraint length
  parameter int SW  = K - 1;             // state width (3 -> 8 states)
  parameter int QW  = 3;                 // soft-decision symbol width
  parameter int QMAX = (1 << QW) - 1;    // strongest '1' symbol
  parameter int BMW = QW + 1;            // branch metric width (sum of 2 symbols)
  parameter int MW  = 8;                 // path metric width
  parameter int TW  = 6;                 // threshold width

  parameter logic [K-1:0] G0 = 4'b1011;  // octal 15 in delay order
  parameter logic [K-1:0] G1 = 4'b1111;  // octal 17 in delay order

  // Smallest threshold a stage may start with.  Both generators tap the
  // current input, so the two children of any path carry complementary
  // symbols and the better of the two has a (normalized) branch metric of at
  // most QMAX.  With T >= QMAX+1 the first evaluation of a stage keeps at
  // least the best path.
  parameter int T_MIN = QMAX + 1;
  parameter int T_STEP = 2;              // threshold decrement per iteration

  typedef logic [SW-1:0]  state_t;
  typedef logic [QW-1:0]  sym_t;
  typedef logic [BMW-1:0] bm_t;
  typedef logic [MW-1:0]  metric_t;
  typedef logic [TW-1:0]  thr_t;

  // One entry of the path metric array: a surviving path.
  typedef struct packed {
    logic    valid;
    state_t  state;
    metric_t metric;
  } path_t;

  // One ACS candidate: a survivor extended by one input bit.
  typedef struct packed {
    logic    alive;     // parent valid and not beaten by a merging path
    state_t  state;
    metric_t metric;
  } cand_t;

  // Encoder output pair {c0, c1} for leaving state s on input bit b.
  function automatic logic [1:0] expected_sym(state_t s, logic b);
    logic [K-1:0] w;
    w = {s, b};
    return {^(w & G0), ^(w & G1)};
  endfunction

  function automatic state_t next_state(state_t s, logic b);
    return {s[SW-2:0], b};
  endfunction

endpackage
