// sm_pkg: shared constants of the Sherman-Morrison update engines.
//
// Data words are two's-complement numbers of DATA_W bits with FRAC_W
// fraction bits. The default, 32-bit integers with no fraction, matches the
// integer data the algorithm is written with; the word format is this
// design's choice, as the engines only need "a number format" to work.
// A product of two words is formed at full width, shifted right
// (arithmetically) by FRAC_W and cut back to DATA_W bits, so with FRAC_W = 0
// all arithmetic is integer arithmetic modulo 2^DATA_W.
//
// The latencies are counted in clock edges from the edge that samples
// start to the edge after which done is high.
package sm_pkg;
  localparam int DATA_W = 32;
  localparam int FRAC_W = 0;

  // Full engine: 8 + 2N cycles (2N for the two sweeps over the columns,
  // 8 for the pipeline registers between and around them).
  function automatic int full_latency(input int n);
    return 8 + 2 * n;
  endfunction

  // Optimised engine: constant, independent of N.
  localparam int OPT_LATENCY = 4;
endpackage
