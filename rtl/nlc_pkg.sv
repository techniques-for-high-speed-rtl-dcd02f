// nlc_pkg: constants shared by the nonlinear-cancellation (NLC) receiver.
//
// The receiver decides each binary symbol a_n by comparing the received
// sample with one of 2^N thresholds, where the threshold is chosen by the N
// previous decisions.  Instead of switching the threshold, it runs 2^N
// comparators in parallel and selects among their outputs digitally; the
// selection recursion is unrolled L times ("lookahead") so the feedback loop
// may take L symbol periods.
//
// Defaults: one feedback tap (N = 1) iterated twice (L = 2), the example the
// design is built around.  The sample width is this design's own choice: the
// received signal is taken as an already quantised two's-complement sample.
// Threshold index convention: threshold j is used when the previous N
// decisions, read as a binary number with the most recent one (a_{n-1}) as
// the most significant bit, equal j.
package nlc_pkg;

  localparam int unsigned DEFAULT_N_TAPS   = 1;  // feedback bits N
  localparam int unsigned DEFAULT_LOOKAHEAD = 2; // iterations L
  localparam int unsigned DEFAULT_SAMPLE_W = 8;  // quantised sample width

  // Number of comparators (and of precomputed f_i) for N taps.
  function automatic int unsigned num_levels(input int unsigned n_taps);
    return 1 << n_taps;
  endfunction

endpackage
