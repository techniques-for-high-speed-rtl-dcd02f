// nlc_channel_pkg: test channel and reference canceller for the receiver tests.
//
// The channel sends random bits b_n as +/-35 and adds post-cursor ISI from up
// to three earlier bits (+/-40, +/-15, +/-8 for b_{n-1}, b_{n-2}, b_{n-3}, as
// many as the receiver has taps) plus a nonlinear, pattern-dependent term of
// +20 when b_n and b_{n-1} are both one, and uniform noise of at most +/-6.
// A fixed threshold cannot separate these levels; a threshold chosen from the
// N previous bits can, with at least 35 of margin on either side.
// Threshold j (history j, newest bit as MSB) is the midpoint of the two
// levels that history can produce.
package nlc_channel_pkg;

  function automatic int hist_bit(int n_taps, int hist, int k);  // b_{n-k}
    return (k <= n_taps) ? ((hist >> (n_taps - k)) & 1) : 0;
  endfunction

  function automatic int level(int n_taps, int b, int hist);
    int v;
    v = 35 * (2 * b - 1);
    v += 40 * (2 * hist_bit(n_taps, hist, 1) - 1);
    if (n_taps >= 2) v += 15 * (2 * hist_bit(n_taps, hist, 2) - 1);
    if (n_taps >= 3) v += 8 * (2 * hist_bit(n_taps, hist, 3) - 1);
    if (b == 1 && hist_bit(n_taps, hist, 1) == 1) v += 20;
    return v;
  endfunction

  function automatic int threshold(int n_taps, int hist);
    return (level(n_taps, 0, hist) + level(n_taps, 1, hist)) / 2;
  endfunction

  function automatic int noisy_sample(int n_taps, int b, int hist);
    return level(n_taps, b, hist) + $urandom_range(0, 12) - 6;
  endfunction

endpackage
