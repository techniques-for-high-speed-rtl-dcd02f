// parallel_loops: L copies of the decision-feedback loop, each running at 1/L
// of the symbol rate, plus the output switch that interleaves their decisions.
//
// After lookahead, decision n depends only on decisions at least L symbols
// old, so the symbols can be dealt round-robin to L loops: loop k handles
// symbols n with n = k (mod L).  Each loop is no more complex than the
// original one-symbol loop (hold registers for f(n), a 2^N:1 multiplexer and
// a decision register), but its own feedback path has L symbol periods.
//
// The staggered half-rate clocks (Clock/2 and its complement for L = 2) are
// realised here as clock enables from a phase counter on the single symbol
// clock: loop k updates only in the cycle whose phase is k, so every register
// of a loop holds its value for L cycles.  In that cycle loop k
//   * latches the new precomputed word f(n) into its hold register, and
//   * decides a_{n-L} = f_i(n-L) from the word it latched L cycles earlier,
//     with i = binary(a_{n-2L} ... a_{n-2L-N+1}) (a_{n-2L} = MSB).
// a_{n-2L} is the loop's own previous decision; for N > 1 the older bits
// come from the other loops, which keep a short history of their own
// decisions (two entries each for N = 2, L = 2).  This hold-then-select
// arrangement and the cross connections follow the one-tap and two-tap
// parallel-loop circuits; the phase-enable form is this design's choice.
//
// Interface: `f` bit i is f_i(n) for the symbol presented this cycle;
// `bit_out` is the interleaved decision stream, one decision per clock.
// `phase` tells which loop decided the bit now on `bit_out`.
// Timing: a_n appears on `bit_out` L + 1 cycles after f(n) is presented.
// Reset clears all loop registers (all previous decisions 0) and the phase.
module parallel_loops #(
  parameter int unsigned N_TAPS    = nlc_pkg::DEFAULT_N_TAPS,
  parameter int unsigned LOOKAHEAD = nlc_pkg::DEFAULT_LOOKAHEAD,
  localparam int unsigned LEVELS   = nlc_pkg::num_levels(N_TAPS),
  localparam int unsigned PHASE_W  = (LOOKAHEAD > 1) ? $clog2(LOOKAHEAD) : 1,
  // Decisions kept per loop: the newest, plus what other loops reach back to.
  localparam int unsigned DEPTH    = (N_TAPS == 1) ? 1 : 2 + (N_TAPS - 2) / LOOKAHEAD
) (
  input  logic               clk,
  input  logic               rst,
  input  logic [LEVELS-1:0]  f,
  output logic               bit_out,
  output logic [PHASE_W-1:0] phase
);

  // Loop that holds the decision on symbol n-2L-t, seen from loop k.
  function automatic int unsigned src_loop(int unsigned k, int unsigned t);
    return (k + LOOKAHEAD * N_TAPS - t) % LOOKAHEAD;
  endfunction
  // Position of that decision in the source loop's history (0 = newest).
  function automatic int unsigned src_depth(int unsigned t);
    return (t == 0) ? 0 : 1 + (t - 1) / LOOKAHEAD;
  endfunction

  logic [PHASE_W-1:0] cur;                   // loop enabled this cycle
  logic [LEVELS-1:0]  fq  [LOOKAHEAD];       // per-loop hold register for f
  logic [DEPTH-1:0]   aq  [LOOKAHEAD];       // per-loop decisions, [0] newest
  logic               dec [LOOKAHEAD];       // decision each loop would take

  for (genvar k = 0; k < LOOKAHEAD; k++) begin : g_loop
    logic [N_TAPS-1:0] sel;
    always_comb begin
      for (int t = 0; t < N_TAPS; t++)
        sel[N_TAPS-1-t] = aq[src_loop(k, t)][src_depth(t)];
      dec[k] = fq[k][sel];
    end

    always_ff @(posedge clk) begin
      if (rst) begin
        fq[k] <= '0;
        aq[k] <= '0;
      end else if (cur == PHASE_W'(k)) begin
        fq[k] <= f;
        aq[k] <= (aq[k] << 1) | DEPTH'(dec[k]);
      end
    end
  end

  // Phase counter standing in for the L staggered 1/L-rate clocks.
  always_ff @(posedge clk) begin
    if (rst)                                cur <= '0;
    else if (cur == PHASE_W'(LOOKAHEAD-1))  cur <= '0;
    else                                    cur <= cur + 1'b1;
  end

  // Output switch: pass on the decision of the loop that just updated.
  always_ff @(posedge clk) begin
    if (rst) begin
      bit_out <= 1'b0;
      phase   <= '0;
    end else begin
      bit_out <= dec[cur];
      phase   <= cur;
    end
  end

  // Every loop gets its turn: the phase wraps to 0 after loop L-1.
  a_phase_wrap: assert property (@(posedge clk) disable iff (rst)
    cur == PHASE_W'(LOOKAHEAD-1) |=> cur == '0);

endmodule
