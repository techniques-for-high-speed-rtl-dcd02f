// lookahead_precompute: the lookahead computation done outside the feedback loop.
//
// With 2^N comparators, decision n is a_n = A_(j,n) where j is formed from the
// N previous decisions.  Substituting that relation into itself L times
// expresses a_n through decisions that are L symbols old:
//     a_n = f_i(n),  i = binary(a_{n-L} a_{n-L-1} ... a_{n-L-N+1})
// For every one of the 2^N possible values i of those old bits, this block
// computes f_i(n) by running the selection recursion forward over the last L
// comparator words A(n-L+1) .. A(n): start from the assumed history i, pick the
// comparator that history selects, shift the resulting bit into the history,
// and repeat.  For N = 1, L = 2 this reduces to
//     f_0(n) = A_1(n) B(n-1) + A_0(n) ~B(n-1)   (B = comparator 0, A = comparator 1)
//     f_1(n) = A_1(n) A(n-1) + A_0(n) ~A(n-1)
// the two AND-OR pairs of the one-tap lookahead circuit.  The result is one
// word f per symbol, shared by all feedback loops that follow.
//
// Interface: `cmp` is the comparator word A(n) (bit j = comparator j); `f` bit
// i is f_i(n).  Index i reads the old decisions with the most recent one as
// the most significant bit.
// Timing: the block keeps L-1 registers of comparator history.  With
// PIPE_STAGES = 0 (default) `f` is combinational from `cmp` and the history;
// each further stage adds one output register and one cycle of latency,
// which the design allows because this logic is outside the feedback loop.
// Reset clears the history to all zeros, consistent with an all-zero past.
module lookahead_precompute #(
  parameter int unsigned N_TAPS      = nlc_pkg::DEFAULT_N_TAPS,
  parameter int unsigned LOOKAHEAD   = nlc_pkg::DEFAULT_LOOKAHEAD,
  parameter int unsigned PIPE_STAGES = 0,
  localparam int unsigned LEVELS   = nlc_pkg::num_levels(N_TAPS)
) (
  input  logic              clk,
  input  logic              rst,
  input  logic [LEVELS-1:0] cmp,
  output logic [LEVELS-1:0] f
);

  // hist[k] holds A(n-k); hist[0] is the live input.
  logic [LEVELS-1:0] hist [LOOKAHEAD];
  logic [LEVELS-1:0] f_comb;

  assign hist[0] = cmp;

  for (genvar k = 1; k < LOOKAHEAD; k++) begin : g_hist
    always_ff @(posedge clk) begin
      if (rst) hist[k] <= '0;
      else     hist[k] <= hist[k-1];
    end
  end

  // Iterate the one-step selection L times for every assumed history.
  always_comb begin
    logic [N_TAPS-1:0] s;
    logic              a;
    for (int i = 0; i < LEVELS; i++) begin
      s = N_TAPS'(i);
      a = 1'b0;
      for (int k = LOOKAHEAD - 1; k >= 0; k--) begin
        a = hist[k][s];
        s = (s >> 1) | (N_TAPS'(a) << (N_TAPS - 1));
      end
      f_comb[i] = a;
    end
  end

  if (PIPE_STAGES == 0) begin : g_nopipe
    assign f = f_comb;
  end else begin : g_pipe
    logic [LEVELS-1:0] pipe [PIPE_STAGES];
    always_ff @(posedge clk) begin
      if (rst) begin
        for (int p = 0; p < PIPE_STAGES; p++) pipe[p] <= '0;
      end else begin
        pipe[0] <= f_comb;
        for (int p = 1; p < PIPE_STAGES; p++) pipe[p] <= pipe[p-1];
      end
    end
    assign f = pipe[PIPE_STAGES-1];
  end

endmodule
