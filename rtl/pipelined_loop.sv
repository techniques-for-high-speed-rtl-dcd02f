// pipelined_loop: the decision-feedback loop run at the full symbol rate,
// using the L-symbol delay that lookahead allows to pipeline the multiplexer.
//
// Each symbol period the loop receives the precomputed word f(n) and outputs
//     a_n = f_i(n),  i = binary(a_{n-L} ... a_{n-L-N+1})   (a_{n-L} = MSB)
// The decisions it needs are L or more symbols old, so the loop contains L
// registers (a_{n-1}, a_{n-2}, ...) instead of one, which is the slack that
// lets the multiplexer be split by a pipeline latch.
//
// PIPE_MUX = 0: one 2^N:1 multiplexer selected by the old decisions, followed
//   by the decision register (one-tap and two-tap "iterated twice" circuits).
// PIPE_MUX = 1 (default): the multiplexer is split in two.  The first stage
//   resolves the N-1 older select bits a_{n-L-1} .. a_{n-L-N+1} (already
//   available one cycle earlier) and is registered; the second stage is a 2:1
//   multiplexer on a_{n-L}.  With N = 1 the first stage is only the register.
//   The split at that point follows the two-tap pipelined-loop circuit; for
//   N = 1 the placement of the latch is this design's choice.
//
// Interface: `f` bit i is f_i(n) for the symbol presented this cycle;
// `bit_out` is the decision stream.
// Timing: one decision per clock.  `bit_out` shows a_n 1 + PIPE_MUX cycles
// after f(n) is presented.  Reset clears the history (previous decisions 0).
module pipelined_loop #(
  parameter int unsigned N_TAPS    = nlc_pkg::DEFAULT_N_TAPS,
  parameter int unsigned LOOKAHEAD = nlc_pkg::DEFAULT_LOOKAHEAD,
  parameter bit          PIPE_MUX  = 1'b1,
  localparam int unsigned LEVELS   = nlc_pkg::num_levels(N_TAPS),
  localparam int unsigned HDEPTH   = LOOKAHEAD + N_TAPS - 1
) (
  input  logic              clk,
  input  logic              rst,
  input  logic [LEVELS-1:0] f,
  output logic              bit_out
);

  // hist[0] is the newest registered decision.
  logic [HDEPTH-1:0] hist;
  logic              a_next;

  if (!PIPE_MUX) begin : g_flat
    // Stage at cycle of f(n): hist[0] = a_{n-1}, so a_{n-L-t} = hist[L-1+t].
    logic [N_TAPS-1:0] sel;
    always_comb begin
      for (int t = 0; t < N_TAPS; t++) sel[N_TAPS-1-t] = hist[LOOKAHEAD-1+t];
      a_next = f[sel];
    end
  end else begin : g_pipe
    // First stage, cycle of f(n): hist[0] = a_{n-2}, so a_{n-L-t} = hist[L-2+t].
    logic [1:0] part_d, part_q;
    if (N_TAPS == 1) begin : g_one
      assign part_d = f[1:0];
    end else begin : g_many
      logic [N_TAPS-2:0] low;
      always_comb begin
        for (int t = 1; t < N_TAPS; t++) low[N_TAPS-1-t] = hist[LOOKAHEAD-2+t];
        part_d[0] = f[{1'b0, low}];
        part_d[1] = f[{1'b1, low}];
      end
    end
    always_ff @(posedge clk) begin
      if (rst) part_q <= '0;
      else     part_q <= part_d;
    end
    // Second stage, one cycle later: hist[0] = a_{n-1}, a_{n-L} = hist[L-1].
    assign a_next = part_q[hist[LOOKAHEAD-1]];
  end

  if (HDEPTH == 1) begin : g_hist1
    always_ff @(posedge clk) begin
      if (rst) hist <= '0;
      else     hist <= a_next;
    end
  end else begin : g_histn
    always_ff @(posedge clk) begin
      if (rst) hist <= '0;
      else     hist <= {hist[HDEPTH-2:0], a_next};
    end
  end

  assign bit_out = hist[0];

  initial begin
    assert (LOOKAHEAD >= 1) else $error("LOOKAHEAD must be at least 1");
  end

endmodule
