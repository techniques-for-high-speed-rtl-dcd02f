// nlc_receiver: binary receiver with nonlinear cancellation of post-cursor ISI,
// built so that no analog signal is switched and the feedback loop may take
// L symbol periods.
//
// Structure (front end shared, two loop organisations side by side):
//   comparator_bank       2^N comparators with fixed thresholds thr[j] and
//                         their sampling flip-flops: A_(j,n)
//   lookahead_precompute  the L-times-iterated selection f_i(n), computed
//                         once per symbol outside any feedback loop
//   parallel_loops        L loops at 1/L of the symbol rate plus the output
//                         switch                               -> bit_par
//   pipelined_loop        one full-rate loop with the multiplexer split by a
//                         pipeline register                    -> bit_pipe
// Both outputs carry the same decisions as the direct canceller
//     a_n = (sample_n > thr[j]),  j = binary(a_{n-1} ... a_{n-N})  (a_{n-1} = MSB)
// They only differ in latency and in how the loop timing is relieved; a
// chip would keep one of the two back ends, both are built here so that
// either can be used.
//
// Interface: one signed sample per clock on `sample`; `thr` are the 2^N
// thresholds, expected to be static.  `par_phase` tells which parallel loop
// produced the bit on `bit_par`.
// Timing: sample n is captured at a rising edge; a_n appears on `bit_pipe`
// PIPE_LATENCY edges later and on `bit_par` PAR_LATENCY edges later (counting
// the capturing edge as the first).  Synchronous active-high reset; the
// decisions before the first sample read as zeros.
module nlc_receiver #(
  parameter int unsigned N_TAPS      = nlc_pkg::DEFAULT_N_TAPS,
  parameter int unsigned LOOKAHEAD   = nlc_pkg::DEFAULT_LOOKAHEAD,
  parameter int unsigned SAMPLE_W    = nlc_pkg::DEFAULT_SAMPLE_W,
  parameter int unsigned PRE_PIPE    = 0,
  parameter bit          PIPE_MUX    = 1'b1,
  localparam int unsigned LEVELS     = nlc_pkg::num_levels(N_TAPS),
  localparam int unsigned PHASE_W    = (LOOKAHEAD > 1) ? $clog2(LOOKAHEAD) : 1,
  localparam int unsigned PIPE_LATENCY = 2 + PRE_PIPE + int'(PIPE_MUX),
  localparam int unsigned PAR_LATENCY  = 2 + PRE_PIPE + LOOKAHEAD
) (
  input  logic                       clk,
  input  logic                       rst,
  input  logic signed [SAMPLE_W-1:0] sample,
  input  logic signed [SAMPLE_W-1:0] thr [LEVELS],
  output logic                       bit_par,
  output logic [PHASE_W-1:0]         par_phase,
  output logic                       bit_pipe
);

  logic [LEVELS-1:0] cmp;
  logic [LEVELS-1:0] f;

  comparator_bank #(.N_TAPS(N_TAPS), .SAMPLE_W(SAMPLE_W)) u_cmp (
    .clk, .rst, .sample, .thr, .cmp
  );

  lookahead_precompute #(.N_TAPS(N_TAPS), .LOOKAHEAD(LOOKAHEAD),
                         .PIPE_STAGES(PRE_PIPE)) u_pre (
    .clk, .rst, .cmp, .f
  );

  parallel_loops #(.N_TAPS(N_TAPS), .LOOKAHEAD(LOOKAHEAD)) u_par (
    .clk, .rst, .f, .bit_out(bit_par), .phase(par_phase)
  );

  pipelined_loop #(.N_TAPS(N_TAPS), .LOOKAHEAD(LOOKAHEAD),
                   .PIPE_MUX(PIPE_MUX)) u_pipe (
    .clk, .rst, .f, .bit_out(bit_pipe)
  );

endmodule
