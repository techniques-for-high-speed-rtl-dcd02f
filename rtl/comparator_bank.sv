// comparator_bank: the 2^N threshold comparators with their sampling flip-flops.
//
// Each comparator j compares the received sample with its own fixed
// threshold thr[j] and a D flip-flop samples the result on the symbol clock,
// giving A_(j,n) = (sample_n > thr[j]).  These are the A_n / B_n registers of
// the one-tap circuit and the A..D registers of the two-tap circuit.  With a
// bank of fixed-threshold comparators no analog threshold has to be switched
// at the symbol rate; the choice among them is made later in digital logic.
//
// Interface: `sample` is the received signal as a signed SAMPLE_W-bit value
// (the analog comparator is modelled on a quantised sample, a choice of this
// design); `thr` holds the 2^N thresholds; `cmp` is the registered comparator
// word, bit j from comparator j.  Equal values give 0 (also this design's
// choice).
// Timing: one register stage; `cmp` reflects the sample present at the
// previous rising clock edge.  Synchronous active-high reset clears `cmp`,
// which reads as an all-zero history to the logic that follows.
module comparator_bank #(
  parameter int unsigned N_TAPS   = nlc_pkg::DEFAULT_N_TAPS,
  parameter int unsigned SAMPLE_W = nlc_pkg::DEFAULT_SAMPLE_W,
  localparam int unsigned LEVELS   = nlc_pkg::num_levels(N_TAPS)
) (
  input  logic                       clk,
  input  logic                       rst,
  input  logic signed [SAMPLE_W-1:0] sample,
  input  logic signed [SAMPLE_W-1:0] thr [LEVELS],
  output logic        [LEVELS-1:0]   cmp
);

  logic [LEVELS-1:0] cmp_d;

  always_comb begin
    for (int j = 0; j < LEVELS; j++) cmp_d[j] = (sample > thr[j]);
  end

  always_ff @(posedge clk) begin
    if (rst) cmp <= '0;
    else     cmp <= cmp_d;
  end

endmodule
