// receiver_harness: end-to-end run of one nlc_receiver configuration.
//
// Random bits go through the channel of nlc_channel_pkg; the receiver's
// thresholds are set from the same channel.  The reference is the direct
// canceller (compare each sample with the threshold picked by the reference's
// own previous N decisions).  Both outputs are checked against it at exactly
// their latencies, and the reference itself must recover every transmitted
// bit.  Events counted, each of which must occur: every threshold index in
// use; a bit that the plain midpoint threshold 0 would get wrong (ISI that
// the canceller removes); a cycle in which the old decision changes the
// decision (the comparators disagree); every parallel loop delivering.
module receiver_harness #(
  parameter int N_TAPS    = 1,
  parameter int LOOKAHEAD = 2,
  parameter int PRE_PIPE  = 0,
  parameter bit PIPE_MUX  = 1'b1,
  parameter int CYCLES    = 2000
) (
  input  logic clk,
  output int   checks,
  output int   failures,
  output logic done
);
  import nlc_channel_pkg::*;
  localparam int LEVELS   = 1 << N_TAPS;
  localparam int W        = 8;
  localparam int PW       = (LOOKAHEAD > 1) ? $clog2(LOOKAHEAD) : 1;
  localparam int LAT_PIPE = 2 + PRE_PIPE + int'(PIPE_MUX);
  localparam int LAT_PAR  = 2 + PRE_PIPE + LOOKAHEAD;

  logic rst = 1'b1;
  logic signed [W-1:0] sample = '0;
  logic signed [W-1:0] thr [LEVELS];
  logic bit_par, bit_pipe;
  logic [PW-1:0] par_phase;

  bit sent [int];
  bit ref_a [int];
  int thr_used [LEVELS];
  int isi_fixed = 0, lookahead_mattered = 0;
  int loop_hits [LOOKAHEAD];

  nlc_receiver #(.N_TAPS(N_TAPS), .LOOKAHEAD(LOOKAHEAD), .SAMPLE_W(W),
                 .PRE_PIPE(PRE_PIPE), .PIPE_MUX(PIPE_MUX))
    dut (.clk, .rst, .sample, .thr, .bit_par, .par_phase, .bit_pipe);

  function automatic bit ref_at(int n);
    return (n < 0) ? 1'b0 : ref_a[n];
  endfunction
  function automatic int hist_of(int n, bit which_ref);  // previous N bits, newest MSB
    int h = 0;
    for (int k = 1; k <= N_TAPS; k++)
      h = h * 2 + ((n - k < 0) ? 0 : (which_ref ? int'(ref_a[n-k]) : int'(sent[n-k])));
    return h;
  endfunction

  initial begin
    checks = 0; failures = 0; done = 1'b0;
    for (int j = 0; j < LEVELS; j++) begin
      thr[j] = W'(threshold(N_TAPS, j));
      thr_used[j] = 0;
    end
    for (int k = 0; k < LOOKAHEAD; k++) loop_hits[k] = 0;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    for (int c = 0; c < CYCLES + LAT_PAR; c++) begin
      automatic int np = c - LAT_PIPE;
      automatic int nq = c - LAT_PAR;
      checks++;
      if (np < CYCLES && bit_pipe !== ref_at(np)) begin
        failures++;
        $display("N=%0d L=%0d pipelined output, symbol %0d: got %b expected %b",
                 N_TAPS, LOOKAHEAD, np, bit_pipe, ref_at(np));
      end
      checks++;
      if (bit_par !== ref_at(nq)) begin
        failures++;
        $display("N=%0d L=%0d parallel output, symbol %0d: got %b expected %b",
                 N_TAPS, LOOKAHEAD, nq, bit_par, ref_at(nq));
      end
      if (nq >= 0) loop_hits[par_phase]++;
      if (c < CYCLES) begin
        automatic int s, j;
        sent[c] = 1'($urandom);
        s = noisy_sample(N_TAPS, int'(sent[c]), hist_of(c, 1'b0));
        sample = W'(s);
        j = hist_of(c, 1'b1);
        thr_used[j]++;
        ref_a[c] = (s > threshold(N_TAPS, j));
        if ((s > 0) != sent[c]) isi_fixed++;
        for (int jj = 0; jj < LEVELS; jj++)
          if ((s > threshold(N_TAPS, jj)) != (s > threshold(N_TAPS, 0))) begin
            lookahead_mattered++;
            break;
          end
        checks++;
        if (ref_a[c] != sent[c]) begin
          failures++;
          $display("N=%0d: reference canceller missed bit %0d", N_TAPS, c);
        end
      end else sample = '0;
      @(negedge clk);
    end
    for (int j = 0; j < LEVELS; j++) begin
      checks++;
      if (thr_used[j] == 0) begin failures++; $display("threshold %0d never used", j); end
    end
    for (int k = 0; k < LOOKAHEAD; k++) begin
      checks++;
      if (loop_hits[k] == 0) begin failures++; $display("parallel loop %0d never used", k); end
    end
    checks += 2;
    if (isi_fixed == 0) begin failures++; $display("no bit needed cancellation"); end
    if (lookahead_mattered == 0) begin failures++; $display("comparators never disagreed"); end
    $display("N=%0d L=%0d PRE=%0d PIPE_MUX=%0d: %0d symbols, %0d would fail a fixed threshold, comparators disagreed on %0d",
             N_TAPS, LOOKAHEAD, PRE_PIPE, PIPE_MUX, CYCLES, isi_fixed, lookahead_mattered);
    done = 1'b1;
  end
endmodule
