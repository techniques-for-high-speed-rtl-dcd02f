// tb_nlc_receiver_full: the receiver with every parameter at its default
// (one feedback tap, lookahead L = 2, 8-bit samples, pipelined multiplexer)
// receiving 20000 symbols through the ISI channel of nlc_channel_pkg.
// Both decision streams are compared with the direct canceller at their
// latencies (3 cycles for the pipelined loop, 4 for the parallel loops), the
// canceller must recover every transmitted bit, and each mechanism must
// occur: both thresholds selected, both parallel loops delivering, and bits
// that a fixed threshold would get wrong.
module tb_nlc_receiver_full;
  import nlc_channel_pkg::*;
  localparam int N_TAPS   = 1;
  localparam int L        = 2;
  localparam int W        = 8;
  localparam int CYCLES   = 20000;
  localparam int LAT_PIPE = 3;
  localparam int LAT_PAR  = 4;

  logic clk = 1'b0;
  logic rst = 1'b1;
  logic signed [W-1:0] sample = '0;
  logic signed [W-1:0] thr [2];
  logic bit_par, bit_pipe;
  logic par_phase;
  int checks = 0, failures = 0;
  int thr_used [2] = '{0, 0};
  int loop_hits [2] = '{0, 0};
  int isi_fixed = 0;
  bit sent [int];
  bit ref_a [int];

  always #5 clk = ~clk;

  nlc_receiver dut (.clk, .rst, .sample, .thr, .bit_par, .par_phase, .bit_pipe);

  function automatic bit ref_at(int n);
    return (n < 0) ? 1'b0 : ref_a[n];
  endfunction

  initial begin
    repeat (CYCLES + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int j = 0; j < 2; j++) thr[j] = W'(threshold(N_TAPS, j));
    repeat (3) @(negedge clk);
    rst = 1'b0;
    for (int c = 0; c < CYCLES + LAT_PAR; c++) begin
      automatic int np = c - LAT_PIPE;
      automatic int nq = c - LAT_PAR;
      checks += 2;
      if (np < CYCLES && bit_pipe !== ref_at(np)) begin
        failures++;
        $display("pipelined output, symbol %0d: got %b expected %b", np, bit_pipe, ref_at(np));
      end
      if (bit_par !== ref_at(nq)) begin
        failures++;
        $display("parallel output, symbol %0d: got %b expected %b", nq, bit_par, ref_at(nq));
      end
      if (nq >= 0) loop_hits[par_phase]++;
      if (c < CYCLES) begin
        automatic int s, j;
        automatic int h = (c == 0) ? 0 : int'(sent[c-1]);
        sent[c] = 1'($urandom);
        s = noisy_sample(N_TAPS, int'(sent[c]), h);
        sample = W'(s);
        j = int'(ref_at(c-1));
        thr_used[j]++;
        ref_a[c] = (s > threshold(N_TAPS, j));
        if ((s > 0) != sent[c]) isi_fixed++;
        checks++;
        if (ref_a[c] != sent[c]) failures++;
      end else sample = '0;
      @(negedge clk);
    end
    checks += 5;
    if (thr_used[0] == 0 || thr_used[1] == 0) begin failures++; $display("a threshold was never used"); end
    if (loop_hits[0] == 0) begin failures++; $display("loop 0 never used"); end
    if (loop_hits[1] == 0) begin failures++; $display("loop 1 never used"); end
    if (isi_fixed == 0) begin failures++; $display("no bit needed cancellation"); end
    if (loop_hits[0] + loop_hits[1] != CYCLES) begin failures++; $display("decision count wrong"); end
    $display("%0d symbols; %0d would be wrong with a fixed threshold; loops delivered %0d and %0d",
             CYCLES, isi_fixed, loop_hits[0], loop_hits[1]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
