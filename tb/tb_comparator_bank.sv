// tb_comparator_bank: self-checking test of the comparator bank.
//
// Drives random signed samples against random thresholds (with a share of
// samples equal to a threshold) into a four-comparator bank (N = 2) and checks
// that one clock later bit j equals (sample > thr[j]) computed here with
// integer arithmetic.  Also checks that reset clears the word.
module tb_comparator_bank;
  localparam int N_TAPS = 2;
  localparam int W      = 8;
  localparam int LEVELS = 1 << N_TAPS;
  localparam int CYCLES = 2000;

  logic clk = 1'b0;
  logic rst = 1'b1;
  logic signed [W-1:0] sample;
  logic signed [W-1:0] thr [LEVELS];
  logic [LEVELS-1:0]   cmp;
  int checks = 0, failures = 0;
  int prev_s;
  int eq_hits = 0;

  always #5 clk = ~clk;

  comparator_bank #(.N_TAPS(N_TAPS), .SAMPLE_W(W)) dut (.clk, .rst, .sample, .thr, .cmp);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    sample = '0;
    for (int j = 0; j < LEVELS; j++) thr[j] = W'($urandom_range(0, 255));
    sample = 8'sd100;
    repeat (3) @(negedge clk);
    checks++;
    if (cmp !== '0) begin failures++; $display("reset did not clear cmp"); end
    rst = 1'b0;
    prev_s = 0;
    for (int c = 0; c < CYCLES; c++) begin
      if (c % 200 == 0)
        for (int j = 0; j < LEVELS; j++) thr[j] = W'($urandom_range(0, 255));
      if ($urandom_range(0, 3) == 0) sample = thr[$urandom_range(0, LEVELS-1)];
      else                           sample = W'($urandom_range(0, 255));
      @(negedge clk);
      for (int j = 0; j < LEVELS; j++) begin
        int s, t;
        s = int'(sample);  // value captured at the edge just passed
        t = int'(thr[j]);
        checks++;
        if (s == t) eq_hits++;
        if (cmp[j] !== (s > t)) begin
          failures++;
          $display("cycle %0d comparator %0d: sample %0d thr %0d got %b", c, j, s, t, cmp[j]);
        end
      end
    end
    checks++;
    if (eq_hits == 0) begin failures++; $display("no equal-valued case exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
