// tb_lookahead_precompute: runs the lookahead precomputation in four
// configurations (one-tap L = 2 as built by default, one-tap L = 1, two-tap
// L = 2 with one pipeline stage, three-tap L = 3 with two pipeline stages)
// against the reference model in precompute_harness.
module tb_lookahead_precompute;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  int c0, f0, c1, f1, c2, f2, c3, f3;
  logic d0, d1, d2, d3;
  int checks, failures;

  precompute_harness #(.N_TAPS(1), .LOOKAHEAD(2), .PIPE_STAGES(0)) h0 (.clk, .checks(c0), .failures(f0), .done(d0));
  precompute_harness #(.N_TAPS(1), .LOOKAHEAD(1), .PIPE_STAGES(0)) h1 (.clk, .checks(c1), .failures(f1), .done(d1));
  precompute_harness #(.N_TAPS(2), .LOOKAHEAD(2), .PIPE_STAGES(1)) h2 (.clk, .checks(c2), .failures(f2), .done(d2));
  precompute_harness #(.N_TAPS(3), .LOOKAHEAD(3), .PIPE_STAGES(2)) h3 (.clk, .checks(c3), .failures(f3), .done(d3));

  initial begin
    repeat (20000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", c0 + c1 + c2 + c3, f0 + f1 + f2 + f3 + 1);
    $finish;
  end

  initial begin
    @(posedge clk);
    wait (d0 && d1 && d2 && d3);
    checks   = c0 + c1 + c2 + c3;
    failures = f0 + f1 + f2 + f3;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
