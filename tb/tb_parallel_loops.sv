// tb_parallel_loops: checks the L parallel 1/L-rate loops and their output
// switch: one tap with L = 2 (default), one tap with L = 1, two taps with
// L = 2 (cross-coupled loops), three taps with L = 3 and one tap with L = 4.
// Every decision is compared with equation (7) at exactly L + 1 cycles, the
// reported loop must be n mod L, every loop must deliver decisions and each
// instance must produce both decision values.
module tb_parallel_loops;
  localparam int NI = 5;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  int   c [NI], fl [NI], on [NI];
  logic d [NI];
  int   checks, failures;

  loop_harness_par #(.N_TAPS(1), .LOOKAHEAD(2)) h0 (.clk, .checks(c[0]), .failures(fl[0]), .ones(on[0]), .phase_hits(), .done(d[0]));
  loop_harness_par #(.N_TAPS(1), .LOOKAHEAD(1)) h1 (.clk, .checks(c[1]), .failures(fl[1]), .ones(on[1]), .phase_hits(), .done(d[1]));
  loop_harness_par #(.N_TAPS(2), .LOOKAHEAD(2)) h2 (.clk, .checks(c[2]), .failures(fl[2]), .ones(on[2]), .phase_hits(), .done(d[2]));
  loop_harness_par #(.N_TAPS(1), .LOOKAHEAD(4)) h3 (.clk, .checks(c[3]), .failures(fl[3]), .ones(on[3]), .phase_hits(), .done(d[3]));
  loop_harness_par #(.N_TAPS(3), .LOOKAHEAD(3)) h4 (.clk, .checks(c[4]), .failures(fl[4]), .ones(on[4]), .phase_hits(), .done(d[4]));

  function automatic void total();
    checks = 0; failures = 0;
    for (int i = 0; i < NI; i++) begin checks += c[i]; failures += fl[i]; end
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    total();
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    @(posedge clk);
    wait (d[0] && d[1] && d[2] && d[3] && d[4]);
    total();
    for (int i = 0; i < NI; i++) begin
      checks++;
      if (on[i] == 0 || on[i] == 1000) begin
        failures++;
        $display("instance %0d produced only one decision value", i);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
