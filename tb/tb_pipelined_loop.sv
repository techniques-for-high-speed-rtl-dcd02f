// tb_pipelined_loop: checks the full-rate loop in the configurations the
// design describes: one tap with L = 2 and a pipelined multiplexer (default),
// one tap with L = 1 (no lookahead), two taps with L = 2 unpipelined and
// pipelined, three taps with L = 3 pipelined, and two taps with L = 1
// pipelined (correct, though without lookahead the register gives no timing
// relief).  Each instance must produce both decision values.
module tb_pipelined_loop;
  localparam int NI = 6;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  int   c [NI], fl [NI], on [NI];
  logic d [NI];
  int   checks, failures;

  loop_harness_pipe #(.N_TAPS(1), .LOOKAHEAD(2), .PIPE_MUX(1)) h0 (.clk, .checks(c[0]), .failures(fl[0]), .ones(on[0]), .done(d[0]));
  loop_harness_pipe #(.N_TAPS(1), .LOOKAHEAD(1), .PIPE_MUX(0)) h1 (.clk, .checks(c[1]), .failures(fl[1]), .ones(on[1]), .done(d[1]));
  loop_harness_pipe #(.N_TAPS(2), .LOOKAHEAD(2), .PIPE_MUX(0)) h2 (.clk, .checks(c[2]), .failures(fl[2]), .ones(on[2]), .done(d[2]));
  loop_harness_pipe #(.N_TAPS(2), .LOOKAHEAD(2), .PIPE_MUX(1)) h3 (.clk, .checks(c[3]), .failures(fl[3]), .ones(on[3]), .done(d[3]));
  loop_harness_pipe #(.N_TAPS(3), .LOOKAHEAD(3), .PIPE_MUX(1)) h4 (.clk, .checks(c[4]), .failures(fl[4]), .ones(on[4]), .done(d[4]));
  loop_harness_pipe #(.N_TAPS(2), .LOOKAHEAD(1), .PIPE_MUX(1)) h5 (.clk, .checks(c[5]), .failures(fl[5]), .ones(on[5]), .done(d[5]));

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
    wait (d[0] && d[1] && d[2] && d[3] && d[4] && d[5]);
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
