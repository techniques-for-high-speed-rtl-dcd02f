// tb_nlc_receiver: end-to-end test of the receiver in the configurations the
// design is built around: one tap with L = 2 (default), one tap without
// lookahead (L = 1), two taps with L = 2 and a pipelined multiplexer, two taps
// with L = 2, a pipelined precomputation and an unpipelined multiplexer, and
// three taps with L = 3.
module tb_nlc_receiver;
  localparam int NI = 5;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  int   c [NI], fl [NI];
  logic d [NI];
  int   checks, failures;

  receiver_harness #(.N_TAPS(1), .LOOKAHEAD(2), .PRE_PIPE(0), .PIPE_MUX(1)) h0 (.clk, .checks(c[0]), .failures(fl[0]), .done(d[0]));
  receiver_harness #(.N_TAPS(1), .LOOKAHEAD(1), .PRE_PIPE(0), .PIPE_MUX(0)) h1 (.clk, .checks(c[1]), .failures(fl[1]), .done(d[1]));
  receiver_harness #(.N_TAPS(2), .LOOKAHEAD(2), .PRE_PIPE(0), .PIPE_MUX(1)) h2 (.clk, .checks(c[2]), .failures(fl[2]), .done(d[2]));
  receiver_harness #(.N_TAPS(2), .LOOKAHEAD(2), .PRE_PIPE(1), .PIPE_MUX(0)) h3 (.clk, .checks(c[3]), .failures(fl[3]), .done(d[3]));
  receiver_harness #(.N_TAPS(3), .LOOKAHEAD(3), .PRE_PIPE(0), .PIPE_MUX(1)) h4 (.clk, .checks(c[4]), .failures(fl[4]), .done(d[4]));

  function automatic void total();
    checks = 0; failures = 0;
    for (int i = 0; i < NI; i++) begin checks += c[i]; failures += fl[i]; end
  endfunction

  initial begin
    repeat (50000) @(posedge clk);
    total();
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    @(posedge clk);
    wait (d[0] && d[1] && d[2] && d[3] && d[4]);
    total();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
