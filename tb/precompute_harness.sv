// precompute_harness: drives one lookahead_precompute instance with random
// comparator words and checks every f_i against a reference model.
//
// Reference: for each assumed history i the harness writes the N old
// decisions into a decision array and steps the plain one-symbol selection
// rule (threshold index = previous N decisions, newest as MSB) over the last L
// comparator words.  It also runs the direct recursion over the whole random
// stream and checks that the f selected by the true old decisions equals the
// true new decision (equations (6)-(8)).  For N = 1, L = 2 the closed forms
// f_1 = A_n A_{n-1} + B_n ~A_{n-1}, f_0 = A_n B_{n-1} + B_n ~B_{n-1} are
// checked too.  f is compared PIPE_STAGES cycles after its comparator word.
module precompute_harness #(
  parameter int N_TAPS      = 1,
  parameter int LOOKAHEAD   = 2,
  parameter int PIPE_STAGES = 0,
  parameter int CYCLES      = 1000
) (
  input  logic clk,
  output int   checks,
  output int   failures,
  output logic done
);
  localparam int LEVELS = 1 << N_TAPS;
  localparam int HIST   = 16;

  logic rst = 1'b1;
  logic [LEVELS-1:0] cmp = '0;
  logic [LEVELS-1:0] f;
  logic [LEVELS-1:0] words [int];   // comparator word per symbol
  bit                truth [int];   // direct-recursion decisions

  lookahead_precompute #(.N_TAPS(N_TAPS), .LOOKAHEAD(LOOKAHEAD),
                         .PIPE_STAGES(PIPE_STAGES)) dut (.clk, .rst, .cmp, .f);

  function automatic logic [LEVELS-1:0] word_at(int n);
    return (n < 0) ? '0 : words[n];
  endfunction
  function automatic bit truth_at(int n);
    return (n < 0) ? 1'b0 : truth[n];
  endfunction

  function automatic bit ref_f(int n, int i);
    bit d [int];
    int j;
    for (int t = 0; t < N_TAPS; t++) d[n-LOOKAHEAD-t] = i[N_TAPS-1-t];
    for (int s = n - LOOKAHEAD + 1; s <= n; s++) begin
      j = 0;
      for (int t = 1; t <= N_TAPS; t++) j = j * 2 + int'(d[s-t]);
      d[s] = word_at(s)[j];
    end
    return d[n];
  endfunction

  initial begin
    checks = 0; failures = 0; done = 1'b0;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    for (int c = 0; c < CYCLES + PIPE_STAGES; c++) begin
      int n;
      // check the output belonging to symbol n (combinational when P = 0)
      if (c < CYCLES) begin
        words[c] = LEVELS'($urandom);
        begin
          automatic int j = 0;
          for (int t = 1; t <= N_TAPS; t++) j = j * 2 + int'(truth_at(c-t));
          truth[c] = words[c][j];
        end
        cmp = words[c];
      end else cmp = '0;
      n = c - PIPE_STAGES;
      if (PIPE_STAGES == 0) #1;
      if (n >= 0) begin
        automatic int sel = 0;
        for (int i = 0; i < LEVELS; i++) begin
          checks++;
          if (f[i] !== ref_f(n, i)) begin
            failures++;
            $display("N=%0d L=%0d symbol %0d: f_%0d = %b, expected %b",
                     N_TAPS, LOOKAHEAD, n, i, f[i], ref_f(n, i));
          end
        end
        for (int t = 0; t < N_TAPS; t++) sel = sel * 2 + int'(truth_at(n-LOOKAHEAD-t));
        checks++;
        if (f[sel] !== truth[n]) begin
          failures++;
          $display("N=%0d L=%0d symbol %0d: selected f differs from direct decision", N_TAPS, LOOKAHEAD, n);
        end
        if (N_TAPS == 1 && LOOKAHEAD == 2) begin
          bit an, an1, bn, bn1;
          an = word_at(n)[1]; an1 = word_at(n-1)[1];
          bn = word_at(n)[0]; bn1 = word_at(n-1)[0];
          checks += 2;
          if (f[1] !== ((an & an1) | (bn & ~an1))) failures++;
          if (f[0] !== ((an & bn1) | (bn & ~bn1))) failures++;
        end
      end
      @(negedge clk);
    end
    done = 1'b1;
  end
endmodule
