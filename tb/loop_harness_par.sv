// loop_harness_par: drives one parallel_loops instance with random precomputed words
// f(n) and checks the decision stream against equation (7):
//     a_n = f_i(n),  i = binary(a_{n-L} ... a_{n-L-N+1}),  a_n = 0 for n < 0
// evaluated here on the reference's own decisions.  The decision for symbol n
// must appear exactly L + 1 cycles after f(n) is driven.
module loop_harness_par #(
  parameter int N_TAPS    = 1,
  parameter int LOOKAHEAD = 2,
  parameter int CYCLES    = 1000
) (
  input  logic clk,
  output int   checks,
  output int   failures,
  output int   ones,
  output int   phase_hits [LOOKAHEAD],
  output logic done
);
  localparam int LEVELS = 1 << N_TAPS;
  localparam int LAT    = LOOKAHEAD + 1;
  localparam int PW     = (LOOKAHEAD > 1) ? $clog2(LOOKAHEAD) : 1;

  logic rst = 1'b1;
  logic [LEVELS-1:0] f = '0;
  logic bit_out;
  logic [PW-1:0] phase;
  bit   a [int];

  parallel_loops #(.N_TAPS(N_TAPS), .LOOKAHEAD(LOOKAHEAD))
    dut (.clk, .rst, .f, .bit_out, .phase);

  function automatic bit a_at(int n);
    return (n < 0) ? 1'b0 : a[n];
  endfunction

  initial begin
    checks = 0; failures = 0; ones = 0; done = 1'b0;
    for (int k = 0; k < LOOKAHEAD; k++) phase_hits[k] = 0;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    for (int c = 0; c < CYCLES + LAT; c++) begin
      automatic int n = c - LAT;
      checks++;
      if (bit_out !== a_at(n)) begin
        failures++;
        $display("parallel N=%0d L=%0d: symbol %0d got %b expected %b",
                 N_TAPS, LOOKAHEAD, n, bit_out, a_at(n));
      end
      if (n >= 0) begin
        checks++;
        if (int'(phase) != n % LOOKAHEAD) begin
          failures++;
          $display("parallel N=%0d L=%0d: symbol %0d came from loop %0d", N_TAPS, LOOKAHEAD, n, phase);
        end else phase_hits[n % LOOKAHEAD]++;
      end
      if (n >= 0 && a_at(n)) ones++;
      if (c < CYCLES) begin
        automatic int sel = 0;
        f = LEVELS'($urandom);
        for (int t = 0; t < N_TAPS; t++) sel = sel * 2 + int'(a_at(c-LOOKAHEAD-t));
        a[c] = f[sel];
      end else f = '0;
      @(negedge clk);
    end
    for (int k = 0; k < LOOKAHEAD; k++) begin
      checks++;
      if (phase_hits[k] == 0) begin
        failures++;
        $display("parallel N=%0d L=%0d: loop %0d never delivered a decision", N_TAPS, LOOKAHEAD, k);
      end
    end
    done = 1'b1;
  end
endmodule
