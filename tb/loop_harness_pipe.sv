// loop_harness_pipe: drives one pipelined_loop with random precomputed words
// f(n) and checks the decision stream against equation (7):
//     a_n = f_i(n),  i = binary(a_{n-L} ... a_{n-L-N+1}),  a_n = 0 for n < 0
// evaluated here on the reference's own decisions.  The decision for symbol n
// must appear exactly 1 + PIPE_MUX cycles after f(n) is driven.
module loop_harness_pipe #(
  parameter int N_TAPS    = 1,
  parameter int LOOKAHEAD = 2,
  parameter bit PIPE_MUX  = 1'b1,
  parameter int CYCLES    = 1000
) (
  input  logic clk,
  output int   checks,
  output int   failures,
  output int   ones,
  output logic done
);
  localparam int LEVELS = 1 << N_TAPS;
  localparam int LAT    = 1 + int'(PIPE_MUX);

  logic rst = 1'b1;
  logic [LEVELS-1:0] f = '0;
  logic bit_out;
  bit   a [int];

  pipelined_loop #(.N_TAPS(N_TAPS), .LOOKAHEAD(LOOKAHEAD), .PIPE_MUX(PIPE_MUX))
    dut (.clk, .rst, .f, .bit_out);

  function automatic bit a_at(int n);
    return (n < 0) ? 1'b0 : a[n];
  endfunction

  initial begin
    checks = 0; failures = 0; ones = 0; done = 1'b0;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    for (int c = 0; c < CYCLES + LAT; c++) begin
      automatic int n = c - LAT;
      checks++;
      if (bit_out !== a_at(n)) begin
        failures++;
        $display("pipelined N=%0d L=%0d P=%0d: symbol %0d got %b expected %b",
                 N_TAPS, LOOKAHEAD, PIPE_MUX, n, bit_out, a_at(n));
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
    done = 1'b1;
  end
endmodule
