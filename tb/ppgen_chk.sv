// ppgen_chk: stimulus and reference for one size of modmul_ppgen.
// Operands are legal (n+1)-bit values in [0, 2^N], with 2^N chosen often.
// The rows must satisfy  sum(rows) = x*y + (2^N - N - 1) + 2  mod 2^N+1:
// the complemented, repositioned bits add 2^N - N - 1, the constant row 2.
// Every operand class (both below 2^N, x = 2^N, y = 2^N, both) is counted.
module ppgen_chk #(
  parameter int N    = 16,
  parameter int NVEC = 1000
) (
  input  logic clk,
  output logic done,
  output int   checks,
  output int   failures,
  output int   n_cls [4]
);
  logic [N:0]        x, y;
  logic [N:0][N-1:0] pp;
  logic [127:0]      m, acc, exp_v;

  modmul_ppgen #(.N(N)) dut (.x(x), .y(y), .pp(pp));

  function automatic logic [N:0] pick(int i);
    if ($urandom % 6 == 0) return (N+1)'(1) << N;
    if ($urandom % 20 == 0) return '0;
    return {1'b0, N'({$urandom, $urandom})};
  endfunction

  initial begin
    done = 0; checks = 0; failures = 0;
    for (int c = 0; c < 4; c++) n_cls[c] = 0;
    m = (128'd1 << N) + 1;
    for (int i = 0; i < NVEC; i++) begin
      x = pick(i);
      y = pick(i);
      @(posedge clk);
      acc = 0;
      for (int j = 0; j <= N; j++) acc += 128'(pp[j]);
      exp_v = (128'(x) * 128'(y) + (128'd1 << N) - N - 1 + 2) % m;
      checks++;
      if (acc % m != exp_v) begin
        failures++;
        $display("FAIL N=%0d x=%h y=%h rows=%0d exp=%0d", N, x, y, acc % m, exp_v);
      end
      n_cls[{x[N], y[N]}]++;
    end
    done = 1;
  end
endmodule
