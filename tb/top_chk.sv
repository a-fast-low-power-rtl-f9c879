// top_chk: stimulus and reference for one size of modmul_top.
// With EXH = 1 every legal operand pair in [0, 2^N] is applied; otherwise
// corner pairs and then NVEC random legal pairs (2^N and 0 chosen often).
// r is compared with x*y mod (2^N + 1). Counts the operand classes, results
// of 2^N and both values of the final adder's end-around carry.
module top_chk #(
  parameter int N    = 16,
  parameter int NVEC = 1000,
  parameter bit EXH  = 0
) (
  input  logic clk,
  output logic done,
  output int   checks,
  output int   failures,
  output int   n_cls [4],   // {x = 2^N, y = 2^N}
  output int   n_top,       // results equal to 2^N
  output int   n_eac [2]    // end-around carry into bit 0 was 0 / 1
);
  logic [N:0]   x, y, r;
  logic [127:0] m, exp_r;

  modmul_top #(.N(N)) dut (.x(x), .y(y), .r(r));

  function automatic logic [N:0] pick();
    if ($urandom % 6 == 0) return (N+1)'(1) << N;
    if ($urandom % 30 == 0) return '0;
    if ($urandom % 30 == 0) return (N+1)'(1);
    return {1'b0, N'({$urandom, $urandom})};
  endfunction

  task automatic apply(logic [N:0] xv, logic [N:0] yv);
    x = xv;
    y = yv;
    @(posedge clk);
    exp_r = (128'(x) * 128'(y)) % m;
    checks++;
    if (128'(r) != exp_r) begin
      failures++;
      if (failures < 10) $display("FAIL N=%0d x=%0d y=%0d r=%0d exp=%0d", N, x, y, r, exp_r);
    end
    n_cls[{x[N], y[N]}]++;
    if (r[N]) n_top++;
    n_eac[dut.u_fsa.cblk[0]]++;
  endtask

  initial begin
    logic [N:0] two_n;
    done = 0; checks = 0; failures = 0; n_top = 0;
    for (int c = 0; c < 4; c++) n_cls[c] = 0;
    n_eac[0] = 0; n_eac[1] = 0;
    m = (128'd1 << N) + 1;
    two_n = (N+1)'(1) << N;
    if (EXH) begin
      for (longint i = 0; i <= (longint'(1) << N); i++)
        for (longint j = 0; j <= (longint'(1) << N); j++)
          apply((N+1)'(i), (N+1)'(j));
    end else begin
      apply('0, '0);
      apply(two_n, two_n);
      apply(two_n, (N+1)'(1));
      apply((N+1)'(1), two_n);
      apply(two_n, two_n - 1);
      apply(two_n - 1, two_n - 1);
      apply(two_n - 1, (N+1)'(2));
      apply(two_n, '0);
      for (int i = 0; i < NVEC; i++) apply(pick(), pick());
    end
    done = 1;
  end
endmodule
