// ppr_chk: stimulus and reference for one size of modmul_ppr.
// Random bit rows (any values, not only legal partial products) are
// reduced; the outputs must satisfy  S + C = sum(rows) + (N - 1)  mod 2^N+1,
// N - 1 being the total constant left by the complemented end-around
// carries of any complete reduction.
module ppr_chk #(
  parameter int N    = 16,
  parameter int NVEC = 1000
) (
  input  logic clk,
  output logic done,
  output int   checks,
  output int   failures
);
  logic [N:0][N-1:0] pp;
  logic [N-1:0]      vs, vc;
  logic [127:0]      m, acc;

  modmul_ppr #(.N(N)) dut (.pp(pp), .sum_o(vs), .carry_o(vc));

  initial begin
    done = 0; checks = 0; failures = 0;
    m = (128'd1 << N) + 1;
    for (int i = 0; i < NVEC; i++) begin
      for (int j = 0; j <= N; j++) begin
        case (i)
          0:       pp[j] = '0;
          1:       pp[j] = '1;
          default: pp[j] = N'({$urandom, $urandom});
        endcase
      end
      @(posedge clk);
      acc = 0;
      for (int j = 0; j <= N; j++) acc += 128'(pp[j]);
      checks++;
      if ((128'(vs) + 128'(vc)) % m != (acc + N - 1) % m) begin
        failures++;
        $display("FAIL N=%0d S=%h C=%h", N, vs, vc);
      end
    end
    done = 1;
  end
endmodule
