// adder_chk: stimulus and reference for one size (N, K) of ieac_sparse_adder.
// Drives NVEC operand pairs (corners first, then random) on its clock and
// compares r with (a + b + 1) mod (2^N + 1). Counts results equal to 2^N
// (complementary inputs) and end-around carries of 0 and 1.
module adder_chk #(
  parameter int N    = 16,
  parameter int K    = 4,
  parameter int NVEC = 1000
) (
  input  logic clk,
  output logic done,
  output int   checks,
  output int   failures,
  output int   n_top,     // results equal to 2^N
  output int   n_wrap0,   // A+B >= 2^N (end-around carry-in 0)
  output int   n_wrap1    // A+B <  2^N (end-around carry-in 1)
);
  logic [N-1:0] a, b;
  logic [N:0]   r;
  logic [127:0] m, exp_r;

  ieac_sparse_adder #(.N(N), .K(K)) dut (.a(a), .b(b), .r(r));

  initial begin
    done = 0; checks = 0; failures = 0; n_top = 0; n_wrap0 = 0; n_wrap1 = 0;
    m = (128'd1 << N) + 1;
    for (int i = 0; i < NVEC; i++) begin
      case (i)
        0: begin a = '0; b = '0; end
        1: begin a = '1; b = '1; end
        2: begin a = '1; b = '0; end
        3: begin a = {N/2{2'b01}}; b = {N/2{2'b10}}; end
        4: begin a = N'(1); b = '1; end
        5: begin a = '1; b = N'(2); end
        default: begin
          a = N'({$urandom, $urandom});
          b = (i % 7 == 0) ? ~a : N'({$urandom, $urandom});
        end
      endcase
      @(posedge clk);
      exp_r = (128'(a) + 128'(b) + 1) % m;
      checks++;
      if (128'(r) != exp_r) begin
        failures++;
        $display("FAIL N=%0d a=%h b=%h r=%h exp=%h", N, a, b, r, exp_r);
      end
      if (r[N]) n_top++;
      if (128'(a) + 128'(b) >= (128'd1 << N)) n_wrap0++; else n_wrap1++;
    end
    done = 1;
  end
endmodule
