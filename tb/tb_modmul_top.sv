// tb_modmul_top: end-to-end self-check of the multiplier at its default
// size (n = 16, 17-bit operands, modulus 65537).
//
// Corner pairs and 1000000 random legal pairs are compared with
// x*y mod 65537. The test also requires that each mechanism of the design
// was exercised: every operand class of the OR-merged product matrix
// (both operands below 2^16, x = 2^16, y = 2^16, both = 2^16), a result of
// 2^16 (top output bit), both values of the final adder's end-around carry,
// and the 7:2, 5:2 and 3:2 stages of the reduction array.
module tb_modmul_top;
  import modmul_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;

  logic done;
  int checks, failures, n_top;
  int n_cls [4];
  int n_eac [2];

  top_chk #(.NVEC(1000000)) u_chk (
    .clk(clk), .done(done), .checks(checks), .failures(failures),
    .n_cls(n_cls), .n_top(n_top), .n_eac(n_eac));

  initial begin
    repeat (2000000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    int f;
    @(posedge clk);
    wait (done);
    f = failures;
    $display("operand classes: plain=%0d y=2^n:%0d x=2^n:%0d both:%0d",
             n_cls[0], n_cls[1], n_cls[2], n_cls[3]);
    $display("results 2^n: %0d, end-around carry 0/1: %0d/%0d", n_top, n_eac[0], n_eac[1]);
    for (int c = 0; c < 4; c++)
      if (n_cls[c] == 0) begin f++; $display("FAIL operand class %0d never applied", c); end
    if (n_top == 0) begin f++; $display("FAIL no result of 2^n"); end
    if (n_eac[0] == 0 || n_eac[1] == 0) begin f++; $display("FAIL end-around carry not seen both ways"); end
    if (count_kind(16, CMP_72) != 2 || count_kind(16, CMP_52) != 1 || count_kind(16, CMP_32) != 2) begin
      f++; $display("FAIL reduction stage plan");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks + 1, f);
    $finish;
  end
endmodule
