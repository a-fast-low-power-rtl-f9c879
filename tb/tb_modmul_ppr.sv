// tb_modmul_ppr: self-check of the compressor reduction array at n = 16
// (default: 7:2, 7:2, 5:2, 3:2, 3:2), 8 (7:2, 3:2, 3:2), 12 (7:2, 5:2, 4:2,
// 3:2) and 4 (4:2, 3:2), so every compressor kind is used. The stage plan of
// each size is checked against the expected compressor counts.
module tb_modmul_ppr;
  import modmul_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;

  logic d16, d8, d12, d4;
  int c16, c8, c12, c4, f16, f8, f12, f4;
  int checks, failures;

  ppr_chk #(.N(16), .NVEC(20000)) u16 (.clk(clk), .done(d16), .checks(c16), .failures(f16));
  ppr_chk #(.N(8),  .NVEC(20000)) u8  (.clk(clk), .done(d8),  .checks(c8),  .failures(f8));
  ppr_chk #(.N(12), .NVEC(20000)) u12 (.clk(clk), .done(d12), .checks(c12), .failures(f12));
  ppr_chk #(.N(4),  .NVEC(20000)) u4  (.clk(clk), .done(d4),  .checks(c4),  .failures(f4));

  task automatic plan(int n, int e72, int e52, int e42, int e32);
    checks++;
    if (count_kind(n, CMP_72) != e72 || count_kind(n, CMP_52) != e52 ||
        count_kind(n, CMP_42) != e42 || count_kind(n, CMP_32) != e32) begin
      failures++;
      $display("FAIL stage plan n=%0d", n);
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", c16 + c8 + c12 + c4, f16 + f8 + f12 + f4 + 1);
    $finish;
  end

  initial begin
    @(posedge clk);
    wait (d16 && d8 && d12 && d4);
    checks   = c16 + c8 + c12 + c4;
    failures = f16 + f8 + f12 + f4;
    plan(16, 2, 1, 0, 2);
    plan(8, 1, 0, 0, 2);
    plan(12, 1, 1, 1, 1);
    plan(4, 0, 0, 1, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
