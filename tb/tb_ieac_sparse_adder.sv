// tb_ieac_sparse_adder: self-check of the sparse-tree inverted end-around-
// carry adder at n = 16 (default), 8, 12 (three blocks), 32, and 32 with
// a sparseness of K = 8 (carries every 8th bit). Each size
// adds corner and random operand pairs and compares with
// (a + b + 1) mod (2^n + 1). Each size must see a result of 2^n and both
// values of the end-around carry.
module tb_ieac_sparse_adder;
  logic clk = 0;
  always #5 clk = ~clk;

  logic d16, d8, d12, d32, dk8;
  int ck8, fk8, tk8, w0k8, w1k8;
  int c16, c8, c12, c32, f16, f8, f12, f32;
  int t16, t8, t12, t32, w016, w08, w012, w032, w116, w18, w112, w132;
  int checks, failures;

  adder_chk #(.N(16), .NVEC(20000)) u16 (.clk(clk), .done(d16), .checks(c16), .failures(f16), .n_top(t16), .n_wrap0(w016), .n_wrap1(w116));
  adder_chk #(.N(8),  .NVEC(20000)) u8  (.clk(clk), .done(d8),  .checks(c8),  .failures(f8),  .n_top(t8),  .n_wrap0(w08),  .n_wrap1(w18));
  adder_chk #(.N(12), .NVEC(20000)) u12 (.clk(clk), .done(d12), .checks(c12), .failures(f12), .n_top(t12), .n_wrap0(w012), .n_wrap1(w112));
  adder_chk #(.N(32), .K(8), .NVEC(20000)) uk8 (.clk(clk), .done(dk8), .checks(ck8), .failures(fk8), .n_top(tk8), .n_wrap0(w0k8), .n_wrap1(w1k8));
  adder_chk #(.N(32), .NVEC(20000)) u32 (.clk(clk), .done(d32), .checks(c32), .failures(f32), .n_top(t32), .n_wrap0(w032), .n_wrap1(w132));

  initial begin
    repeat (100000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", c16 + c8 + c12 + c32, f16 + f8 + f12 + f32 + 1);
    $finish;
  end

  initial begin
    @(posedge clk);
    wait (d16 && d8 && d12 && d32 && dk8);
    checks   = c16 + c8 + c12 + c32 + ck8;
    failures = f16 + f8 + f12 + f32 + fk8;
    if (t16 == 0 || t8 == 0 || t12 == 0 || t32 == 0 || tk8 == 0) begin
      failures++; $display("FAIL a size never produced 2^n");
    end
    if (w016 == 0 || w116 == 0 || w032 == 0 || w132 == 0 || w0k8 == 0 || w1k8 == 0) begin
      failures++; $display("FAIL end-around carry not exercised both ways");
    end
    $display("results 2^n: %0d/%0d/%0d/%0d", t16, t8, t12, t32);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
