// tb_iqmc_mpy: checks the multiplier and R0 register.
// Random and corner operands (including products that overflow 24 bits in
// both directions); R0 must hold (coef*opnd) >> 20, rounded toward minus
// infinity and saturated, exactly one clock edge after the operands.
module tb_iqmc_mpy;
  logic clk = 1'b0, rst_n;
  logic signed [23:0] coef, opnd, r0;
  int checks = 0, failures = 0;
  int n_sat = 0;

  iqmc_mpy dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint expect_p(longint a, longint b);
    longint p;
    p = (a * b) >>> 20;
    if (p > 8388607)  p = 8388607;
    if (p < -8388608) p = -8388608;
    return p;
  endfunction

  task automatic apply(longint a, longint b);
    longint e;
    @(negedge clk);
    coef = 24'(a); opnd = 24'(b);
    e = expect_p(longint'(coef), longint'(opnd));
    if (((longint'(coef) * longint'(opnd)) >>> 20) != e) n_sat++;
    @(posedge clk); #1;
    checks++;
    if (longint'(r0) != e) begin
      failures++;
      $display("mpy %0d * %0d: got %0d expected %0d", coef, opnd, r0, e);
    end
  endtask

  initial begin
    rst_n = 1'b0; coef = '0; opnd = '0;
    repeat (2) @(negedge clk);
    checks++;
    if (r0 != 0) failures++;
    rst_n = 1'b1;
    apply(1 << 20, 1 << 20);                 // 1.0 * 1.0
    apply(-(1 << 20), 3 << 19);              // -1.0 * 1.5
    apply(24'h7fffff, 24'h7fffff);           // positive overflow
    apply(-8388608, 8388607);                // negative overflow
    apply(-8388608, -8388608);
    apply(3, -1);                            // tiny negative product floors
    for (int i = 0; i < 2000; i++)
      apply(longint'($signed(24'($urandom()))) >>> ($urandom_range(8, 0)),
            longint'($signed(24'($urandom()))) >>> ($urandom_range(8, 0)));
    checks++;
    if (n_sat == 0) begin failures++; $display("saturation never exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
