// tb_iqmc_offset_rom: checks D' = C*D of every quantization class against
// floating-point values (C = 2**bits/steps, D = 1 - (steps-1)/2**bits),
// rounded to 20 fraction bits, plus spot values of the standard's D
// column times C; unused classes read 0.
module tb_iqmc_offset_rom;
  logic [4:0] qclass;
  logic signed [23:0] dprime;
  int checks = 0, failures = 0;

  iqmc_offset_rom dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(int q, longint e);
    qclass = 5'(q);
    #1;
    checks++;
    if (longint'(dprime) != e) begin
      failures++;
      $display("D'[%0d] = %0d, expected %0d", q, dprime, e);
    end
  endtask

  initial begin
    int steps[17] = '{3, 5, 7, 9, 15, 31, 63, 127, 255, 511, 1023, 2047, 4095,
                      8191, 16383, 32767, 65535};
    int bits[17]  = '{2, 3, 3, 4, 4, 5, 6, 7, 8, 9, 10, 11, 12, 13, 14, 15, 16};
    for (int q = 0; q < 17; q++) begin
      real c, d;
      c = (2.0 ** bits[q]) / steps[q];
      d = 1.0 - (steps[q] - 1) / (2.0 ** bits[q]);
      chk(q, longint'($floor(c * d * 1048576.0 + 0.5)));
    end
    chk(0, 699051);   // 4/3 * 0.5
    chk(1, 838861);   // 1.6 * 0.5
    chk(2, 299593);   // 8/7 * 0.25
    chk(3, 932068);   // 16/9 * 0.5
    for (int q = 17; q < 32; q++) chk(q, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
