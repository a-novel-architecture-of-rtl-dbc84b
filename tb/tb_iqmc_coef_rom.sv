// tb_iqmc_coef_rom: checks every entry of the coefficient table against
// values computed here in floating point and rounded to 20 fraction bits:
// C = 2**bits/steps, SF = 2**(1-i/3) (mantissa rounded, then shifted as
// the table is specified), N = 1/alpha, 1/(alpha*beta), 1/(alpha*gamma) of
// the MPEG-2 dematrix procedures.  Unused addresses must read 0.
module tb_iqmc_coef_rom;
  import iqmc_pkg::*;
  tbl_e tbl;
  logic [5:0] addr;
  logic signed [23:0] coef;
  int checks = 0, failures = 0;

  iqmc_coef_rom dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint rnd(real v);
    return longint'($floor(v + 0.5));
  endfunction

  task automatic chk(tbl_e t, int a, longint e);
    tbl = t; addr = 6'(a);
    #1;
    checks++;
    if (longint'(coef) != e) begin
      failures++;
      $display("%s[%0d] = %0d, expected %0d", t.name(), a, coef, e);
    end
  endtask

  initial begin
    int steps[17] = '{3, 5, 7, 9, 15, 31, 63, 127, 255, 511, 1023, 2047, 4095,
                      8191, 16383, 32767, 65535};
    int bits[17]  = '{2, 3, 3, 4, 4, 5, 6, 7, 8, 9, 10, 11, 12, 13, 14, 15, 16};
    real s2, n;
    s2 = $sqrt(2.0);
    for (int q = 0; q < 17; q++) chk(TBL_C, q, rnd((2.0 ** bits[q]) / steps[q] * 1048576.0));
    for (int q = 17; q < 64; q++) chk(TBL_C, q, 0);
    // spot values of the standard's tables
    chk(TBL_C, 0, 1398101);   // 1.33333333
    chk(TBL_C, 3, 1864135);   // 1.77777777
    for (int i = 0; i < 63; i++)
      chk(TBL_SF, i, rnd((2.0 ** (1.0 - (i % 3) / 3.0)) * 1048576.0) >>> (i / 3));
    chk(TBL_SF, 63, 0);
    chk(TBL_SF, 0, 2097152);  // 2.0
    chk(TBL_SF, 3, 1048576);  // 1.0
    for (int p = 0; p < 4; p++)
      for (int c = 0; c < 8; c++) begin
        real a, b, g;
        case (p)
          1:       begin a = 1.0 / (1.5 + 0.5 * s2); b = 1.0 / s2; g = 0.5; end
          3:       begin a = 1.0; b = 1.0; g = 1.0; end
          default: begin a = 1.0 / (1.0 + s2); b = 1.0 / s2; g = 1.0 / s2; end
        endcase
        if (c <= 1)      n = 1.0 / a;
        else if (c == 2) n = 1.0 / (a * b);
        else if (c <= 4) n = 1.0 / (a * g);
        else             n = 0.0;
        chk(TBL_N, p * 8 + c, rnd(n * 1048576.0));
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
