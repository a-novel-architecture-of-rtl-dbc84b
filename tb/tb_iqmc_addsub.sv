// tb_iqmc_addsub: checks every operation of the adder/subtractor against
// integer arithmetic, with random operands and with sums that must
// saturate at the 24-bit limits.
module tb_iqmc_addsub;
  import iqmc_pkg::*;
  addsub_op_e op;
  logic signed [23:0] a, b, y;
  int checks = 0, failures = 0, n_sat = 0;

  iqmc_addsub dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint ref_y(addsub_op_e o, longint x, longint z);
    longint r;
    case (o)
      OP_PASS_A: r = x;
      OP_PASS_B: r = z;
      OP_ADD:    r = z + x;
      OP_SUB:    r = z - x;
      default:   r = x - z;
    endcase
    if (r > 8388607)  r = 8388607;
    if (r < -8388608) r = -8388608;
    return r;
  endfunction

  initial begin
    for (int i = 0; i < 5000; i++) begin
      op = addsub_op_e'($urandom_range(4, 0));
      if (i % 10 == 0) begin
        a = ($urandom_range(1, 0) != 0) ? 24'sh7ffff0 : -24'sh7ffff0;
        b = ($urandom_range(1, 0) != 0) ? 24'sh7ffff0 : -24'sh7ffff0;
      end else begin
        a = 24'($urandom()); b = 24'($urandom());
      end
      #1;
      checks++;
      if (longint'(y) != ref_y(op, longint'(a), longint'(b))) begin
        failures++;
        $display("%s a=%0d b=%0d: y=%0d expected %0d", op.name(), a, b, y,
                 ref_y(op, longint'(a), longint'(b)));
      end
      if (op inside {OP_ADD, OP_SUB, OP_RSUB} && (y == 24'sh7fffff || y == -24'sh800000)) n_sat++;
    end
    checks++;
    if (n_sat == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
