// tb_iqmc_fifo3: checks that the three-register FIFO delays its input by
// exactly three enabled clock edges, holds while disabled, and clears on
// reset.
module tb_iqmc_fifo3;
  logic clk = 1'b0, rst_n, en;
  logic signed [23:0] din, dout;
  int checks = 0, failures = 0;
  logic signed [23:0] hist[$];

  iqmc_fifo3 dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0; en = 1'b0; din = '0;
    repeat (2) @(negedge clk);
    checks++;
    if (dout != 0) failures++;
    rst_n = 1'b1;
    hist = '{0, 0, 0};
    for (int i = 0; i < 1000; i++) begin
      @(negedge clk);
      en  = ($urandom_range(3, 0) != 0);
      din = 24'($urandom());
      if (en) hist.push_back(din);
      @(posedge clk); #1;
      if (en) void'(hist.pop_front());
      checks++;
      if (dout != hist[0]) begin
        failures++;
        $display("cycle %0d: dout=%0d expected %0d", i, dout, hist[0]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
