// tb_iqmc_ctrl: checks the 47-cycle schedule of the sequencer cycle by
// cycle: multiplier operand and table (C in cycles 0..14, SF in 16..30 with
// the crosstalk source's index, N in 32..46), the D' phase (1..15), the
// dematrixing selects (17..31, FIFO1 joining at 20, FIFO2 taking R0 from
// 23), the output valid window (33..47) and the handshake.  Two granules
// run back to back (period 47), then one after an idle gap.  The side
// information on in_info is scrambled after the first cycle to show that it
// is latched.  Expected operations per group come from the dematrixing
// decoder inside the controller, which has its own testbench.
module tb_iqmc_ctrl;
  import iqmc_pkg::*;
  logic       clk = 1'b0, rst_n, in_valid, in_ready;
  gran_info_t in_info;
  logic       mpy_from_fifo, add0_b_dtab, f2_from_r0, fifo_en, out_valid, busy;
  tbl_e       tbl;
  logic [5:0] tbl_addr, cycle;
  logic [4:0] d_qclass;
  addsub_op_e add0_op, add1_op;
  f1_src_e    f1_src;
  chan_e      out_chan;
  int checks = 0, failures = 0;
  int n_valid = 0, n_xtalk = 0;
  longint cyc = 0, start_cyc[$];

  iqmc_ctrl dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(string what, int c, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("c=%0d %s: got %0d expected %0d", c, what, got, exp);
    end
  endtask

  function automatic gran_info_t rand_info();
    gran_info_t gi;
    gi = gran_info_t'({$urandom(), $urandom(), $urandom()});
    for (int ch = 0; ch < 5; ch++) begin
      gi.qclass[ch] = 5'($urandom_range(16, 0));
      gi.sf_idx[ch] = 6'($urandom_range(62, 0));
      gi.sf_src[ch] = ($urandom_range(2, 0) == 0) ? 3'($urandom_range(7, 0)) : 3'(ch);
    end
    return gi;
  endfunction

  // run one granule and check all outputs in each of its 47 cycles
  task automatic granule(gran_info_t gi);
    dem_prog_t p;
    for (int c = 0; c < 47; c++) begin
      in_valid = (c < 15);
      in_info  = (c == 0) ? gi : rand_info();
      #1;
      if (c == 0) begin
        expect_eq("in_ready", c, in_ready, 1);
        start_cyc.push_back(cyc);
      end else expect_eq("in_ready", c, in_ready, 0);
      expect_eq("cycle", c, cycle, c);
      p = dut.prog;
      // stage 1
      if (c <= 14) begin
        expect_eq("mpy_from_fifo", c, mpy_from_fifo, 0);
        expect_eq("tbl", c, tbl, TBL_C);
        expect_eq("addr C", c, tbl_addr, gi.qclass[c/3]);
      end else if (c >= 16 && c <= 30) begin
        int ch, s;
        ch = (c - 16) / 3;
        s  = (gi.sf_src[ch] <= 4) ? int'(gi.sf_src[ch]) : ch;
        if (s != ch) n_xtalk++;
        expect_eq("mpy_from_fifo", c, mpy_from_fifo, 1);
        expect_eq("tbl", c, tbl, TBL_SF);
        expect_eq("addr SF", c, tbl_addr, gi.sf_idx[s]);
      end else if (c >= 32) begin
        expect_eq("mpy_from_fifo", c, mpy_from_fifo, 1);
        expect_eq("tbl", c, tbl, TBL_N);
        expect_eq("addr N", c, tbl_addr, {gi.dematrix, p.tag[4 - (c - 32) / 3]});
      end
      // stage 2
      if (c >= 1 && c <= 15) begin
        expect_eq("add0_b_dtab", c, add0_b_dtab, 1);
        expect_eq("add0_op", c, add0_op, OP_ADD);
        expect_eq("d_qclass", c, d_qclass, gi.qclass[(c-1)/3]);
        expect_eq("f1_src", c, f1_src, F1_CHAIN);
        expect_eq("f2_from_r0", c, f2_from_r0, 0);
      end else if (c >= 17 && c <= 31) begin
        int k;
        k = (c - 17) / 3;
        expect_eq("add0_b_dtab", c, add0_b_dtab, 0);
        expect_eq("add0_op", c, add0_op, p.op0[k]);
        expect_eq("f1_src", c, f1_src, (c < 20) ? F1_CHAIN : p.f1src[k]);
        if (c >= 20 && p.f1src[k] == F1_ADD) expect_eq("add1_op", c, add1_op, p.op1[k]);
        expect_eq("f2_from_r0", c, f2_from_r0, c >= 23);
      end else if (c >= 32) begin
        expect_eq("f1_src", c, f1_src, F1_CHAIN);
        expect_eq("f2_from_r0", c, f2_from_r0, 0);
      end
      expect_eq("fifo_en", c, fifo_en, 1);
      // R0 results of Phase III are valid in cycles 33..47
      if (c > 0) expect_eq("out_valid", c, out_valid, (c >= 33));
      if (c >= 33) begin
        n_valid++;
        expect_eq("out_chan", c, out_chan, p.tag[4 - (c - 33) / 3]);
      end
      @(negedge clk);
    end
    // cycle 47 (idle, or cycle 0 of the next granule): last output
    #1;
    expect_eq("out_valid", 47, out_valid, 1);
    n_valid++;
  endtask

  initial begin
    gran_info_t g;
    rst_n = 1'b0; in_valid = 1'b0; in_info = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    #1;
    expect_eq("idle in_ready", -1, in_ready, 1);
    expect_eq("idle busy", -1, busy, 0);
    @(negedge clk);
    for (int i = 0; i < 12; i++) begin
      g = rand_info();
      g.dematrix = 2'(i % 4);
      g.tc_alloc = 3'(i % 8);
      granule(g);
      if (i % 3 == 2) begin
        in_valid = 1'b0;
        @(negedge clk);
        #1;
        expect_eq("idle busy", -1, busy, 0);
        expect_eq("idle out_valid", -1, out_valid, 0);
        @(negedge clk);
      end
    end
    checks++;
    if (start_cyc[1] - start_cyc[0] != 47) begin
      failures++;
      $display("back-to-back period %0d, expected 47", start_cyc[1] - start_cyc[0]);
    end
    checks++;
    if (n_valid != 12 * 15 || n_xtalk == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
