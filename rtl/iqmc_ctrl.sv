// iqmc_ctrl: hard-wired sequencer of the IQ/MC core.
//
// No program memory: a cycle counter c = 0..46 walks one granule through
// the three phases, and every select and table address is decoded from c
// and the granule's side information.  With T_k the transmission channel k
// and "stage 1" the multiplier, "stage 2" the ADD/SUB units and FIFOs:
//   c  0..14  stage 1: Q'(c) * C[class]          (Phase I, ReC)
//   c  1..15  stage 2: FIFO0 <- R0 + D', chain shifts toward FIFO4
//   c 16..30  stage 1: FIFO4 * SF[sf_idx]        (Phase II, ReS + DC)
//   c 17..31  stage 2: R0 holds T_k, k=(c-17)/3; FIFO0/FIFO1 accumulate the
//             dematrixing sums, FIFO2..4 collect T2..T4 (DTCS + DeM);
//             FIFO1 leaves the chain at c=20, FIFO2 takes R0 from c=23, each
//             once the last Phase I sample has passed it
//   c 32..46  stage 1: FIFO4 * N[channel]        (Phase III, DeN)
// c = 15 and c = 31 are the two pipeline bubbles, so a granule of 15
// samples takes 47 cycles and granules follow each other every 47 cycles.
//
// Interface: the core is idle (in_ready = 1) between granules.  A granule
// starts on a cycle with in_valid = 1 while idle; in_info is taken in that
// cycle and the sample source must then keep in_valid high for the next 14
// cycles (assertion below).  Dynamic crosstalk substitutes the scale
// factor: channel y uses the index of channel sf_src[y] (values above 4
// select the channel's own index).
// Outputs are decoded from the counter (combinational), except out_valid
// and out_chan, which are registered to line up with R0 (Phase III results
// are valid in R0 one cycle after their multiplication: c = 33..47).
//
// The phase schedule, the 47-cycle period and the FIFO data flow follow the
// design; the exact cycle of every select, the handshake and the crosstalk
// encoding are this implementation's choices.
module iqmc_ctrl
  import iqmc_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  input  gran_info_t in_info,
  output logic       in_ready,
  // stage 1
  output logic       mpy_from_fifo, // multiplier operand: 0 input sample, 1 FIFO4
  output tbl_e       tbl,
  output logic [5:0] tbl_addr,
  // stage 2
  output logic [4:0] d_qclass,      // D' table address
  output logic       add0_b_dtab,   // ADD/SUB0 operand B: 1 D' table, 0 FIFO0
  output addsub_op_e add0_op,
  output addsub_op_e add1_op,
  output f1_src_e    f1_src,
  output logic       f2_from_r0,    // FIFO2 input: 1 R0, 0 FIFO1
  output logic       fifo_en,
  // result in R0
  output logic       out_valid,
  output chan_e      out_chan,
  // status
  output logic [5:0] cycle,         // c of the current cycle
  output logic       busy
);

  logic [5:0]  cnt;
  logic        start;
  logic [5:0]  c;
  gran_info_t  info_q;
  logic [NCH-1:0][4:0] qclass_cur;
  dem_prog_t   prog;
  logic        p1, p2, p3, s1, s2;
  logic [2:0]  ch1, ch2, grp3, ch_s1, k2;
  logic [2:0]  src;
  logic [2:0]  fsel;

  iqmc_dem_decode u_dem (
    .tc_alloc (info_q.tc_alloc),
    .dematrix (info_q.dematrix),
    .prog     (prog)
  );

  assign in_ready = !busy;
  assign start    = !busy && in_valid;
  assign c        = busy ? cnt : 6'd0;
  assign cycle    = c;
  assign qclass_cur = start ? in_info.qclass : info_q.qclass;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy   <= 1'b0;
      cnt    <= '0;
      info_q <= '0;
    end else if (start) begin
      busy   <= 1'b1;
      cnt    <= 6'd1;
      info_q <= in_info;
    end else if (busy) begin
      if (cnt == 6'(PERIOD - 1)) begin
        busy <= 1'b0;
        cnt  <= '0;
      end else begin
        cnt <= cnt + 6'd1;
      end
    end
  end

  // phase decode
  always_comb begin
    p1 = (start || busy) && (c <= 6'd14);
    p2 = busy && (c >= 6'd16) && (c <= 6'd30);
    p3 = busy && (c >= 6'd32) && (c <= 6'd46);
    s1 = busy && (c >= 6'd1)  && (c <= 6'd15);
    s2 = busy && (c >= 6'd17) && (c <= 6'd31);
    ch1   = 3'(c / 6'd3);
    ch2   = 3'((c - 6'd16) / 6'd3);
    grp3  = 3'((c - 6'd32) / 6'd3);
    ch_s1 = 3'((c - 6'd1) / 6'd3);
    k2    = 3'((c - 6'd17) / 6'd3);
  end

  // stage 1: multiplier operand and coefficient table
  always_comb begin
    mpy_from_fifo = !p1;
    tbl           = TBL_C;
    tbl_addr      = '0;
    src           = '0;
    fsel          = '0;
    if (p1) begin
      tbl      = TBL_C;
      tbl_addr = {1'b0, qclass_cur[ch1]};
    end else if (p2) begin
      src      = (info_q.sf_src[ch2] <= 3'd4) ? info_q.sf_src[ch2] : ch2;
      tbl      = TBL_SF;
      tbl_addr = info_q.sf_idx[src];
    end else if (p3) begin
      fsel     = 3'd4 - grp3;
      tbl      = TBL_N;
      tbl_addr = {1'b0, info_q.dematrix, prog.tag[fsel]};
    end
  end

  // stage 2: ADD/SUB operations and FIFO sources
  always_comb begin
    d_qclass    = info_q.qclass[ch_s1];
    add0_b_dtab = 1'b0;
    add0_op     = OP_PASS_A;
    add1_op     = OP_PASS_B;
    f1_src      = F1_CHAIN;
    f2_from_r0  = 1'b0;
    fifo_en     = busy || start;
    if (s1) begin
      add0_b_dtab = 1'b1;
      add0_op     = OP_ADD;
    end else if (s2) begin
      add0_op    = prog.op0[k2];
      add1_op    = prog.op1[k2];
      f1_src     = (c >= 6'd20) ? prog.f1src[k2] : F1_CHAIN;
      f2_from_r0 = (c >= 6'd23);
    end
  end

  // R0 output valid and channel tag, aligned with R0
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_chan  <= CH_L;
    end else begin
      out_valid <= p3;
      out_chan  <= p3 ? prog.tag[3'd4 - grp3] : CH_L;
    end
  end

  // A granule's 15 samples arrive on consecutive cycles.
  a_samples_back_to_back: assert property (
    @(posedge clk) disable iff (!rst_n) (busy && cnt >= 6'd1 && cnt <= 6'd14) |-> in_valid
  ) else $error("iqmc_ctrl: sample missing in cycle %0d of a granule", cnt);

endmodule
