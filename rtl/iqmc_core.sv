// iqmc_core: inverse quantization and multichannel processing core for
// MPEG-2 audio Layer I/II decoding (one subband, five channels).
//
// One multiplier and two adder/subtractors form a two-stage pipeline
// (multiply into R0, then add into a FIFO), and five three-register FIFOs
// are the only data storage.  The same hardware is reused in three phases
// of one granule (15 samples = 5 channels x 3 samples):
//   Phase I   requantization      Q  = C*Q' + D'   (into the FIFO chain)
//   Phase II  rescaling           T  = SF*Q, with dynamic crosstalk (SF
//             of another channel), channel switching and dematrixing
//             accumulated in FIFO0/FIFO1 (see iqmc_dem_decode)
//   Phase III denormalisation     A  = A^w*N, sent out from R0
// The FIFO chain is FIFO0 -> FIFO1 -> FIFO2 -> FIFO3 -> FIFO4 -> multiplier.
// FIFO0 takes ADD/SUB0 (R0 + D' table, or R0 against FIFO0's own output),
// FIFO1 takes FIFO0 or ADD/SUB1 (R0 against FIFO1's output), FIFO2 takes
// FIFO1 or R0.  R0 also feeds the synthesis filter bank (out_*).
//
// Interface: in_valid/in_ready start a granule (see iqmc_ctrl); in_sample
// carries Q', the sample code with its MSB inverted read as a fraction in
// [-1, 1) with FRAC fraction bits, one per cycle in the order T0 s0..s2,
// T1 s0..s2, ... T4 s0..s2.  out_valid marks the 15 output samples, in the
// order of the channels in FIFO4, FIFO3, FIFO2, FIFO1, FIFO0 (s0..s2 each),
// with out_chan naming the audio channel.  Latency: first output 33 cycles
// after the first input, last one 47 cycles after it; one granule every 47
// cycles.  Synchronous active-low reset.
//
// The datapath and its connections follow the design.  Word format, table
// contents, the handshake, the reverse subtraction and the exact schedule
// are this implementation's choices.
module iqmc_core
  import iqmc_pkg::*;
#(
  parameter int unsigned FRAC = WORD_FRAC
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  output logic        in_ready,
  input  gran_info_t  in_info,
  input  word_t       in_sample,
  output logic        out_valid,
  output chan_e       out_chan,
  output word_t       out_sample
);

  logic       mpy_from_fifo, add0_b_dtab, f2_from_r0, fifo_en;
  tbl_e       tbl;
  logic [5:0] tbl_addr;
  logic [4:0] d_qclass;
  addsub_op_e add0_op, add1_op;
  f1_src_e    f1_src;

  word_t coef, opnd, r0, dprime;
  word_t add0_b, add0_y, add1_y;
  word_t fifo_din  [NCH];
  word_t fifo_dout [NCH];

  iqmc_ctrl u_ctrl (
    .clk, .rst_n, .in_valid, .in_info, .in_ready,
    .mpy_from_fifo, .tbl, .tbl_addr,
    .d_qclass, .add0_b_dtab, .add0_op, .add1_op, .f1_src, .f2_from_r0,
    .fifo_en, .out_valid, .out_chan, .cycle(), .busy()
  );

  iqmc_coef_rom #(.W(WORD_W), .FRAC(FRAC)) u_coef (
    .tbl, .addr(tbl_addr), .coef
  );

  assign opnd = mpy_from_fifo ? fifo_dout[4] : in_sample;

  iqmc_mpy #(.W(WORD_W), .FRAC(FRAC)) u_mpy (
    .clk, .rst_n, .coef, .opnd, .r0
  );

  iqmc_offset_rom #(.W(WORD_W), .FRAC(FRAC)) u_offset (
    .qclass(d_qclass), .dprime
  );

  assign add0_b = add0_b_dtab ? dprime : fifo_dout[0];

  iqmc_addsub #(.W(WORD_W)) u_add0 (.op(add0_op), .a(r0), .b(add0_b),       .y(add0_y));
  iqmc_addsub #(.W(WORD_W)) u_add1 (.op(add1_op), .a(r0), .b(fifo_dout[1]), .y(add1_y));

  always_comb begin
    fifo_din[0] = add0_y;
    fifo_din[1] = (f1_src == F1_ADD) ? add1_y : fifo_dout[0];
    fifo_din[2] = f2_from_r0 ? r0 : fifo_dout[1];
    fifo_din[3] = fifo_dout[2];
    fifo_din[4] = fifo_dout[3];
  end

  for (genvar f = 0; f < NCH; f++) begin : g_fifo
    iqmc_fifo3 #(.W(WORD_W)) u_fifo (
      .clk, .rst_n, .en(fifo_en), .din(fifo_din[f]), .dout(fifo_dout[f])
    );
  end

  assign out_sample = r0;

endmodule
