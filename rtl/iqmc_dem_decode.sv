// iqmc_dem_decode: dematrixing programme for one granule.
//
// Dynamic transmission channel switching (tc_allocation) decides which
// audio channels travel in T2..T4, and dematrixing rebuilds the two
// remaining ones from the compatible channels L0 = T0 and R0 = T1:
//     X = L0 - T2 - T3,   Y = R0 - T2 - T4   (in weighted channels).
// In modes 1, 2, 6 and 7 one of X, Y is the centre channel and the other
// depends on it.  Those sums are decomposed into independent sequences of
// additions and subtractions of T0..T4, so that the two accumulators
// (ADD/SUB0 + FIFO0 and ADD/SUB1 + FIFO1) can consume T0..T4 in the fixed
// order in which they leave R0:
//   pattern A (modes 0,3,4,5): FIFO0 = L0-T2-T3,          FIFO1 = R0-T2-T4
//   pattern B (modes 2,6)    : FIFO0 = L0-R0+T2-T3+T4,    FIFO1 = R0-T2-T4
//   pattern C (modes 1,7)    : FIFO0 = R0-L0+T2+T3-T4,    FIFO1 = L0-T2-T3
// FIFO1 cannot see T0 (it is still draining Phase I data then), so in
// pattern C it receives L0 by a copy from FIFO0 while FIFO0 turns into
// R0-L0.  T2, T3, T4 themselves end in FIFO4, FIFO3, FIFO2.
// Dematrix procedure 3 (no matrixing, also 2-channel MPEG-1 use) leaves
// FIFO0 = T0 and FIFO1 = T1.
//
// Output `prog.tag[f]` is the audio channel left in FIFO f, used for the
// N table and as the channel tag of each output sample.
// Some fields are the same in every mode (T0 is always loaded into FIFO0,
// FIFO1 always takes the chain during T0); they are kept in the programme so
// that it describes all five groups uniformly.
// Combinational.  The decomposition idea and the FIFO roles are the
// design's (its example is mode 2); the mode-to-channel table follows the
// MPEG-2 standard for the 3/2 configuration; patterns A and C and the copy
// path are worked out here.
module iqmc_dem_decode
  import iqmc_pkg::*;
(
  input  logic [2:0] tc_alloc,
  input  logic [1:0] dematrix,
  output dem_prog_t  prog
);

  typedef enum logic [1:0] {PAT_NONE, PAT_A, PAT_B, PAT_C} pat_e;

  pat_e pat;

  always_comb begin
    // channel placement: tag[4] = T2, tag[3] = T3, tag[2] = T4,
    // tag[1] = FIFO1 result, tag[0] = FIFO0 result
    pat = PAT_A;
    prog.tag[4] = CH_C;  prog.tag[3] = CH_LS; prog.tag[2] = CH_RS;
    prog.tag[1] = CH_R;  prog.tag[0] = CH_L;
    if (dematrix == 2'd3) begin
      pat = PAT_NONE;
    end else begin
      unique case (tc_alloc)
        3'd0: begin pat = PAT_A; end
        3'd1: begin pat = PAT_C; prog.tag[4] = CH_L; prog.tag[0] = CH_R;  prog.tag[1] = CH_C;  end
        3'd2: begin pat = PAT_B; prog.tag[4] = CH_R; prog.tag[0] = CH_L;  prog.tag[1] = CH_C;  end
        3'd3: begin pat = PAT_A; prog.tag[3] = CH_L; prog.tag[0] = CH_LS; prog.tag[1] = CH_R;  end
        3'd4: begin pat = PAT_A; prog.tag[2] = CH_R; prog.tag[0] = CH_L;  prog.tag[1] = CH_RS; end
        3'd5: begin pat = PAT_A; prog.tag[3] = CH_L; prog.tag[2] = CH_R;
                    prog.tag[0] = CH_LS; prog.tag[1] = CH_RS; end
        3'd6: begin pat = PAT_B; prog.tag[4] = CH_R; prog.tag[3] = CH_L;
                    prog.tag[0] = CH_LS; prog.tag[1] = CH_C; end
        3'd7: begin pat = PAT_C; prog.tag[4] = CH_L; prog.tag[2] = CH_R;
                    prog.tag[0] = CH_RS; prog.tag[1] = CH_C; end
        default: ;
      endcase
    end

    // k:                 T0         T1         T2         T3         T4
    prog.f1src = {F1_ADD,   F1_ADD,    F1_ADD,    F1_ADD,    F1_CHAIN};
    unique case (pat)
      PAT_A: begin
        prog.op0 = {OP_PASS_B, OP_SUB,    OP_SUB,    OP_PASS_B, OP_PASS_A};
        prog.op1 = {OP_SUB,    OP_PASS_B, OP_SUB,    OP_PASS_A, OP_PASS_A};
      end
      PAT_B: begin
        prog.op0 = {OP_ADD,    OP_SUB,    OP_ADD,    OP_SUB,    OP_PASS_A};
        prog.op1 = {OP_SUB,    OP_PASS_B, OP_SUB,    OP_PASS_A, OP_PASS_A};
      end
      PAT_C: begin
        prog.op0 = {OP_SUB,    OP_ADD,    OP_ADD,    OP_RSUB,   OP_PASS_A};
        prog.op1 = {OP_PASS_B, OP_SUB,    OP_SUB,    OP_PASS_A, OP_PASS_A};
        prog.f1src[1] = F1_CHAIN;   // A_y^w <- A_x^w: copy L0 from FIFO0
      end
      default: begin  // no dematrixing
        prog.op0 = {OP_PASS_B, OP_PASS_B, OP_PASS_B, OP_PASS_B, OP_PASS_A};
        prog.op1 = {OP_PASS_B, OP_PASS_B, OP_PASS_B, OP_PASS_A, OP_PASS_A};
      end
    endcase
  end

endmodule
