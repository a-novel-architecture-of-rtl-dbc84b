// iqmc_addsub: adder/subtractor of the second pipeline stage.
//
// Operand A is always the R0 register (the multiplier result).  Operand B
// is the second input: the D' table for ADD/SUB0 in Phase I, otherwise the
// output of the unit's own FIFO fed back, so that a value recirculating
// through a three-register FIFO meets the next channel's sample of the same
// time slot three cycles later.  The operation (iqmc_pkg::addsub_op_e)
// selects A, B, B+A, B-A or A-B; the result is saturated to W bits.
//
// Timing: purely combinational; the result is written into the first
// register of the unit's FIFO at the next clock edge.  Two such units are
// in the design; the reverse subtraction A-B and the saturation are this
// implementation's additions (A-B lets the dependent dematrixing modes
// start a sum from the copied value, see iqmc_dem_decode).
module iqmc_addsub
  import iqmc_pkg::*;
#(
  parameter int unsigned W = 24
) (
  input  addsub_op_e          op,
  input  logic signed [W-1:0] a,
  input  logic signed [W-1:0] b,
  output logic signed [W-1:0] y
);

  localparam logic signed [W:0] MAXV = (W+1)'(2**(W-1) - 1);
  localparam logic signed [W:0] MINV = -(W+1)'(2**(W-1));

  logic signed [W:0] wide;

  always_comb begin
    unique case (op)
      OP_PASS_A: wide = (W+1)'(a);
      OP_PASS_B: wide = (W+1)'(b);
      OP_ADD:    wide = (W+1)'(b) + (W+1)'(a);
      OP_SUB:    wide = (W+1)'(b) - (W+1)'(a);
      OP_RSUB:   wide = (W+1)'(a) - (W+1)'(b);
      default:   wide = '0;
    endcase
    if (wide > MAXV)      y = MAXV[W-1:0];
    else if (wide < MINV) y = MINV[W-1:0];
    else                  y = wide[W-1:0];
  end

endmodule
