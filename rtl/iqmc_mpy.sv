// iqmc_mpy: the core's only multiplier followed by the pipeline register R0.
//
// This is stage 1 of the two-stage pipeline.  Every cycle it multiplies the
// table coefficient `coef` by the operand `opnd` (an input sample in
// Phase I, the FIFO4 output in Phases II and III) and stores the product in
// R0.  Both operands and the result are W-bit two's complement fixed point
// with FRAC fraction bits; the full product is shifted right by FRAC
// (rounding toward minus infinity) and saturated to W bits.
//
// Timing: `r0` holds coef*opnd one clock edge after the operands are
// presented.  R0 is loaded every cycle; `rst_n` (active low, synchronous)
// clears it.  The single shared multiplier and the register named R0 are
// the design's; the fixed-point scaling and saturation are this
// implementation's choices.
module iqmc_mpy #(
  parameter int unsigned W    = 24,
  parameter int unsigned FRAC = 20
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic signed [W-1:0] coef,
  input  logic signed [W-1:0] opnd,
  output logic signed [W-1:0] r0
);

  localparam logic signed [2*W-1:0] MAXV = (2*W)'(2**(W-1) - 1);
  localparam logic signed [2*W-1:0] MINV = -(2*W)'(2**(W-1));

  logic signed [2*W-1:0] prod;
  logic signed [2*W-1:0] scaled;
  logic signed [W-1:0]   prod_sat;

  always_comb begin
    prod   = (2*W)'(coef) * (2*W)'(opnd);
    scaled = prod >>> FRAC;
    if (scaled > MAXV)      prod_sat = MAXV[W-1:0];
    else if (scaled < MINV) prod_sat = MINV[W-1:0];
    else                    prod_sat = scaled[W-1:0];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) r0 <= '0;
    else        r0 <= prod_sat;
  end

endmodule
