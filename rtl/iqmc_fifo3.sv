// iqmc_fifo3: one FIFO of the distributed register file, three registers
// in a row.
//
// Each enabled clock edge shifts `din` into the first register and the
// contents one place on; `dout` is the third register.  Because a granule
// holds three samples per channel, a FIFO holds exactly one channel's
// samples, and a value leaving `dout` and fed back to `din` returns after
// three cycles.  Five of these, chained FIFO0 -> FIFO4, are the core's only
// data storage.
//
// Timing: a value written at edge n appears on `dout` after edge n+2 (the
// third register).  `rst_n` (active low, synchronous) clears the registers;
// the reset is this implementation's choice.
module iqmc_fifo3 #(
  parameter int unsigned W     = 24,
  parameter int unsigned DEPTH = 3
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                en,
  input  logic signed [W-1:0] din,
  output logic signed [W-1:0] dout
);

  logic signed [W-1:0] r [DEPTH];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < DEPTH; i++) r[i] <= '0;
    end else if (en) begin
      r[0] <= din;
      for (int i = 1; i < DEPTH; i++) r[i] <= r[i-1];
    end
  end

  assign dout = r[DEPTH-1];

endmodule
