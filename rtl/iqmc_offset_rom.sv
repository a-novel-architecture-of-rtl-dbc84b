// iqmc_offset_rom: the D' table beside ADD/SUB0.
//
// Requantization Q = C*(Q' + D) is reordered to Q = C*Q' + D' with
// D' = C*D, so that the multiplication comes first as in the other two
// phases.  With steps(q) levels coded on bits(q) bits, C = 2**bits/steps and
// D = (2**bits - steps + 1) / 2**bits, hence D' = (2**bits - steps + 1) /
// steps.  The table holds D' for quantization classes 0..16 as W-bit words
// with FRAC fraction bits, rounded to nearest; other addresses read 0.
//
// Timing: combinational read, used by ADD/SUB0 one cycle after the
// multiplier used C of the same class.  The reordering and the separate
// table are the design's; the values follow the MPEG audio standards.
module iqmc_offset_rom
  import iqmc_pkg::*;
#(
  parameter int unsigned W    = 24,
  parameter int unsigned FRAC = 20
) (
  input  logic [4:0]          qclass,
  output logic signed [W-1:0] dprime
);

  `include "iqmc_qclass.svh"

  function automatic longint dp_value(input int q);
    longint two_b;
    two_b = longint'(1) << qc_bits(q);
    return qc_div_round((two_b - qc_steps(q) + 1) << FRAC, qc_steps(q));
  endfunction

  logic signed [W-1:0] rom [NQCLASS];

  for (genvar q = 0; q < NQCLASS; q++) begin : g_rom
    assign rom[q] = W'(dp_value(q));
  end

  assign dprime = (qclass < 5'(NQCLASS)) ? rom[qclass] : '0;

endmodule
