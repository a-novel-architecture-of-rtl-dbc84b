// iqmc_coef_rom: the coefficient table in front of the multiplier.
//
// It holds the three coefficient sets the multiplier uses, one per phase:
//   TBL_C  : requantization factor C = 2**bits / steps of quantization
//            class addr (0..16), used in Phase I (Q = C*Q' + D').
//   TBL_SF : scale factor 2**(1 - addr/3) of index addr (0..62), used in
//            Phase II (T = SF*Q).  It is built as a three-entry mantissa
//            {2, 2**(2/3), 2**(1/3)} selected by addr mod 3 and shifted right
//            by addr div 3.
//   TBL_N  : combined weighting and denormalisation factor N, used in
//            Phase III (A = A^w * N).  addr[4:3] is the dematrix procedure
//            and addr[2:0] the audio channel (iqmc_pkg::chan_e).  N = 1/alpha
//            for L and R, 1/(alpha*beta) for C, 1/(alpha*gamma) for LS and
//            RS, with (alpha, beta, gamma) of MPEG-2 procedure 0/2:
//            (1/(1+sqrt2), 1/sqrt2, 1/sqrt2), procedure 1:
//            (1/(1.5+0.5*sqrt2), 1/sqrt2, 1/2), procedure 3: all ones.
// Unused addresses read 0.  All values are W-bit words with FRAC fraction
// bits, computed at elaboration and rounded to nearest.
//
// Timing: combinational read; the multiplier registers the product.
// That C, SF and N come from ROM tables is the design's; the table contents
// follow the MPEG audio standards, and the address layout is this
// implementation's choice.
module iqmc_coef_rom
  import iqmc_pkg::*;
#(
  parameter int unsigned W    = 24,
  parameter int unsigned FRAC = 20
) (
  input  tbl_e                tbl,
  input  logic [5:0]          addr,
  output logic signed [W-1:0] coef
);

  `include "iqmc_qclass.svh"

  // 2**(1 - r/3) for r = 0, 1, 2, in FRAC-bit fixed point (20 bits:
  // 2097152, 1664511, 1321123).
  function automatic longint sf_mant(input int r);
    case (r)
      0:       return longint'(2) << FRAC;
      1:       return qc_div_round(longint'(1587401052) << FRAC, 1000000000);
      default: return qc_div_round(longint'(1259921050) << FRAC, 1000000000);
    endcase
  endfunction

  function automatic longint c_value(input int q);
    return qc_div_round(longint'(1) << (qc_bits(q) + FRAC), qc_steps(q));
  endfunction

  function automatic longint sf_value(input int i);
    return sf_mant(i % 3) >> (i / 3);
  endfunction

  // N in units of 1e-9, then scaled to fixed point.
  function automatic longint n_value(input int proc, input int ch);
    longint n9;
    case (proc)
      1: n9 = (ch <= 1) ? 64'd2207106781 : (ch == 2) ? 64'd3121320344 : 64'd4414213562;
      3: n9 = 64'd1000000000;
      default: n9 = (ch <= 1) ? 64'd2414213562 : 64'd3414213562;
    endcase
    if (ch > 4) return 0;
    return qc_div_round(n9 << FRAC, 1000000000);
  endfunction

  logic signed [W-1:0] c_rom  [NQCLASS];
  logic signed [W-1:0] sf_rom [NSF];
  logic signed [W-1:0] n_rom  [32];

  for (genvar q = 0; q < NQCLASS; q++) begin : g_c
    assign c_rom[q] = W'(c_value(q));
  end
  for (genvar i = 0; i < NSF; i++) begin : g_sf
    assign sf_rom[i] = W'(sf_value(i));
  end
  for (genvar j = 0; j < 32; j++) begin : g_n
    assign n_rom[j] = W'(n_value(j / 8, j % 8));
  end

  always_comb begin
    coef = '0;
    unique case (tbl)
      TBL_C:   if (addr < 6'(NQCLASS)) coef = c_rom[addr[4:0]];
      TBL_SF:  if (addr < 6'(NSF))     coef = sf_rom[addr];
      TBL_N:   coef = n_rom[addr[4:0]];
      default: coef = '0;
    endcase
  end

endmodule
