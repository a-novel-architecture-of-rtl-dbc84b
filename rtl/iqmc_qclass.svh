// Quantization classes of MPEG audio Layer I/II shared by the C and D'
// tables.  Class q has steps(q) levels and its codes are bits(q) wide
// before grouping: 3, 5, 7, 9 levels for q = 0..3, then 2**q - 1 levels.
function automatic longint qc_steps(input int q);
  case (q)
    0: return 3;
    1: return 5;
    2: return 7;
    3: return 9;
    default: return (longint'(1) << q) - 1;
  endcase
endfunction

function automatic int qc_bits(input int q);
  case (q)
    0: return 2;
    1: return 3;
    2: return 3;
    3: return 4;
    default: return q;
  endcase
endfunction

// round(num / den) for positive operands
function automatic longint qc_div_round(input longint num, input longint den);
  return (2 * num + den) / (2 * den);
endfunction
