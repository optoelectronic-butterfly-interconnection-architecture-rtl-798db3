// msd_pkg: shared types and helpers for the modified signed-digit (MSD)
// adder/subtracter.
//
// An MSD digit takes the values 1, 0 and -1 (written 1bar).  It is carried in
// space-position-logic encoding (SPLE): three rails, one per value, of which
// exactly one is lit.  On the X side of a detecting array the rails are called
// A, B, C (for 1, 0, -1); on the Y side a, b, c.  Here both sides use one
// struct, sple_t, whose fields are named after the value they stand for:
// pos (A/a), zero (B/b) and neg (C/c).  An all-dark digit (no rail lit)
// is not a legal code; the logic simply lets it propagate as darkness.
//
// The rail assignment and the one-hot rule follow the encoding the design is
// built on; the field names and the helper functions are this design's own.
package msd_pkg;

  // One SPLE digit: exactly one of the three rails is 1.
  typedef struct packed {
    logic pos;   // rail A / a : digit  1
    logic zero;  // rail B / b : digit  0
    logic neg;   // rail C / c : digit -1
  } sple_t;

  localparam sple_t SPLE_P1   = '{pos: 1'b1, zero: 1'b0, neg: 1'b0};
  localparam sple_t SPLE_ZERO = '{pos: 1'b0, zero: 1'b1, neg: 1'b0};
  localparam sple_t SPLE_M1   = '{pos: 1'b0, zero: 1'b0, neg: 1'b1};

  // Rail index r of the X side (0=A, 1=B, 2=C) and c of the Y side (0=a,
  // 1=b, 2=c) name detecting element G(3r+c+1).  Packed bit order of sple_t
  // is {pos, zero, neg} = bits {2,1,0}, so rail index r sits in bit 2-r.
  function automatic logic rail(input sple_t d, input int unsigned r);
    case (r)
      0:       return d.pos;
      1:       return d.zero;
      default: return d.neg;
    endcase
  endfunction

  // Encode a digit value (-1, 0 or 1) as SPLE.
  function automatic sple_t sple_encode(input int v);
    if (v > 0)      return SPLE_P1;
    else if (v < 0) return SPLE_M1;
    else            return SPLE_ZERO;
  endfunction

  // Decode an SPLE digit to its value; an illegal code decodes as 0.
  function automatic int sple_value(input sple_t d);
    if (d == SPLE_P1)      return 1;
    else if (d == SPLE_M1) return -1;
    else                   return 0;
  endfunction

  // True when exactly one rail is lit.
  function automatic logic sple_legal(input sple_t d);
    return (d == SPLE_P1) || (d == SPLE_ZERO) || (d == SPLE_M1);
  endfunction

  // Complement of a digit (1 <-> -1, 0 stays 0): swap the outer rails.
  function automatic sple_t sple_negate(input sple_t d);
    return '{pos: d.neg, zero: d.zero, neg: d.pos};
  endfunction

endpackage
