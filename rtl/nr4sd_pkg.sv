// nr4sd_pkg -- types and digit decoding shared by the NR4SD multiplier blocks.
//
// A radix-4 digit of the non-redundant signed-digit (NR4SD) form is held in two
// bits: one positively and one negatively signed bit.
//   NR4SD+ : bits {n+, n-}, value 2*n+ - n-   -> digit set {-1, 0, +1, +2}
//   NR4SD- : bits {n-, n+}, value n+ - 2*n-   -> digit set {-2, -1, 0, +1}
// The most significant digit is kept in Modified Booth (MB) form as three
// bits {neg, one, two}, value (neg ? -1 : +1) * (one + 2*two).
// The partial product generators need every digit as such a {neg, one, two}
// select; decode_nr() produces it from the two stored bits. The bit order of the
// stored pairs and the {neg, one, two} format are this design's choices.
package nr4sd_pkg;

  typedef enum logic {
    NR4SD_PLUS  = 1'b0,   // digits {-1, 0, +1, +2}
    NR4SD_MINUS = 1'b1    // digits {-2, -1, 0, +1}
  } nr4sd_variant_e;

  // Partial product select for one radix-4 digit.
  typedef struct packed {
    logic neg;   // digit is negative: invert the row and add 1
    logic one;   // |digit| = 1: row is the multiplicand
    logic two;   // |digit| = 2: row is the multiplicand shifted left once
  } pp_sel_t;

  // Decode a stored NR4SD digit pair into a partial product select.
  function automatic pp_sel_t decode_nr(nr4sd_variant_e v, logic [1:0] d);
    pp_sel_t s;
    if (v == NR4SD_PLUS) begin
      // d = {n+, n-}: 00 -> 0, 01 -> -1, 10 -> +2, 11 -> +1
      s.neg = d[0] & ~d[1];
      s.one = d[0];
      s.two = d[1] & ~d[0];
    end else begin
      // d = {n-, n+}: 00 -> 0, 01 -> +1, 10 -> -2, 11 -> -1
      s.neg = d[1];
      s.one = d[0];
      s.two = d[1] & ~d[0];
    end
    return s;
  endfunction

endpackage
