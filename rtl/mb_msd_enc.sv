// mb_msd_enc -- Modified Booth encoding of the most significant radix-4 digit.
//
// The top digit of an NR4SD-encoded number is kept in MB form so that the
// encoded number covers the whole two's complement range. Its value is
//   msd = -2*b2k-1 + b2k-2 + c2k-2          (in {-2, -1, 0, +1, +2})
// where c2k-2 is the carry out of the last NR4SD cell. The digit is given as the
// partial product select {neg, one, two} (nr4sd_pkg::pp_sel_t); neg is never set
// for a zero digit. The inputs and the digit set follow the document's recoding
// figure; the three-bit format is this design's choice. Purely combinational.
module mb_msd_enc
  import nr4sd_pkg::*;
(
  input  logic    b_hi,   // b2k-1, sign bit
  input  logic    b_lo,   // b2k-2
  input  logic    c_in,   // c2k-2
  output pp_sel_t msd
);

  always_comb begin
    // b_lo + c_in is 0, 1 or 2; b_hi subtracts 2.
    msd.one = b_lo ^ c_in;
    msd.two = b_hi ? ~(b_lo | c_in) : (b_lo & c_in);
    msd.neg = b_hi & ~(b_lo & c_in);
  end

endmodule
