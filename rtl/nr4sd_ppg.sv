// nr4sd_ppg -- partial product generator for one radix-4 digit.
//
// The stored digit bits are decoded into a {neg, one, two} select (for an
// NR4SD digit by nr4sd_pkg::decode_nr, the MB top digit is already in that
// form) and the row is formed bit by bit as
//   pp[i] = ((a[i] & one) | (a[i-1] & two)) ^ neg,   i = 0 .. N,
// with a[-1] = 0 and a[N] = a[N-1] (sign extension). The row is therefore
// digit*a in N+1 bits, minus neg; the multiplier adds neg back as a correction
// bit in the row's lowest position. Because an NR4SD digit takes only four
// values, its decode needs fewer gates than that of a five-valued MB digit.
// The row equation is the usual radix-4 one; the document states only that the
// NR4SD generator is simpler than the MB one. Purely combinational.
module nr4sd_ppg
  import nr4sd_pkg::*;
#(
  parameter int             N       = 8,
  parameter nr4sd_variant_e VARIANT = NR4SD_PLUS,
  parameter bit             IS_MSD  = 1'b0   // 1: dig is an MB {neg, one, two}
) (
  input  logic [N-1:0] a,
  input  logic [2:0]   dig,   // NR4SD digit in dig[1:0], or MB digit in dig[2:0]
  output logic [N:0]   pp,
  output logic         neg
);

  pp_sel_t    sel;
  logic [N:0] a_ext;   // a sign-extended to N+1 bits
  logic [N:0] a_sh;    // a_ext shifted left once (2*a)

  always_comb begin
    if (IS_MSD) sel = pp_sel_t'(dig);
    else        sel = decode_nr(VARIANT, dig[1:0]);
    a_ext = {a[N-1], a};
    a_sh  = {a, 1'b0};
    for (int i = 0; i <= N; i++)
      pp[i] = ((a_ext[i] & sel.one) | (a_sh[i] & sel.two)) ^ sel.neg;
    neg = sel.neg;
  end

endmodule
