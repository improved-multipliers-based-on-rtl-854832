// nr4sd_encoder -- two's complement to NR4SD recoder (N bits -> N+1 bits).
//
// A ripple chain of N/2-1 recoding cells (nr4sd_digit_enc) turns the low N-2
// bits of b into NR4SD digits, starting with a carry of 0 into the least
// significant cell; the carry out of the chain and the two top bits of b form
// the most significant digit, which is encoded in Modified Booth form
// (mb_msd_enc). The structure follows the document's recoding figure.
// Output layout (this design's choice):
//   b_enc[2j+1:2j]  NR4SD digit j, j = 0 .. N/2-2   (see nr4sd_pkg)
//   b_enc[N:N-2]    MB digit {neg, one, two}
// so b = sum_j digit_j * 4^j exactly, and an encoded word needs N+1 bits.
// Purely combinational; the delay grows with N through the carry chain.
module nr4sd_encoder
  import nr4sd_pkg::*;
#(
  parameter int             N       = 8,
  parameter nr4sd_variant_e VARIANT = NR4SD_PLUS
) (
  input  logic [N-1:0] b,
  output logic [N:0]   b_enc
);

  localparam int K = N / 2;   // number of radix-4 digits

  // Elaboration-time check of the width.
  if (N < 4 || (N % 2) != 0) begin : g_bad_width
    $error("nr4sd_encoder: N must be even and at least 4");
  end

  logic [K-1:0] c;   // c[j] = carry c2j into cell j
  pp_sel_t      msd;

  assign c[0] = 1'b0;

  for (genvar j = 0; j < K - 1; j++) begin : g_cell
    nr4sd_digit_enc #(.VARIANT(VARIANT)) u_cell (
      .b_lo (b[2*j]),
      .b_hi (b[2*j+1]),
      .c_in (c[j]),
      .c_out(c[j+1]),
      .dig  (b_enc[2*j+1:2*j])
    );
  end

  mb_msd_enc u_msd (
    .b_hi(b[N-1]),
    .b_lo(b[N-2]),
    .c_in(c[K-1]),
    .msd (msd)
  );

  assign b_enc[N:N-2] = msd;

endmodule
