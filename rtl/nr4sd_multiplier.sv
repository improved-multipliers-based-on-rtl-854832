// nr4sd_multiplier -- N x N two's complement multiplier with an NR4SD operand.
//
// The second operand arrives already recoded (from the coefficient ROM or from
// nr4sd_encoder): N/2-1 NR4SD digits and a Modified Booth top digit, N+1 bits.
// Each digit j drives one partial product generator (nr4sd_ppg) whose N+1-bit
// row is sign-extended to 2N bits and placed at bit 2j; the generators' +1
// correction bits, one per row at bit 2j, form one further row. The N/2+1 rows
// are reduced by a carry-save tree (csa_tree) and added by one carry-propagate
// adder. The product p = a * b is exact in 2N bits.
// Only half as many rows as a radix-2 array are needed, as with MB, but the low
// rows come from four-valued digits. The pre-encoded operand and the digit
// formats follow the document; row sign extension, the reduction tree and the
// final adder are this design's choices. Purely combinational.
module nr4sd_multiplier
  import nr4sd_pkg::*;
#(
  parameter int             N       = 8,
  parameter nr4sd_variant_e VARIANT = NR4SD_PLUS
) (
  input  logic [N-1:0]   a,
  input  logic [N:0]     b_enc,
  output logic [2*N-1:0] p
);

  localparam int K = N / 2;     // digits
  localparam int W = 2 * N;     // product width

  if (N < 4 || (N % 2) != 0) begin : g_bad_width
    $error("nr4sd_multiplier: N must be even and at least 4");
  end

  logic [N:0]   pp   [K];
  logic [K-1:0] negs;
  logic [W-1:0] rows [K+1];
  logic [W-1:0] corr;
  logic [W-1:0] sum, carry;

  for (genvar j = 0; j < K; j++) begin : g_ppg
    logic [2:0] dig;
    if (j < K - 1) begin : g_nr
      assign dig = {1'b0, b_enc[2*j+1:2*j]};
    end else begin : g_mb
      assign dig = b_enc[N:N-2];
    end
    nr4sd_ppg #(.N(N), .VARIANT(VARIANT), .IS_MSD(j == K - 1)) u_ppg (
      .a  (a),
      .dig(dig),
      .pp (pp[j]),
      .neg(negs[j])
    );
    // sign-extend the row and move it to bit 2j
    assign rows[j] = W'({{(W - N - 1){pp[j][N]}}, pp[j]} << (2 * j));
  end

  always_comb begin
    corr = '0;
    for (int j = 0; j < K; j++) corr[2*j] = negs[j];
  end
  assign rows[K] = corr;

  csa_tree #(.ROWS(K + 1), .W(W)) u_tree (
    .rows (rows),
    .sum  (sum),
    .carry(carry)
  );

  assign p = sum + carry;

endmodule
