// nr4sd_mult_top -- pre-encoded NR4SD multiplier system.
//
// Computes out = x * y (two's complement, N x N -> 2N bits) where the
// multiplier operand y is taken in NR4SD form from one of two sources:
//   use_coef = 1 : the coefficient ROM (coeff_rom), whose words were recoded
//                  off-line, so no recoding logic lies on this path;
//   use_coef = 0 : the y port, recoded on-line by nr4sd_encoder.
// The selected N+1-bit word feeds nr4sd_multiplier, and the product is
// captured in an output register with synchronous, active-high reset.
// Timing: one cycle. x, y, use_coef and coef_addr presented before a rising
// clk edge give their product on out right after that edge; rst high at an
// edge clears out to 0.
// The ROM-fed multiplier, the digit formats, the 8-bit default width and the
// registered product (one-cycle latency) follow the document; the use_coef
// select that lets both operand sources share one multiplier is this design's
// own addition.
module nr4sd_mult_top
  import nr4sd_pkg::*;
#(
  parameter int             N       = 8,
  parameter nr4sd_variant_e VARIANT = NR4SD_PLUS,
  parameter int             DEPTH   = 16,
  parameter int             AW      = (DEPTH > 1) ? $clog2(DEPTH) : 1,
  parameter int             COEFFS [DEPTH] = '{0, 49, 90, 117, 127, 117, 90, 49,
                                               0, -49, -90, -117, -127, -117, -90, -49}
) (
  input  logic           clk,
  input  logic           rst,
  input  logic [N-1:0]   x,
  input  logic [N-1:0]   y,
  input  logic           use_coef,
  input  logic [AW-1:0]  coef_addr,
  output logic [2*N-1:0] out
);

  logic [N:0]     y_enc;     // y recoded on-line
  logic [N:0]     rom_enc;   // pre-encoded coefficient
  logic [N:0]     b_enc;
  logic [2*N-1:0] z;         // combinational product

  nr4sd_encoder #(.N(N), .VARIANT(VARIANT)) u_enc (
    .b    (y),
    .b_enc(y_enc)
  );

  coeff_rom #(.N(N), .VARIANT(VARIANT), .DEPTH(DEPTH), .AW(AW), .COEFFS(COEFFS)) u_rom (
    .addr(coef_addr),
    .data(rom_enc)
  );

  assign b_enc = use_coef ? rom_enc : y_enc;

  nr4sd_multiplier #(.N(N), .VARIANT(VARIANT)) u_mul (
    .a    (x),
    .b_enc(b_enc),
    .p    (z)
  );

  always_ff @(posedge clk) begin
    if (rst) out <= '0;
    else     out <= z;
  end

endmodule
