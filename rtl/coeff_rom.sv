// coeff_rom -- read-only memory of pre-encoded coefficients.
//
// Multiplications by fixed coefficients (filter taps, the sine table of an FFT)
// let the coefficients be recoded once, off-line, and stored already in NR4SD
// form: N/2-1 two-bit NR4SD digits plus a three-bit Modified Booth top digit,
// N+1 bits per word instead of the 3N/2 bits a pre-encoded MB word needs.
// Here the table COEFFS of two's complement values (truncated to N bits) is
// recoded when the design is elaborated, by the function encode() below, which
// is the same recoding nr4sd_encoder does with gates; the synthesised ROM holds
// only constants. The word layout is that of nr4sd_encoder.
// Read is asynchronous: data follows addr combinationally. An address at or
// above DEPTH reads word 0.
// The document gives the ROM's purpose and word format; the depth, the default
// contents (round(127*sin(2*pi*i/16)), a 16-point sine table for N = 8) and the
// asynchronous read are this design's choices.
module coeff_rom
  import nr4sd_pkg::*;
#(
  parameter int             N       = 8,
  parameter nr4sd_variant_e VARIANT = NR4SD_PLUS,
  parameter int             DEPTH   = 16,
  parameter int             AW      = (DEPTH > 1) ? $clog2(DEPTH) : 1,
  parameter int             COEFFS [DEPTH] = '{0, 49, 90, 117, 127, 117, 90, 49,
                                               0, -49, -90, -117, -127, -117, -90, -49}
) (
  input  logic [AW-1:0] addr,
  output logic [N:0]    data
);

  localparam int K = N / 2;

  // Off-line recoding of one coefficient: ripple the carry through the digit
  // pairs, then put the MB top digit above them.
  function automatic logic [N:0] encode(logic [N-1:0] b);
    logic [N:0] w;
    logic       c, cm;
    w = '0;
    c = 1'b0;
    for (int j = 0; j < K - 1; j++) begin
      if (VARIANT == NR4SD_PLUS) begin
        cm       = b[2*j] | c;
        w[2*j]   = b[2*j] ^ c;
        w[2*j+1] = b[2*j+1] ^ cm;
        c        = b[2*j+1] & cm;
      end else begin
        cm       = b[2*j] & c;
        w[2*j]   = b[2*j] ^ c;
        w[2*j+1] = b[2*j+1] ^ cm;
        c        = b[2*j+1] | cm;
      end
    end
    // MB top digit -2*b[N-1] + b[N-2] + c as {neg, one, two}
    w[N]   = b[N-1] & ~(b[N-2] & c);
    w[N-1] = b[N-2] ^ c;
    w[N-2] = b[N-1] ? ~(b[N-2] | c) : (b[N-2] & c);
    return w;
  endfunction

  logic [N:0] rom [DEPTH];

  for (genvar i = 0; i < DEPTH; i++) begin : g_word
    assign rom[i] = encode(N'(COEFFS[i]));
  end

  always_comb begin
    data = rom[0];
    if (int'(addr) < DEPTH) data = rom[addr];
  end

endmodule
