// nr4sd_digit_enc -- one "two's complement to NR4SD form" recoding cell.
//
// The cell takes two bits b2j, b2j+1 of a two's complement number and the carry
// c2j from the cell below, and produces one radix-4 NR4SD digit and the carry
// c2j+2 for the cell above, so that  b2j + 2*b2j+1 + c2j = 4*c2j+2 + digit.
// It is two half adders in a row, one of them with a negatively signed sum
// (HA*: b + c = 2*carry - sum, i.e. carry = b | c, sum = b ^ c):
//   NR4SD+ (digit {-1,0,+1,+2}): HA* on b2j gives n-2j, HA on b2j+1 gives n+2j+1.
//   NR4SD- (digit {-2,-1,0,+1}): HA on b2j gives n+2j, HA* on b2j+1 gives n-2j+1.
// Ports and digit sets follow the document's recoding figure for NR4SD+; the
// NR4SD- cell is its mirror image. The output bit order {positively signed bit of
// the higher position, other bit} for NR4SD+ and {n-, n+} for NR4SD- is this
// design's choice (see nr4sd_pkg). Purely combinational.
module nr4sd_digit_enc
  import nr4sd_pkg::*;
#(
  parameter nr4sd_variant_e VARIANT = NR4SD_PLUS
) (
  input  logic       b_lo,   // b2j
  input  logic       b_hi,   // b2j+1
  input  logic       c_in,   // c2j
  output logic       c_out,  // c2j+2
  output logic [1:0] dig     // NR4SD+: {n+2j+1, n-2j}; NR4SD-: {n-2j+1, n+2j}
);

  logic c_mid;  // c2j+1, carry between the two half adders

  always_comb begin
    if (VARIANT == NR4SD_PLUS) begin
      c_mid  = b_lo | c_in;          // HA*, negatively signed sum
      dig[0] = b_lo ^ c_in;          // n-2j
      c_out  = b_hi & c_mid;         // HA
      dig[1] = b_hi ^ c_mid;         // n+2j+1
    end else begin
      c_mid  = b_lo & c_in;          // HA
      dig[0] = b_lo ^ c_in;          // n+2j
      c_out  = b_hi | c_mid;         // HA*, negatively signed sum
      dig[1] = b_hi ^ c_mid;         // n-2j+1
    end
  end

endmodule
