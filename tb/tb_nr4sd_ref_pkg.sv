// tb_nr4sd_ref_pkg -- reference model of the NR4SD recoding for the testbenches.
//
// Written from the arithmetic definition rather than from gates: for each
// radix-4 position j the value v = (b >> 2j) % 4 + carry is split into
// 4*carry' + d with d taken from the digit set of the variant
// (NR4SD+: {-1,0,+1,+2}, NR4SD-: {-2,-1,0,+1}); the top digit is
// -2*b[n-1] + b[n-2] + carry in Modified Booth form. Words use the layout of
// the RTL: pair j in bits [2j+1:2j], MB digit {neg,one,two} in bits [n:n-2].
// Widths up to 64 bits are handled.
package tb_nr4sd_ref_pkg;

  // digit value -> stored pair
  function automatic logic [1:0] pair_of(int d, bit minus);
    if (!minus) begin            // {n+, n-}, value 2n+ - n-
      case (d)
        0:       return 2'b00;
        -1:      return 2'b01;
        2:       return 2'b10;
        default: return 2'b11;   // +1
      endcase
    end else begin               // {n-, n+}, value n+ - 2n-
      case (d)
        0:       return 2'b00;
        1:       return 2'b01;
        -2:      return 2'b10;
        default: return 2'b11;   // -1
      endcase
    end
  endfunction

  // stored pair -> digit value
  function automatic int value_of_pair(logic [1:0] p, bit minus);
    if (!minus) return 2 * int'(p[1]) - int'(p[0]);
    else        return int'(p[0]) - 2 * int'(p[1]);
  endfunction

  // {neg, one, two} -> digit value
  function automatic int value_of_mb(logic [2:0] m);
    int mag;
    mag = int'(m[1]) + 2 * int'(m[0]);
    return m[2] ? -mag : mag;
  endfunction

  // Digit j (0 .. n/2-1) of b in the given variant, as a value.
  function automatic int digit(longint b, int n, bit minus, int j);
    int c = 0;
    int v, d;
    for (int i = 0; i < n / 2 - 1; i++) begin
      v = int'((b >> (2 * i)) & 3) + c;
      if (!minus) begin d = (v >= 3) ? v - 4 : v;        c = (v >= 3) ? 1 : 0; end
      else        begin d = (v >= 2) ? v - 4 : v;        c = (v >= 2) ? 1 : 0; end
      if (i == j) return d;
    end
    return -2 * int'((b >> (n - 1)) & 1) + int'((b >> (n - 2)) & 1) + c;
  endfunction

  // Encode the n-bit two's complement value b into an n+1 bit word.
  function automatic logic [64:0] encode(longint b, int n, bit minus);
    logic [64:0] w = '0;
    int m;
    for (int j = 0; j < n / 2 - 1; j++) begin
      logic [1:0] p = pair_of(digit(b, n, minus, j), minus);
      w[2*j]   = p[0];
      w[2*j+1] = p[1];
    end
    m = digit(b, n, minus, n / 2 - 1);
    w[n]   = (m < 0);
    w[n-1] = (m == 1 || m == -1);
    w[n-2] = (m == 2 || m == -2);
    return w;
  endfunction

  // Value of an n+1 bit encoded word.
  function automatic longint decode(logic [64:0] w, int n, bit minus);
    longint s = 0;
    for (int j = 0; j < n / 2 - 1; j++)
      s += longint'(value_of_pair({w[2*j+1], w[2*j]}, minus)) <<< (2 * j);
    s += longint'(value_of_mb({w[n], w[n-1], w[n-2]})) <<< (n - 2);
    return s;
  endfunction

  // Sign-extend the low n bits of x.
  function automatic longint sext(longint x, int n);
    return (x <<< (64 - n)) >>> (64 - n);
  endfunction

endpackage
