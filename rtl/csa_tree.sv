// csa_tree -- carry-save (3:2) reduction of partial product rows.
//
// ROWS rows of W bits are reduced to two, a sum and a carry vector, in layers
// of full adders: in every layer each complete group of three rows becomes a
// sum row and a carry row (shifted left one place), and the one or two rows
// left over pass through unchanged. A layer maps r rows to 2*(r/3) + r%3, so
// the depth grows with log1.5(ROWS) (Wallace-style). All arithmetic is modulo
// 2^W: sum + carry equals the sum of the rows truncated to W bits.
// The document does not describe the reduction; this tree and the final
// carry-propagate adder in nr4sd_multiplier are this design's choice.
// Purely combinational.
module csa_tree #(
  parameter int ROWS = 5,
  parameter int W    = 16
) (
  input  logic [W-1:0] rows [ROWS],
  output logic [W-1:0] sum,
  output logic [W-1:0] carry
);

  // Rows present after l layers.
  function automatic int rows_after(int r0, int l);
    int r = r0;
    for (int i = 0; i < l; i++)
      if (r > 2) r = 2 * (r / 3) + r % 3;
    return r;
  endfunction

  function automatic int num_layers(int r0);
    int r = r0;
    int l = 0;
    while (r > 2) begin
      r = 2 * (r / 3) + r % 3;
      l++;
    end
    return l;
  endfunction

  localparam int L = num_layers(ROWS);

  // g_lvl[l].r holds the rows after l layers; entries at and above
  // rows_after(ROWS, l) are unused and held at zero.
  for (genvar l = 0; l <= L; l++) begin : g_lvl
    logic [W-1:0] r [ROWS];
    if (l == 0) begin : g_in
      assign r = rows;
    end else begin : g_layer
      localparam int RP = rows_after(ROWS, l - 1);   // rows coming in
      localparam int G  = RP / 3;                    // full adder groups
      localparam int RN = rows_after(ROWS, l);       // rows going out
      for (genvar g = 0; g < G; g++) begin : g_fa
        logic [W-1:0] x, y, z;
        logic [W-2:0] maj;
        assign x   = g_lvl[l-1].r[3*g];
        assign y   = g_lvl[l-1].r[3*g+1];
        assign z   = g_lvl[l-1].r[3*g+2];
        assign maj = (x[W-2:0] & y[W-2:0]) | (x[W-2:0] & z[W-2:0]) | (y[W-2:0] & z[W-2:0]);
        assign r[2*g]   = x ^ y ^ z;
        assign r[2*g+1] = {maj, 1'b0};
      end
      for (genvar q = 0; q < RP - 3 * G; q++) begin : g_pass
        assign r[2*G+q] = g_lvl[l-1].r[3*G+q];
      end
      for (genvar u = RN; u < ROWS; u++) begin : g_unused
        assign r[u] = '0;
      end
    end
  end

  localparam int RF = rows_after(ROWS, L);
  if (RF >= 2) begin : g_two
    assign sum   = g_lvl[L].r[0];
    assign carry = g_lvl[L].r[1];
  end else begin : g_one
    assign sum   = g_lvl[L].r[0];
    assign carry = '0;
  end

endmodule
