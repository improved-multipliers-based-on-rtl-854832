// tb_coeff_rom -- test of the pre-encoded coefficient ROM.
//
// The default sine table is read in both variants, and a 5-word 12-bit table
// with extreme values in NR4SD+. Every word must equal the reference encoding
// of its coefficient and decode back to it; an address past the end of the
// 5-word table must read word 0.
module tb_coeff_rom;
  import nr4sd_pkg::*;
  import tb_nr4sd_ref_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam int SINE [16] = '{0, 49, 90, 117, 127, 117, 90, 49,
                               0, -49, -90, -117, -127, -117, -90, -49};
  localparam int SMALL [5] = '{-2048, 2047, -1, 1365, -683};

  logic [3:0]  a16;
  logic [2:0]  a5;
  logic [8:0]  dp, dm;
  logic [12:0] ds;

  coeff_rom #(.VARIANT(NR4SD_PLUS))  u_p (.addr(a16), .data(dp));
  coeff_rom #(.VARIANT(NR4SD_MINUS)) u_m (.addr(a16), .data(dm));
  coeff_rom #(.N(12), .DEPTH(5), .COEFFS(SMALL)) u_s (.addr(a5), .data(ds));

  task automatic check(logic [64:0] w, longint c, int n, bit minus);
    checks++;
    if (w != encode(c, n, minus) || decode(w, n, minus) != c) begin
      failures++;
      $display("FAIL n=%0d minus=%0d coefficient %0d word %h", n, minus, c, w);
    end
  endtask

  initial begin
    for (int i = 0; i < 16; i++) begin
      a16 = 4'(i);
      a5  = 3'(i % 8);
      @(posedge clk);
      check(65'(dp), longint'(SINE[i]), 8, 1'b0);
      check(65'(dm), longint'(SINE[i]), 8, 1'b1);
      check(65'(ds), longint'((i % 8) < 5 ? SMALL[i % 8] : SMALL[0]), 12, 1'b0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
