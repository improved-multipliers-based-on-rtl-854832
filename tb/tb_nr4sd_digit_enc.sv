// tb_nr4sd_digit_enc -- exhaustive test of the NR4SD recoding cell.
//
// Both variants are instantiated. For all eight input combinations the test
// checks that b_lo + 2*b_hi + c_in = 4*c_out + digit, that the digit lies in
// the variant's set, and that the stored pair matches the reference model.
module tb_nr4sd_digit_enc;
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

  logic b_lo, b_hi, c_in;
  logic cp, cm;
  logic [1:0] dp, dm;

  nr4sd_digit_enc #(.VARIANT(NR4SD_PLUS))  u_p (.b_lo, .b_hi, .c_in, .c_out(cp), .dig(dp));
  nr4sd_digit_enc #(.VARIANT(NR4SD_MINUS)) u_m (.b_lo, .b_hi, .c_in, .c_out(cm), .dig(dm));

  task automatic check(bit minus, logic c, logic [1:0] d, int v);
    int dv = value_of_pair(d, minus);
    int exp_d = minus ? ((v >= 2) ? v - 4 : v) : ((v >= 3) ? v - 4 : v);
    checks++;
    if (4 * int'(c) + dv != v || dv != exp_d) begin
      failures++;
      $display("FAIL minus=%0d v=%0d c_out=%0d digit=%0d expected %0d", minus, v, c, dv, exp_d);
    end
  endtask

  initial begin
    for (int i = 0; i < 8; i++) begin
      {b_hi, b_lo, c_in} = 3'(i);
      @(posedge clk);
      check(1'b0, cp, dp, int'(b_lo) + 2 * int'(b_hi) + int'(c_in));
      check(1'b1, cm, dm, int'(b_lo) + 2 * int'(b_hi) + int'(c_in));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
