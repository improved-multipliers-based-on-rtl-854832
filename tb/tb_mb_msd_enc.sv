// tb_mb_msd_enc -- exhaustive test of the Modified Booth top-digit encoder.
//
// For all eight inputs the {neg, one, two} output must have the value
// -2*b_hi + b_lo + c_in, never set one and two together, and never mark a zero
// digit as negative.
module tb_mb_msd_enc;
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

  logic    b_hi, b_lo, c_in;
  pp_sel_t msd;

  mb_msd_enc dut (.b_hi, .b_lo, .c_in, .msd);

  initial begin
    for (int i = 0; i < 8; i++) begin
      int exp_v;
      {b_hi, b_lo, c_in} = 3'(i);
      @(posedge clk);
      exp_v = -2 * int'(b_hi) + int'(b_lo) + int'(c_in);
      checks++;
      if (value_of_mb(msd) != exp_v || (msd.one && msd.two) || (exp_v == 0 && msd.neg)) begin
        failures++;
        $display("FAIL in=%b msd=%b expected value %0d", 3'(i), msd, exp_v);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
