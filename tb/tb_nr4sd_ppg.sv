// tb_nr4sd_ppg -- exhaustive test of the partial product generator (N = 8).
//
// Three instances: an NR4SD+ digit, an NR4SD- digit and the MB top digit.
// For every multiplicand and every digit code, the sign-extended row plus its
// correction bit must equal digit * a.
module tb_nr4sd_ppg;
  import nr4sd_pkg::*;
  import tb_nr4sd_ref_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [7:0] a;
  logic [2:0] dig;
  logic [8:0] ppp, ppm, ppb;
  logic       np, nm, nb;

  nr4sd_ppg #(.VARIANT(NR4SD_PLUS))               u_p (.a, .dig, .pp(ppp), .neg(np));
  nr4sd_ppg #(.VARIANT(NR4SD_MINUS))              u_m (.a, .dig, .pp(ppm), .neg(nm));
  nr4sd_ppg #(.VARIANT(NR4SD_PLUS), .IS_MSD(1'b1)) u_b (.a, .dig, .pp(ppb), .neg(nb));

  task automatic check(logic [8:0] pp, logic neg, int d, string what);
    longint got = sext(longint'(pp), 9) + longint'(neg);
    longint exp_v = longint'(d) * sext(longint'(a), 8);
    checks++;
    if (got != exp_v) begin
      failures++;
      if (failures < 10) $display("FAIL %s a=%0d digit=%0d got %0d", what, sext(longint'(a), 8), d, got);
    end
  endtask

  initial begin
    for (int i = 0; i < 256; i++) begin
      for (int c = 0; c < 8; c++) begin
        a   = 8'(i);
        dig = 3'(c);
        @(posedge clk);
        if (c < 4) begin
          check(ppp, np, value_of_pair(dig[1:0], 1'b0), "NR4SD+");
          check(ppm, nm, value_of_pair(dig[1:0], 1'b1), "NR4SD-");
        end
        // MB codes with one and two both set are never produced
        if (!(dig[1] && dig[0])) check(ppb, nb, value_of_mb(dig), "MB");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
