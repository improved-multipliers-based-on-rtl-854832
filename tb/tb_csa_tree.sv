// tb_csa_tree -- random test of the carry-save reduction tree.
//
// Instances with 1, 2, 3, 5, 9 and 17 rows (W = 16, and W = 20 for 17 rows)
// get random rows; sum + carry must equal the sum of the rows modulo 2^W.
module tb_csa_tree;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [19:0] r [17];

  logic [15:0] r1 [1], r2 [2], r3 [3], r5 [5], r9 [9];
  logic [15:0] s1, c1, s2, c2, s3, c3, s5, c5, s9, c9;
  logic [19:0] s17, c17;

  always_comb begin
    for (int i = 0; i < 1; i++) r1[i] = r[i][15:0];
    for (int i = 0; i < 2; i++) r2[i] = r[i][15:0];
    for (int i = 0; i < 3; i++) r3[i] = r[i][15:0];
    for (int i = 0; i < 5; i++) r5[i] = r[i][15:0];
    for (int i = 0; i < 9; i++) r9[i] = r[i][15:0];
  end

  csa_tree #(.ROWS(1),  .W(16)) u1  (.rows(r1), .sum(s1),  .carry(c1));
  csa_tree #(.ROWS(2),  .W(16)) u2  (.rows(r2), .sum(s2),  .carry(c2));
  csa_tree #(.ROWS(3),  .W(16)) u3  (.rows(r3), .sum(s3),  .carry(c3));
  csa_tree #(.ROWS(5),  .W(16)) u5  (.rows(r5), .sum(s5),  .carry(c5));
  csa_tree #(.ROWS(9),  .W(16)) u9  (.rows(r9), .sum(s9),  .carry(c9));
  csa_tree #(.ROWS(17), .W(20)) u17 (.rows(r),  .sum(s17), .carry(c17));

  function automatic logic [19:0] ref_sum(int n, int w);
    logic [19:0] s = '0;
    for (int i = 0; i < n; i++) s += (w == 16) ? 20'(r[i][15:0]) : r[i];
    return (w == 16) ? 20'(s[15:0]) : s;
  endfunction

  task automatic check(int n, logic [19:0] got);
    logic [19:0] e = ref_sum(n, n == 17 ? 20 : 16);
    checks++;
    if (got != e) begin
      failures++;
      if (failures < 10) $display("FAIL rows=%0d got %h expected %h", n, got, e);
    end
  endtask

  initial begin
    for (int t = 0; t < 2000; t++) begin
      for (int i = 0; i < 17; i++) r[i] = (t < 4) ? {20{t[0]}} : 20'($urandom);
      @(posedge clk);
      check(1,  20'(16'(s1 + c1)));
      check(2,  20'(16'(s2 + c2)));
      check(3,  20'(16'(s3 + c3)));
      check(5,  20'(16'(s5 + c5)));
      check(9,  20'(16'(s9 + c9)));
      check(17, 20'(s17 + c17));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
