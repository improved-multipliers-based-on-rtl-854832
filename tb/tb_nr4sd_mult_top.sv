// tb_nr4sd_mult_top -- end-to-end test of the pre-encoded NR4SD multiplier
// system at its default parameters (N = 8, NR4SD+, 16-word sine table).
//
// Sequence:
//  1. reset: out must be 0 while rst is high;
//  2. the three products of the reference waveform: 11*6 = 66, 3*7 = 21,
//     11*5 = 55, with the one-cycle latency checked (out keeps the previous
//     product until the next rising edge, then shows the new one);
//  3. every x * y pair through the on-line recoder (65536 products);
//  4. every x times every ROM coefficient (4096 products);
//  5. reset in the middle of operation.
// Inputs change on the falling edge; out is checked just before and just after
// each rising edge. Counters record how often each mechanism was exercised: the
// on-line and ROM operand paths, reset, every NR4SD digit value in the low
// digits, every MB value of the top digit, and a carry into the top digit. A
// mechanism never exercised counts as a failure.
module tb_nr4sd_mult_top;
  import nr4sd_pkg::*;
  import tb_nr4sd_ref_pkg::*;

  localparam int N = 8;
  localparam int SINE [16] = '{0, 49, 90, 117, 127, 117, 90, 49,
                               0, -49, -90, -117, -127, -117, -90, -49};

  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (80000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic           rst = 1'b1;
  logic [N-1:0]   x = '0, y = '0;
  logic           use_coef = 1'b0;
  logic [3:0]     coef_addr = '0;
  logic [2*N-1:0] out;

  nr4sd_mult_top dut (.clk, .rst, .x, .y, .use_coef, .coef_addr, .out);

  // mechanism counters
  int n_online = 0, n_rom = 0, n_reset = 0, n_carry_msd = 0;
  int n_low_digit [-2:2];
  int n_msd_digit [-2:2];

  longint expected;   // product the output must show after the next edge

  function automatic longint operand();
    return use_coef ? longint'(SINE[coef_addr]) : sext(longint'(y), N);
  endfunction

  // Note which digits and carries the current operand uses.
  task automatic count_digits(longint b);
    for (int j = 0; j < N / 2 - 1; j++) n_low_digit[digit(b, N, 1'b0, j)]++;
    n_msd_digit[digit(b, N, 1'b0, N / 2 - 1)]++;
    // carry into the top digit: top digit differs from -2*b[N-1] + b[N-2]
    if (digit(b, N, 1'b0, N / 2 - 1) != -2 * int'((b >> (N - 1)) & 1) + int'((b >> (N - 2)) & 1))
      n_carry_msd++;
  endtask

  // Apply one operation and check it across the next rising edge.
  task automatic step(logic [N-1:0] xv, logic [N-1:0] yv, logic uc, logic [3:0] ad);
    longint prev = expected;
    @(negedge clk);
    x = xv; y = yv; use_coef = uc; coef_addr = ad;
    expected = sext(longint'(x), N) * operand();
    if (uc) n_rom++; else n_online++;
    count_digits(operand());
    #4;  // just before the edge: still the previous product
    checks++;
    if (sext(longint'(out), 2 * N) != prev) begin
      failures++;
      if (failures < 10) $display("FAIL latency: out changed early (%0d, expected %0d)", sext(longint'(out), 2 * N), prev);
    end
    @(posedge clk);
    #1;
    checks++;
    if (sext(longint'(out), 2 * N) != expected) begin
      failures++;
      if (failures < 10) $display("FAIL %0d * %0d: out %0d, expected %0d", sext(longint'(x), N), operand(), sext(longint'(out), 2 * N), expected);
    end
  endtask

  task automatic do_reset();
    @(negedge clk);
    rst = 1'b1;
    x = 8'd77; y = 8'd99;
    @(posedge clk);
    #1;
    n_reset++;
    checks++;
    if (out != '0) begin
      failures++;
      $display("FAIL reset: out = %0d", out);
    end
    @(negedge clk);
    rst = 1'b0;
    expected = sext(longint'(x), N) * operand();   // captured at the next edge
  endtask

  initial begin
    for (int v = -2; v <= 2; v++) begin n_low_digit[v] = 0; n_msd_digit[v] = 0; end
    do_reset();

    // the reference waveform
    step(8'd11, 8'd6, 1'b0, 4'd0);
    if (out != 16'd66) begin failures++; $display("FAIL 11*6"); end
    step(8'd3, 8'd7, 1'b0, 4'd0);
    if (out != 16'd21) begin failures++; $display("FAIL 3*7"); end
    step(8'd11, 8'd5, 1'b0, 4'd0);
    if (out != 16'd55) begin failures++; $display("FAIL 11*5"); end
    checks += 3;

    // all products through the on-line recoder
    for (int i = 0; i < 65536; i++) step(i[7:0], i[15:8], 1'b0, 4'd0);

    // all multiplicands times every ROM coefficient
    for (int i = 0; i < 4096; i++) step(i[7:0], 8'(~i), 1'b1, i[11:8]);

    do_reset();
    step(8'h80, 8'h80, 1'b0, 4'd0);   // -128 * -128 = 16384
    step(8'h80, 8'h00, 1'b1, 4'd12);  // -128 * -127

    $display("mechanisms: online=%0d rom=%0d reset=%0d carry_into_msd=%0d", n_online, n_rom, n_reset, n_carry_msd);
    for (int v = -2; v <= 2; v++)
      $display("  digit %0d: low digits %0d times, top digit %0d times", v, n_low_digit[v], n_msd_digit[v]);
    checks++;
    if (n_online == 0 || n_rom == 0 || n_reset < 2 || n_carry_msd == 0) begin
      failures++;
      $display("FAIL a mechanism was never exercised");
    end
    for (int v = -1; v <= 2; v++) begin
      checks++;
      if (n_low_digit[v] == 0) begin failures++; $display("FAIL NR4SD+ digit %0d never used", v); end
    end
    for (int v = -2; v <= 2; v++) begin
      checks++;
      if (n_msd_digit[v] == 0) begin failures++; $display("FAIL MB digit %0d never used", v); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
