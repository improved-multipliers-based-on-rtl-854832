// tb_nr4sd_widths -- the multiplier system at 16- and 24-bit operand widths.
//
// Four instances of nr4sd_mult_top: N = 16 and N = 24, each in the NR4SD+ and
// NR4SD- variants, with ROM tables scaled to the width. Extreme operands
// (0, +-1, the largest and smallest values) and random operands are applied
// through the on-line recoder, and random multiplicands times every ROM word
// through the ROM path; every registered product is checked one cycle later.
module tb_nr4sd_widths;
  import nr4sd_pkg::*;
  import tb_nr4sd_ref_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam int T16 [8] = '{0, 12539, 23170, 30273, 32767, -32768, -23170, -1};
  localparam int T24 [8] = '{0, 3210181, 5931642, 7750063, 8388607, -8388608, -5931642, -1};

  logic           rst = 1'b1;
  logic [23:0]    xs = '0, ys = '0;
  logic           use_coef = 1'b0;
  logic [2:0]     addr = '0;
  logic [31:0]    o16p, o16m;
  logic [47:0]    o24p, o24m;

  nr4sd_mult_top #(.N(16), .VARIANT(NR4SD_PLUS),  .DEPTH(8), .COEFFS(T16)) u16p
    (.clk, .rst, .x(xs[15:0]), .y(ys[15:0]), .use_coef, .coef_addr(addr), .out(o16p));
  nr4sd_mult_top #(.N(16), .VARIANT(NR4SD_MINUS), .DEPTH(8), .COEFFS(T16)) u16m
    (.clk, .rst, .x(xs[15:0]), .y(ys[15:0]), .use_coef, .coef_addr(addr), .out(o16m));
  nr4sd_mult_top #(.N(24), .VARIANT(NR4SD_PLUS),  .DEPTH(8), .COEFFS(T24)) u24p
    (.clk, .rst, .x(xs), .y(ys), .use_coef, .coef_addr(addr), .out(o24p));
  nr4sd_mult_top #(.N(24), .VARIANT(NR4SD_MINUS), .DEPTH(8), .COEFFS(T24)) u24m
    (.clk, .rst, .x(xs), .y(ys), .use_coef, .coef_addr(addr), .out(o24m));

  task automatic check(longint got, int n, string what);
    longint b = use_coef ? longint'(n == 16 ? T16[addr] : T24[addr]) : sext(longint'(ys), n);
    longint e = sext(longint'(xs), n) * b;
    checks++;
    if (sext(got, 2 * n) != e) begin
      failures++;
      if (failures < 10) $display("FAIL %s %0d * %0d: got %0d", what, sext(longint'(xs), n), b, sext(got, 2 * n));
    end
  endtask

  task automatic step(logic [23:0] xv, logic [23:0] yv, logic uc, logic [2:0] ad);
    @(negedge clk);
    xs = xv; ys = yv; use_coef = uc; addr = ad;
    @(posedge clk);
    #1;
    check(longint'(o16p), 16, "N16+");
    check(longint'(o16m), 16, "N16-");
    check(longint'(o24p), 24, "N24+");
    check(longint'(o24m), 24, "N24-");
  endtask

  localparam logic [23:0] EDGE [8] = '{24'h0, 24'h1, 24'hFFFFFF, 24'h7FFFFF, 24'h800000,
                                       24'hFF8000, 24'h007FFF, 24'hAAAAAA};

  initial begin
    @(negedge clk);
    rst = 1'b0;
    for (int i = 0; i < 64; i++) step(EDGE[i % 8], EDGE[i / 8], 1'b0, 3'd0);
    for (int i = 0; i < 20000; i++) step(24'($urandom), 24'($urandom), 1'b0, 3'd0);
    for (int i = 0; i < 2000; i++) step(24'($urandom), 24'd0, 1'b1, 3'(i));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
