// tb_nr4sd_multiplier -- test of the combinational NR4SD multiplier.
//
// N = 8 in both variants is tested exhaustively (every a, every b); N = 16 in
// both variants with random and extreme operands. The encoded operand comes
// from the reference encoder; the product must equal a * b.
module tb_nr4sd_multiplier;
  import nr4sd_pkg::*;
  import tb_nr4sd_ref_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [7:0]  a8, b8;
  logic [8:0]  e8p, e8m;
  logic [15:0] p8p, p8m;
  logic [15:0] a16, b16;
  logic [16:0] e16p, e16m;
  logic [31:0] p16p, p16m;

  nr4sd_multiplier #(.N(8),  .VARIANT(NR4SD_PLUS))  u8p  (.a(a8),  .b_enc(e8p),  .p(p8p));
  nr4sd_multiplier #(.N(8),  .VARIANT(NR4SD_MINUS)) u8m  (.a(a8),  .b_enc(e8m),  .p(p8m));
  nr4sd_multiplier #(.N(16), .VARIANT(NR4SD_PLUS))  u16p (.a(a16), .b_enc(e16p), .p(p16p));
  nr4sd_multiplier #(.N(16), .VARIANT(NR4SD_MINUS)) u16m (.a(a16), .b_enc(e16m), .p(p16m));

  task automatic check(longint got, longint a, longint b, int n, string what);
    longint e = sext(a, n) * sext(b, n);
    checks++;
    if (sext(got, 2 * n) != e) begin
      failures++;
      if (failures < 10) $display("FAIL %s %0d * %0d = %0d, got %0d", what, sext(a, n), sext(b, n), e, sext(got, 2 * n));
    end
  endtask

  localparam int EDGE [6] = '{0, 1, -1, 32767, -32768, -32767};

  initial begin
    for (int i = 0; i < 65536; i++) begin
      a8  = i[7:0];
      b8  = i[15:8];
      e8p = 9'(encode(longint'(b8), 8, 1'b0));
      e8m = 9'(encode(longint'(b8), 8, 1'b1));
      if (i < 36) begin
        a16 = 16'(EDGE[i % 6]);
        b16 = 16'(EDGE[i / 6]);
      end else begin
        a16 = 16'($urandom);
        b16 = 16'($urandom);
      end
      e16p = 17'(encode(longint'(b16), 16, 1'b0));
      e16m = 17'(encode(longint'(b16), 16, 1'b1));
      @(posedge clk);
      check(longint'(p8p), longint'(a8), longint'(b8), 8, "N8+");
      check(longint'(p8m), longint'(a8), longint'(b8), 8, "N8-");
      if (i < 10000) begin
        check(longint'(p16p), longint'(a16), longint'(b16), 16, "N16+");
        check(longint'(p16m), longint'(a16), longint'(b16), 16, "N16-");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
