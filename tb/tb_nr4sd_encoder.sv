// tb_nr4sd_encoder -- exhaustive test of the N-bit recoder.
//
// Four instances: N = 8 and N = 12, each in both variants. Every input value
// is applied; the encoded word must equal the reference encoding and must
// decode back to the signed input value.
module tb_nr4sd_encoder;
  import nr4sd_pkg::*;
  import tb_nr4sd_ref_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [7:0]  b8;
  logic [11:0] b12;
  logic [8:0]  e8p, e8m;
  logic [12:0] e12p, e12m;

  nr4sd_encoder #(.N(8),  .VARIANT(NR4SD_PLUS))  u8p  (.b(b8),  .b_enc(e8p));
  nr4sd_encoder #(.N(8),  .VARIANT(NR4SD_MINUS)) u8m  (.b(b8),  .b_enc(e8m));
  nr4sd_encoder #(.N(12), .VARIANT(NR4SD_PLUS))  u12p (.b(b12), .b_enc(e12p));
  nr4sd_encoder #(.N(12), .VARIANT(NR4SD_MINUS)) u12m (.b(b12), .b_enc(e12m));

  task automatic check(logic [64:0] w, longint b, int n, bit minus);
    logic [64:0] exp_w = encode(b, n, minus);
    checks++;
    if (w != exp_w || decode(w, n, minus) != sext(b, n)) begin
      failures++;
      if (failures < 10)
        $display("FAIL n=%0d minus=%0d b=%0d word=%h expected %h", n, minus, sext(b, n), w, exp_w);
    end
  endtask

  initial begin
    for (int i = 0; i < 4096; i++) begin
      b8  = 8'(i);
      b12 = 12'(i);
      @(posedge clk);
      if (i < 256) begin
        check(65'(e8p), longint'(b8), 8, 1'b0);
        check(65'(e8m), longint'(b8), 8, 1'b1);
      end
      check(65'(e12p), longint'(b12), 12, 1'b0);
      check(65'(e12m), longint'(b12), 12, 1'b1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
