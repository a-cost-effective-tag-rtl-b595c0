// tb_tag_size_sweep: the tag generator at the other power-of-two points of
// the tag-size / alpha / beta trade-off on a 256-bit line: 16-, 32-, 64- and
// 128-bit tags with alpha=16, beta=1, and a 32-bit tag with alpha=32,
// beta=2 (the default 64-bit, alpha=32, beta=2 point is covered elsewhere).
// Random lines and nonces; every tag is compared with the bit-level model.
module tb_tag_size_sweep;
  import tag_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0;
  logic [255:0] line;
  logic [127:0] nonce;
  logic [4:0]   v;
  logic [15:0]  t16;
  logic [31:0]  t32, t32b;
  logic [63:0]  t64;
  logic [127:0] t128;
  int checks = 0, failures = 0;

  tag_gen #(.TAG_W(16),  .ALPHA(16), .BETA(1)) u16  (.clk, .rst_n, .in_valid, .line, .nonce, .out_valid(v[0]), .tag(t16));
  tag_gen #(.TAG_W(32),  .ALPHA(16), .BETA(1)) u32  (.clk, .rst_n, .in_valid, .line, .nonce, .out_valid(v[1]), .tag(t32));
  tag_gen #(.TAG_W(64),  .ALPHA(16), .BETA(1)) u64  (.clk, .rst_n, .in_valid, .line, .nonce, .out_valid(v[2]), .tag(t64));
  tag_gen #(.TAG_W(128), .ALPHA(16), .BETA(1)) u128 (.clk, .rst_n, .in_valid, .line, .nonce, .out_valid(v[3]), .tag(t128));
  tag_gen #(.TAG_W(32),  .ALPHA(32), .BETA(2)) u32b (.clk, .rst_n, .in_valid, .line, .nonce, .out_valid(v[4]), .tag(t32b));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what, input logic [127:0] got, input logic [127:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s got %h exp %h", what, got, exp);
    end
  endtask

  initial begin
    logic [127:0] e16, e32, e64, e128, e32b;
    line = '0; nonce = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 300; t++) begin
      for (int w = 0; w < 8; w++) line[32*w +: 32] = $urandom;
      nonce = {$urandom, $urandom, $urandom, $urandom};
      e16  = ref_tag(line, nonce, 256, 16, 16, 1);
      e32  = ref_tag(line, nonce, 256, 32, 16, 1);
      e64  = ref_tag(line, nonce, 256, 64, 16, 1);
      e128 = ref_tag(line, nonce, 256, 128, 16, 1);
      e32b = ref_tag(line, nonce, 256, 32, 32, 2);
      in_valid = 1'b1;
      @(negedge clk);
      in_valid = 1'b0;
      check("valid", 128'(v), 128'h1f);
      check("m=16 a=16 b=1", 128'(t16), e16);
      check("m=32 a=16 b=1", 128'(t32), e32);
      check("m=64 a=16 b=1", 128'(t64), e64);
      check("m=128 a=16 b=1", t128, e128);
      check("m=32 a=32 b=2", 128'(t32b), e32b);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
