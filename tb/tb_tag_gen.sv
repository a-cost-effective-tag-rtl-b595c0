// tb_tag_gen: random encrypted lines and nonces through the default tag
// generator (n=256, m=64, alpha=32, beta=2) and the 128-bit-tag one; every
// tag is compared with the bit-level reference and must appear exactly one
// cycle after its input, with back-to-back inputs.
module tb_tag_gen;
  import tag_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0;
  logic [255:0] line;
  logic [127:0] nonce;
  logic         v64, v128;
  logic [63:0]  tag64;
  logic [127:0] tag128;
  int checks = 0, failures = 0;

  tag_gen u64 (.clk, .rst_n, .in_valid, .line, .nonce, .out_valid(v64), .tag(tag64));
  tag_gen #(.TAG_W(128)) u128 (.clk, .rst_n, .in_valid, .line, .nonce, .out_valid(v128), .tag(tag128));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [63:0]  e64;
    logic [127:0] e128;
    line = '0; nonce = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 300; t++) begin
      for (int w = 0; w < 8; w++) line[32*w +: 32] = $urandom;
      nonce = {$urandom, $urandom, $urandom, $urandom};
      in_valid = 1'b1;
      e64  = 64'(ref_tag(line, nonce, 256, 64, 32, 2));
      e128 = ref_tag(line, nonce, 256, 128, 32, 2);
      @(negedge clk);
      checks++;
      if (!v64 || tag64 !== e64) begin
        failures++;
        $display("FAIL tag64 v=%b got %h exp %h", v64, tag64, e64);
      end
      checks++;
      if (!v128 || tag128 !== e128) begin
        failures++;
        $display("FAIL tag128 v=%b got %h exp %h", v128, tag128, e128);
      end
      if (t % 3 == 2) begin
        in_valid = 1'b0;
        @(negedge clk);
        checks++;
        if (v64 || v128) begin
          failures++;
          $display("FAIL out_valid without input");
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
