// tb_aes128_enc: checks the AES-128 core against the FIPS-197 example
// vectors and against an independent byte-level model on random blocks, and
// checks that `done` comes exactly 10 cycles after `start`.
module tb_aes128_enc;
  import tag_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0, busy, done;
  logic [127:0] key, pt, ct;
  int checks = 0, failures = 0;

  aes128_enc dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input logic [127:0] k, input logic [127:0] p, input logic [127:0] exp);
    int lat = 0;
    @(negedge clk);
    key = k; pt = p; start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    key = '0; pt = '0;          // sampled only with start
    lat = 0;
    while (!done) begin @(negedge clk); lat++; end
    checks++;
    if (ct !== exp) begin
      failures++;
      $display("FAIL key=%h pt=%h ct=%h exp=%h", k, p, ct, exp);
    end
    checks++;
    if (lat != 10) begin
      failures++;
      $display("FAIL latency %0d, expected 10", lat);
    end
  endtask

  initial begin
    logic [127:0] k, p;
    key = '0; pt = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    run(128'h000102030405060708090a0b0c0d0e0f, 128'h00112233445566778899aabbccddeeff,
        128'h69c4e0d86a7b0430d8cdb78070b4c55a);
    run(128'h2b7e151628aed2a6abf7158809cf4f3c, 128'h3243f6a8885a308d313198a2e0370734,
        128'h3925841d02dc09fbdc118597196a0b32);
    for (int t = 0; t < 40; t++) begin
      k = {$urandom, $urandom, $urandom, $urandom};
      p = {$urandom, $urandom, $urandom, $urandom};
      run(k, p, ref_aes128(k, p));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
