// tb_block_xor: the tag must be the XOR of all blocks; each tag bit is
// checked as the parity of the four block bits at that position.
module tb_block_xor;
  int checks = 0, failures = 0;
  logic [3:0][63:0] blk_in;
  logic [63:0]      tag;

  block_xor dut (.*);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 300; t++) begin
      for (int b = 0; b < 4; b++) blk_in[b] = {$urandom, $urandom};
      #1;
      for (int p = 0; p < 64; p++) begin
        int ones;
        ones = 0;
        for (int b = 0; b < 4; b++) ones += int'(blk_in[b][p]);
        checks++;
        if (tag[p] !== logic'(ones % 2)) begin
          failures++;
          $display("FAIL bit %0d", p);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
