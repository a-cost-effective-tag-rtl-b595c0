// tb_block_permute: every block must come out rotated left by its own
// amount; checked bit by bit on random blocks and amounts, including 0.
module tb_block_permute;
  int checks = 0, failures = 0;
  logic [3:0][63:0] blk_in, blk_out;
  logic [3:0][5:0]  shift;

  block_permute dut (.*);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 500; t++) begin
      for (int b = 0; b < 4; b++) begin
        blk_in[b] = {$urandom, $urandom};
        shift[b]  = (t < 4) ? 6'(t * 21) : 6'($urandom);
      end
      #1;
      for (int b = 0; b < 4; b++)
        for (int p = 0; p < 64; p++) begin
          checks++;
          if (blk_out[b][(p + int'(shift[b])) % 64] !== blk_in[b][p]) begin
            failures++;
            $display("FAIL block %0d bit %0d shift %0d", b, p, shift[b]);
          end
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
