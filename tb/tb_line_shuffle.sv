// tb_line_shuffle: random lines and nonces; the shuffled line is compared
// with the bit-by-bit reference shuffle (beta = 2 rounds, 64-bit blocks).
module tb_line_shuffle;
  import tag_ref_pkg::*;

  int checks = 0, failures = 0;
  logic [255:0]     line, exp;
  logic [127:0]     nonce;
  logic [1:0][1:0]  bi, bj;
  logic [1:0][6:0]  sz;
  logic [1:0][5:0]  pa, pb;
  logic [3:0][63:0] blk_out;

  line_shuffle dut (.line, .blk_i(bi), .blk_j(bj), .seg_size(sz), .pos_a(pa), .pos_b(pb), .blk_out);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    round_ctrl_t c;
    for (int t = 0; t < 400; t++) begin
      for (int w = 0; w < 8; w++) line[32*w +: 32] = $urandom;
      nonce = {$urandom, $urandom, $urandom, $urandom};
      for (int k = 0; k < 2; k++) begin
        c = ref_round(nonce, 256, 64, 32, k);
        bi[k] = 2'(c.i); bj[k] = 2'(c.j); sz[k] = 7'(c.size); pa[k] = 6'(c.pa); pb[k] = 6'(c.pb);
      end
      exp = ref_shuffle(line, nonce, 256, 64, 32, 2);
      #1;
      for (int b = 0; b < 4; b++) begin
        checks++;
        if (blk_out[b] !== exp[(3-b)*64 +: 64]) begin
          failures++;
          $display("FAIL block %0d got %h exp %h", b, blk_out[b], exp[(3-b)*64 +: 64]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
