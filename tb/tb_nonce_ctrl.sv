// tb_nonce_ctrl: random nonces; every decoded control is compared with the
// bit-level reference decode, and the chosen blocks must differ. Runs the
// default 256/64 configuration and the 256/128 one.
module tb_nonce_ctrl;
  import tag_ref_pkg::*;

  logic [127:0] nonce;
  int checks = 0, failures = 0;

  // default: n=256, m=64, alpha=32, beta=2
  logic [1:0][1:0] i64, j64;
  logic [1:0][6:0] sz64;
  logic [1:0][5:0] pa64, pb64;
  logic [3:0][5:0] sh64;
  nonce_ctrl u64 (.nonce, .blk_i(i64), .blk_j(j64), .seg_size(sz64), .pos_a(pa64),
                  .pos_b(pb64), .shift(sh64));

  // n=256, m=128, alpha=32, beta=2
  logic [1:0][0:0] i128, j128;
  logic [1:0][7:0] sz128;
  logic [1:0][6:0] pa128, pb128;
  logic [1:0][6:0] sh128;
  nonce_ctrl #(.TAG_W(128)) u128 (.nonce, .blk_i(i128), .blk_j(j128), .seg_size(sz128),
                                  .pos_a(pa128), .pos_b(pb128), .shift(sh128));

  task automatic check(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s got %0d exp %0d nonce=%h", what, got, exp, nonce);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    round_ctrl_t c;
    for (int t = 0; t < 300; t++) begin
      nonce = {$urandom, $urandom, $urandom, $urandom};
      #1;
      for (int k = 0; k < 2; k++) begin
        c = ref_round(nonce, 256, 64, 32, k);
        check("i64", int'(i64[k]), c.i);
        check("j64", int'(j64[k]), c.j);
        check("i64!=j64", int'(i64[k] != j64[k]), 1);
        check("size64", int'(sz64[k]), c.size);
        check("pa64", int'(pa64[k]), c.pa);
        check("pb64", int'(pb64[k]), c.pb);
        c = ref_round(nonce, 256, 128, 32, k);
        check("i128", int'(i128[k]), c.i);
        check("j128", int'(j128[k]), c.j);
        check("size128", int'(sz128[k]), c.size);
        check("pa128", int'(pa128[k]), c.pa);
        check("pb128", int'(pb128[k]), c.pb);
      end
      for (int b = 0; b < 4; b++) check("shift64", int'(sh64[b]), ref_shift(nonce, 256, 64, 32, 2, b));
      for (int b = 0; b < 2; b++) check("shift128", int'(sh128[b]), ref_shift(nonce, 256, 128, 32, 2, b));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
