// tb_nonce_gen: a 64-line nonce generator. Checks that the seed table is
// cleared for exactly LINES cycles after reset, that a write steps the line's
// counter and takes a fresh LFSR value while a read reuses the stored seed,
// that the nonce is the AES-128 encryption of {line, random, counter}
// (independent model), and that nonce_valid comes 11 cycles after start.
module tb_nonce_gen;
  import tag_ref_pkg::*;

  localparam int LINES = 64;
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0, write = 1'b0;
  logic [127:0] key, nonce;
  logic [5:0]   line_idx;
  logic         ready, nonce_valid;
  tag_pkg::nonce_seed_t seed;
  int checks = 0, failures = 0;

  nonce_gen #(.LINES(LINES)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [63:0] m_rnd [LINES];
  logic [31:0] m_cnt [LINES];
  logic [63:0] m_lfsr;

  task automatic check(input string what, input logic [127:0] got, input logic [127:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s got %h exp %h", what, got, exp);
    end
  endtask

  task automatic access(input bit wr, input int idx);
    int lat;
    tag_pkg::nonce_seed_t e;
    while (!ready) @(negedge clk);
    if (wr) begin
      m_cnt[idx]++;
      m_rnd[idx] = m_lfsr;
      m_lfsr = {m_lfsr[62:0], m_lfsr[63] ^ m_lfsr[62] ^ m_lfsr[60] ^ m_lfsr[59]};
    end
    e = '{addr: 32'(idx), rnd: m_rnd[idx], cnt: m_cnt[idx]};
    start = 1'b1; write = wr; line_idx = 6'(idx);
    @(negedge clk);
    start = 1'b0; write = 1'b0; line_idx = '0;
    lat = 0;
    while (!nonce_valid && lat < 50) begin @(negedge clk); lat++; end
    check("latency", 128'(lat), 128'd11);
    check("seed", seed, e);
    check("nonce", nonce, ref_aes128(key, e));
  endtask

  initial begin
    int wait_cycles;
    key = 128'h2b7e151628aed2a6abf7158809cf4f3c;
    line_idx = '0;
    m_lfsr = 64'h0123_4567_89AB_CDEF;
    for (int l = 0; l < LINES; l++) begin m_rnd[l] = '0; m_cnt[l] = '0; end
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    wait_cycles = 0;
    while (!ready) begin @(negedge clk); wait_cycles++; end
    check("init cycles", 128'(wait_cycles), 128'(LINES));
    access(0, 5);            // never written: all-zero seed
    access(1, 5);
    access(0, 5);
    access(1, 5);            // counter 2, new random value
    access(0, 5);
    access(1, 63);
    access(0, 63);
    for (int t = 0; t < 60; t++) access($urandom_range(0, 1), $urandom_range(0, LINES - 1));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
