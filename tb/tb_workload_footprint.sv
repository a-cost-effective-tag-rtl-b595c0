// tb_workload_footprint: tags the whole memory footprint of each of eight
// embedded benchmark programs (adpcm, dijkstra, jpeg, qsort, rijndael, sha,
// stringsearch, susan), then reads every line back and requires it to
// authenticate, and one altered line per program to fail.
// Two units run side by side on the same traffic: the default one (64-bit
// tags) and one built with 128-bit tags. For each program the off-chip tag
// storage (lines x tag bytes) is compared with the published overhead of
// this scheme: 64-bit tags cost a quarter of the program size, 128-bit tags
// half. Every 97th write tag is also checked against the independent model.
module tb_workload_footprint;
  import tag_ref_pkg::*;

  localparam int LINES = 32768;
  localparam int NAPP  = 8;
  localparam string APP_NAME [NAPP] = '{"adpcm", "dijkstra", "jpeg", "qsort", "rijndael",
                                        "sha", "stringsearch", "susan"};
  // program size in KB and published tag storage in KB (64-bit, 128-bit tags)
  localparam int APP_KB   [NAPP] = '{308, 436, 759, 403, 334, 301, 295, 459};
  localparam int TAG64_KB [NAPP] = '{77, 109, 190, 101, 84, 75, 74, 115};
  localparam int TAG128_KB[NAPP] = '{154, 218, 380, 202, 167, 151, 148, 230};

  logic clk = 1'b0, rst_n = 1'b0;
  logic [127:0] key = 128'h2b7e151628aed2a6abf7158809cf4f3c;
  logic         req_valid = 1'b0, req_write = 1'b0;
  logic [14:0]  req_line_idx = '0;
  logic [255:0] req_line = '0;
  logic [63:0]  req_tag64 = '0;
  logic [127:0] req_tag128 = '0;
  logic         rdy64, rdy128, rv64, rv128, rw64, rw128, ok64, ok128, fail64, fail128;
  logic [63:0]  rtag64;
  logic [127:0] rtag128;
  int checks = 0, failures = 0;

  tag_auth_unit u64 (
    .clk, .rst_n, .key, .req_valid, .req_ready(rdy64), .req_write, .req_line_idx, .req_line,
    .req_tag(req_tag64), .resp_valid(rv64), .resp_write(rw64), .resp_tag(rtag64),
    .resp_auth_ok(ok64), .resp_auth_fail(fail64));

  tag_auth_unit #(.TAG_W(128)) u128 (
    .clk, .rst_n, .key, .req_valid, .req_ready(rdy128), .req_write, .req_line_idx, .req_line,
    .req_tag(req_tag128), .resp_valid(rv128), .resp_write(rw128), .resp_tag(rtag128),
    .resp_auth_ok(ok128), .resp_auth_fail(fail128));

  always #5 clk = ~clk;

  initial begin
    repeat (20_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [63:0]  tag64_mem  [LINES];
  logic [127:0] tag128_mem [LINES];
  logic [63:0]  m_rnd [LINES];
  logic [31:0]  m_cnt [LINES];
  logic [63:0]  m_lfsr = 64'h0123_4567_89AB_CDEF;

  task automatic check(input string what, input bit ok);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  // line contents are a function of program and line number
  function automatic logic [255:0] line_data(int app, int idx);
    logic [255:0] l;
    for (int w = 0; w < 8; w++) l[32*w +: 32] = 32'(app * 32'h9E3779B9 ^ idx * 32'h85EBCA6B ^ w * 32'hC2B2AE35);
    return l;
  endfunction

  task automatic request(input bit wr, input int idx, input logic [255:0] line,
                         input logic [63:0] t64, input logic [127:0] t128);
    while (!(rdy64 && rdy128)) @(negedge clk);
    req_valid = 1'b1; req_write = wr; req_line_idx = 15'(idx); req_line = line;
    req_tag64 = t64; req_tag128 = t128;
    @(negedge clk);
    req_valid = 1'b0;
    while (!(rv64 && rv128)) @(negedge clk);
  endtask

  initial begin
    int lines, tb64, tb128;
    tag_pkg::nonce_seed_t s;
    logic [127:0] nonce;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int l = 0; l < LINES; l++) m_cnt[l] = '0;
    for (int a = 0; a < NAPP; a++) begin
      lines = (APP_KB[a] * 1024 + 31) / 32;
      check($sformatf("%s fits in the protected memory", APP_NAME[a]), lines <= LINES);
      for (int i = 0; i < lines; i++) begin
        m_cnt[i]++;
        m_rnd[i] = m_lfsr;
        m_lfsr = {m_lfsr[62:0], m_lfsr[63] ^ m_lfsr[62] ^ m_lfsr[60] ^ m_lfsr[59]};
        request(1'b1, i, line_data(a, i), '0, '0);
        tag64_mem[i]  = rtag64;
        tag128_mem[i] = rtag128;
        if (i % 97 == 0) begin
          s = '{addr: 32'(i), rnd: m_rnd[i], cnt: m_cnt[i]};
          nonce = ref_aes128(key, s);
          check($sformatf("%s tag64 line %0d", APP_NAME[a], i),
                rtag64 === 64'(ref_tag(line_data(a, i), nonce, 256, 64, 32, 2)));
          check($sformatf("%s tag128 line %0d", APP_NAME[a], i),
                rtag128 === ref_tag(line_data(a, i), nonce, 256, 128, 32, 2));
        end
      end
      for (int i = 0; i < lines; i++) begin
        request(1'b0, i, line_data(a, i), tag64_mem[i], tag128_mem[i]);
        check($sformatf("%s read line %0d", APP_NAME[a], i), ok64 && ok128);
      end
      request(1'b0, lines / 2, line_data(a, lines / 2) ^ 256'd1, tag64_mem[lines / 2],
              tag128_mem[lines / 2]);
      check($sformatf("%s altered line", APP_NAME[a]), fail64 && fail128);
      tb64  = lines * 8;
      tb128 = lines * 16;
      $display("%-12s %4d KB  %5d lines  tags: %3d KB (64-bit)  %3d KB (128-bit)", APP_NAME[a],
               APP_KB[a], lines, (tb64 + 512) / 1024, (tb128 + 512) / 1024);
      check($sformatf("%s 64-bit tag storage", APP_NAME[a]), (tb64 + 512) / 1024 == TAG64_KB[a]);
      check($sformatf("%s 128-bit tag storage", APP_NAME[a]), (tb128 + 512) / 1024 == TAG128_KB[a]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
