// tb_tag_auth_unit: end-to-end test of the tag generation / authentication
// unit at its default size (256-bit lines, 64-bit tags, 32768 lines).
// The testbench plays the off-chip memory: it stores every line with the
// tag the unit returns, and checks each tag against an independent model
// (seed table, LFSR, AES-128 and bit-level tag generator). It then reads
// lines back honestly and under the attacks the scheme is meant to catch:
//   - altered data (type A: a bit of the encrypted line flipped)
//   - altered tag
//   - relocation (type B: a valid line/tag pair of another address)
//   - replay (an old line/tag pair of the same address after a rewrite)
// and requires exactly the honest reads to authenticate. It also checks the
// seed-table clear time after reset and the 13-cycle response latency, and
// counts how often each mechanism happened; one that never did is a failure.
module tb_tag_auth_unit;
  import tag_ref_pkg::*;

  localparam int LINES = 32768;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [127:0] key;
  logic         req_valid = 1'b0, req_ready, req_write = 1'b0;
  logic [14:0]  req_line_idx;
  logic [255:0] req_line;
  logic [63:0]  req_tag;
  logic         resp_valid, resp_write, resp_auth_ok, resp_auth_fail;
  logic [63:0]  resp_tag;
  int checks = 0, failures = 0;

  tag_auth_unit dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // model of the on-chip seed state
  logic [63:0]  m_rnd [int];
  logic [31:0]  m_cnt [int];
  logic [63:0]  m_lfsr = 64'h0123_4567_89AB_CDEF;
  // off-chip memory and the copies an attacker kept
  logic [255:0] mem_line [int];
  logic [63:0]  mem_tag  [int];
  logic [255:0] old_line [int];
  logic [63:0]  old_tag  [int];

  int n_write = 0, n_ok = 0, n_data = 0, n_tag = 0, n_reloc = 0, n_replay = 0, n_init = 0;

  function automatic logic [63:0] model_tag(int idx, logic [255:0] line);
    tag_pkg::nonce_seed_t s;
    s.addr = 32'(idx);
    s.rnd  = m_rnd.exists(idx) ? m_rnd[idx] : '0;
    s.cnt  = m_cnt.exists(idx) ? m_cnt[idx] : '0;
    return 64'(ref_tag(line, ref_aes128(key, s), 256, 64, 32, 2));
  endfunction

  task automatic check(input string what, input bit ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // one request; returns the response fields
  task automatic request(input bit wr, input int idx, input logic [255:0] line,
                         input logic [63:0] tag, output logic [63:0] rtag, output bit ok);
    int lat;
    while (!req_ready) @(negedge clk);
    req_valid = 1'b1; req_write = wr; req_line_idx = 15'(idx); req_line = line; req_tag = tag;
    @(negedge clk);
    req_valid = 1'b0; req_line = '0; req_tag = '0;
    lat = 0;
    while (!resp_valid && lat < 100) begin @(negedge clk); lat++; end
    check($sformatf("latency %0d", lat), lat == 13);
    check("resp_write", resp_write == wr);
    check("one verdict", wr ? (!resp_auth_ok && !resp_auth_fail) : (resp_auth_ok ^ resp_auth_fail));
    rtag = resp_tag;
    ok   = resp_auth_ok;
  endtask

  task automatic do_write(input int idx, input logic [255:0] line);
    logic [63:0] t;
    bit ok;
    if (mem_line.exists(idx)) begin
      old_line[idx] = mem_line[idx];
      old_tag[idx]  = mem_tag[idx];
    end
    m_cnt[idx] = (m_cnt.exists(idx) ? m_cnt[idx] : 32'd0) + 1;
    m_rnd[idx] = m_lfsr;
    m_lfsr = {m_lfsr[62:0], m_lfsr[63] ^ m_lfsr[62] ^ m_lfsr[60] ^ m_lfsr[59]};
    request(1'b1, idx, line, '0, t, ok);
    check($sformatf("write tag line %0d", idx), t === model_tag(idx, line));
    mem_line[idx] = line;
    mem_tag[idx]  = t;
    n_write++;
  endtask

  task automatic do_read(input int idx, input logic [255:0] line, input logic [63:0] tag,
                         input bit expect_ok, input string what);
    logic [63:0] t;
    bit ok;
    request(1'b0, idx, line, tag, t, ok);
    check($sformatf("%s line %0d recomputed tag", what, idx), t === model_tag(idx, line));
    check($sformatf("%s line %0d verdict", what, idx), ok == expect_ok);
  endtask

  function automatic logic [255:0] rand_line();
    logic [255:0] l;
    for (int w = 0; w < 8; w++) l[32*w +: 32] = $urandom;
    return l;
  endfunction

  initial begin
    int idx, other, kind;
    key = 128'h000102030405060708090a0b0c0d0e0f;
    req_line_idx = '0; req_line = '0; req_tag = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    while (!req_ready) begin @(negedge clk); n_init++; end
    check("seed table clear time", n_init == LINES);

    // the same data at two addresses gets two different tags
    begin
      logic [255:0] l = rand_line();
      do_write(0, l);
      do_write(LINES - 1, l);
      check("location-specific tag", mem_tag[0] != mem_tag[LINES - 1]);
    end

    for (int t = 0; t < 24; t++) do_write($urandom_range(0, LINES - 1), rand_line());

    for (int t = 0; t < 150; t++) begin
      int keys[$];
      foreach (mem_line[k]) keys.push_back(k);
      idx = keys[$urandom_range(0, keys.size() - 1)];
      kind = $urandom_range(0, 5);
      case (kind)
        0: do_write(idx, rand_line());
        1: begin do_read(idx, mem_line[idx], mem_tag[idx], 1'b1, "honest"); n_ok++; end
        2: begin
             do_read(idx, mem_line[idx] ^ (256'd1 << $urandom_range(0, 255)), mem_tag[idx],
                     1'b0, "altered data");
             n_data++;
           end
        3: begin
             do_read(idx, mem_line[idx], mem_tag[idx] ^ (64'd1 << $urandom_range(0, 63)),
                     1'b0, "altered tag");
             n_tag++;
           end
        4: begin
             other = keys[$urandom_range(0, keys.size() - 1)];
             if (other != idx) begin
               do_read(idx, mem_line[other], mem_tag[other], 1'b0, "relocated pair");
               n_reloc++;
             end
           end
        default:
          if (old_line.exists(idx)) begin
            do_read(idx, old_line[idx], old_tag[idx], 1'b0, "replayed pair");
            n_replay++;
          end else begin
            do_write(idx, rand_line());
          end
      endcase
    end

    $display("writes=%0d honest=%0d data=%0d tag=%0d relocate=%0d replay=%0d init_cycles=%0d",
             n_write, n_ok, n_data, n_tag, n_reloc, n_replay, n_init);
    check("writes happened", n_write > 0);
    check("honest reads happened", n_ok > 0);
    check("data tampering happened", n_data > 0);
    check("tag tampering happened", n_tag > 0);
    check("relocation happened", n_reloc > 0);
    check("replay happened", n_replay > 0);
    check("seed table clear happened", n_init > 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
