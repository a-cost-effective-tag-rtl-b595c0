// tb_seg_shuffle: the two worked examples of the segment shuffle on 8-bit
// blocks (a 2-bit segment, and a 5-bit segment that wraps around B(i)), then
// random swaps on the default 64-bit blocks against a bit-by-bit reference.
module tb_seg_shuffle;
  import tag_ref_pkg::*;

  int checks = 0, failures = 0;

  // 8-bit blocks, two of them
  logic [1:0][7:0] s_in, s_out;
  logic [0:0]      s_i, s_j;
  logic [3:0]      s_size;
  logic [2:0]      s_pa, s_pb;
  seg_shuffle #(.TAG_W(8), .Q(2)) u_small (.blk_in(s_in), .blk_i(s_i), .blk_j(s_j),
    .seg_size(s_size), .pos_a(s_pa), .pos_b(s_pb), .blk_out(s_out));

  // default: 64-bit blocks, four of them
  logic [3:0][63:0] d_in, d_out;
  logic [1:0]       d_i, d_j;
  logic [6:0]       d_size;
  logic [5:0]       d_pa, d_pb;
  seg_shuffle u_dut (.blk_in(d_in), .blk_i(d_i), .blk_j(d_j), .seg_size(d_size),
    .pos_a(d_pa), .pos_b(d_pb), .blk_out(d_out));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic example(input logic [7:0] bi, bj, input int sz, pa, pb,
                       input logic [7:0] ei, ej);
    s_in = {bj, bi}; s_i = 1'b0; s_j = 1'b1;
    s_size = 4'(sz); s_pa = 3'(pa); s_pb = 3'(pb);
    #1;
    checks++;
    if (s_out[0] !== ei || s_out[1] !== ej) begin
      failures++;
      $display("FAIL example: got %b %b exp %b %b", s_out[0], s_out[1], ei, ej);
    end
  endtask

  initial begin
    bit blk[16][128];
    round_ctrl_t c;
    // 2-bit segment: bits 6:5 of B(i) <-> bits 2:1 of B(j)
    example(8'b1001_0111, 8'b0101_0110, 2, 5, 1, 8'b1111_0111, 8'b0101_0000);
    // 5-bit segment wrapping in B(i) (bits 4..7,0) <-> bits 3..7 of B(j)
    example(8'b1001_0111, 8'b0101_0110, 5, 4, 3, 8'b1010_0110, 8'b1100_1110);
    for (int t = 0; t < 500; t++) begin
      for (int b = 0; b < 4; b++) d_in[b] = {$urandom, $urandom};
      c.i = $urandom_range(0, 3);
      c.j = (c.i + $urandom_range(1, 3)) % 4;
      c.size = $urandom_range(1, 64);
      c.pa = $urandom_range(0, 63);
      c.pb = $urandom_range(0, 63);
      d_i = 2'(c.i); d_j = 2'(c.j); d_size = 7'(c.size); d_pa = 6'(c.pa); d_pb = 6'(c.pb);
      for (int b = 0; b < 4; b++) for (int p = 0; p < 64; p++) blk[b][p] = d_in[b][p];
      ref_seg_swap(blk, 64, c);
      #1;
      for (int b = 0; b < 4; b++) begin
        logic [63:0] e;
        for (int p = 0; p < 64; p++) e[p] = blk[b][p];
        checks++;
        if (d_out[b] !== e) begin
          failures++;
          $display("FAIL block %0d i=%0d j=%0d size=%0d pa=%0d pb=%0d", b, c.i, c.j, c.size, c.pa, c.pb);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
