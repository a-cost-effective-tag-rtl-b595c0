// seg_shuffle: one segment shuffle between two blocks of a cache line.
//
// Blocks are TAG_W bits wide and treated as rings. The segment of B(i) that
// starts at bit pos_a and runs seg_size bits upward (wrapping past the top bit
// to bit 0) is exchanged with the segment of B(j) that starts at pos_b, bit
// for bit in order: B(i)[pos_a+t] <-> B(j)[pos_b+t], t = 0..seg_size-1, all
// indices mod TAG_W. The other blocks pass unchanged. Wrapped segments and
// order-preserving exchange follow the published worked example; counting positions
// from the least significant bit is this design's choice.
// It is built from two rotators and two ring masks: B(j) rotated by
// pos_a-pos_b lines its segment up with the one in B(i), and vice versa.
// Purely combinational. i must differ from j; seg_size is 1..TAG_W.
module seg_shuffle #(
  parameter int unsigned TAG_W = tag_pkg::TAG_W,
  parameter int unsigned Q     = tag_pkg::LINE_W / tag_pkg::TAG_W,
  localparam int unsigned QB = (Q > 1) ? $clog2(Q) : 1,
  localparam int unsigned PB = $clog2(TAG_W)
) (
  input  logic [Q-1:0][TAG_W-1:0] blk_in,
  input  logic [QB-1:0]           blk_i,
  input  logic [QB-1:0]           blk_j,
  input  logic [PB:0]             seg_size,
  input  logic [PB-1:0]           pos_a,
  input  logic [PB-1:0]           pos_b,
  output logic [Q-1:0][TAG_W-1:0] blk_out
);
  function automatic logic [TAG_W-1:0] rotl(input logic [TAG_W-1:0] x, input logic [PB-1:0] s);
    return (x << s) | (x >> (TAG_W - int'(s)));
  endfunction

  logic [TAG_W-1:0] bi, bj, low, mask_a, mask_b, bi_new, bj_new;

  always_comb begin
    bi     = blk_in[blk_i];
    bj     = blk_in[blk_j];
    low    = (seg_size >= (PB+1)'(TAG_W)) ? '1
           : TAG_W'(({{TAG_W{1'b0}}, 1'b1} << seg_size) - 1'b1);
    mask_a = rotl(low, pos_a);
    mask_b = rotl(low, pos_b);
    bi_new = (bi & ~mask_a) | (rotl(bj, pos_a - pos_b) & mask_a);
    bj_new = (bj & ~mask_b) | (rotl(bi, pos_b - pos_a) & mask_b);
    for (int b = 0; b < Q; b++) begin
      if (QB'(b) == blk_i)      blk_out[b] = bi_new;
      else if (QB'(b) == blk_j) blk_out[b] = bj_new;
      else                      blk_out[b] = blk_in[b];
    end
  end
endmodule
