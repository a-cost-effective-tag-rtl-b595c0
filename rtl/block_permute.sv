// block_permute: the random permutation step of the tag generator.
//
// Each of the Q blocks is rotated left (towards its most significant bit) by
// its own nonce-controlled amount shift[b], 0..TAG_W-1, as the published
// scheme specifies. Purely combinational: one barrel rotator per block.
module block_permute #(
  parameter int unsigned TAG_W = tag_pkg::TAG_W,
  parameter int unsigned Q     = tag_pkg::LINE_W / tag_pkg::TAG_W,
  localparam int unsigned PB = $clog2(TAG_W)
) (
  input  logic [Q-1:0][TAG_W-1:0] blk_in,
  input  logic [Q-1:0][PB-1:0]    shift,
  output logic [Q-1:0][TAG_W-1:0] blk_out
);
  always_comb
    for (int b = 0; b < Q; b++)
      blk_out[b] = (blk_in[b] << shift[b]) | (blk_in[b] >> (TAG_W - int'(shift[b])));
endmodule
