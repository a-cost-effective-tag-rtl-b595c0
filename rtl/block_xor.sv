// block_xor: folds the permuted blocks into the tag by bitwise XOR,
// tag = B(1) ^ B(2) ^ ... ^ B(Q), as the published scheme specifies. Combinational.
module block_xor #(
  parameter int unsigned TAG_W = tag_pkg::TAG_W,
  parameter int unsigned Q     = tag_pkg::LINE_W / tag_pkg::TAG_W
) (
  input  logic [Q-1:0][TAG_W-1:0] blk_in,
  output logic [TAG_W-1:0]        tag
);
  always_comb begin
    tag = '0;
    for (int b = 0; b < Q; b++) tag ^= blk_in[b];
  end
endmodule
