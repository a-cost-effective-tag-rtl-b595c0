// line_shuffle: the nonce-controlled line shuffle of the tag generator.
//
// The LINE_W-bit encrypted line is cut into Q = LINE_W/TAG_W blocks of tag
// size, B(1) being the most significant (line = B(1) || B(2) || ... || B(Q)).
// Then BETA segment-shuffle rounds run one after another, round k with its
// own block pair, segment size and segment positions (see seg_shuffle). The
// output is the shuffled blocks, index 0 holding B(1). Purely combinational:
// the BETA rounds are chained stages.
module line_shuffle #(
  parameter int unsigned LINE_W = tag_pkg::LINE_W,
  parameter int unsigned TAG_W  = tag_pkg::TAG_W,
  parameter int unsigned BETA   = tag_pkg::BETA,
  localparam int unsigned Q  = LINE_W / TAG_W,
  localparam int unsigned QB = (Q > 1) ? $clog2(Q) : 1,
  localparam int unsigned PB = $clog2(TAG_W)
) (
  input  logic [LINE_W-1:0]         line,
  input  logic [BETA-1:0][QB-1:0]   blk_i,
  input  logic [BETA-1:0][QB-1:0]   blk_j,
  input  logic [BETA-1:0][PB:0]     seg_size,
  input  logic [BETA-1:0][PB-1:0]   pos_a,
  input  logic [BETA-1:0][PB-1:0]   pos_b,
  output logic [Q-1:0][TAG_W-1:0]   blk_out
);
  logic [BETA:0][Q-1:0][TAG_W-1:0] stage;

  always_comb
    for (int b = 0; b < Q; b++) stage[0][b] = line[(Q-1-b)*TAG_W +: TAG_W];

  for (genvar k = 0; k < BETA; k++) begin : g_round
    seg_shuffle #(.TAG_W(TAG_W), .Q(Q)) u_seg (
      .blk_in  (stage[k]),
      .blk_i   (blk_i[k]),
      .blk_j   (blk_j[k]),
      .seg_size(seg_size[k]),
      .pos_a   (pos_a[k]),
      .pos_b   (pos_b[k]),
      .blk_out (stage[k+1])
    );
  end

  assign blk_out = stage[BETA];
endmodule
