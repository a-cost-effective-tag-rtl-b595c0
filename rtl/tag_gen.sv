// tag_gen: generates the TAG_W-bit tag of one encrypted LINE_W-bit cache line.
//
// The tag is an inverse transform of the uniformly random encrypted line,
// built only from operations that keep a uniform distribution: the line is
// shuffled (BETA nonce-controlled segment swaps between tag-sized blocks),
// every block is rotated left by a nonce-controlled amount, and the blocks
// are XORed together. All three steps and their order follow the published scheme;
// the nonce bit layout is in nonce_ctrl.
// Timing: the whole transform is one combinational path into an output
// register, so `tag` is valid with `out_valid` one cycle after `in_valid`,
// one line per cycle. This single-register pipeline is this design's choice.
module tag_gen #(
  parameter int unsigned LINE_W  = tag_pkg::LINE_W,
  parameter int unsigned TAG_W   = tag_pkg::TAG_W,
  parameter int unsigned ALPHA   = tag_pkg::ALPHA,
  parameter int unsigned BETA    = tag_pkg::BETA,
  parameter int unsigned NONCE_W = tag_pkg::NONCE_W
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               in_valid,
  input  logic [LINE_W-1:0]  line,
  input  logic [NONCE_W-1:0] nonce,
  output logic               out_valid,
  output logic [TAG_W-1:0]   tag
);
  localparam int unsigned Q  = LINE_W / TAG_W;
  localparam int unsigned QB = (Q > 1) ? $clog2(Q) : 1;
  localparam int unsigned PB = $clog2(TAG_W);

  logic [BETA-1:0][QB-1:0]  blk_i, blk_j;
  logic [BETA-1:0][PB:0]    seg_size;
  logic [BETA-1:0][PB-1:0]  pos_a, pos_b;
  logic [Q-1:0][PB-1:0]     shift;
  logic [Q-1:0][TAG_W-1:0]  shuffled, permuted;
  logic [TAG_W-1:0]         tag_d;

  nonce_ctrl #(.LINE_W(LINE_W), .TAG_W(TAG_W), .ALPHA(ALPHA), .BETA(BETA),
               .NONCE_W(NONCE_W)) u_ctrl (
    .nonce, .blk_i, .blk_j, .seg_size, .pos_a, .pos_b, .shift
  );

  line_shuffle #(.LINE_W(LINE_W), .TAG_W(TAG_W), .BETA(BETA)) u_shuffle (
    .line, .blk_i, .blk_j, .seg_size, .pos_a, .pos_b, .blk_out(shuffled)
  );

  block_permute #(.TAG_W(TAG_W), .Q(Q)) u_perm (
    .blk_in(shuffled), .shift, .blk_out(permuted)
  );

  block_xor #(.TAG_W(TAG_W), .Q(Q)) u_xor (.blk_in(permuted), .tag(tag_d));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      tag       <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) tag <= tag_d;
    end
  end
endmodule
