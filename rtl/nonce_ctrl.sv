// nonce_ctrl: splits the nonce into the controls of the tag generator.
//
// The nonce is uniformly random, so each control is a plain bit field of it.
// Shuffle round k (0..BETA-1) reads the RB-bit field at nonce[k*RB +: RB]:
//   [QB-1:0]           first block i
//   next QB bits       r; second block j = (i + 1 + r mod (Q-1)) mod Q, so j != i
//   next SB bits       segment size - 1; size is 1..ALPHA
//   next PB bits       segment start in B(i)   (pos_a)
//   next PB bits       segment start in B(j)   (pos_b)
// after the BETA round fields, block b takes its left-rotate amount from the
// PB-bit field at nonce[BETA*RB + b*PB +: PB].
// The field layout is this design's own; the kinds of control (block pair,
// segment size, two segment positions, per-block shift) follow the tag
// generation algorithm. Purely combinational; most outputs are plain slices
// of the nonce, only the second block and the segment size need arithmetic.
module nonce_ctrl #(
  parameter int unsigned LINE_W  = tag_pkg::LINE_W,
  parameter int unsigned TAG_W   = tag_pkg::TAG_W,
  parameter int unsigned ALPHA   = tag_pkg::ALPHA,
  parameter int unsigned BETA    = tag_pkg::BETA,
  parameter int unsigned NONCE_W = tag_pkg::NONCE_W,
  localparam int unsigned Q  = LINE_W / TAG_W,
  localparam int unsigned QB = (Q > 1) ? $clog2(Q) : 1,
  localparam int unsigned PB = $clog2(TAG_W),
  localparam int unsigned SB = (ALPHA > 1) ? $clog2(ALPHA) : 1,
  localparam int unsigned RB = 2*QB + SB + 2*PB
) (
  input  logic [NONCE_W-1:0]           nonce,
  output logic [BETA-1:0][QB-1:0]      blk_i,
  output logic [BETA-1:0][QB-1:0]      blk_j,
  output logic [BETA-1:0][PB:0]        seg_size,
  output logic [BETA-1:0][PB-1:0]      pos_a,
  output logic [BETA-1:0][PB-1:0]      pos_b,
  output logic [Q-1:0][PB-1:0]         shift
);
  initial begin
    assert (Q >= 2 && (1 << QB) == Q) else $error("LINE_W/TAG_W must be a power of two >= 2");
    assert ((1 << PB) == TAG_W)       else $error("TAG_W must be a power of two");
    assert ((1 << SB) == ALPHA && ALPHA <= TAG_W) else $error("ALPHA must be a power of two <= TAG_W");
    assert (BETA*RB + Q*PB <= NONCE_W) else $error("nonce too short for the controls");
  end

  always_comb begin
    logic [RB-1:0] f;
    logic [QB-1:0] r;
    for (int k = 0; k < BETA; k++) begin
      f           = nonce[k*RB +: RB];
      blk_i[k]    = f[0 +: QB];
      r           = f[QB +: QB];
      blk_j[k]    = QB'((32'(f[0 +: QB]) + 32'd1 + 32'(r) % (Q - 1)) % Q);
      seg_size[k] = (PB+1)'(32'(f[2*QB +: SB]) + 32'd1);
      pos_a[k]    = f[2*QB + SB +: PB];
      pos_b[k]    = f[2*QB + SB + PB +: PB];
    end
    for (int b = 0; b < Q; b++) shift[b] = nonce[BETA*RB + b*PB +: PB];
  end
endmodule
