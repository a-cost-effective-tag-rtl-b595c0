// tag_check: the authentication comparator.
//
// When `in_valid` is high it compares the tag recomputed from the fetched
// line with the tag fetched from memory. One cycle later `out_valid` is high
// with exactly one of `auth_ok` (equal: the line may be decrypted and used)
// and `auth_fail` (different: the line must be discarded). The registered
// result is this design's choice.
module tag_check #(
  parameter int unsigned TAG_W = tag_pkg::TAG_W
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  logic [TAG_W-1:0] tag_calc,
  input  logic [TAG_W-1:0] tag_mem,
  output logic             out_valid,
  output logic             auth_ok,
  output logic             auth_fail
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      auth_ok   <= 1'b0;
      auth_fail <= 1'b0;
    end else begin
      out_valid <= in_valid;
      auth_ok   <= in_valid && (tag_calc == tag_mem);
      auth_fail <= in_valid && (tag_calc != tag_mem);
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) out_valid |-> (auth_ok ^ auth_fail));
endmodule
