// tag_auth_unit: on-chip tag generation and data authentication for lines
// of encrypted memory.
//
// The unit sits between the cache (after encryption) and the untrusted
// off-chip memory. Each tag depends on the encrypted line and on a nonce
// that is unique to the line's address and to the access.
//  - Write (req_write = 1): a new nonce is made for the line (its counter
//    steps, a fresh random value is drawn), the tag of req_line is generated
//    and returned on resp_tag, to be stored off chip next to the line.
//  - Read (req_write = 0): the nonce the line was last written with is
//    rebuilt, the tag of the fetched line req_line is recomputed and compared
//    with the fetched tag req_tag; resp_auth_ok or resp_auth_fail says whether
//    the line may be decrypted and used.
// Data that was altered, a valid line/tag pair copied from another address
// and an old line/tag pair of the same address replayed after a newer write
// all fail. Data encryption and decryption are outside this unit.
// Handshake (this design's choice): a request is taken when req_valid and
// req_ready are both high; the response is a one-cycle resp_valid pulse 13
// cycles later (11 for the nonce, 1 for the tag, 1 for the compare), and
// req_ready returns the cycle after it. After reset req_ready stays low for
// LINES cycles while the nonce seed table is cleared.
module tag_auth_unit #(
  parameter int unsigned LINE_W = tag_pkg::LINE_W,
  parameter int unsigned TAG_W  = tag_pkg::TAG_W,
  parameter int unsigned ALPHA  = tag_pkg::ALPHA,
  parameter int unsigned BETA   = tag_pkg::BETA,
  parameter int unsigned LINES  = tag_pkg::LINES,
  localparam int unsigned LIDX_W = $clog2(LINES)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [127:0]      key,
  // request
  input  logic              req_valid,
  output logic              req_ready,
  input  logic              req_write,
  input  logic [LIDX_W-1:0] req_line_idx,
  input  logic [LINE_W-1:0] req_line,
  input  logic [TAG_W-1:0]  req_tag,
  // response
  output logic              resp_valid,
  output logic              resp_write,
  output logic [TAG_W-1:0]  resp_tag,
  output logic              resp_auth_ok,
  output logic              resp_auth_fail
);
  typedef enum logic [1:0] {S_IDLE, S_NONCE, S_TAG, S_CHECK} state_t;

  state_t               state;
  logic                 write_q;
  logic [LINE_W-1:0]    line_q;
  logic [TAG_W-1:0]     tag_mem_q;
  logic                 ng_ready, nonce_valid, tag_valid, chk_valid, chk_ok, chk_fail;
  logic [127:0]         nonce;
  logic                 accept;

  assign req_ready = (state == S_IDLE) && ng_ready;
  assign accept    = req_valid && req_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      write_q   <= 1'b0;
      line_q    <= '0;
      tag_mem_q <= '0;
    end else begin
      case (state)
        S_IDLE:
          if (accept) begin
            write_q   <= req_write;
            line_q    <= req_line;
            tag_mem_q <= req_tag;
            state     <= S_NONCE;
          end
        S_NONCE: if (nonce_valid) state <= S_TAG;
        S_TAG:   if (tag_valid)   state <= S_CHECK;
        S_CHECK: if (chk_valid)   state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  nonce_gen #(.LINES(LINES)) u_nonce (
    .clk, .rst_n, .key,
    .ready      (ng_ready),
    .start      (accept),
    .write      (req_write),
    .line_idx   (req_line_idx),
    .nonce_valid(nonce_valid),
    .nonce,
    .seed       ()
  );

  tag_gen #(.LINE_W(LINE_W), .TAG_W(TAG_W), .ALPHA(ALPHA), .BETA(BETA),
            .NONCE_W(128)) u_tag (
    .clk, .rst_n,
    .in_valid (state == S_NONCE && nonce_valid),
    .line     (line_q),
    .nonce,
    .out_valid(tag_valid),
    .tag      (resp_tag)
  );

  tag_check #(.TAG_W(TAG_W)) u_check (
    .clk, .rst_n,
    .in_valid (state == S_TAG && tag_valid),
    .tag_calc (resp_tag),
    .tag_mem  (tag_mem_q),
    .out_valid(chk_valid),
    .auth_ok  (chk_ok),
    .auth_fail(chk_fail)
  );

  assign resp_valid     = (state == S_CHECK) && chk_valid;
  assign resp_write     = write_q;
  assign resp_auth_ok   = resp_valid && !write_q && chk_ok;
  assign resp_auth_fail = resp_valid && !write_q && chk_fail;
endmodule
