// aes128_enc: iterative AES-128 encryption core, one round per clock.
//
// It turns the nonce seed into the nonce. The cipher itself is standard AES
// (FIPS-197); how it is built here is this design's choice: the initial
// AddRoundKey happens when `start` is taken, then rounds 1..10 run on ten
// consecutive cycles with the round key expanded on the fly, so the result
// appears with `done` high for one cycle 10 cycles after `start`. `busy` is
// high from the cycle after `start` until `done`; a `start` while busy is
// ignored. `key` and `pt` are sampled only with `start`.
module aes128_enc
  import aes_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [127:0] key,
  input  logic [127:0] pt,
  output logic         busy,
  output logic         done,
  output logic [127:0] ct
);
  block_t     state_q, rkey_q, rkey_n, round_out;
  logic [3:0] round_q;     // round to run next, 1..10
  logic [7:0] rcon_q;

  always_comb begin
    rkey_n    = next_key(rkey_q, rcon_q);
    round_out = shift_rows(sub_bytes(state_q));
    if (round_q != 4'd10) round_out = mix_columns(round_out);
    round_out = round_out ^ rkey_n;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy    <= 1'b0;
      done    <= 1'b0;
      round_q <= 4'd0;
      rcon_q  <= 8'h00;
      state_q <= '0;
      rkey_q  <= '0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          busy    <= 1'b1;
          state_q <= pt ^ key;
          rkey_q  <= key;
          round_q <= 4'd1;
          rcon_q  <= 8'h01;
        end
      end else begin
        state_q <= round_out;
        rkey_q  <= rkey_n;
        rcon_q  <= xtime(rcon_q);
        round_q <= round_q + 4'd1;
        if (round_q == 4'd10) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

  assign ct = state_q;
endmodule
