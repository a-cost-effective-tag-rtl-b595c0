// nonce_gen: builds the nonce of one cache-line access.
//
// The nonce is the AES-128 encryption of a seed of three fields, {line
// address, random value, counter}, as the published scheme specifies: the address
// ties a tag to its location, the counter changes it on every new write of
// the same line, and the random value makes the seed hard to predict.
// This design's own choices:
//  - A seed table holds the {random value, counter} last used for every line
//    of the protected memory, on chip, so that a read can rebuild the nonce
//    its data was tagged with and only the tag is stored off chip. Right
//    after reset the table is swept to zero, one line per cycle (LINES
//    cycles; `ready` is low meanwhile).
//  - The random value is taken from a 64-bit maximal-length LFSR
//    (x^64+x^63+x^61+x^60+1) that steps on every write.
//  - The address field is the line index, zero-extended (its upper bits on
//    the `seed` output are constant zero).
// Protocol: with `ready` high, a `start` pulse requests a nonce for line
// `line_idx`; `write` high means a new write (counter + 1, fresh random value,
// table updated), low means a read (stored seed reused). `nonce_valid` pulses
// 11 cycles later with `nonce` and the `seed` it was built from; `ready`
// returns the cycle after.
module nonce_gen #(
  parameter int unsigned LINES = tag_pkg::LINES,
  parameter logic [tag_pkg::RAND_W-1:0] LFSR_SEED = 64'h0123_4567_89AB_CDEF,
  localparam int unsigned LIDX_W = $clog2(LINES)
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [127:0]        key,
  output logic                ready,
  input  logic                start,
  input  logic                write,
  input  logic [LIDX_W-1:0]   line_idx,
  output logic                nonce_valid,
  output logic [127:0]        nonce,
  output tag_pkg::nonce_seed_t seed
);
  import tag_pkg::*;

  typedef struct packed {
    logic [RAND_W-1:0] rnd;
    logic [CNT_W-1:0]  cnt;
  } entry_t;

  typedef enum logic [1:0] {S_INIT, S_IDLE, S_SEED, S_WAIT} state_t;

  entry_t              mem [LINES];
  entry_t              rd_q;
  state_t              state;
  logic [LIDX_W-1:0]   idx_q, init_idx;
  logic                write_q;
  logic [RAND_W-1:0]   lfsr;
  nonce_seed_t         seed_d;
  logic                mem_we;
  logic [LIDX_W-1:0]   mem_waddr;
  entry_t              mem_wdata;
  logic                aes_done;

  always_comb begin
    seed_d.addr = ADDR_W'(idx_q);
    seed_d.rnd  = write_q ? lfsr : rd_q.rnd;
    seed_d.cnt  = write_q ? rd_q.cnt + 1'b1 : rd_q.cnt;
    mem_we      = (state == S_INIT) || (state == S_SEED && write_q);
    mem_waddr   = (state == S_INIT) ? init_idx : idx_q;
    mem_wdata   = (state == S_INIT) ? '0 : entry_t'{rnd: seed_d.rnd, cnt: seed_d.cnt};
  end

  // Seed table: one write port, one registered read port.
  always_ff @(posedge clk) begin
    if (mem_we) mem[mem_waddr] <= mem_wdata;
    if (state == S_IDLE && start) rd_q <= mem[line_idx];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_INIT;
      init_idx <= '0;
      idx_q    <= '0;
      write_q  <= 1'b0;
      lfsr     <= LFSR_SEED;
      seed     <= '0;
    end else begin
      case (state)
        S_INIT: begin
          init_idx <= init_idx + 1'b1;
          if (init_idx == LIDX_W'(LINES - 1)) state <= S_IDLE;
        end
        S_IDLE:
          if (start) begin
            idx_q   <= line_idx;
            write_q <= write;
            state   <= S_SEED;
          end
        S_SEED: begin
          seed  <= seed_d;
          if (write_q) lfsr <= {lfsr[62:0], lfsr[63] ^ lfsr[62] ^ lfsr[60] ^ lfsr[59]};
          state <= S_WAIT;
        end
        S_WAIT:
          if (aes_done) state <= S_IDLE;
        default: state <= S_INIT;
      endcase
    end
  end

  aes128_enc u_aes (
    .clk, .rst_n,
    .start(state == S_SEED),
    .key,
    .pt   (seed_d),
    .busy (),
    .done (aes_done),
    .ct   (nonce)
  );

  assign ready       = (state == S_IDLE);
  assign nonce_valid = aes_done;

  initial assert ($bits(nonce_seed_t) == 128) else $error("seed must fill one AES block");
endmodule
