// tag_pkg: shared sizes of the memory tag generator and authenticator.
//
// The defaults are the main configuration: a 256-bit cache line (the line size
// of the evaluated embedded processor), a 64-bit tag, segment sizes drawn from
// alpha = 32 values and beta = 2 shuffle rounds, the pair that makes 64 bits the
// best tag size in the exploration-space model. The nonce is one AES block. The
// split of the nonce seed into 32-bit address, 64-bit random value and 32-bit
// counter, and the 1 MB protected memory (32768 lines), are this design's own
// choices sized after the evaluated system.
package tag_pkg;
  localparam int unsigned LINE_W     = 256;   // cache line, bits (n)
  localparam int unsigned TAG_W      = 64;    // tag, bits (m)
  localparam int unsigned ALPHA      = 32;    // number of segment sizes
  localparam int unsigned BETA       = 2;     // shuffle rounds
  localparam int unsigned NONCE_W    = 128;   // one AES block
  localparam int unsigned ADDR_W     = 32;    // seed field: line address
  localparam int unsigned RAND_W     = 64;    // seed field: random value
  localparam int unsigned CNT_W      = 32;    // seed field: access counter
  localparam int unsigned MEM_BYTES  = 1 << 20;
  localparam int unsigned LINE_BYTES = LINE_W / 8;
  localparam int unsigned LINES      = MEM_BYTES / LINE_BYTES;

  // Seed of the nonce, encrypted as one 128-bit block.
  typedef struct packed {
    logic [ADDR_W-1:0] addr;
    logic [RAND_W-1:0] rnd;
    logic [CNT_W-1:0]  cnt;
  } nonce_seed_t;
endpackage
