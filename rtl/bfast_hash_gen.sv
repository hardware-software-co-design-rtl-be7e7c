// bfast_hash_gen: HashGenerator, the four hash functions H0..H3.
//
// Each hash function is an H3-class hash: a programmable table of 32 rows of
// 14 bits, one row per bit of the 4-byte block; the hash is the XOR of the
// rows whose block bit is 1. Because the hash is linear, the hash of the last
// L bytes of the block (the other bytes taken as zero) is the XOR of the
// per-byte partial hashes of those bytes, so all four suffix lengths come out
// at once: groups G0..G4 use the 4-byte hash, G5, G6, G7 the 3-, 2- and
// 1-byte suffix hashes (they hold the 3-, 2- and 1-byte pattern prefixes).
//
// The description gives four writable hash functions producing 14-bit values;
// the H3 construction and the suffix hashes are this design's choices.
//
// Timing: block in one cycle, hash registered at the edge (the Hash stage of
// the pipeline). Host port: h_we writes row h_row of function h_fn;
// h_rdata returns that row the cycle after h_re.
module bfast_hash_gen
  import bfast_pkg::*;
(
  input  logic         clk,
  input  logic         en,          // register a new result
  input  block_t       block,       // byte 0 (lowest address) in bits 7:0
  output suffix_hash_t hash,        // hash[L-1][k], valid the cycle after en
  // host port
  input  logic         h_we,
  input  logic         h_re,
  input  logic [1:0]   h_fn,
  input  logic [4:0]   h_row,
  input  hash_t        h_wdata,
  output hash_t        h_rdata
);

  hash_t rows [N_HASH][BLOCK_W];
  hash_t part [N_HASH][BLOCK_BYTES];
  suffix_hash_t hash_d;

  always_ff @(posedge clk) begin
    if (h_we) rows[h_fn][h_row] <= h_wdata;
    if (h_re) h_rdata <= rows[h_fn][h_row];
  end

  // per-byte partial hashes
  always_comb begin
    for (int k = 0; k < int'(N_HASH); k++) begin
      for (int j = 0; j < int'(BLOCK_BYTES); j++) begin
        part[k][j] = '0;
        for (int t = 0; t < 8; t++)
          if (block[8*j + t]) part[k][j] ^= rows[k][8*j + t];
      end
    end
  end

  // suffix hashes: L bytes = bytes 4-L .. 3
  always_comb begin
    for (int k = 0; k < int'(N_HASH); k++) begin
      hash_d[0][k] = part[k][3];
      hash_d[1][k] = part[k][3] ^ part[k][2];
      hash_d[2][k] = part[k][3] ^ part[k][2] ^ part[k][1];
      hash_d[3][k] = part[k][3] ^ part[k][2] ^ part[k][1] ^ part[k][0];
    end
  end

  always_ff @(posedge clk) begin
    if (en) hash <= hash_d;
  end

endmodule
