// bfast_bloom_query: BloomFilterQuery, eight Bloom filters BF(G0)..BF(G7).
//
// MbitVector g holds the Bloom filter of block group Gg: the blocks that end
// g bytes before the end of a pattern's first eight bytes. A block is a
// member of Gg when all four of its hash bits in MbitVector g are set. All
// eight filters are queried in parallel; the shift distance is the number of
// the lowest group that hits, or the window length (8) when none hits.
// Groups G5..G7 are addressed with the 3-, 2- and 1-byte suffix hashes.
//
// Timing: hash in cycle t (ShiftDistance stage: the MbitVectors are read),
// hit and shift valid in cycle t+1 (WB stage), combinationally from the
// registered bits. Host port: h_vec selects the MbitVector, h_rdata is valid
// the cycle after h_re. The shift rule follows the design description; the
// suffix hashes for the short groups are this design's choice.
module bfast_bloom_query
  import bfast_pkg::*;
(
  input  logic         clk,
  input  suffix_hash_t hash,
  output group_vec_t   hit,        // group g hit
  output shift_t       shift,      // lowest hit group, or WIN_BYTES
  // host port
  input  logic         h_we,
  input  logic         h_re,
  input  logic [2:0]   h_vec,
  input  hash_t        h_addr,
  input  logic         h_wdata,
  output logic         h_rdata
);

  logic [N_GROUPS-1:0][N_HASH-1:0] qbits;
  logic [N_GROUPS-1:0]             vec_rdata;
  logic [2:0]                      h_vec_q;

  for (genvar g = 0; g < N_GROUPS; g++) begin : g_vec
    localparam int unsigned L = group_len(g);
    logic [N_HASH-1:0][HASH_W-1:0] addr;
    for (genvar k = 0; k < N_HASH; k++) begin : g_k
      assign addr[k] = hash[L-1][k];
    end

    bfast_mbit_vector #(.AW(HASH_W), .NPORTS(N_HASH)) u_vec (
      .clk     (clk),
      .q_addr  (addr),
      .q_bit   (qbits[g]),
      .h_we    (h_we && h_vec == 3'(g)),
      .h_re    (h_re && h_vec == 3'(g)),
      .h_addr  (h_addr),
      .h_wdata (h_wdata),
      .h_rdata (vec_rdata[g])
    );

    assign hit[g] = &qbits[g];
  end

  always_ff @(posedge clk) begin
    if (h_re) h_vec_q <= h_vec;
  end
  assign h_rdata = vec_rdata[h_vec_q];

  // priority: lowest hit group
  always_comb begin
    shift = shift_t'(WIN_BYTES);
    for (int g = int'(N_GROUPS) - 1; g >= 0; g--)
      if (hit[g]) shift = shift_t'(g);
  end

endmodule
