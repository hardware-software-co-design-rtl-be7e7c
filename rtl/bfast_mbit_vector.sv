// bfast_mbit_vector: one MbitVector, the bit array of one Bloom filter.
//
// 2^14 one-bit entries addressed by a 14-bit hash value. A Bloom filter
// query needs the bits at all four hash values of a block in the same cycle,
// so the array has four synchronous read ports (a pair of dual-port block
// RAMs holding the same contents on an FPGA) plus a host port that writes
// or reads one bit.
//
// Timing: q_addr -> q_bit one cycle later; h_we writes at the clock edge;
// h_rdata is valid the cycle after h_re. The 14-bit address and 1-bit data
// follow the design description; the number of read ports is this design's
// choice, made so that one query takes one cycle.
module bfast_mbit_vector #(
  parameter int unsigned AW     = bfast_pkg::HASH_W,  // address width
  parameter int unsigned NPORTS = bfast_pkg::N_HASH   // query read ports
) (
  input  logic                   clk,
  // query ports
  input  logic [NPORTS-1:0][AW-1:0] q_addr,
  output logic [NPORTS-1:0]         q_bit,
  // host port
  input  logic                   h_we,
  input  logic                   h_re,
  input  logic [AW-1:0]          h_addr,
  input  logic                   h_wdata,
  output logic                   h_rdata
);

  logic mem [1 << AW];

  always_ff @(posedge clk) begin
    if (h_we) mem[h_addr] <= h_wdata;
    if (h_re) h_rdata <= mem[h_addr];
    for (int p = 0; p < int'(NPORTS); p++) q_bit[p] <= mem[q_addr[p]];
  end

endmodule
