// bfast_top: the BFAST* peripheral as attached to the processor bus: the
// scanning core with its two TextRams, hash functions, Bloom filters and
// registers, plus the DMA engine that fills the TextRams from system memory.
//
// The host (driver) sees one memory-mapped port:
//   h_is_reg = 1, h_id = register: 0 EnableTextRam0, 1 EnableTextRam1,
//                 2 StatusRegister, 3 DMA source, 4 DMA control, 5 DMA status
//   h_is_reg = 0, h_id = memory:   0/1 TextRam0/1 (byte address, aligned
//                 32-bit writes, 4-byte reads from any byte), 2..5 rows of
//                 hash functions H0..H3, 6..13 bits of MbitVector0..7
// h_rdata is valid the cycle after h_re. The DMA reads system memory through
// a request/response port with 64-bit data. irq_found is high while a scan
// result with a possible match is held (software in the original system polls
// the StatusRegister instead). The bus protocol itself (the processor local
// bus) is replaced by this plain port.
module bfast_top
  import bfast_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  // host port
  input  logic        h_we,
  input  logic        h_re,
  input  logic        h_is_reg,
  input  logic [3:0]  h_id,
  input  logic [13:0] h_addr,
  input  logic [31:0] h_wdata,
  output logic [31:0] h_rdata,
  // DMA memory read port
  output logic        m_req_valid,
  input  logic        m_req_ready,
  output logic [31:0] m_req_addr,
  input  logic        m_rsp_valid,
  input  logic [63:0] m_rsp_data,
  // status
  output logic [1:0]  scanning,
  output logic [1:0]  finished,
  output logic        irq_found
);

  logic        is_dma;
  logic        d_we, d_ram;
  logic [TEXT_AW-3:0] d_word;
  logic [31:0] d_data, core_rdata, dma_rdata;
  logic [3:0]  d_be;
  logic        rd_dma;

  assign is_dma = h_is_reg && h_id >= 4'(REG_DMA_SRC);

  bfast_core u_core (
    .clk       (clk),
    .rst_n     (rst_n),
    .h_we      (h_we && !is_dma),
    .h_re      (h_re && !is_dma),
    .h_is_reg  (h_is_reg),
    .h_id      (h_id),
    .h_addr    (h_addr),
    .h_wdata   (h_wdata),
    .h_rdata   (core_rdata),
    .d_we      (d_we),
    .d_ram     (d_ram),
    .d_word    (d_word),
    .d_data    (d_data),
    .d_be      (d_be),
    .scanning  (scanning),
    .finished  (finished),
    .irq_found (irq_found)
  );

  bfast_dma u_dma (
    .clk         (clk),
    .rst_n       (rst_n),
    .h_we        (h_we && is_dma),
    .h_re        (h_re && is_dma),
    .h_sel       (2'(h_id - 4'(REG_DMA_SRC))),
    .h_wdata     (h_wdata),
    .h_rdata     (dma_rdata),
    .m_req_valid (m_req_valid),
    .m_req_ready (m_req_ready),
    .m_req_addr  (m_req_addr),
    .m_rsp_valid (m_rsp_valid),
    .m_rsp_data  (m_rsp_data),
    .d_we        (d_we),
    .d_ram       (d_ram),
    .d_word      (d_word),
    .d_data      (d_data),
    .d_be        (d_be)
  );

  always_ff @(posedge clk) begin
    if (h_re) rd_dma <= is_dma;
  end
  assign h_rdata = rd_dma ? dma_rdata : core_rdata;

endmodule
