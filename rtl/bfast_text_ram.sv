// bfast_text_ram: one TextRam, the on-chip buffer holding the text to scan.
//
// The 8 KB (13-bit byte address) buffer is cut into four interleaved byte
// banks, bank b holding the bytes whose address is b modulo 4, so that any
// four consecutive bytes lie in four different banks and can be read in one
// access. Each bank reads the row that holds its byte of the requested block
// (the next row for banks below the byte offset); the four bytes are then
// rotated by the byte offset so that rd_data[7:0] is the byte at rd_addr.
// Addresses wrap modulo the buffer size.
//
// Read port: rd_en/rd_addr in one cycle, rd_data valid in the next cycle
// (banks are synchronous RAMs). rd_data holds its value while rd_en is low.
// Write port: one aligned 32-bit word per cycle with byte enables; byte 0 of
// wr_data goes to the lowest address. The interleaving and rotation follow
// the design description; the word-wide write port is this design's choice.
module bfast_text_ram #(
  parameter int unsigned AW = bfast_pkg::TEXT_AW   // byte address width
) (
  input  logic          clk,
  // unaligned 4-byte read
  input  logic          rd_en,
  input  logic [AW-1:0] rd_addr,
  output logic [31:0]   rd_data,
  // aligned word write
  input  logic          wr_en,
  input  logic [AW-3:0] wr_word,
  input  logic [31:0]   wr_data,
  input  logic [3:0]    wr_be
);

  localparam int unsigned ROWS = 1 << (AW - 2);

  logic [7:0]   bank [4][ROWS];
  logic [7:0]   bank_q [4];
  logic [1:0]   ofs_q;
  logic [AW-3:0] row_base;
  logic [1:0]   ofs;

  assign row_base = rd_addr[AW-1:2];
  assign ofs      = rd_addr[1:0];

  for (genvar b = 0; b < 4; b++) begin : g_bank
    logic [AW-3:0] row;
    // banks below the offset hold bytes from the next row
    assign row = (2'(b) < ofs) ? row_base + 1'b1 : row_base;

    always_ff @(posedge clk) begin
      if (wr_en && wr_be[b]) bank[b][wr_word] <= wr_data[8*b +: 8];
      if (rd_en)             bank_q[b]        <= bank[b][row];
    end
  end

  always_ff @(posedge clk) begin
    if (rd_en) ofs_q <= ofs;
  end

  // Rotate: output byte j comes from bank (ofs + j) mod 4.
  always_comb begin
    for (int j = 0; j < 4; j++) rd_data[8*j +: 8] = bank_q[2'(ofs_q + 2'(j))];
  end

endmodule
