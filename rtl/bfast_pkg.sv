// bfast_pkg: sizes, types and helpers shared by the BFAST* string-matching
// engine.
//
// BFAST* searches text held in an on-chip TextRam for a set of patterns by
// sliding an 8-byte search window over the text. The rightmost 4-byte block
// of the window is hashed and looked up in eight Bloom filters, one per block
// group G0..G7; the lowest group that hits tells how far the window may shift
// without skipping a pattern, and no hit allows a full 8-byte shift.
//
// The numbers below follow the design description: 8 KB TextRams with 13-bit
// addresses, 4-byte blocks, an 8-byte window, eight groups, four hash
// functions with 14-bit results, five TPControllers each covering 1600 bytes,
// and a five-stage pipeline. The encodings (host memory identifiers, register
// numbers) are this implementation's own.
package bfast_pkg;

  // Text buffer
  localparam int unsigned TEXT_AW     = 13;               // TextRam address width
  localparam int unsigned TEXT_BYTES  = 1 << TEXT_AW;     // 8 KB per TextRam
  localparam int unsigned BLOCK_BYTES = 4;                // block size B
  localparam int unsigned WIN_BYTES   = 8;                // search window m
  localparam int unsigned N_GROUPS    = 8;                // G0..G7

  // Hashing / Bloom filters
  localparam int unsigned N_HASH      = 4;                // H0..H3
  localparam int unsigned HASH_W      = 14;               // hash value width
  localparam int unsigned BLOCK_W     = 8 * BLOCK_BYTES;  // 32-bit block

  // Scanning
  localparam int unsigned N_TPC       = 5;                // TPControllers = pipeline stages
  localparam int unsigned SEG_BYTES   = 1600;             // bytes per TPController
  localparam int unsigned PTR_W       = TEXT_AW + 1;      // pointer width with headroom
  localparam int unsigned SHIFT_W     = 4;                // shift distance 0..8

  typedef logic [TEXT_AW-1:0]  text_addr_t;
  typedef logic [PTR_W-1:0]    ptr_t;
  typedef logic [HASH_W-1:0]   hash_t;
  typedef logic [BLOCK_W-1:0]  block_t;    // byte 0 (lowest address) in bits 7:0
  typedef logic [SHIFT_W-1:0]  shift_t;
  typedef logic [N_GROUPS-1:0] group_vec_t;

  // Hash values of the rightmost 1..4 bytes of a block, per hash function.
  // idx [L-1][k]: hash function k over the last L bytes of the block.
  typedef hash_t suffix_hash_t [BLOCK_BYTES][N_HASH];

  // TPController states (state diagram: INIT, SCAN, CHECK, HOLD)
  typedef enum logic [1:0] {
    TPC_INIT  = 2'd0,
    TPC_SCAN  = 2'd1,
    TPC_CHECK = 2'd2,
    TPC_HOLD  = 2'd3
  } tpc_state_t;

  // Host-visible memories (driver's AR_SELECT numbering)
  typedef enum logic [3:0] {
    MEM_TEXTRAM0 = 4'd0,
    MEM_TEXTRAM1 = 4'd1,
    MEM_H0       = 4'd2,   // H0..H3 = 2..5
    MEM_MBIT0    = 4'd6    // MbitVector0..7 = 6..13
  } mem_id_t;

  // Host-visible registers (driver's REG_SELECT numbering; 3..5 are the DMA's)
  localparam int unsigned REG_EN0     = 0;
  localparam int unsigned REG_EN1     = 1;
  localparam int unsigned REG_STATUS  = 2;
  localparam int unsigned REG_DMA_SRC = 3;
  localparam int unsigned REG_DMA_CTL = 4;
  localparam int unsigned REG_DMA_STA = 5;

  // Field layout of EnableTextRamN: [31] enable, [30:13] start address, [12:0] length
  typedef struct packed {
    logic        enable;
    logic [17:0] start;
    logic [12:0] length;
  } enable_reg_t;

  // Field layout of StatusRegister (bits 31:25 read as zero)
  typedef struct packed {
    logic [6:0]  zero;
    logic        bfast_enable;     // 24
    logic        ram0_finished;    // 23
    logic        ram1_finished;    // 22
    logic        ram0_scanning;    // 21
    logic        ram1_scanning;    // 20
    logic        ram0_error;       // 19
    logic        ram1_error;       // 18
    logic [4:0]  virus_tpc;        // 17:13 one-hot: TPController that found it
    logic [11:0] text_pointer;     // 12:1 window start address bits 12:1
    logic        found_virus;      // 0
  } status_reg_t;

  // Number of bytes of a block that group g is matched on: four for G0..G4,
  // then 3, 2, 1 for G5, G6, G7 (the shorter prefixes of the patterns).
  function automatic int unsigned group_len(int unsigned g);
    return (WIN_BYTES - g < BLOCK_BYTES) ? WIN_BYTES - g : BLOCK_BYTES;
  endfunction

endpackage
