// bfast_core: BFAST*, the Bloom-filter accelerated sub-linear string matcher.
//
// Text is loaded into one of two TextRams while the other is scanned. A scan
// is requested through EnableTextRam0/1 (start address and length) and runs
// five TPControllers in parallel, controller k covering the k-th 1600-byte
// segment. The controllers share a five-stage pipeline, each stage busy with
// a different controller in every cycle:
//   TP            the owning controller's TextPoint addresses the TextRam
//   TextRead      four consecutive text bytes come out of the TextRam banks
//   Hash          HashGenerator computes the four 14-bit hash values
//   ShiftDistance the eight MbitVectors are read at those hash values
//   WB            the lowest hit group gives the shift distance; the
//                 controller moves its window or checks a possible match.
// So every controller advances its window once per five cycles, by up to
// eight bytes, and a full 8000-byte TextRam takes about 1000 cycles when
// nothing matches. A possible match is reported 11 passes (55 cycles) after
// the query that found its last block: 1 detecting, 8 checking each block of
// the window against its group, 1 position check and 1 report pass.
// The scan ends when every controller is done or one reports a match; the
// StatusRegister then holds the result until the next scan.
//
// Host port: h_is_reg selects the registers (h_id = register 0..2) or the
// memories (h_id: 0/1 TextRam0/1 by byte address with 32-bit aligned writes,
// 2..5 H0..H3 rows, 6..13 MbitVector0..7 bits). Reads return h_rdata one
// cycle after h_re. DMA port: aligned 32-bit writes into a TextRam; a DMA
// write wins over a host write in the same cycle. Writing to, or a host read
// of, the TextRam being scanned is refused and flags that TextRam's error.
//
// Stage split, memory sizes and register fields follow the description. The
// start/ping-pong rules (a new scan starts once the previous one has ended
// without a match or its TextRam was disabled; TextRam0 first) are this
// design's choices.
module bfast_core
  import bfast_pkg::*;
#(
  parameter int unsigned SEG = SEG_BYTES   // bytes per TPController
) (
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
  // DMA write port
  input  logic        d_we,
  input  logic        d_ram,
  input  logic [TEXT_AW-3:0] d_word,
  input  logic [31:0] d_data,
  input  logic [3:0]  d_be,
  // observation
  output logic [1:0]  scanning,
  output logic [1:0]  finished,
  output logic        irq_found          // found a possible match (level)
);

  localparam int unsigned IDW = $clog2(N_TPC);

  // ---------------------------------------------------------------- registers
  enable_reg_t en [2];
  ptr_t        scan_len [2];
  logic [1:0]  err, set_fin, set_err;
  logic [31:0] reg_rdata;
  logic        result_valid;
  logic [4:0]  found_vec;
  text_addr_t  found_ptr;

  // ------------------------------------------------------------- scan control
  logic       engaged, over, over_found, cur;
  logic [1:0] ok, en_wr;
  logic       start_now, pick, sel_ram, scan_done;
  logic [N_TPC-1:0] done_v, req_v;

  for (genvar r = 0; r < 2; r++) begin : g_ok
    assign ok[r]    = en[r].enable && !finished[r] && !err[r];
    assign en_wr[r] = h_we && h_is_reg && h_id == 4'(REG_EN0 + r);
  end
  assign pick      = !ok[0];
  assign start_now = (|ok) && (!engaged || (over && !over_found));
  assign sel_ram   = start_now ? pick : cur;
  assign scan_done = (&done_v) || (|found_vec);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      engaged    <= 1'b0;
      over       <= 1'b0;
      over_found <= 1'b0;
      cur        <= 1'b0;
    end else if (start_now) begin
      engaged    <= 1'b1;
      over       <= 1'b0;
      over_found <= 1'b0;
      cur        <= pick;
    end else if (engaged && (!en[cur].enable || en_wr[cur])) begin
      engaged    <= 1'b0;
    end else if (engaged && !over && scan_done) begin
      over       <= 1'b1;
      over_found <= |found_vec;
    end
  end

  assign result_valid = engaged && !over && scan_done && !start_now &&
                        en[cur].enable && !en_wr[cur];
  assign set_fin      = result_valid ? (cur ? 2'b10 : 2'b01) : 2'b00;
  // a scan counts as running up to the write-back of its last query
  assign scanning[0]  = engaged && !over && !scan_done && !cur;
  assign scanning[1]  = engaged && !over && !scan_done &&  cur;
  assign irq_found    = engaged && over && over_found;

  // ------------------------------------------------------------ controllers
  ptr_t             tp [N_TPC];
  ptr_t             win [N_TPC];
  ptr_t             base, limit;
  logic             ctrl_en;
  logic             issue;
  logic [IDW-1:0]   slot;
  text_addr_t       rd_addr;
  // pipeline meta: p1 TextRead, p2 Hash, p3 ShiftDistance, p4 WB
  logic             p1_v, p2_v, p3_v, p4_v;
  logic [IDW-1:0]   p1_id, p2_id, p3_id, p4_id;
  logic             p1_ram;
  group_vec_t       wb_hit;
  shift_t           wb_shift;

  assign base    = ptr_t'(en[sel_ram].start);
  assign limit   = base + scan_len[sel_ram];
  assign ctrl_en = engaged || start_now;

  for (genvar k = 0; k < N_TPC; k++) begin : g_tpc
    bfast_tp_controller #(.ID(k), .SEG(SEG)) u_tpc (
      .clk        (clk),
      .rst_n      (rst_n),
      .enable     (ctrl_en),
      .start      (start_now),
      .base       (base),
      .limit      (limit),
      .stop       (|found_vec),
      .req        (req_v[k]),
      .text_point (tp[k]),
      .wb_valid   (p4_v && p4_id == IDW'(k)),
      .wb_hit     (wb_hit),
      .wb_shift   (wb_shift),
      .state      (),
      .done       (done_v[k]),
      .found      (found_vec[k]),
      .win_start  (win[k])
    );
  end

  always_comb begin
    found_ptr = '0;
    for (int k = N_TPC - 1; k >= 0; k--)
      if (found_vec[k]) found_ptr = win[k][TEXT_AW-1:0];
  end

  // ---------------------------------------------------------------- TP stage
  bfast_text_point #(.N(N_TPC)) u_tp (
    .clk     (clk),
    .rst_n   (rst_n),
    .restart (start_now),
    .req     (req_v),
    .tp      (tp),
    .issue   (issue),
    .slot    (slot),
    .addr    (rd_addr)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      {p1_v, p2_v, p3_v, p4_v} <= '0;
    end else begin
      p1_v <= issue && engaged;
      p2_v <= p1_v;
      p3_v <= p2_v;
      p4_v <= p3_v;
    end
  end

  always_ff @(posedge clk) begin
    p1_id  <= slot;
    p1_ram <= cur;
    p2_id  <= p1_id;
    p3_id  <= p2_id;
    p4_id  <= p3_id;
  end

  // ------------------------------------------------------- TextRams (TextRead)
  logic        h_mem_we, h_mem_re;
  logic [1:0]  ram_rd_en, ram_wr_en, h_ram_rd;
  text_addr_t  ram_rd_addr [2];
  logic [31:0] ram_rd_data [2];
  logic [TEXT_AW-3:0] ram_wr_word [2];
  logic [31:0] ram_wr_data [2];
  logic [3:0]  ram_wr_be [2];
  block_t      block_q;

  logic        is_hash, is_mbit;
  assign is_hash  = h_id >= MEM_H0 && h_id < MEM_MBIT0;
  assign is_mbit  = h_id >= MEM_MBIT0;
  assign h_mem_we = h_we && !h_is_reg;
  assign h_mem_re = h_re && !h_is_reg;

  for (genvar r = 0; r < 2; r++) begin : g_ram
    logic scan_rd, h_wr, h_rd, dma_wr;
    assign scan_rd = issue && engaged && cur == 1'(r);
    assign h_wr    = h_mem_we && h_id == 4'(MEM_TEXTRAM0) + 4'(r);
    assign h_rd    = h_mem_re && h_id == 4'(MEM_TEXTRAM0) + 4'(r);
    assign dma_wr  = d_we && d_ram == 1'(r);

    assign h_ram_rd[r]    = h_rd && !scanning[r];
    assign ram_rd_en[r]   = scan_rd || h_ram_rd[r];
    assign ram_rd_addr[r] = scan_rd ? rd_addr : h_addr[TEXT_AW-1:0];
    assign ram_wr_en[r]   = (dma_wr || h_wr) && !scanning[r];
    assign ram_wr_word[r] = dma_wr ? d_word : h_addr[TEXT_AW-1:2];
    assign ram_wr_data[r] = dma_wr ? d_data : h_wdata;
    assign ram_wr_be[r]   = dma_wr ? d_be : 4'hF;
    assign set_err[r]     = scanning[r] && (dma_wr || h_wr || h_rd);

    bfast_text_ram #(.AW(TEXT_AW)) u_ram (
      .clk     (clk),
      .rd_en   (ram_rd_en[r]),
      .rd_addr (ram_rd_addr[r]),
      .rd_data (ram_rd_data[r]),
      .wr_en   (ram_wr_en[r]),
      .wr_word (ram_wr_word[r]),
      .wr_data (ram_wr_data[r]),
      .wr_be   (ram_wr_be[r])
    );
  end

  always_ff @(posedge clk) begin
    if (p1_v) block_q <= ram_rd_data[p1_ram];
  end

  // ------------------------------------------------------------ Hash stage
  suffix_hash_t hash_q;
  hash_t        hg_rdata;

  bfast_hash_gen u_hash (
    .clk     (clk),
    .en      (p2_v),
    .block   (block_q),
    .hash    (hash_q),
    .h_we    (h_mem_we && is_hash),
    .h_re    (h_mem_re && is_hash),
    .h_fn    (2'(h_id - MEM_H0)),
    .h_row   (h_addr[4:0]),
    .h_wdata (h_wdata[HASH_W-1:0]),
    .h_rdata (hg_rdata)
  );

  // --------------------------------------------- ShiftDistance and WB stages
  logic bf_rdata;

  bfast_bloom_query u_bfq (
    .clk     (clk),
    .hash    (hash_q),
    .hit     (wb_hit),
    .shift   (wb_shift),
    .h_we    (h_mem_we && is_mbit),
    .h_re    (h_mem_re && is_mbit),
    .h_vec   (3'(h_id - MEM_MBIT0)),
    .h_addr  (h_addr),
    .h_wdata (h_wdata[0]),
    .h_rdata (bf_rdata)
  );

  // ---------------------------------------------------------------- registers
  bfast_regs u_regs (
    .clk          (clk),
    .rst_n        (rst_n),
    .h_we         (h_we && h_is_reg),
    .h_re         (h_re && h_is_reg),
    .h_sel        (h_id[1:0]),
    .h_wdata      (h_wdata),
    .h_rdata      (reg_rdata),
    .en           (en),
    .scan_len     (scan_len),
    .finished     (finished),
    .error        (err),
    .scanning     (scanning),
    .set_finished (set_fin),
    .set_error    (set_err),
    .clear_result (start_now),
    .result_valid (result_valid),
    .result_tpc   (found_vec),
    .result_ptr   (found_ptr),
    .result_found (|found_vec)
  );

  // ------------------------------------------------------------ host read mux
  logic       rd_is_reg;
  logic [3:0] rd_id;

  always_ff @(posedge clk) begin
    if (h_re) begin
      rd_is_reg <= h_is_reg;
      rd_id     <= h_id;
    end
  end

  always_comb begin
    if (rd_is_reg)        h_rdata = reg_rdata;
    else if (rd_id < MEM_H0)    h_rdata = ram_rd_data[rd_id[0]];
    else if (rd_id < MEM_MBIT0) h_rdata = 32'(hg_rdata);
    else                  h_rdata = 32'(bf_rdata);
  end

endmodule
