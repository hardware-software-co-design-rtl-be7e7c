// tb_bfast_top: end-to-end test of the BFAST* peripheral at its default
// sizes, run the way the scanning software uses it. Patterns are programmed
// into the hash functions and Bloom filters over the host port; a text
// buffer in system memory is then scanned in TextRam-sized batches that
// overlap by 10 bytes: the DMA loads the next batch into one TextRam while
// the other is being scanned, the host polls the StatusRegister, and the
// first reported match ends the buffer. Every batch is compared with the
// software reference (match, controller, window start, scan cycles).
//
// Mechanisms counted (each must occur): DMA transfers, DMA loading while a
// scan runs, scans without a match, matches, failed checks of a possible
// match, shifts shorter than the window, a match across a batch boundary,
// and the error flag on a write into the TextRam being scanned.
module tb_bfast_top;
  import bfast_pkg::*;
  import bfast_tb_pkg::*;

  localparam int BUF_ADDR = 4096;
  localparam int CHUNK = 8000;
  localparam int KEEP = 10;
  localparam int DMA_BUF = 40960;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        h_we = 0, h_re = 0, h_is_reg = 0;
  logic [3:0]  h_id = '0;
  logic [13:0] h_addr = '0;
  logic [31:0] h_wdata = '0, h_rdata;
  logic        m_req_valid, m_req_ready = 0, m_rsp_valid = 0;
  logic [31:0] m_req_addr;
  logic [63:0] m_rsp_data = '0;
  logic [1:0]  scanning, finished;
  logic        irq_found;

  bfast_top dut (.*);

  bfast_ref   m;
  logic [7:0] sysmem [65536];
  logic [7:0] text [2][];
  int checks = 0, failures = 0;
  int n_dma = 0, n_overlap = 0, n_nomatch = 0, n_match = 0, n_fail_check = 0;
  int n_short = 0, n_boundary = 0, n_err = 0;

  initial begin
    repeat (4000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // system memory: accepts a read after 0..1 cycles, answers 2 cycles later
  initial begin
    forever begin
      @(negedge clk);
      m_rsp_valid = 0;
      m_req_ready = 0;
      if (m_req_valid) begin
        logic [31:0] a;
        repeat ($urandom % 2) @(negedge clk);
        m_req_ready = 1;
        a = m_req_addr;
        @(negedge clk);
        m_req_ready = 0;
        @(negedge clk);
        for (int j = 0; j < 8; j++) m_rsp_data[8*j +: 8] = sysmem[(a + j) % 65536];
        m_rsp_valid = 1;
      end
    end
  end

  // short shifts seen at write-back
  always @(posedge clk)
    if (dut.u_core.p4_v && dut.u_core.wb_shift != 0 && dut.u_core.wb_shift < 8) n_short++;

  task automatic hw(bit is_reg, int id, int addr, logic [31:0] d);
    @(negedge clk);
    h_we = 1; h_is_reg = is_reg; h_id = 4'(id); h_addr = 14'(addr); h_wdata = d;
    @(negedge clk);
    h_we = 0;
  endtask

  task automatic hr(bit is_reg, int id, int addr, output logic [31:0] d);
    @(negedge clk);
    h_re = 1; h_is_reg = is_reg; h_id = 4'(id); h_addr = 14'(addr);
    @(negedge clk);
    h_re = 0; d = h_rdata;
  endtask

  task automatic expect_eq(string what, int got, int exp);
    checks++;
    if (got != exp) begin failures++; $display("%s: got %0d exp %0d", what, got, exp); end
  endtask

  // copy n bytes of the buffer into the aligned DMA buffer of TextRam r (as
  // the driver does), then start a DMA of them into TextRam r at offset 0
  task automatic dma_start(int src, int r, int n);
    int dbuf = DMA_BUF + r * 8192;
    for (int i = 0; i < n; i++) sysmem[dbuf + i] = sysmem[src + i];
    hw(1, 3, 0, dbuf);
    hw(1, 4, 0, {1'b1, 1'(r), 3'b0, 13'd0, 14'(n)});
    for (int i = 0; i < n; i++) text[r][i] = sysmem[src + i];
    n_dma++;
  endtask

  task automatic dma_wait(bit count_overlap);
    logic [31:0] st;
    int guard = 0;
    do begin
      hr(1, 5, 0, st);
      if (count_overlap && st[0] && scanning != 0) n_overlap++;
      guard++;
    end while (st[0] && guard < 50000);
    expect_eq("DMA done", int'(st[1]), 1);
  endtask

  // scan the buffer of `size` bytes; returns the buffer offset of the match
  task automatic scan_buffer(int size, output int found_at);
    int scanned = 0, cur = 0, start_of [2], len_of [2];
    bit first = 1;
    logic [31:0] st;
    found_at = -1;
    // first batch
    len_of[0] = (size > CHUNK) ? CHUNK : size;
    start_of[0] = 0;
    dma_start(BUF_ADDR, 0, len_of[0]);
    dma_wait(0);
    scanned = len_of[0];
    hw(1, 0, 0, {1'b1, 18'd0, 13'(len_of[0])});
    forever begin
      bit f; int tpc, ws, cyc, nc, nf, seen, guard, nxt;
      // expected result of the batch being scanned
      m.scan(text[cur], 0, len_of[cur], SEGB, f, tpc, ws, cyc, nc, nf);
      n_fail_check += nf;
      // load the next batch into the other TextRam meanwhile
      nxt = 1 - cur;
      if (scanned < size) begin
        start_of[nxt] = scanned - KEEP;
        len_of[nxt] = (size - start_of[nxt] > CHUNK) ? CHUNK : size - start_of[nxt];
        dma_start(BUF_ADDR + start_of[nxt], nxt, len_of[nxt]);
        dma_wait(1);
      end
      guard = 0;
      do begin hr(1, 2, 0, st); guard++; end
      while (!(cur == 0 ? st[23] : st[22]) && guard < 50000);
      expect_eq("batch found", int'(st[0]), int'(f));
      if (f) begin
        expect_eq("batch VirusAddress", int'(st[17:13]), 1 << tpc);
        expect_eq("batch TextPointer", int'(st[12:1]), ws >> 1);
        found_at = start_of[cur] + ws;
        n_match++;
        hw(1, cur, 0, 0);
        return;
      end
      n_nomatch++;
      hw(1, cur, 0, 0);
      if (scanned >= size) return;
      cur = nxt;
      scanned = start_of[cur] + len_of[cur];
      hw(1, cur, 0, {1'b1, 18'd0, 13'(len_of[cur])});
    end
  endtask

  initial begin
    int at;
    logic [31:0] d;
    m = new();
    m.random_rows();
    text[0] = new[8192];
    text[1] = new[8192];
    foreach (text[0][i]) begin text[0][i] = 0; text[1][i] = 0; end
    for (int n = 0; n < 8; n++) begin
      logic [7:0] p [8];
      for (int j = 0; j < 8; j++) p[j] = 8'h41 + 8'($urandom % (n < 4 ? 26 : 3));
      m.add_pattern(p);
    end
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < 4; k++)
      for (int r = 0; r < 32; r++) hw(0, 2 + k, r, 32'(m.rows[k][r]));
    for (int g = 0; g < 8; g++)
      for (int a = 0; a < (1 << HASH_W); a++) begin
        @(negedge clk);
        h_we = 1; h_is_reg = 0; h_id = 4'(6 + g); h_addr = 14'(a); h_wdata = 0;
      end
    @(negedge clk); h_we = 0;
    foreach (m.pats[n])
      for (int g = 0; g < 8; g++) begin
        logic [7:0] b [4];
        m.pat_block(m.pats[n], g, b);
        for (int k = 0; k < 4; k++) hw(0, 6 + g, int'(h3_ref(m.rows, k, b, glen(g))), 1);
      end

    // 1: clean 24000-byte buffer, no match in any batch
    for (int i = 0; i < DMA_BUF; i++) sysmem[i] = 8'h61 + 8'($urandom % 26);
    scan_buffer(24000, at);
    expect_eq("clean buffer", at, -1);

    // 2: buffer on a small alphabet with a pattern in the third batch
    for (int i = 0; i < DMA_BUF; i++) sysmem[i] = 8'h41 + 8'($urandom % 4);
    for (int j = 0; j < 8; j++) sysmem[BUF_ADDR + 17000 + j] = m.pats[0][j];
    scan_buffer(24000, at);
    checks++;
    if (at < 0 || at > 17000) begin failures++; $display("match at %0d, planted at 17000", at); end

    // 3: pattern across the first batch boundary (bytes 7995..8002)
    for (int i = 0; i < DMA_BUF; i++) sysmem[i] = 8'h61 + 8'($urandom % 26);
    for (int j = 0; j < 8; j++) sysmem[BUF_ADDR + 7995 + j] = m.pats[1][j];
    scan_buffer(20000, at);
    expect_eq("boundary match", at, 7995);
    if (at == 7995) n_boundary++;

    // 4: a DMA into the TextRam being scanned is refused and flagged
    for (int i = 0; i < DMA_BUF; i++) sysmem[i] = 8'h61 + 8'($urandom % 26);
    dma_start(BUF_ADDR, 0, 8000);
    dma_wait(0);
    hw(1, 0, 0, {1'b1, 18'd0, 13'd8000});
    hw(1, 3, 0, BUF_ADDR);
    hw(1, 4, 0, {1'b1, 1'b0, 3'b0, 13'd0, 14'd16});
    dma_wait(0);
    hr(1, 2, 0, d);
    expect_eq("TextRam0 error", int'(d[19]), 1);
    n_err += d[19];
    hw(1, 0, 0, 0);

    $display("DMA %0d, DMA during scan %0d, no-match batches %0d, matches %0d, failed checks %0d, short shifts %0d, boundary %0d, errors %0d",
             n_dma, n_overlap, n_nomatch, n_match, n_fail_check, n_short, n_boundary, n_err);
    checks++;
    if (n_dma == 0 || n_overlap == 0 || n_nomatch == 0 || n_match == 0 || n_fail_check == 0 ||
        n_short == 0 || n_boundary == 0 || n_err == 0) begin
      failures++; $display("mechanism not exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
