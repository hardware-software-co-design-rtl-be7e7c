// tb_bfast_clamav_files: the file-scanning workload run through the whole
// peripheral (bfast_top at its default sizes). Four files are scanned: 1 KB
// and 1 MB, each clean and with one signature planted (at byte 359 of the
// 1 KB file and byte 738663 of the 1 MB file). The scanning software is
// modelled as in the original system: the file is read in 131072-byte
// buffers that keep the last 10 bytes of the previous buffer; each buffer is
// copied to a DMA buffer in batches of up to 8000 bytes (again overlapping
// by 10 bytes) and alternated between the two TextRams, one loading while
// the other is scanned. The first reported match ends the file.
//
// Checks: clean files report nothing; infected files report the planted
// position exactly; every batch agrees with the software reference
// (match and scan cycles). The testbench prints, per file, the clock
// cycles spent waiting for DMA and for scans.
module tb_bfast_clamav_files;
  import bfast_pkg::*;
  import bfast_tb_pkg::*;

  localparam int CHUNK   = 8000;
  localparam int KEEP    = 10;
  localparam int BUFSZ   = 131072;
  localparam int FILE_AT = 0;
  localparam int DMA_BUF = 1 << 21;
  localparam int MEMSZ   = (1 << 21) + 16384;

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
  logic [7:0] sysmem [];
  logic [7:0] text [2][];
  int checks = 0, failures = 0;
  longint cyc_dma = 0, cyc_scan = 0, n_batches = 0;

  initial begin
    repeat (30000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // system memory: accepts a request the next cycle, answers 2 cycles later
  initial begin
    forever begin
      @(negedge clk);
      m_rsp_valid = 0;
      m_req_ready = 0;
      if (m_req_valid) begin
        logic [31:0] a;
        m_req_ready = 1;
        a = m_req_addr;
        @(negedge clk);
        m_req_ready = 0;
        for (int j = 0; j < 8; j++) begin
          int idx;
          idx = (int'(a) + j) % MEMSZ;
          m_rsp_data[8*j +: 8] = sysmem[idx];
        end
        m_rsp_valid = 1;
      end
    end
  end

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

  task automatic dma_load(int src, int r, int n);
    int dbuf = DMA_BUF + r * 8192;
    logic [31:0] st;
    for (int i = 0; i < n; i++) begin
      sysmem[dbuf + i] = sysmem[src + i];
      text[r][i] = sysmem[src + i];
    end
    hw(1, 3, 0, dbuf);
    hw(1, 4, 0, {1'b1, 1'(r), 3'b0, 13'd0, 14'(n)});
    do begin hr(1, 5, 0, st); cyc_dma += 2; end while (st[0]);
    expect_eq("DMA done", int'(st[1]), 1);
  endtask

  // scan `size` bytes at system address `src`; returns offset of the match or -1
  task automatic scan_buffer(int src, int size, output int found_at);
    int scanned, cur = 0, start_of [2], len_of [2];
    logic [31:0] st;
    found_at = -1;
    len_of[0] = (size > CHUNK) ? CHUNK : size;
    start_of[0] = 0;
    dma_load(src, 0, len_of[0]);
    scanned = len_of[0];
    hw(1, 0, 0, {1'b1, 18'd0, 13'(len_of[0])});
    forever begin
      bit f; int tpc, ws, cyc, nc, nf, nxt, guard;
      m.scan(text[cur], 0, len_of[cur], SEGB, f, tpc, ws, cyc, nc, nf);
      n_batches++;
      nxt = 1 - cur;
      if (scanned < size) begin
        start_of[nxt] = scanned - KEEP;
        len_of[nxt] = (size - start_of[nxt] > CHUNK) ? CHUNK : size - start_of[nxt];
        dma_load(src + start_of[nxt], nxt, len_of[nxt]);
      end
      guard = 0;
      do begin hr(1, 2, 0, st); guard++; end
      while (!(cur == 0 ? st[23] : st[22]) && guard < 50000);
      cyc_scan += 2 * guard;
      expect_eq("batch found", int'(st[0]), int'(f));
      if (f) begin
        expect_eq("batch TextPointer", int'(st[12:1]), ws >> 1);
        found_at = start_of[cur] + ws;
        hw(1, cur, 0, 0);
        return;
      end
      hw(1, cur, 0, 0);
      if (scanned >= size) return;
      cur = nxt;
      scanned = start_of[cur] + len_of[cur];
      hw(1, cur, 0, {1'b1, 18'd0, 13'(len_of[cur])});
    end
  endtask

  // scan a file of `size` bytes in 131072-byte buffers keeping 10 bytes
  task automatic scan_file(string name, int size, int virus_at);
    int pos = 0, found = -1, at;
    cyc_dma = 0; cyc_scan = 0; n_batches = 0;
    for (int i = 0; i < size; i++) sysmem[FILE_AT + i] = 8'h61 + 8'($urandom % 26);
    if (virus_at >= 0)
      for (int j = 0; j < 8; j++) sysmem[FILE_AT + virus_at + j] = m.pats[2][j];
    forever begin
      int n = (size - pos > BUFSZ) ? BUFSZ : size - pos;
      scan_buffer(FILE_AT + pos, n, at);
      if (at >= 0) begin found = pos + at; break; end
      if (pos + n >= size) break;
      pos = pos + n - KEEP;
    end
    expect_eq({name, " match position"}, found, virus_at);
    $display("%s: %0d batches, %0d cycles waiting for DMA, %0d cycles polling scans",
             name, n_batches, cyc_dma, cyc_scan);
  endtask

  initial begin
    m = new();
    m.random_rows();
    sysmem = new[MEMSZ];
    text[0] = new[8192];
    text[1] = new[8192];
    foreach (text[0][i]) begin text[0][i] = 0; text[1][i] = 0; end
    for (int n = 0; n < 16; n++) begin
      logic [7:0] p [8];
      for (int j = 0; j < 8; j++) p[j] = 8'h41 + 8'($urandom % 26);
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

    scan_file("1 KB clean", 1024, -1);
    scan_file("1 KB, signature at 359", 1024, 359);
    scan_file("1 MB clean", 1 << 20, -1);
    scan_file("1 MB, signature at 738663", 1 << 20, 738663);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
