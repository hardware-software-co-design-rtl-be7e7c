// tb_bfast_dma: a system-memory model answers 64-bit reads after a random
// delay and a TextRam model records the DMA's word writes. Transfers of
// random length, source (8- or 4-byte aligned) and destination must place
// exactly the source bytes at the destination and touch nothing else; the
// status register must show busy then done, and misaligned or out-of-range
// requests must set the error bit and move nothing.
module tb_bfast_dma;
  import bfast_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        h_we = 0, h_re = 0;
  logic [1:0]  h_sel = '0;
  logic [31:0] h_wdata = '0, h_rdata;
  logic        m_req_valid, m_req_ready = 0, m_rsp_valid = 0;
  logic [31:0] m_req_addr;
  logic [63:0] m_rsp_data = '0;
  logic        d_we, d_ram;
  logic [TEXT_AW-3:0] d_word;
  logic [31:0] d_data;
  logic [3:0]  d_be;

  bfast_dma dut (.*);

  logic [7:0] sysmem [65536];
  logic [7:0] tram [2][8192];
  int checks = 0, failures = 0, n_beats = 0;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // memory model: accept after 0..2 cycles, answer 1..4 cycles later
  initial begin
    forever begin
      @(negedge clk);
      m_rsp_valid = 0;
      m_req_ready = 0;
      if (m_req_valid) begin
        logic [31:0] a;
        repeat ($urandom % 3) @(negedge clk);
        m_req_ready = 1;
        a = m_req_addr;
        checks++;
        if (a[2:0] != 0) begin failures++; $display("unaligned request %h", a); end
        @(negedge clk);
        m_req_ready = 0;
        repeat ($urandom % 4) @(negedge clk);
        for (int j = 0; j < 8; j++) m_rsp_data[8*j +: 8] = sysmem[(a + j) % 65536];
        m_rsp_valid = 1;
        n_beats++;
      end
    end
  end

  always @(posedge clk)
    if (d_we)
      for (int j = 0; j < 4; j++)
        if (d_be[j]) tram[d_ram][4*d_word + j] <= d_data[8*j +: 8];

  task automatic wr(int sel, logic [31:0] d);
    @(negedge clk); h_we = 1; h_sel = 2'(sel); h_wdata = d;
    @(negedge clk); h_we = 0;
  endtask

  task automatic rd(int sel, output logic [31:0] d);
    @(negedge clk); h_re = 1; h_sel = 2'(sel);
    @(negedge clk); h_re = 0; d = h_rdata;
  endtask

  initial begin
    logic [31:0] st;
    foreach (sysmem[i]) sysmem[i] = 8'($urandom);
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 60; t++) begin
      int src, dst, len, ram, cyc;
      logic [7:0] prev [8192];
      src = ($urandom % 8000) * 4;
      dst = ($urandom % 1000) * 4;
      len = 1 + $urandom % 3000;
      if (t == 0) begin src = 0; dst = 0; len = 8192; end
      ram = $urandom % 2;
      prev = tram[ram];
      wr(0, src);
      wr(1, {1'b1, 1'(ram), 3'b0, 13'(dst), 14'(len)});
      rd(2, st);
      checks++;
      if (st[0] !== 1'b1) begin failures++; $display("not busy"); end
      cyc = 0;
      do begin rd(2, st); cyc++; end while (st[0] && cyc < 20000);
      repeat (2) @(negedge clk);
      checks++;
      if (st[1] !== 1'b1 || st[2] !== 1'b0) begin failures++; $display("status %b", st[2:0]); end
      for (int i = 0; i < 8192; i++) begin
        logic [7:0] exp;
        exp = (i >= dst && i < dst + len) ? sysmem[(src + i - dst) % 65536] : prev[i];
        if (tram[ram][i] !== exp) begin
          failures++; checks++;
          $display("t%0d byte %0d: %h exp %h", t, i, tram[ram][i], exp);
          break;
        end
      end
      checks++;
    end
    // errors: out of range, misaligned destination, misaligned source
    wr(0, 0);
    wr(1, {1'b1, 1'b0, 3'b0, 13'd8000, 14'd400});
    rd(2, st); checks++;
    if (st[2:0] !== 3'b100) begin failures++; $display("range error status %b", st[2:0]); end
    wr(1, {1'b1, 1'b0, 3'b0, 13'd6, 14'd40});
    rd(2, st); checks++;
    if (st[2:0] !== 3'b100) begin failures++; $display("align error status %b", st[2:0]); end
    wr(0, 2);
    wr(1, {1'b1, 1'b0, 3'b0, 13'd8, 14'd40});
    rd(2, st); checks++;
    if (st[2:0] !== 3'b100) begin failures++; $display("src align error status %b", st[2:0]); end
    $display("beats %0d", n_beats);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
