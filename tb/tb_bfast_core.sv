// tb_bfast_core: the BFAST* core programmed and driven through its host
// port exactly as a driver would: hash rows, Bloom filter bits (computed from
// the patterns with an independent H3 reference), text, then EnableTextRam
// writes and StatusRegister polling. Every scan is compared with the software
// reference of the scan algorithm: match or not, reporting controller,
// window start and the number of cycles the scan runs.
//
// Directed cases reproduce the published timings: 11 bytes take 5 cycles,
// 1600..8000 bytes without a match take 1000..1004 cycles, a match at the
// start of segment k takes 55+k cycles, one at the end of segment 0 takes
// 1050. Random cases on a small alphabet exercise short shifts and failed
// checks; the ping-pong start of TextRam1 after TextRam0, the error flag on a
// write into the TextRam being scanned and host read-back are also checked.
module tb_bfast_core;
  import bfast_pkg::*;
  import bfast_tb_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        h_we = 0, h_re = 0, h_is_reg = 0;
  logic [3:0]  h_id = '0;
  logic [13:0] h_addr = '0;
  logic [31:0] h_wdata = '0, h_rdata;
  logic        d_we = 0, d_ram = 0;
  logic [TEXT_AW-3:0] d_word = '0;
  logic [31:0] d_data = '0;
  logic [3:0]  d_be = '0;
  logic [1:0]  scanning, finished;
  logic        irq_found;

  bfast_core dut (.*);

  bfast_ref   m;
  logic [7:0] text [2][];
  int checks = 0, failures = 0;
  int n_match = 0, n_nomatch = 0, n_fail_check = 0, n_short = 0, n_err = 0, n_pingpong = 0;

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
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

  task automatic load_text(int r, int from, int to);
    for (int w = from / 4; w < (to + 3) / 4; w++)
      hw(0, r, 4 * w, {text[r][4*w+3], text[r][4*w+2], text[r][4*w+1], text[r][4*w]});
  endtask

  // run a scan of TextRam r and compare with the reference
  task automatic scan_check(string name, int r, int base, int len, int exp_cycles = -1);
    bit f; int tpc, ws, cyc, nc, nf, seen = 0, guard = 0;
    logic [31:0] st;
    m.scan(text[r], base, len, SEGB, f, tpc, ws, cyc, nc, nf);
    hw(1, r, 0, {1'b1, 18'(base), 13'(len)});
    while (!finished[r] && guard < 20000) begin
      if (scanning[r]) seen++;
      @(negedge clk);
      guard++;
    end
    hr(1, 2, 0, st);
    expect_eq({name, " cycles"}, seen, cyc);
    if (exp_cycles >= 0) expect_eq({name, " published cycles"}, seen, exp_cycles);
    expect_eq({name, " found"}, int'(st[0]), int'(f));
    expect_eq({name, " finished bit"}, int'(r == 0 ? st[23] : st[22]), 1);
    if (f) begin
      expect_eq({name, " VirusAddress"}, int'(st[17:13]), 1 << tpc);
      expect_eq({name, " TextPointer"}, int'(st[12:1]), (ws % 8192) >> 1);
      expect_eq({name, " irq"}, int'(irq_found), 1);
      n_match++;
    end else n_nomatch++;
    n_fail_check += nf;
    // disable
    hw(1, r, 0, 0);
  endtask

  task automatic fill_clean(int r);
    foreach (text[r][i]) text[r][i] = 8'h61 + 8'($urandom % 26);   // lower case
  endtask

  task automatic plant(int r, int at, int pi);
    for (int j = 0; j < 8; j++) text[r][at + j] = m.pats[pi][j];
  endtask

  initial begin
    logic [31:0] d;
    m = new();
    m.random_rows();
    text[0] = new[8192];
    text[1] = new[8192];
    for (int n = 0; n < 6; n++) begin
      logic [7:0] p [8];
      for (int j = 0; j < 8; j++) p[j] = 8'h41 + 8'($urandom % (n < 3 ? 26 : 3));  // upper case
      m.add_pattern(p);
    end
    repeat (2) @(negedge clk);
    rst_n = 1;
    // hash functions
    for (int k = 0; k < 4; k++)
      for (int r = 0; r < 32; r++) hw(0, 2 + k, r, 32'(m.rows[k][r]));
    hr(0, 3, 7, d); expect_eq("H1 row 7 readback", int'(d), int'(m.rows[1][7]));
    // clear and program the Bloom filters
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
    begin
      logic [7:0] b [4];
      m.pat_block(m.pats[2], 5, b);
      hr(0, 11, int'(h3_ref(m.rows, 3, b, 3)), d);
      expect_eq("MbitVector5 readback", int'(d[0]), 1);
    end

    // ---- published no-match timings
    fill_clean(0);
    load_text(0, 0, 8192);
    hr(0, 0, 4097, d);
    expect_eq("TextRam0 unaligned readback", int'(d), int'({text[0][4100], text[0][4099], text[0][4098], text[0][4097]}));
    scan_check("11 bytes", 0, 0, 11, 5);
    scan_check("1600 bytes", 0, 0, 1600, 1000);
    scan_check("3200 bytes", 0, 0, 3200, 1001);
    scan_check("4800 bytes", 0, 0, 4800, 1002);
    scan_check("6400 bytes", 0, 0, 6400, 1003);
    scan_check("8000 bytes", 0, 0, 8000, 1004);

    // ---- published match timings
    for (int k = 0; k < 5; k++) begin
      fill_clean(0);
      plant(0, 1600 * k, 0);
      load_text(0, 0, 8192);
      scan_check($sformatf("match at %0d", 1600 * k), 0, 0, 8000, 55 + k);
    end
    fill_clean(0);
    plant(0, 1592, 1);
    load_text(0, 0, 8192);
    scan_check("match at 1592", 0, 0, 8000, 1050);
    // a match across the segment 0/1 boundary is still found
    fill_clean(0);
    plant(0, 1597, 1);
    load_text(0, 0, 8192);
    scan_check("match across 1600", 0, 0, 8000);

    // ---- random texts on a small alphabet, both TextRams
    for (int t = 0; t < 30; t++) begin
      int r, base, len;
      r = t % 2;
      base = $urandom % 2000;
      len = 8 + $urandom % (8192 - base - 8);
      foreach (text[r][i]) text[r][i] = 8'h41 + 8'($urandom % 4);
      if (t % 3 == 0) plant(r, base + $urandom % (len - 8), 3 + $urandom % 3);
      load_text(r, 0, 8192);
      scan_check($sformatf("random %0d", t), r, base, len);
    end

    // ---- ping-pong: TextRam1 enabled while TextRam0 scans, starts after it
    fill_clean(0);
    fill_clean(1);
    load_text(0, 0, 8192);
    load_text(1, 0, 8192);
    hw(1, 0, 0, {1'b1, 18'd0, 13'd8000});
    hw(1, 1, 0, {1'b1, 18'd0, 13'd3200});
    begin
      int guard = 0;
      while (!finished[0] && guard < 5000) begin @(negedge clk); guard++; end
      @(negedge clk); @(negedge clk);
      expect_eq("TextRam1 scanning after TextRam0", int'(scanning[1]), 1);
      // error: write into the TextRam being scanned
      hw(0, 1, 0, 32'h4141_4141);
      hr(1, 2, 0, d);
      expect_eq("error bit for TextRam1", int'(d[18]), 1);
      n_err += d[18];
      // the refused write must not have reached the TextRam
      while (!finished[1] && guard < 10000) begin @(negedge clk); guard++; end
      hr(0, 1, 0, d);
      expect_eq("refused write", int'(d), int'({text[1][3], text[1][2], text[1][1], text[1][0]}));
      hr(1, 2, 0, d);
      expect_eq("both finished", int'(d[23:22]), 3);
      n_pingpong++;
      hw(1, 0, 0, 0);
      hw(1, 1, 0, 0);
    end
    // DMA-port write while scanning also flags an error
    hw(1, 0, 0, {1'b1, 18'd0, 13'd8000});
    @(negedge clk); d_we = 1; d_ram = 0; d_word = '0; d_data = '0; d_be = 4'hF;
    @(negedge clk); d_we = 0;
    hr(1, 2, 0, d);
    expect_eq("DMA error bit for TextRam0", int'(d[19]), 1);
    n_err += d[19];
    hw(1, 0, 0, 0);

    $display("matches %0d, no-match scans %0d, failed checks %0d, errors %0d, ping-pong %0d",
             n_match, n_nomatch, n_fail_check, n_err, n_pingpong);
    checks++;
    if (n_match == 0 || n_nomatch == 0 || n_fail_check == 0 || n_err == 0 || n_pingpong == 0) begin
      failures++; $display("mechanism not exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
