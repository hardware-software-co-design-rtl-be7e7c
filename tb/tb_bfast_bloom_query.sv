// tb_bfast_bloom_query: clears the eight MbitVectors, programs the Bloom
// filters of a few random 8-byte patterns (four H3 hashes per group entry),
// then queries blocks taken from the patterns at every group offset plus
// random blocks, and compares the hit vector and the shift distance with
// exact set membership (lowest hit group, or 8 when none hits). Host reads of
// programmed bits are checked as well.
module tb_bfast_bloom_query;
  import bfast_pkg::*;
  import bfast_tb_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;

  suffix_hash_t hash;
  group_vec_t   hit;
  shift_t       shift;
  logic         h_we = 0, h_re = 0, h_wdata = 0, h_rdata;
  logic [2:0]   h_vec = '0;
  hash_t        h_addr = '0;
  bfast_ref     m;
  int checks = 0, failures = 0;
  int n_shift [9];

  bfast_bloom_query dut (.*);

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic set_hash(logic [7:0] b [4]);
    for (int L = 1; L <= 4; L++)
      for (int k = 0; k < 4; k++) hash[L-1][k] = h3_ref(m.rows, k, b, L);
  endtask

  task automatic query(logic [7:0] b [4]);
    group_vec_t exp;
    shift_t     sexp;
    @(negedge clk);
    set_hash(b);
    sexp = 4'd8;
    for (int g = 7; g >= 0; g--) begin
      exp[g] = m.in_group(b, g);
      if (exp[g]) sexp = 4'(g);
    end
    @(negedge clk);
    checks++;
    n_shift[sexp]++;
    if (hit !== exp || shift !== sexp) begin
      failures++;
      $display("block %h%h%h%h: hit %b exp %b shift %0d exp %0d", b[3], b[2], b[1], b[0], hit, exp, shift, sexp);
    end
  endtask

  initial begin
    m = new();
    m.random_rows();
    for (int g = 0; g < 8; g++)
      for (int a = 0; a < (1 << HASH_W); a++) begin
        @(negedge clk);
        h_we = 1; h_vec = 3'(g); h_addr = HASH_W'(a); h_wdata = 0;
      end
    for (int n = 0; n < 6; n++) begin
      logic [7:0] p [8];
      logic [7:0] b [4];
      for (int j = 0; j < 8; j++) p[j] = 8'($urandom);
      m.add_pattern(p);
      for (int g = 0; g < 8; g++) begin
        m.pat_block(p, g, b);
        for (int k = 0; k < 4; k++) begin
          @(negedge clk);
          h_we = 1; h_vec = 3'(g); h_addr = h3_ref(m.rows, k, b, glen(g)); h_wdata = 1;
        end
      end
    end
    @(negedge clk); h_we = 0;
    // host read-back of a programmed bit
    for (int g = 0; g < 8; g++) begin
      logic [7:0] b [4];
      m.pat_block(m.pats[0], g, b);
      @(negedge clk); h_re = 1; h_vec = 3'(g); h_addr = h3_ref(m.rows, 0, b, glen(g));
      @(negedge clk); h_re = 0;
      checks++;
      if (h_rdata !== 1'b1) begin failures++; $display("host read of vector %0d", g); end
    end
    // blocks of the patterns: block ending at every position, incl. short prefixes
    foreach (m.pats[n]) begin
      for (int e = 0; e < 8; e++) begin
        logic [7:0] b [4];
        for (int j = 0; j < 4; j++) b[j] = (e - 3 + j >= 0) ? m.pats[n][e - 3 + j] : 8'($urandom);
        query(b);
      end
    end
    for (int n = 0; n < 3000; n++) begin
      logic [7:0] b [4];
      for (int j = 0; j < 4; j++) b[j] = 8'($urandom);
      query(b);
    end
    for (int s = 0; s <= 8; s++) $display("shift %0d seen %0d times", s, n_shift[s]);
    checks++;
    if (n_shift[0] == 0 || n_shift[8] == 0) begin failures++; $display("shift 0 or 8 never seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
