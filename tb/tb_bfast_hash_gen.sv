// tb_bfast_hash_gen: programs random hash rows, reads them back through the
// host port, then hashes random blocks and compares all four suffix hashes of
// all four functions with a bit-by-bit reference.
module tb_bfast_hash_gen;
  import bfast_pkg::*;
  import bfast_tb_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;

  logic         en = 0, h_we = 0, h_re = 0;
  block_t       block = '0;
  suffix_hash_t hash;
  logic [1:0]   h_fn = '0;
  logic [4:0]   h_row = '0;
  hash_t        h_wdata = '0, h_rdata;
  h_rows_t      rows;
  int checks = 0, failures = 0;

  bfast_hash_gen dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 4; k++)
      for (int r = 0; r < 32; r++) begin
        @(negedge clk);
        h_we = 1; h_fn = 2'(k); h_row = 5'(r); h_wdata = 14'($urandom);
        rows[k][r] = h_wdata;
      end
    @(negedge clk); h_we = 0;
    for (int n = 0; n < 40; n++) begin
      @(negedge clk);
      h_re = 1; h_fn = 2'($urandom); h_row = 5'($urandom);
      @(negedge clk);
      h_re = 0;
      checks++;
      if (h_rdata !== rows[h_fn][h_row]) begin failures++; $display("row readback"); end
    end
    for (int n = 0; n < 2000; n++) begin
      logic [7:0] b [4];
      @(negedge clk);
      en = 1; block = $urandom;
      for (int j = 0; j < 4; j++) b[j] = block[8*j +: 8];
      @(negedge clk);
      en = 0;
      block = $urandom;   // must not affect the registered result
      for (int L = 1; L <= 4; L++)
        for (int k = 0; k < 4; k++) begin
          checks++;
          if (hash[L-1][k] !== h3_ref(rows, k, b, L)) begin
            failures++;
            $display("hash L=%0d k=%0d got %h exp %h", L, k, hash[L-1][k], h3_ref(rows, k, b, L));
          end
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
