// tb_bfast_text_ram: random aligned word writes with byte enables into a
// TextRam, then reads of four bytes at random (unaligned, wrapping) byte
// addresses compared with a byte-array model; also checks that rd_data holds
// while rd_en is low.
module tb_bfast_text_ram;
  localparam int AW = 13;
  localparam int N  = 1 << AW;

  logic clk = 0;
  always #5 clk = ~clk;

  logic          rd_en = 0, wr_en = 0;
  logic [AW-1:0] rd_addr = '0;
  logic [31:0]   rd_data, wr_data = '0;
  logic [AW-3:0] wr_word = '0;
  logic [3:0]    wr_be = '0;
  logic [7:0]    model [N];
  int checks = 0, failures = 0;

  bfast_text_ram #(.AW(AW)) dut (.*);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_read(int a);
    logic [31:0] exp;
    for (int j = 0; j < 4; j++) exp[8*j +: 8] = model[(a + j) % N];
    @(negedge clk); rd_en = 1; rd_addr = AW'(a);
    @(negedge clk); rd_en = 0;
    checks++;
    if (rd_data !== exp) begin
      failures++;
      $display("read @%0d: got %h exp %h", a, rd_data, exp);
    end
  endtask

  initial begin
    // fill the whole RAM
    for (int w = 0; w < N / 4; w++) begin
      @(negedge clk);
      wr_en = 1; wr_word = (AW-2)'(w); wr_data = $urandom; wr_be = 4'hF;
      for (int j = 0; j < 4; j++) model[4*w + j] = wr_data[8*j +: 8];
    end
    @(negedge clk); wr_en = 0;
    // partial writes
    for (int n = 0; n < 500; n++) begin
      @(negedge clk);
      wr_en = 1; wr_word = (AW-2)'($urandom); wr_data = $urandom; wr_be = 4'($urandom);
      for (int j = 0; j < 4; j++)
        if (wr_be[j]) model[4*wr_word + j] = wr_data[8*j +: 8];
    end
    @(negedge clk); wr_en = 0;
    // every offset, the wrap-around corner and random addresses
    for (int a = 0; a < 16; a++) check_read(a);
    for (int a = N - 4; a < N; a++) check_read(a);
    for (int n = 0; n < 2000; n++) check_read($urandom % N);
    // hold while rd_en low
    begin
      logic [31:0] held;
      held = rd_data;
      rd_addr = AW'(123);
      repeat (3) @(negedge clk);
      checks++;
      if (rd_data !== held) begin failures++; $display("rd_data not held"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
