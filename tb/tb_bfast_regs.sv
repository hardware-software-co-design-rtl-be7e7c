// tb_bfast_regs: EnableTextRam0/1 write and read-back, the range error on
// an out-of-range start + length, the finished/error set and clear rules, and
// every StatusRegister field at its bit position.
module tb_bfast_regs;
  import bfast_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        h_we = 0, h_re = 0;
  logic [1:0]  h_sel = '0;
  logic [31:0] h_wdata = '0, h_rdata;
  enable_reg_t en [2];
  ptr_t        scan_len [2];
  logic [1:0]  finished, error;
  logic [1:0]  scanning = '0, set_finished = '0, set_error = '0;
  logic        clear_result = 0, result_valid = 0, result_found = 0;
  logic [4:0]  result_tpc = '0;
  text_addr_t  result_ptr = '0;
  int checks = 0, failures = 0;

  bfast_regs dut (.*);

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wr(int sel, logic [31:0] d);
    @(negedge clk); h_we = 1; h_sel = 2'(sel); h_wdata = d;
    @(negedge clk); h_we = 0;
  endtask

  task automatic rd(int sel, output logic [31:0] d);
    @(negedge clk); h_re = 1; h_sel = 2'(sel);
    @(negedge clk); h_re = 0; d = h_rdata;
  endtask

  task automatic expect_eq(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("%s: got %h exp %h", what, got, exp); end
  endtask

  initial begin
    logic [31:0] d;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // example from the driver description: scan TextRam0, length 0x1000
    wr(0, 32'h8000_1000);
    rd(0, d); expect_eq("EN0 readback", d, 32'h8000_1000);
    expect_eq("en0 fields", {en[0].enable, 18'(en[0].start), 13'(en[0].length)}, 32'h8000_1000);
    expect_eq("len", 32'(scan_len[0]), 32'h1000);
    expect_eq("no error", 32'(error), 0);
    // start 100, length 200 in TextRam1
    wr(1, {1'b1, 18'd100, 13'd200});
    expect_eq("en1 start", 32'(en[1].start), 100);
    expect_eq("en1 length", 32'(scan_len[1]), 200);
    // length 0 means 8192
    wr(1, {1'b1, 18'd0, 13'd0});
    expect_eq("len 0 = 8K", 32'(scan_len[1]), 8192);
    expect_eq("8K from 0 ok", 32'(error), 0);
    // out of range: start 8000 + 400
    wr(1, {1'b1, 18'd8000, 13'd400});
    expect_eq("range error", 32'(error), 32'b10);
    rd(2, d); expect_eq("status err bit 18", 32'(d[18]), 1);
    // finished and error set, cleared by a write
    @(negedge clk); set_finished = 2'b01; set_error = 2'b01;
    @(negedge clk); set_finished = 0; set_error = 0;
    rd(2, d);
    expect_eq("finished0 bit 23", 32'(d[23]), 1);
    expect_eq("error0 bit 19", 32'(d[19]), 1);
    wr(0, 32'h8000_0100);
    rd(2, d);
    expect_eq("cleared by write", 32'(d[23:22]), 0);
    expect_eq("error0 cleared", 32'(d[19]), 0);
    @(negedge clk); set_finished = 2'b10;
    @(negedge clk); set_finished = 0;
    rd(2, d); expect_eq("finished1 bit 22", 32'(d[22]), 1);
    // scanning bits and BFAST* enable
    scanning = 2'b01; rd(2, d);
    expect_eq("scanning0 21 / enable 24", {d[24], d[21], d[20]}, 3'b110);
    scanning = 2'b10; rd(2, d);
    expect_eq("scanning1 20", {d[24], d[21], d[20]}, 3'b101);
    scanning = 0; rd(2, d);
    expect_eq("idle", {d[24], d[21], d[20]}, 3'b000);
    // result fields
    @(negedge clk);
    result_valid = 1; result_found = 1; result_tpc = 5'b00100; result_ptr = 13'd3206;
    @(negedge clk); result_valid = 0; result_found = 0; result_tpc = 0; result_ptr = 0;
    rd(2, d);
    expect_eq("found bit 0", 32'(d[0]), 1);
    expect_eq("virus address 17:13", 32'(d[17:13]), 5'b00100);
    expect_eq("text pointer 12:1", 32'(d[12:1]), 3206 >> 1);
    expect_eq("zero bits", 32'(d[31:25]), 0);
    @(negedge clk); clear_result = 1;
    @(negedge clk); clear_result = 0;
    rd(2, d); expect_eq("cleared result", 32'(d[17:0]), 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
