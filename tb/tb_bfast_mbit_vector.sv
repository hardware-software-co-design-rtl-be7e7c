// tb_bfast_mbit_vector: writes random bits through the host port, then
// reads them back through all four query ports (different addresses per
// port) and the host read port, against a bit-array model.
module tb_bfast_mbit_vector;
  localparam int AW = 14;
  localparam int NP = 4;

  logic clk = 0;
  always #5 clk = ~clk;

  logic [NP-1:0][AW-1:0] q_addr = '0;
  logic [NP-1:0]         q_bit;
  logic                  h_we = 0, h_re = 0, h_wdata = 0, h_rdata;
  logic [AW-1:0]         h_addr = '0;
  bit                    model [1 << AW];
  int checks = 0, failures = 0;

  bfast_mbit_vector #(.AW(AW), .NPORTS(NP)) dut (.*);

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < (1 << AW); a++) begin
      @(negedge clk);
      h_we = 1; h_addr = AW'(a); h_wdata = 1'($urandom); model[a] = h_wdata;
    end
    @(negedge clk); h_we = 0;
    for (int n = 0; n < 3000; n++) begin
      logic [NP-1:0] exp;
      @(negedge clk);
      for (int p = 0; p < NP; p++) begin
        q_addr[p] = AW'($urandom);
        exp[p] = model[q_addr[p]];
      end
      h_re = 1; h_addr = AW'($urandom);
      begin
        bit hexp;
        hexp = model[h_addr];
        @(negedge clk);
        h_re = 0;
        checks++;
        if (q_bit !== exp || h_rdata !== hexp) begin
          failures++;
          $display("q_bit %b exp %b / host %b exp %b", q_bit, exp, h_rdata, hexp);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
