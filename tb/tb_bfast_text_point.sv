// tb_bfast_text_point: checks the round-robin slot sequence, the restart to
// slot 0, that a query issues only when the owning controller requests it,
// and that the issued address is that controller's TextPoint.
module tb_bfast_text_point;
  import bfast_pkg::*;
  localparam int N = 5;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic           restart = 0;
  logic [N-1:0]   req = '0;
  ptr_t           tp [N];
  logic           issue;
  logic [2:0]     slot;
  text_addr_t     addr;
  int checks = 0, failures = 0;
  int exp_slot;

  bfast_text_point #(.N(N)) dut (.*);

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < N; k++) tp[k] = ptr_t'(1000 * k + 7);
    repeat (2) @(negedge clk);
    rst_n = 1;
    restart = 1;
    @(negedge clk);
    restart = 0;
    exp_slot = 0;
    for (int n = 0; n < 400; n++) begin
      if (n > 0) @(negedge clk);
      if ($urandom % 37 == 0) begin
        // restart: no issue this cycle, slot 0 next
        restart = 1;
        req = '1;
        #1;
        checks++;
        if (issue !== 1'b0) begin failures++; $display("issued during restart"); end
        @(negedge clk);
        restart = 0;
        exp_slot = 0;
      end
      req = N'($urandom);
      for (int k = 0; k < N; k++) tp[k] = ptr_t'($urandom);
      #1;
      checks++;
      if (slot !== 3'(exp_slot) || issue !== req[exp_slot] ||
          addr !== tp[exp_slot][TEXT_AW-1:0]) begin
        failures++;
        $display("slot %0d exp %0d issue %b addr %h", slot, exp_slot, issue, addr);
      end
      exp_slot = (exp_slot + 1) % N;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
