// tb_bfast_tp_controller: one TPController (segment 2 of 40-byte segments)
// driven by a testbench model of the shared pipeline: its slot comes every
// five cycles and the query result (exact group membership of the block at
// TextPoint) is returned four cycles later. Over many random texts on a
// small alphabet, so that partial hits, failed checks and matches all occur,
// the number of passes, the match result and the window start must equal the
// reference algorithm. Also checks stop (freeze in HOLD), disable (back to
// INIT) and the state sequence INIT -> SCAN -> CHECK -> HOLD.
module tb_bfast_tp_controller;
  import bfast_pkg::*;
  import bfast_tb_pkg::*;
  localparam int ID = 2, SEG = 40;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic       enable = 0, start = 0, stop = 0, req, wb_valid = 0, done, found;
  ptr_t       base = '0, limit = '0, text_point, win_start;
  group_vec_t wb_hit = '0;
  shift_t     wb_shift = '0;
  tpc_state_t state;

  bfast_tp_controller #(.ID(ID), .SEG(SEG)) dut (.*);

  bfast_ref   m;
  logic [7:0] text [];
  int checks = 0, failures = 0;
  int n_found = 0, n_check = 0, n_fail = 0, n_stop = 0, n_disable = 0;
  bit seen_check;

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // run one scan; returns number of passes
  task automatic run(input int b, int len, input bit do_stop, output int passes, output bit stopped);
    int ph = 0, tp_cap = 0, cyc = 0;
    bit pend = 0;
    passes = 0; stopped = 0; seen_check = 0;
    @(negedge clk);
    base = ptr_t'(b); limit = ptr_t'(b + len);
    enable = 1; start = 1;
    @(negedge clk);
    start = 0;
    while (!(state == TPC_HOLD && done) && cyc < 20000) begin
      wb_valid = 0;
      if (state == TPC_CHECK) seen_check = 1;
      if (ph == 0 && req) begin tp_cap = int'(text_point); pend = 1; end
      if (ph == 4 && pend) begin
        logic [7:0] blk [4];
        m.block_at(text, tp_cap, blk);
        wb_shift = 4'd8;
        for (int g = 7; g >= 0; g--) begin
          wb_hit[g] = m.in_group(blk, g);
          if (wb_hit[g]) wb_shift = 4'(g);
        end
        wb_valid = 1; pend = 0; passes++;
      end
      if (do_stop && passes == 3 && ph == 1) begin stop = 1; stopped = 1; end
      @(negedge clk);
      ph = (ph + 1) % 5;
      cyc++;
    end
    wb_valid = 0;
    stop = 0;
  endtask

  initial begin
    m = new();
    text = new[8192];
    for (int n = 0; n < 4; n++) begin
      logic [7:0] p [8];
      for (int j = 0; j < 8; j++) p[j] = 8'h41 + 8'($urandom % 3);
      m.add_pattern(p);
    end
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    checks++;
    if (state !== TPC_INIT) begin failures++; $display("not INIT after reset"); end

    for (int t = 0; t < 300; t++) begin
      int b, len, passes, slots, ws, nc, nf;
      bit f, st, do_stop;
      b = $urandom % 4000;
      len = 30 + $urandom % 200;
      do_stop = (t % 10 == 9);
      foreach (text[i]) text[i] = 8'h41 + 8'($urandom % 4);
      if (t % 2 == 0) begin
        // plant a pattern somewhere in or around the segment
        int at, pi;
        at = b + ID * SEG - 8 + $urandom % (SEG + 16);
        pi = $urandom % m.pats.size();
        for (int j = 0; j < 8; j++) text[(at + j) % 8192] = m.pats[pi][j];
      end
      run(b, len, do_stop, passes, st);
      m.scan_one(text, b, len, SEG, ID, f, slots, ws, nc, nf);
      checks++;
      if (st) begin
        n_stop++;
        if (found || state != TPC_HOLD || passes > slots) begin
          failures++; $display("stop: found %b state %s", found, state.name());
        end
      end else if (found !== f || passes != slots || (f && int'(win_start) != ws)) begin
        failures++;
        $display("run %0d base %0d len %0d: found %b/%b passes %0d/%0d win %0d/%0d",
                 t, b, len, found, f, passes, slots, win_start, ws);
      end else begin
        n_found += f; n_check += nc; n_fail += nf;
        if (nc > 0 && !seen_check) begin failures++; $display("CHECK never observed"); end
      end
      // disable returns to INIT
      @(negedge clk); enable = 0;
      @(negedge clk);
      checks++;
      n_disable++;
      if (state !== TPC_INIT || found) begin failures++; $display("disable: not INIT"); end
    end
    $display("matches %0d, checks %0d, failed checks %0d, stops %0d, disables %0d",
             n_found, n_check, n_fail, n_stop, n_disable);
    checks++;
    if (n_found == 0 || n_fail == 0 || n_stop == 0) begin failures++; $display("mechanism not exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
