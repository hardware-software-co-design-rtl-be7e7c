// bfast_tb_pkg: reference models shared by the BFAST* testbenches.
//
// - h3_ref: the H3 hash of the last L bytes of a 4-byte block, computed bit
//   by bit from the hash table rows.
// - group sets: exact (not Bloom) membership of a block in group Gg, built
//   from the first eight bytes of each pattern.
// - scan_ref: the scan algorithm of the TPControllers, run in software on a
//   byte array, returning the result and the number of cycles the scan takes
//   (5 cycles per pipeline pass; controller k issues k cycles after 0).
package bfast_tb_pkg;

  localparam int WIN = 8;
  localparam int SEGB = 1600;

  typedef logic [13:0] h_rows_t [4][32];

  function automatic int glen(int g);
    return (WIN - g < 4) ? WIN - g : 4;
  endfunction

  // bytes b[0..3], b[0] at the lowest address
  function automatic logic [13:0] h3_ref(h_rows_t rows, int k, logic [7:0] b [4], int L);
    logic [13:0] h = '0;
    for (int j = 4 - L; j < 4; j++)
      for (int t = 0; t < 8; t++)
        if (b[j][t]) h ^= rows[k][8*j + t];
    return h;
  endfunction

  class bfast_ref;
    h_rows_t rows;
    bit      gset [logic [39:0]];   // {g, masked block}
    logic [7:0] pats [$][8];

    function void random_rows();
      for (int k = 0; k < 4; k++)
        for (int r = 0; r < 32; r++) rows[k][r] = 14'($urandom);
    endfunction

    function logic [39:0] key(int g, logic [7:0] b [4]);
      logic [31:0] v = '0;
      for (int j = 4 - glen(g); j < 4; j++) v[8*j +: 8] = b[j];
      return {8'(g), v};
    endfunction

    // bytes of the block of pattern p that belongs to group g (unused bytes 0)
    function void pat_block(logic [7:0] p [8], int g, output logic [7:0] b [4]);
      int e = 7 - g;
      for (int j = 0; j < 4; j++) begin
        int idx = e - 3 + j;
        b[j] = (idx >= 0) ? p[idx] : 8'h00;
        if (j < 4 - glen(g)) b[j] = 8'h00;
      end
    endfunction

    function void add_pattern(logic [7:0] p [8]);
      logic [7:0] b [4];
      pats.push_back(p);
      for (int g = 0; g < 8; g++) begin
        pat_block(p, g, b);
        gset[key(g, b)] = 1;
      end
    endfunction

    function bit in_group(logic [7:0] b [4], int g);
      return gset.exists(key(g, b));
    endfunction

    // text[] is the whole TextRam; addresses wrap at its size
    function void block_at(ref logic [7:0] text [], input int a, output logic [7:0] b [4]);
      int n = text.size();
      for (int j = 0; j < 4; j++) b[j] = text[((a + j) % n + n) % n];
    endfunction

    // One controller k: number of pipeline passes, result and window start.
    function void scan_one(ref logic [7:0] text [], input int base, int len, int seg, int k,
                           output bit f, output int slots, output int wstart,
                           output int n_check, output int n_fail);
      logic [7:0] b [4];
      int s0 = base + k * seg;
      int lim = (s0 + seg + WIN - 1 < base + len) ? s0 + seg + WIN - 1 : base + len;
      int we = s0 + WIN - 1;
      f = 0; slots = 0; wstart = -1; n_check = 0; n_fail = 0;
      if (!(s0 + WIN <= lim)) return;
      while (we < lim) begin
        int sh = WIN;
        slots++;
        block_at(text, we - 3, b);
        for (int g = 7; g >= 0; g--) if (in_group(b, g)) sh = g;
        if (sh != 0) begin
          we += sh;
        end else begin
          int i;
          n_check++;
          for (i = 0; i < 8; i++) begin
            slots++;
            block_at(text, we - 3 - i, b);
            if (!in_group(b, i)) break;
          end
          if (i == 8) begin
            slots += 2;
            f = 1;
            wstart = we - 7;
            return;
          end
          n_fail++;
          we += 1;
        end
      end
    endfunction

    // All five controllers: first reported match (or none) and scan cycles.
    function void scan(ref logic [7:0] text [], input int base, int len, int seg,
                       output bit found, output int tpc, output int wstart,
                       output int cycles, output int n_check, output int n_fail);
      int best = -1, worst = 0;
      found = 0; tpc = -1; wstart = -1; n_check = 0; n_fail = 0;
      for (int k = 0; k < 5; k++) begin
        bit f;
        int slots, ws, nc, nf;
        scan_one(text, base, len, seg, k, f, slots, ws, nc, nf);
        n_check += nc;
        n_fail  += nf;
        if (slots == 0) continue;
        if (f && (best < 0 || 5 * slots + k < best)) begin
          best = 5 * slots + k; tpc = k; wstart = ws;
        end
        if (5 * slots + k > worst) worst = 5 * slots + k;
      end
      found  = (best >= 0);
      cycles = found ? best : worst;
    endfunction
  endclass

endpackage
