// tb_msd_me: end-to-end test of the MSD-first block matcher at its default
// size (4x4 blocks, 8-bit pixels, 16 candidates).
//
// For each test the block and the window are loaded through the load port,
// a search is started in normal or prediction mode, and the result is held
// against the word-level reference model: motion vector, SAD, exactness flag,
// number of digit SADs, number of discards and new minima. The motion vector
// must also be a true full-search minimum, its SAD the plain SAD of that
// candidate, and the busy time must equal the digit-SAD count (one digit SAD
// per cycle). Each mechanism - discard, new running minimum, early stop with
// one survivor, search to the last plane, a tie at the minimum, both modes -
// must occur at least once, and writes to the load port during a search must
// be ignored.
module tb_msd_me;
  import me_pkg::*;
  import me_ref_pkg::*;
  localparam int N = BLK_N, BITS = PIX_BITS, CW = CAND_W, CH = CAND_H;
  localparam int WW = CW + N - 1, WH = CH + N - 1, NCAND = CW * CH;
  localparam int NTESTS = 400;

  logic clk = 1'b0;
  logic rst_n;
  logic ld_valid, ld_is_ref, start, mode_pred;
  logic [2:0] ld_row, ld_col;
  logic [7:0] ld_pixel;
  logic busy, done, sad_exact, ev_discard, ev_newmin;
  logic signed [3:0] mv_m, mv_n;
  logic [3:0]  mv_idx;
  logic [11:0] min_sad;
  logic [7:0]  dsad_count;

  int checks = 0, failures = 0;
  int n_discard = 0, n_newmin = 0, n_early = 0, n_full = 0, n_tie = 0;
  int n_pred = 0, n_norm = 0, n_ldbusy = 0, busy_cycles = 0, total_dsad = 0, total_word = 0;

  always #5 clk = ~clk;

  msd_me dut (.*);

  always @(posedge clk) begin
    if (busy) busy_cycles <= busy_cycles + 1;
    if (ev_discard) n_discard <= n_discard + 1;
    if (ev_newmin) n_newmin <= n_newmin + 1;
  end

  initial begin
    repeat (200_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(string what, int got, int want);
    checks++;
    if (got != want) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0d want %0d", what, got, want);
    end
  endtask

  task automatic load(input int cur[], input int win[]);
    for (int k = 0; k < N*N + WW*WH; k++) begin
      @(negedge clk);
      ld_valid  = 1'b1;
      ld_is_ref = (k >= N*N);
      if (k < N*N) begin
        ld_row = 3'(k / N); ld_col = 3'(k % N); ld_pixel = 8'(cur[k]);
      end else begin
        ld_row = 3'((k - N*N) / WW); ld_col = 3'((k - N*N) % WW);
        ld_pixel = 8'(win[k - N*N]);
      end
    end
    @(negedge clk);
    ld_valid = 1'b0;
  endtask

  initial begin
    int cur[], win[];
    int best, nbest, busy0, disc0, nmin0, t0, s;
    ref_result_t want;
    bit pred;
    rst_n = 1'b0; ld_valid = 0; ld_is_ref = 0; ld_row = 0; ld_col = 0; ld_pixel = 0;
    start = 0; mode_pred = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < NTESTS; t++) begin
      gen_case(t % 5, N, CW, CH, cur, win);
      pred = ((t / 5) % 2 == 1);
      load(cur, win);
      want = search(cur, win, N, BITS, CW, CH, pred);
      busy0 = busy_cycles; disc0 = n_discard; nmin0 = n_newmin;
      @(negedge clk);
      start = 1'b1; mode_pred = pred;
      @(negedge clk);
      start = 1'b0;
      t0 = 0;
      // every other search: write garbage through the load port while busy;
      // the buffers must ignore it
      while (!done) begin
        if (t % 2 == 1 && busy) begin
          ld_valid  = 1'b1;
          ld_is_ref = 1'($urandom);
          ld_row    = 3'($urandom_range(0, ld_is_ref ? WH - 1 : N - 1));
          ld_col    = 3'($urandom_range(0, ld_is_ref ? WW - 1 : N - 1));
          ld_pixel  = 8'($urandom);
          n_ldbusy++;
        end
        @(negedge clk);
        ld_valid = 1'b0;
        t0++;
      end
      expect_eq("mv_idx", int'(mv_idx), want.mv_idx);
      expect_eq("min_sad", int'(min_sad), want.min_sad);
      expect_eq("sad_exact", int'(sad_exact), int'(want.exact));
      expect_eq("dsad_count", int'(dsad_count), want.count);
      expect_eq("busy cycles", busy_cycles - busy0, want.count);
      expect_eq("discards", n_discard - disc0, want.discards);
      expect_eq("new minima", n_newmin - nmin0, want.newmins);
      expect_eq("mv_m", int'(mv_m), int'(mv_idx) % CW - CW / 2);
      expect_eq("mv_n", int'(mv_n), int'(mv_idx) / CW - CH / 2);
      // exactness against plain full search
      best = 1 << 30; nbest = 0;
      for (int k = 0; k < NCAND; k++) begin
        s = full_sad(cur, win, N, CW, WW, k);
        if (s < best) begin best = s; nbest = 1; end
        else if (s == best) nbest++;
      end
      expect_eq("full-search minimum", full_sad(cur, win, N, CW, WW, int'(mv_idx)), best);
      if (sad_exact) expect_eq("exact SAD", int'(min_sad), best);
      if (sad_exact) n_full++; else n_early++;
      if (nbest > 1) n_tie++;
      if (pred) n_pred++; else n_norm++;
      total_dsad += int'(dsad_count);
      total_word += NCAND * BITS;
    end
    $display("mechanisms: discards=%0d new_minima=%0d early_stops=%0d full_searches=%0d ties=%0d normal=%0d prediction=%0d loads_while_busy=%0d",
             n_discard, n_newmin, n_early, n_full, n_tie, n_norm, n_pred, n_ldbusy);
    $display("digit SADs issued: %0d of %0d (%0d%%)", total_dsad, total_word, 100 * total_dsad / total_word);
    expect_eq("discard seen", int'(n_discard > 0), 1);
    expect_eq("new minimum seen", int'(n_newmin > 0), 1);
    expect_eq("early stop seen", int'(n_early > 0), 1);
    expect_eq("full search seen", int'(n_full > 0), 1);
    expect_eq("tie seen", int'(n_tie > 0), 1);
    expect_eq("normal mode seen", int'(n_norm > 0), 1);
    expect_eq("prediction mode seen", int'(n_pred > 0), 1);
    expect_eq("load while busy seen", int'(n_ldbusy > 0), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
