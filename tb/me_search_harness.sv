// me_search_harness: drives one msd_me instance of a given size through
// NTESTS searches on generated images (both visiting modes, all image
// scenarios of me_ref_pkg) and checks each result against the reference model
// and against plain full search. Reports its counts through ports so that one
// testbench can run several sizes side by side.
module me_search_harness #(
  parameter int N      = 4,
  parameter int BITS   = 8,
  parameter int CW     = 4,
  parameter int CH     = 4,
  parameter int NTESTS = 10
)(
  input  logic clk,
  input  logic rst_n,
  output logic finished,
  output int   checks,
  output int   failures,
  output int   dsad_total,
  output int   dsad_word
);
  import me_ref_pkg::*;
  localparam int WW = CW + N - 1, WH = CH + N - 1, NCAND = CW * CH;
  localparam int NPIX = N * N;
  localparam int CIW  = (NCAND > 1) ? $clog2(NCAND) : 1;
  localparam int RW   = (WH > 1) ? $clog2(WH) : 1;
  localparam int CLW  = (WW > 1) ? $clog2(WW) : 1;
  localparam int AW   = $clog2(NPIX * ((1 << BITS) - 1) + 1);
  localparam int CNTW = $clog2(NCAND * BITS + 1);
  localparam int MVW  = $clog2((CW > CH ? CW : CH) + 1) + 1;

  logic ld_valid, ld_is_ref, start, mode_pred;
  logic [RW-1:0]   ld_row;
  logic [CLW-1:0]  ld_col;
  logic [BITS-1:0] ld_pixel;
  logic busy, done, sad_exact, ev_discard, ev_newmin;
  logic signed [MVW-1:0] mv_m, mv_n;
  logic [CIW-1:0]  mv_idx;
  logic [AW-1:0]   min_sad;
  logic [CNTW-1:0] dsad_count;
  int busy_cycles;

  msd_me #(.N(N), .BITS(BITS), .CW(CW), .CH(CH)) dut (.*);

  always @(posedge clk) if (busy) busy_cycles <= busy_cycles + 1;

  task automatic expect_eq(string what, int got, int want);
    checks++;
    if (got != want) begin
      failures++;
      if (failures < 10) $display("FAIL [%0dx%0d, %0d bit, %0d cand] %s: got %0d want %0d",
                                  N, N, BITS, NCAND, what, got, want);
    end
  endtask

  initial begin
    int cur[], win[];
    int best, s, b0, mask;
    ref_result_t want;
    bit pred;
    finished = 0; checks = 0; failures = 0; dsad_total = 0; dsad_word = 0; busy_cycles = 0;
    ld_valid = 0; ld_is_ref = 0; ld_row = '0; ld_col = '0; ld_pixel = '0; start = 0; mode_pred = 0;
    mask = (1 << BITS) - 1;
    @(posedge rst_n);
    for (int t = 0; t < NTESTS; t++) begin
      gen_case(t % 5, N, CW, CH, cur, win);
      foreach (cur[k]) cur[k] = cur[k] & mask;
      foreach (win[k]) win[k] = win[k] & mask;
      pred = ((t / 5) % 2 == 1);
      for (int k = 0; k < NPIX + WW*WH; k++) begin
        @(negedge clk);
        ld_valid  = 1'b1;
        ld_is_ref = (k >= NPIX);
        if (k < NPIX) begin
          ld_row = RW'(k / N); ld_col = CLW'(k % N); ld_pixel = BITS'(cur[k]);
        end else begin
          ld_row = RW'((k - NPIX) / WW); ld_col = CLW'((k - NPIX) % WW);
          ld_pixel = BITS'(win[k - NPIX]);
        end
      end
      @(negedge clk);
      ld_valid = 1'b0;
      want = search(cur, win, N, BITS, CW, CH, pred);
      b0 = busy_cycles;
      start = 1'b1; mode_pred = pred;
      @(negedge clk);
      start = 1'b0;
      while (!done) @(negedge clk);
      expect_eq("mv_idx", int'(mv_idx), want.mv_idx);
      expect_eq("min_sad", int'(min_sad), want.min_sad);
      expect_eq("sad_exact", int'(sad_exact), int'(want.exact));
      expect_eq("dsad_count", int'(dsad_count), want.count);
      expect_eq("cycles", busy_cycles - b0, want.count);
      best = 1 << 30;
      for (int k = 0; k < NCAND; k++) begin
        s = full_sad(cur, win, N, CW, WW, k);
        if (s < best) best = s;
      end
      expect_eq("full-search minimum", full_sad(cur, win, N, CW, WW, int'(mv_idx)), best);
      dsad_total += int'(dsad_count);
      dsad_word  += NCAND * BITS;
    end
    finished = 1;
  end
endmodule
