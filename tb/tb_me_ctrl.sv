// tb_me_ctrl: the plane sequencer driven by a behavioural datapath.
//
// The testbench stands in for the data generation unit and the digit-SAD
// unit: for the candidate and plane the controller asks for it returns the
// digit SAD worked out from pixel values, prefix(z) - 2*prefix(z+1). It also
// hands back a switch-state pattern unique to candidate and plane, and checks
// that the controller returns exactly that pattern the next time it visits
// the same candidate. Results, digit-SAD counts and cycle counts are compared
// with the reference model in both modes; a start while busy must be ignored.
module tb_me_ctrl;
  import me_pkg::*;
  import me_ref_pkg::*;
  localparam int NPIX = 16, BITS = 8, CW = 4, CH = 4, N = 4;
  localparam int WW = CW + N - 1, NCAND = CW * CH;

  logic clk = 1'b0;
  logic rst_n, start, mode_pred;
  logic [3:0]  cand;
  logic [2:0]  plane;
  sw_state_t   st_cur [NPIX];
  sw_state_t   st_new [NPIX];
  logic signed [5:0] dsad;
  logic busy, done, sad_exact, ev_discard, ev_newmin;
  logic [3:0]  mv_idx;
  logic [11:0] min_sad;
  logic [7:0]  dsad_count;

  int checks = 0, failures = 0;
  int cur[], win[];
  int last_plane_of [NCAND];
  int busy_cycles;

  always #5 clk = ~clk;

  me_ctrl #(.NPIX(NPIX), .BITS(BITS), .CW(CW), .CH(CH)) dut (.*);

  function automatic sw_state_t pattern(int c, int z, int k);
    return sw_state_t'(2'((c * 7 + z * 3 + k) % 4));
  endfunction

  // behavioural datapath
  always_comb begin
    int hi, lo;
    lo = 0; hi = 0;
    if (cur.size() != 0) begin
      lo = prefix(cur, win, N, CW, WW, int'(cand), int'(plane));
      hi = (plane == 3'(BITS - 1)) ? 0 : prefix(cur, win, N, CW, WW, int'(cand), int'(plane) + 1);
    end
    dsad = 6'(lo - 2 * hi);
    for (int k = 0; k < NPIX; k++) st_new[k] = pattern(int'(cand), int'(plane), k);
  end

  // switch states must come back as they were left
  always @(posedge clk) begin
    if (busy) begin
      busy_cycles <= busy_cycles + 1;
      for (int k = 0; k < NPIX; k++) begin
        sw_state_t want;
        want = (last_plane_of[cand] < 0) ? sw_state_t'(2'b00)
                                         : pattern(int'(cand), last_plane_of[cand], k);
        checks++;
        if (st_cur[k] != want) begin
          failures++;
          if (failures < 10) $display("FAIL switch state cand=%0d pix=%0d", cand, k);
        end
      end
      last_plane_of[cand] <= int'(plane);
    end
  end

  initial begin
    repeat (100_000) @(posedge clk);
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

  initial begin
    ref_result_t want;
    int b0;
    bit pred;
    busy_cycles = 0;
    rst_n = 1'b0; start = 1'b0; mode_pred = 1'b0;
    gen_case(1, N, CW, CH, cur, win);
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 300; t++) begin
      gen_case(t % 5, N, CW, CH, cur, win);
      pred = (t % 2 == 1);
      want = search(cur, win, N, BITS, CW, CH, pred);
      foreach (last_plane_of[c]) last_plane_of[c] = -1;
      b0 = busy_cycles;
      @(negedge clk);
      start = 1'b1; mode_pred = pred;
      @(negedge clk);
      // a second start while busy is ignored; mode is sampled once
      start = 1'b1; mode_pred = !pred;
      @(negedge clk);
      start = 1'b0;
      while (!done) @(negedge clk);
      expect_eq("mv_idx", int'(mv_idx), want.mv_idx);
      expect_eq("min_sad", int'(min_sad), want.min_sad);
      expect_eq("sad_exact", int'(sad_exact), int'(want.exact));
      expect_eq("dsad_count", int'(dsad_count), want.count);
      expect_eq("busy cycles", busy_cycles - b0, want.count);
      @(negedge clk);
      expect_eq("idle after done", int'(busy), 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
