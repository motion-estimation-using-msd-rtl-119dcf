// tb_digit_comparator: the decision is checked against the rule worked out
// by hand (margin 2*NPIX before the last plane, exact after it) on random and
// edge-case prefixes, and every "larger" decision before the last plane is
// checked to be safe: no choice of the unseen lower digits can make the
// candidate smaller than or equal to the minimum.
module tb_digit_comparator;
  import me_pkg::*;
  localparam int NPIX = 16;
  localparam int AW   = 13;

  logic [AW-1:0] a_cand, a_min;
  logic          min_valid, last_plane;
  cmp_t          result;
  int checks = 0, failures = 0;

  digit_comparator #(.NPIX(NPIX), .AW(AW)) dut (.a_cand, .a_min, .min_valid, .last_plane, .result);

  // A one-pixel instance compares two single signed-digit streams, where the
  // margin is two units of the current digit. Worked example: x = 0 1 0 -1 -1
  // 0 -1 -1 (37) and y = 0 0 1 0 1 0 0 1 (41), MSD first; the order must
  // become certain at the eighth digit and not before.
  logic [7:0] sx, sy;
  cmp_t       r_yx, r_xy;
  digit_comparator #(.NPIX(1), .AW(8)) u_one_yx (
    .a_cand(sy), .a_min(sx), .min_valid(1'b1), .last_plane(1'b0), .result(r_yx));
  digit_comparator #(.NPIX(1), .AW(8)) u_one_xy (
    .a_cand(sx), .a_min(sy), .min_valid(1'b1), .last_plane(1'b0), .result(r_xy));

  initial begin
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(int ac, int am, bit mv, bit lp);
    cmp_t want;
    int   diff;
    a_cand = AW'(ac); a_min = AW'(am); min_valid = mv; last_plane = lp;
    #1;
    diff = ac - am;
    if (!mv)                   want = CMP_SMALLER;
    else if (lp)               want = (diff < 0) ? CMP_SMALLER : CMP_LARGER;
    else if (diff >= 2 * NPIX) want = CMP_LARGER;
    else if (diff < 0)         want = CMP_SMALLER;
    else                       want = CMP_UNDECIDED;
    checks++;
    if (result != want) begin
      failures++;
      if (failures < 10) $display("FAIL ac=%0d am=%0d mv=%0b lp=%0b got %0d", ac, am, mv, lp, result);
    end
    // Safety of an early "larger": with z planes left, each pixel's unseen
    // tail lies in [-(2^z-1), 2^z-1]; worst case for z = 7.
    if (mv && !lp && result == CMP_LARGER) begin
      checks++;
      if (!((ac * 128 - NPIX * 127) > (am * 128 + NPIX * 127))) begin
        failures++;
        $display("FAIL unsafe discard ac=%0d am=%0d", ac, am);
      end
    end
  endtask

  initial begin
    int xd[8] = '{0, 1, 0, -1, -1, 0, -1, -1};
    int yd[8] = '{0, 0, 1, 0, 1, 0, 0, 1};
    int px, py;
    px = 0; py = 0;
    for (int k = 0; k < 8; k++) begin
      px = 2 * px + xd[k];
      py = 2 * py + yd[k];
      sx = 8'(px); sy = 8'(py);
      #1;
      checks++;
      if ((r_yx == CMP_LARGER) != (k == 7) || r_xy == CMP_LARGER) begin
        failures++;
        $display("FAIL two-stream example at digit %0d: y-vs-x %0d x-vs-y %0d", k + 1, r_yx, r_xy);
      end
    end
    for (int am = 0; am < 200; am++)
      for (int d = -40; d <= 40; d++)
        if (am + d >= 0) begin
          check(am + d, am, 1, 0);
          check(am + d, am, 1, 1);
        end
    for (int t = 0; t < 5000; t++)
      check($urandom_range(0, 4080), $urandom_range(0, 4080), 1'($urandom), 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
