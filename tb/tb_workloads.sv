// tb_workloads: the matcher at the sizes of the configurations the design is
// evaluated at, on generated images (the video sequences themselves are not
// part of this test):
//   - the worked example of the plane-by-plane search: 25 candidates
//     (displacements -2..+2 both ways) on 4-bit pixels, 4x4 blocks;
//   - the full-scale search: 961 candidates (displacements -15..+15) with
//     16x16 blocks of 8-bit pixels.
// Each size runs searches in both modes against the reference model and full
// search, and the share of digit SADs actually issued is printed.
module tb_workloads;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic fin_a, fin_b;
  int   ca, fa, ta, wa, cb, fb, tb_, wb;
  int   checks, failures;

  always #5 clk = ~clk;

  me_search_harness #(.N(4),  .BITS(4), .CW(5),  .CH(5),  .NTESTS(200)) u_small (
    .clk, .rst_n, .finished(fin_a), .checks(ca), .failures(fa), .dsad_total(ta), .dsad_word(wa));
  me_search_harness #(.N(16), .BITS(8), .CW(31), .CH(31), .NTESTS(10)) u_large (
    .clk, .rst_n, .finished(fin_b), .checks(cb), .failures(fb), .dsad_total(tb_), .dsad_word(wb));

  initial begin
    checks = 0; failures = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    wait (fin_a && fin_b);
    checks = ca + cb;
    failures = fa + fb;
    $display("25 candidates, 4-bit: digit SADs %0d of %0d (%0d%%)", ta, wa, 100 * ta / wa);
    $display("961 candidates, 16x16, 8-bit: digit SADs %0d of %0d (%0d%%)", tb_, wb, 100 * tb_ / wb);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2_000_000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", ca + cb, fa + fb + 1);
    $finish;
  end
endmodule
