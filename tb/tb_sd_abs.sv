// tb_sd_abs: exhaustive check of the signed-digit absolute-value switch.
// Every pair of 8-bit values (c, r) is fed MSB first through one sd_abs cell,
// the switch state carried from plane to plane; the digits, weighted by their
// planes, must add up to |c - r|, and every prefix must equal
// |(c >> z) - (r >> z)|.
module tb_sd_abs;
  import me_pkg::*;

  logic      c, r;
  sw_state_t st_i, st_o;
  sd_t       a;
  int        checks = 0, failures = 0;

  sd_abs dut (.c(c), .r(r), .st_i(st_i), .a(a), .st_o(st_o));

  initial begin
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int acc, d;
    for (int cv = 0; cv < 256; cv++)
      for (int rv = 0; rv < 256; rv++) begin
        st_i = '0;
        acc  = 0;
        for (int z = 7; z >= 0; z--) begin
          c = cv[z];
          r = rv[z];
          #1;
          acc = 2 * acc + sd_value(a);
          d   = (cv >> z) - (rv >> z);
          if (d < 0) d = -d;
          checks++;
          if (acc != d || (a.p && a.n)) begin
            failures++;
            if (failures < 10)
              $display("FAIL c=%0d r=%0d z=%0d prefix=%0d want %0d", cv, rv, z, acc, d);
          end
          st_i = st_o;
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
