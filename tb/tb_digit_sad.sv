// tb_digit_sad: random 4x4 blocks of 8-bit pixels are matched plane by plane
// through digit_sad, the switch states held between planes as the controller
// would hold them. After each plane the running sum 2*A + dsad must equal the
// word-level prefix sum_p |(c_p >> z) - (r_p >> z)|, and after the last plane
// the plain SAD.
module tb_digit_sad;
  import me_pkg::*;
  localparam int NPIX = 16;
  localparam int DW   = $clog2(NPIX + 1) + 1;

  logic [NPIX-1:0]      cbits, rbits;
  sw_state_t            st_i [NPIX];
  sw_state_t            st_o [NPIX];
  sd_t                  ad   [NPIX];
  logic signed [DW-1:0] dsad;
  int checks = 0, failures = 0;

  digit_sad #(.NPIX(NPIX)) dut (.cbits, .rbits, .st_i, .st_o, .ad, .dsad);

  initial begin
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cp[NPIX], rp[NPIX];
    int acc, want, d;
    for (int t = 0; t < 3000; t++) begin
      for (int k = 0; k < NPIX; k++) begin
        case (t % 3)
          0: begin cp[k] = $urandom_range(0, 255); rp[k] = $urandom_range(0, 255); end
          1: begin cp[k] = $urandom_range(0, 255);
                   rp[k] = cp[k] + $urandom_range(0, 8) - 4;
                   if (rp[k] < 0) rp[k] = 0; if (rp[k] > 255) rp[k] = 255; end
          default: begin cp[k] = (t % 2 != 0) ? 255 : 0; rp[k] = (k % 2 != 0) ? 255 - cp[k] : cp[k]; end
        endcase
        st_i[k] = '0;
      end
      acc = 0;
      for (int z = 7; z >= 0; z--) begin
        for (int k = 0; k < NPIX; k++) begin
          cbits[k] = cp[k][z];
          rbits[k] = rp[k][z];
        end
        #1;
        acc  = 2 * acc + int'(dsad);
        want = 0;
        for (int k = 0; k < NPIX; k++) begin
          d = (cp[k] >> z) - (rp[k] >> z);
          want += (d < 0) ? -d : d;
        end
        checks++;
        if (acc != want || int'(dsad) > NPIX || int'(dsad) < -NPIX) begin
          failures++;
          if (failures < 10) $display("FAIL t=%0d z=%0d got %0d want %0d", t, z, acc, want);
        end
        for (int k = 0; k < NPIX; k++) st_i[k] = st_o[k];
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
