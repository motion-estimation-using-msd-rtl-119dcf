// tb_dgu: loads a random current block and reference window through the load
// port, then reads every candidate and bit plane and compares the returned
// bits with the loaded pixels. A second load shows the buffers are rewritten.
module tb_dgu;
  import me_pkg::*;
  localparam int N = 4, BITS = 8, CW = 4, CH = 4;
  localparam int WW = CW + N - 1, WH = CH + N - 1;

  logic clk = 0;
  logic ld_valid = 0, ld_is_ref = 0;
  logic [2:0] ld_row = '0, ld_col = '0;
  logic [7:0] ld_pixel = '0;
  logic [3:0] cand = '0;
  logic [2:0] plane = '0;
  logic [N*N-1:0] cbits, rbits;
  int checks = 0, failures = 0;
  int cur[N*N], win[WH*WW];

  always #5 clk = ~clk;

  dgu #(.N(N), .BITS(BITS), .CW(CW), .CH(CH)) dut (.*);

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int pass = 0; pass < 2; pass++) begin
      for (int k = 0; k < N*N; k++) cur[k] = $urandom_range(0, 255);
      for (int k = 0; k < WH*WW; k++) win[k] = $urandom_range(0, 255);
      for (int k = 0; k < N*N + WH*WW; k++) begin
        @(negedge clk);
        ld_valid  = 1;
        ld_is_ref = (k >= N*N);
        if (k < N*N) begin
          ld_row = 3'(k / N); ld_col = 3'(k % N); ld_pixel = 8'(cur[k]);
        end else begin
          ld_row = 3'((k - N*N) / WW); ld_col = 3'((k - N*N) % WW); ld_pixel = 8'(win[k - N*N]);
        end
      end
      @(negedge clk);
      ld_valid = 0;
      for (int c = 0; c < CW*CH; c++)
        for (int z = 0; z < BITS; z++) begin
          cand = 4'(c); plane = 3'(z);
          #1;
          for (int i = 0; i < N; i++)
            for (int j = 0; j < N; j++) begin
              checks++;
              if (cbits[i*N+j] != cur[i*N+j][z] ||
                  rbits[i*N+j] != win[(c/CW + i)*WW + c%CW + j][z]) begin
                failures++;
                if (failures < 10) $display("FAIL cand=%0d z=%0d pix=%0d,%0d", c, z, i, j);
              end
            end
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
