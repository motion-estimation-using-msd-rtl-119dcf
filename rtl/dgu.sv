// dgu: data generation unit - holds the current block and the reference
// search window and hands out one bit plane of a chosen candidate per cycle.
//
// The current block (N x N pixels) and the reference window
// ((CAND_H+N-1) x (CAND_W+N-1) pixels) are written once per block match
// through a one-pixel-per-cycle load port fed from frame memory, so every
// reference pixel is fetched from outside exactly once however many
// candidates use it. Candidates are numbered row-major; candidate k sits at
// window row k / CAND_W and column k % CAND_W. For the candidate and digit
// plane selected on the read side, the unit returns bit z of each current
// pixel and of each overlapping reference pixel, MSD plane first as the
// caller chooses. Any candidate can follow any other, so skipping discarded
// candidates costs no cycles.
//
// Timing: loads are registered (one pixel per cycle); the read side is
// combinational from the stored pixels. The document moves the reference
// data by shifting a flip-flop array up, left and right by the number of
// skipped candidates; this design reaches the same data through multiplexers
// on a stored window, which is its own choice.
module dgu
  import me_pkg::*;
#(
  parameter int unsigned N      = BLK_N,
  parameter int unsigned BITS   = PIX_BITS,
  parameter int unsigned CW     = CAND_W,
  parameter int unsigned CH     = CAND_H,
  localparam int unsigned WW    = CW + N - 1,
  localparam int unsigned WH    = CH + N - 1,
  localparam int unsigned NCAND = CW * CH,
  localparam int unsigned CIW   = (NCAND > 1) ? $clog2(NCAND) : 1,
  localparam int unsigned ZW    = (BITS > 1) ? $clog2(BITS) : 1,
  localparam int unsigned RW    = (WH > 1) ? $clog2(WH) : 1,
  localparam int unsigned CLW   = (WW > 1) ? $clog2(WW) : 1
)(
  input  logic              clk,
  // load port
  input  logic              ld_valid,
  input  logic              ld_is_ref,  // 1: reference window, 0: current block
  input  logic [RW-1:0]     ld_row,
  input  logic [CLW-1:0]    ld_col,
  input  logic [BITS-1:0]   ld_pixel,
  // read side
  input  logic [CIW-1:0]    cand,
  input  logic [ZW-1:0]     plane,
  output logic [N*N-1:0]    cbits,
  output logic [N*N-1:0]    rbits
);
  logic [BITS-1:0] cur_q [N][N];
  logic [BITS-1:0] win_q [WH][WW];

  always_ff @(posedge clk) begin
    if (ld_valid) begin
      if (ld_is_ref)
        win_q[ld_row][ld_col] <= ld_pixel;
      else if (int'(ld_row) < N && int'(ld_col) < N)
        cur_q[ld_row[$clog2(N)-1:0]][ld_col[$clog2(N)-1:0]] <= ld_pixel;
    end
  end

  always_comb begin
    int unsigned r0, c0;
    r0 = int'(cand) / CW;
    c0 = int'(cand) % CW;
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++) begin
        cbits[i*N + j] = cur_q[i][j][plane];
        rbits[i*N + j] = win_q[r0 + i][c0 + j][plane];
      end
  end

  // A load outside the window is a caller error.
  always_ff @(posedge clk)
    if (ld_valid)
      assert (ld_is_ref ? (int'(ld_row) < WH && int'(ld_col) < WW)
                        : (int'(ld_row) < N && int'(ld_col) < N))
        else $error("dgu: load address out of range");
endmodule
