// msd_me: MSD-first full-search block matcher (top level).
//
// Finds, for one current block, the candidate position of minimum sum of
// absolute differences (SAD) in a reference window, processing pixels bit
// plane by bit plane from the most significant one. Each clock cycle one
// "digit SAD" is formed: one plane of one candidate, all N x N pixels at once.
// Pixel differences are signed digits, so the absolute value is a rail swap
// decided by the leading nonzero digit, and the SAD grows MSD first. After
// every digit SAD the candidate is compared with the running minimum of the
// plane; once it is certainly larger its remaining planes are skipped. The
// motion vector found is exactly the full-search one.
//
// Blocks: dgu (holds the block and window, serves bit planes), digit_sad
// (switches and same-weight summation), me_ctrl (plane sequencer with the
// digit comparator). Frame memory is outside: it writes the block and the
// window through the load port before start.
//
// Interface and timing: load N*N current pixels (ld_is_ref = 0) and
// (CAND_H+N-1)*(CAND_W+N-1) window pixels (ld_is_ref = 1), one per cycle;
// then pulse start with mode_pred. done pulses when the result is ready; the
// search takes dsad_count cycles, at most CAND_W*CAND_H*PIX_BITS. The motion
// vector is (mv_m, mv_n) = (column, row) of the winning candidate minus
// (CAND_W/2, CAND_H/2), horizontal first. Writes to the load port are ignored
// while busy.
//
// The chain access -> signed-digit SAD -> MSD-first comparison with discarded
// candidates fed back to data access, the one-digit-SAD-per-cycle rate and the
// default size (16 candidates of 4x4 8-bit pixels) follow the paper. The load
// port, the handshake and the 4x4 grid of candidates are this design's own.
module msd_me
  import me_pkg::*;
#(
  parameter int unsigned N      = BLK_N,
  parameter int unsigned BITS   = PIX_BITS,
  parameter int unsigned CW     = CAND_W,
  parameter int unsigned CH     = CAND_H,
  localparam int unsigned NPIX  = N * N,
  localparam int unsigned WW    = CW + N - 1,
  localparam int unsigned WH    = CH + N - 1,
  localparam int unsigned NCAND = CW * CH,
  localparam int unsigned CIW   = (NCAND > 1) ? $clog2(NCAND) : 1,
  localparam int unsigned ZW    = (BITS > 1) ? $clog2(BITS) : 1,
  localparam int unsigned RW    = (WH > 1) ? $clog2(WH) : 1,
  localparam int unsigned CLW   = (WW > 1) ? $clog2(WW) : 1,
  localparam int unsigned DW    = $clog2(NPIX + 1) + 1,
  localparam int unsigned AW    = $clog2(NPIX * ((1 << BITS) - 1) + 1),
  localparam int unsigned CNTW  = $clog2(NCAND * BITS + 1),
  localparam int unsigned MVW   = $clog2((CW > CH ? CW : CH) + 1) + 1
)(
  input  logic                  clk,
  input  logic                  rst_n,
  // frame-memory load port
  input  logic                  ld_valid,
  input  logic                  ld_is_ref,
  input  logic [RW-1:0]         ld_row,
  input  logic [CLW-1:0]        ld_col,
  input  logic [BITS-1:0]       ld_pixel,
  // control
  input  logic                  start,
  input  logic                  mode_pred,
  output logic                  busy,
  output logic                  done,
  // result
  output logic signed [MVW-1:0] mv_m,
  output logic signed [MVW-1:0] mv_n,
  output logic [CIW-1:0]        mv_idx,
  output logic [AW-1:0]         min_sad,
  output logic                  sad_exact,
  output logic [CNTW-1:0]       dsad_count,
  // one-cycle event strobes
  output logic                  ev_discard,
  output logic                  ev_newmin
);
  logic [CIW-1:0]       cand;
  logic [ZW-1:0]        plane;
  logic [NPIX-1:0]      cbits, rbits;
  sw_state_t            st_cur [NPIX];
  sw_state_t            st_new [NPIX];
  logic signed [DW-1:0] dsad;

  dgu #(.N(N), .BITS(BITS), .CW(CW), .CH(CH)) u_dgu (
    .clk      (clk),
    .ld_valid (ld_valid && !busy),
    .ld_is_ref(ld_is_ref),
    .ld_row   (ld_row),
    .ld_col   (ld_col),
    .ld_pixel (ld_pixel),
    .cand     (cand),
    .plane    (plane),
    .cbits    (cbits),
    .rbits    (rbits)
  );

  digit_sad #(.NPIX(NPIX)) u_sad (
    .cbits(cbits),
    .rbits(rbits),
    .st_i (st_cur),
    .st_o (st_new),
    .ad   (),
    .dsad (dsad)
  );

  me_ctrl #(.NPIX(NPIX), .BITS(BITS), .CW(CW), .CH(CH)) u_ctrl (
    .clk       (clk),
    .rst_n     (rst_n),
    .start     (start),
    .mode_pred (mode_pred),
    .cand      (cand),
    .plane     (plane),
    .st_cur    (st_cur),
    .st_new    (st_new),
    .dsad      (dsad),
    .busy      (busy),
    .done      (done),
    .mv_idx    (mv_idx),
    .min_sad   (min_sad),
    .sad_exact (sad_exact),
    .dsad_count(dsad_count),
    .ev_discard(ev_discard),
    .ev_newmin (ev_newmin)
  );

  always_comb begin
    mv_m = MVW'(int'(mv_idx) % CW) - MVW'(CW / 2);
    mv_n = MVW'(int'(mv_idx) / CW) - MVW'(CH / 2);
  end
endmodule
