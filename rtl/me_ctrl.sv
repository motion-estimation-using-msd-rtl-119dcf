// me_ctrl: digit-plane sequencer of the MSD-first block matcher.
//
// The search runs plane-major. For the most significant digit plane every
// candidate gets its digit SAD; for each less significant plane only the
// candidates still alive do. One digit SAD is issued per clock cycle, so a
// discarded candidate costs nothing in later planes. The comparator holds
// each new SAD prefix against the running minimum of the plane (the
// candidates of this plane seen so far): a candidate that is certainly larger
// is discarded for good, a smaller one becomes the running minimum.
// Candidates visited before the minimum in a plane are not re-examined until
// the next plane.
//
// Short operands. Prefixes are not stored whole. At the end of each plane the
// minimum's prefix M is taken as a bias (M <- 2M + its offset, one word
// register). Each candidate keeps only its offset E from that bias, clipped to
// 2*NPIX, and forms its next offset as 2E + digit SAD. A candidate whose
// offset reached 2*NPIX already loses to the previous minimum. Clipping it can
// only cause discards that are correct anyway, and it never touches the
// winner. The stored state per candidate is then a few bits set by the block
// size, not by the pixel word length. The per-pixel switch states are kept per
// candidate as well.
//
// Two visiting orders:
//   normal mode     - row-major from the top-left candidate in every plane;
//   prediction mode - the MSD plane starts at the centre candidate
//                     (displacement (0,0)), every later plane starts at the
//                     previous plane's running minimum, then visits the rest
//                     row-major.
// The search ends after the least significant plane, or earlier as soon as a
// plane leaves a single candidate alive (the motion vector is then known but
// its SAD is only a prefix: sad_exact = 0).
//
// Interface: pulse start for one cycle with mode_pred set; busy is high from
// the next cycle until done pulses with mv_idx / min_sad / sad_exact valid
// (they hold until the next start). dsad_count counts issued digit SADs,
// which is also the cycle count of the search. ev_* pulse for one cycle on
// each discard and each new running minimum.
//
// Plane-major order, the two modes, the discard rule and the early stop
// follow the document; the start/busy/done handshake, the state kept per
// candidate and the tie rule (earlier minimum wins) are this design's.
module me_ctrl
  import me_pkg::*;
#(
  parameter int unsigned NPIX  = BLK_N * BLK_N,
  parameter int unsigned BITS  = PIX_BITS,
  parameter int unsigned CW    = CAND_W,
  parameter int unsigned CH    = CAND_H,
  localparam int unsigned NCAND = CW * CH,
  localparam int unsigned CIW   = (NCAND > 1) ? $clog2(NCAND) : 1,
  localparam int unsigned ZW    = (BITS > 1) ? $clog2(BITS) : 1,
  localparam int unsigned DW    = $clog2(NPIX + 1) + 1,
  localparam int unsigned AW    = $clog2(NPIX * ((1 << BITS) - 1) + 1),
  localparam int unsigned CNTW  = $clog2(NCAND * BITS + 1)
)(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic              mode_pred,
  // to the data generation unit and the digit-SAD unit
  output logic [CIW-1:0]    cand,
  output logic [ZW-1:0]     plane,
  output sw_state_t         st_cur [NPIX],
  input  sw_state_t         st_new [NPIX],
  input  logic signed [DW-1:0] dsad,
  // status and result
  output logic              busy,
  output logic              done,
  output logic [CIW-1:0]    mv_idx,
  output logic [AW-1:0]     min_sad,
  output logic              sad_exact,
  output logic [CNTW-1:0]   dsad_count,
  output logic              ev_discard,
  output logic              ev_newmin
);
  localparam logic [CIW-1:0] CENTRE = CIW'((CH / 2) * CW + CW / 2);
  // Offsets lie in [-NPIX, 5*NPIX]: 2 * (clipped E <= 2*NPIX) + digit SAD.
  localparam int unsigned RELW = $clog2(5 * NPIX + 1) + 1;
  localparam logic signed [RELW-1:0] ECLIP = RELW'(2 * NPIX);

  logic [NCAND-1:0] alive_q, alive_d;
  logic signed [RELW-1:0] rel_q [NCAND];  // offset from the bias of its plane
  logic signed [RELW-1:0] base_q;         // previous plane's minimum offset
  logic [AW-1:0]    macc_q;               // prefix of the previous plane's minimum
  logic signed [RELW:0]   e_raw;
  logic signed [RELW-1:0] e_cur;
  sw_state_t        sw_q    [NCAND][NPIX];
  logic [CIW-1:0]   cur_q, min_idx_q, min_idx_d;
  logic signed [RELW-1:0] min_a_q, min_a_d;
  logic             min_valid_q;
  logic [ZW-1:0]    plane_q;
  logic             pred_q;
  logic signed [RELW-1:0] a_new;
  logic [AW-1:0]    macc_next;
  cmp_t             cmp;
  logic [CIW-1:0]   nxt_idx, first_idx;
  logic             nxt_found, first_found;
  logic             last_plane, single_left;
  logic             run_q;
  logic [CIW-1:0]   min_start_q;  // first candidate of the plane in progress

  assign cand  = cur_q;
  assign plane = plane_q;
  assign busy  = run_q;

  always_comb
    for (int k = 0; k < NPIX; k++) st_cur[k] = sw_q[cur_q][k];

  // Offset of the candidate in hand against this plane's bias 2M.
  always_comb begin
    e_raw = (RELW+1)'(rel_q[cur_q]) - (RELW+1)'(base_q);
    if (e_raw < 0)                    e_cur = '0;  // not reached: kept for safety
    else if (e_raw > (RELW+1)'(ECLIP)) e_cur = ECLIP;
    else                              e_cur = RELW'(e_raw);
    a_new = RELW'(2 * e_cur + RELW'(dsad));
  end
  assign last_plane = (plane_q == '0);
  // Exact prefix of the plane's minimum: 2M + its offset (never negative).
  assign macc_next  = AW'({macc_q, 1'b0}) + AW'(min_a_d);

  digit_comparator #(.NPIX(NPIX), .AW(RELW)) u_cmp (
    .a_cand    (a_new),
    .a_min     (min_a_q),
    .min_valid (min_valid_q),
    .last_plane(last_plane),
    .result    (cmp)
  );

  always_comb begin
    alive_d   = alive_q;
    min_idx_d = min_idx_q;
    min_a_d   = min_a_q;
    if (cmp == CMP_LARGER)
      alive_d[cur_q] = 1'b0;
    else if (cmp == CMP_SMALLER) begin
      min_idx_d = cur_q;
      min_a_d   = a_new;
    end
  end

  // Next candidate of this plane. Candidates after the one in hand are not
  // touched this cycle, so the registered alive mask serves.
  always_comb begin
    nxt_found = 1'b0;
    nxt_idx   = '0;
    for (int k = NCAND - 1; k >= 0; k--) begin
      if (alive_q[k] && (pred_q ? (CIW'(k) != min_start_q &&
                                   (cur_q == min_start_q || CIW'(k) > cur_q))
                                : (CIW'(k) > cur_q))) begin
        nxt_found = 1'b1;
        nxt_idx   = CIW'(k);
      end
    end
  end

  // First candidate of the next plane.
  always_comb begin
    first_found = 1'b0;
    first_idx   = '0;
    for (int k = NCAND - 1; k >= 0; k--)
      if (alive_d[k]) begin
        first_found = 1'b1;
        first_idx   = CIW'(k);
      end
    if (pred_q) first_idx = min_idx_d;
    single_left = ($countones(alive_d) == 1);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run_q       <= 1'b0;
      done        <= 1'b0;
      alive_q     <= '0;
      cur_q       <= '0;
      plane_q     <= '0;
      pred_q      <= 1'b0;
      min_idx_q   <= '0;
      min_a_q     <= '0;
      min_valid_q <= 1'b0;
      min_start_q <= '0;
      base_q      <= '0;
      macc_q      <= '0;
      mv_idx      <= '0;
      min_sad     <= '0;
      sad_exact   <= 1'b0;
      dsad_count  <= '0;
      for (int c = 0; c < NCAND; c++) begin
        rel_q[c] <= '0;
        for (int k = 0; k < NPIX; k++) sw_q[c][k] <= '0;
      end
    end else begin
      done <= 1'b0;
      if (start && !run_q) begin
        run_q       <= 1'b1;
        alive_q     <= '1;
        pred_q      <= mode_pred;
        cur_q       <= mode_pred ? CENTRE : '0;
        min_start_q <= mode_pred ? CENTRE : '0;
        plane_q     <= ZW'(BITS - 1);
        min_valid_q <= 1'b0;
        dsad_count  <= '0;
        base_q      <= '0;
        macc_q      <= '0;
        for (int c = 0; c < NCAND; c++) begin
          rel_q[c] <= '0;
          for (int k = 0; k < NPIX; k++) sw_q[c][k] <= '0;
        end
      end else if (run_q) begin
        dsad_count   <= dsad_count + 1'b1;
        rel_q[cur_q] <= a_new;
        for (int k = 0; k < NPIX; k++) sw_q[cur_q][k] <= st_new[k];
        alive_q   <= alive_d;
        min_idx_q <= min_idx_d;
        min_a_q   <= min_a_d;
        if (nxt_found) begin
          cur_q       <= nxt_idx;
          min_valid_q <= 1'b1;
        end else if (last_plane || single_left || !first_found) begin
          run_q     <= 1'b0;
          done      <= 1'b1;
          mv_idx    <= min_idx_d;
          min_sad   <= macc_next;
          sad_exact <= last_plane;
        end else begin
          plane_q     <= plane_q - 1'b1;
          base_q      <= min_a_d;
          macc_q      <= macc_next;
          cur_q       <= first_idx;
          min_start_q <= first_idx;
          min_valid_q <= 1'b0;
        end
      end
    end
  end

  assign ev_discard = run_q && (cmp == CMP_LARGER);
  assign ev_newmin  = run_q && (cmp == CMP_SMALLER) && min_valid_q;

  // Handshake rules.
  a_alive_issued: assert property (@(posedge clk) disable iff (!rst_n)
    run_q |-> alive_q[cur_q])
    else $error("me_ctrl: dead candidate issued");
  a_min_alive: assert property (@(posedge clk) disable iff (!rst_n)
    (run_q && min_valid_q) |-> alive_q[min_idx_q])
    else $error("me_ctrl: running minimum was discarded");
  a_done_pulse: assert property (@(posedge clk) disable iff (!rst_n)
    done |-> !run_q)
    else $error("me_ctrl: done while still running");
endmodule
