// sd_abs: difference and absolute-value stage for one pixel, one digit plane.
//
// The current-block bit c and the reference bit r of equal weight are bound
// together as one signed digit x = c - r (p rail = c, n rail = r), so the
// difference costs no logic. Negating a signed digit only swaps its rails, so
// |Ic - Ir| needs nothing more than a sign check and a rail-swapping switch:
// the sign of the whole difference is the sign of its leading nonzero digit.
// The switch state (in st_i / out st_o) remembers whether that digit has been
// seen and whether it was negative; every digit from then on is swapped when
// it was. Digits are fed most significant first.
//
// Purely combinational: the caller keeps the switch state between planes,
// which lets one switch serve many candidates whose planes are interleaved.
// The rail-swap structure follows the design's absolute stage; keeping the
// state outside the cell is this design's choice.
module sd_abs
  import me_pkg::*;
(
  input  logic      c,     // current-block bit of this plane
  input  logic      r,     // reference-block bit of this plane
  input  sw_state_t st_i,  // switch state before this plane
  output sd_t       a,     // digit of |Ic - Ir| for this plane
  output sw_state_t st_o   // switch state after this plane
);
  logic nonzero;
  logic neg_now;

  always_comb begin
    nonzero = c ^ r;
    // Sign in force for this digit: the stored one, or this digit's own
    // when it is the leading nonzero digit.
    neg_now = st_i.set ? st_i.neg : (nonzero & r);
    a.p     = neg_now ? r : c;
    a.n     = neg_now ? c : r;
    // c = r = 1 is the digit 0 as well; drop the redundant form.
    if (c & r) begin
      a.p = 1'b0;
      a.n = 1'b0;
    end
    st_o.set = st_i.set | nonzero;
    st_o.neg = st_i.set ? st_i.neg : (nonzero & r);
  end
endmodule
