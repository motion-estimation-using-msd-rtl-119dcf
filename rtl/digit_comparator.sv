// digit_comparator: MSD-first decision between a candidate and the running
// minimum of the current digit plane.
//
// Both inputs are SAD prefixes (the sums of the digit SADs of the planes seen
// so far, each earlier plane weighted twice the next) taken relative to a
// common bias, so only their difference matters. Every pixel's digits not yet
// seen add less than one unit of the current weight, up or down, so two
// prefixes whose difference reaches 2*NPIX (the two-unit margin of a single
// signed-digit comparison, summed over the block's pixels) can no longer
// change order: the larger candidate is then certainly not the best match.
// Below that margin a candidate is only provisionally smaller or larger.
// After the least significant plane the prefixes are exact and so is the
// decision; an equal SAD counts as larger, so the earlier-found minimum wins.
//
// The decision rule - order fixed once the difference reaches two digits'
// worth - and the removal of a common bias to keep the operands short follow
// the paper's comparator; its sign-magnitude gate-level circuit is not
// reproduced. Combinational.
module digit_comparator #(
  parameter int unsigned NPIX = 16,
  parameter int unsigned AW   = 8    // signed operand width
)(
  input  logic signed [AW-1:0] a_cand,     // candidate prefix, bias removed
  input  logic signed [AW-1:0] a_min,      // running-minimum prefix, same bias
  input  logic                 min_valid,  // a running minimum exists in this plane
  input  logic                 last_plane, // the least significant plane was just added
  output me_pkg::cmp_t         result
);
  logic signed [AW:0] diff;

  always_comb begin
    diff = (AW+1)'(a_cand) - (AW+1)'(a_min);
    if (!min_valid)
      result = me_pkg::CMP_SMALLER;
    else if (last_plane)
      result = (diff < 0) ? me_pkg::CMP_SMALLER : me_pkg::CMP_LARGER;
    else if (diff >= signed'((AW+1)'(2 * NPIX)))
      result = me_pkg::CMP_LARGER;
    else if (diff < 0)
      result = me_pkg::CMP_SMALLER;
    else
      result = me_pkg::CMP_UNDECIDED;
  end
endmodule
