// digit_sad: one digit SAD - the absolute differences of all pixels of a
// block, for one digit plane, summed.
//
// Each of the NPIX pixel positions has an sd_abs switch that turns the bit
// pair (c, r) into a signed digit of |Ic - Ir|. The NPIX digits all carry the
// same weight, so they are clustered and added into one small signed integer
// in [-NPIX, +NPIX] (a value of about 2*log2(N) digits). The caller scales
// the previous planes' sum by two and adds this one, which builds the SAD most
// significant digit first.
//
// Combinational. The switch states of the candidate in hand go in and come
// back updated. The adder is written as a plain count of positive minus
// negative digits; how the document's signed-digit adder is built inside is
// not reproduced.
module digit_sad
  import me_pkg::*;
#(
  parameter int unsigned NPIX = BLK_N * BLK_N,
  localparam int unsigned DW  = $clog2(NPIX + 1) + 1
)(
  input  logic [NPIX-1:0]  cbits,        // current block, one bit plane
  input  logic [NPIX-1:0]  rbits,        // reference block, same plane
  input  sw_state_t        st_i [NPIX],  // switch states before the plane
  output sw_state_t        st_o [NPIX],  // switch states after the plane
  output sd_t              ad   [NPIX],  // absolute-difference digits
  output logic signed [DW-1:0] dsad      // sum of the NPIX digits
);
  for (genvar k = 0; k < NPIX; k++) begin : g_sw
    sd_abs u_sw (
      .c   (cbits[k]),
      .r   (rbits[k]),
      .st_i(st_i[k]),
      .a   (ad[k]),
      .st_o(st_o[k])
    );
  end

  always_comb begin
    logic [DW-1:0] npos, nneg;
    npos = '0;
    nneg = '0;
    for (int k = 0; k < NPIX; k++) begin
      npos = npos + DW'(ad[k].p);
      nneg = nneg + DW'(ad[k].n);
    end
    dsad = signed'(npos - nneg);
  end
endmodule
