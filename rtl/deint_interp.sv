// deint_interp: one pixel of a missing line of an interlaced field.
//
// Two estimators are formed from the pixels above and below the missing
// pixel in the same field and the co-sited pixel of the previous field: a
// 3-tap spatial-temporal median of (above, below, previous) and a 2-tap
// vertical lowpass (above + below) / 2. They are not switched by a
// multiplexer but mixed linearly, here with equal weights:
//   y = (median + lowpass) / 2, each division rounding half up.
// The two estimators and the linear mix are the document's; the equal
// weights and the rounding are this design's.
//
// Timing: combinational.
module deint_interp
  import video_pkg::*;
(
  input  pix_t above,
  input  pix_t below,
  input  pix_t prev,
  output pix_t y_out
);
  logic [8:0] lp, sum;
  pix_t       med;

  always_comb begin
    med   = median3(above, below, prev);
    lp    = ({1'b0, above} + {1'b0, below} + 9'd1) >> 1;
    sum   = {1'b0, med} + lp + 9'd1;
    y_out = sum[8:1];
  end
endmodule
