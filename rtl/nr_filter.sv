// nr_filter: noise reduction by elimination of picture singularities.
//
// A pixel is judged a singularity when it moved "fast": it differs from the
// same position in the previous picture of the same parity by more than the
// threshold th, and it also differs by more than th from each of its eight
// spatial neighbours in the current field. For such a pixel the previous
// picture's content is forwarded instead of the current one; every other
// pixel passes unchanged. Forwarding the previous content on fast motion is
// the document's rule; the threshold test and the requirement that the pixel
// also stand out from all its neighbours (so that real picture changes, which
// are spatially coherent, are not frozen) are this design's choices. Pixels
// on the picture border (border = 1) and all pixels when en_nr = 0 pass.
//
// Interface: cur is the 3 x 3 current-field window (cur[1][1] the centre),
// prev the co-sited pixel of the previous same-parity picture.
// Timing: combinational.
module nr_filter
  import video_pkg::*;
(
  input  logic en_nr,
  input  pix_t th,
  input  logic border,
  input  pix_t cur [3][3],
  input  pix_t prev,
  output pix_t y_out,
  output logic fwd       // the previous picture's pixel was forwarded
);
  logic motion, isolated;

  always_comb begin
    motion   = absdiff(cur[1][1], prev) > th;
    isolated = 1'b1;
    for (int r = 0; r < 3; r++)
      for (int c = 0; c < 3; c++)
        if (!(r == 1 && c == 1) && absdiff(cur[1][1], cur[r][c]) <= th)
          isolated = 1'b0;
    fwd   = en_nr && !border && motion && isolated;
    y_out = fwd ? prev : cur[1][1];
  end
endmodule
