// st_window: spatial-temporal D x H x W filter window.
//
// A spatial-temporal filter sees pixels from D fields, H lines and W columns.
// The field delays themselves are external field memories, so this block
// takes one pixel stream per field, already aligned to the same picture
// position, and builds an H x W spatial window on each of them. It therefore
// holds D*(H-1) line memories and D*H*(W-1) registers, the count the document
// gives for such a filter. With H = 1 it is the purely temporal window (no
// line memories, D*(W-1) registers); with D = 1 it is the spatial window.
//
// Tap layout: win[d][r][c], d = index of the input stream (the caller decides
// which field each stream carries), r and c as in spatial_window.
// Timing: every stream's centre tap lags its input by H/2 lines and W/2
// pixels; all streams stay aligned.
module st_window
  import video_pkg::*;
#(
  parameter int unsigned D    = 3,
  parameter int unsigned H    = 3,
  parameter int unsigned W    = 3,
  parameter int unsigned LINE = 864
) (
  input  logic clk,
  input  logic rst_n,
  input  logic en,
  input  pix_t field_in [D],
  output pix_t win [D][H][W]
);
  for (genvar d = 0; d < D; d++) begin : g_field
    spatial_window #(.H(H), .W(W), .LINE(LINE)) u_sw (
      .clk, .rst_n, .en,
      .pix_in(field_in[d]),
      .win   (win[d])
    );
  end
endmodule
