// spatial_window: H x W pixel window around the pixel being processed.
//
// The incoming line is the newest window row; H-1 chained line memories give
// the H-1 lines above it, and each of the H rows passes through a chain of
// W-1 registers, so H*(W-1) registers in all. This is the line memory and
// register structure of the document's spatial filter; a filter function
// takes the H*W taps.
//
// Tap layout: win[r][c], r = 0 the oldest line, r = H-1 the incoming line;
// c = 0 the oldest pixel, c = W-1 the incoming pixel. For the 3 x 3 case,
// tap number r*3 + c + 1 is Z1..Z9 of the document: Z1 at (x-1, y-1), Z5 at
// the centre (x, y), Z9 at (x+1, y+1).
//
// Timing: all taps move on en. The centre tap lags the input by
// (H/2) lines plus (W/2) pixels. LINE is the line length in enabled cycles.
module spatial_window
  import video_pkg::*;
#(
  parameter int unsigned H    = 3,
  parameter int unsigned W    = 3,
  parameter int unsigned LINE = 864
) (
  input  logic clk,
  input  logic rst_n,
  input  logic en,
  input  pix_t pix_in,
  output pix_t win [H][W]
);
  pix_t row_in [H];   // row_in[H-1] = input, row_in[r] = line delayed H-1-r times

  assign row_in[H-1] = pix_in;

  for (genvar r = H - 1; r > 0; r--) begin : g_lm
    line_mem #(.WIDTH(8), .DEPTH(LINE)) u_lm (
      .clk, .rst_n, .en,
      .in_data (row_in[r]),
      .out_data(row_in[r-1])
    );
  end

  for (genvar r = 0; r < H; r++) begin : g_row
    assign win[r][W-1] = row_in[r];
    if (W > 1) begin : g_regs
      pix_t taps [W-1];   // taps[c] = win[r][c]
      always_ff @(posedge clk or negedge rst_n) begin
        if (!rst_n) begin
          for (int c = 0; c < W - 1; c++) taps[c] <= '0;
        end else if (en) begin
          for (int c = 0; c < W - 1; c++) taps[c] <= (c == W - 2) ? row_in[r] : taps[c+1];
        end
      end
      for (genvar c = 0; c < W - 1; c++) begin : g_out
        assign win[r][c] = taps[c];
      end
    end
  end

endmodule
