// video_pkg: types and constants shared by the scan-rate-conversion datapath.
//
// The input is a 4:1:1 YUV stream at one pixel per pixel-clock enable: 8-bit
// luminance Y and an 8-bit chroma bus C. In 4:1:1 the two colour-difference
// signals are spread over four pixels as 4-bit nibbles, so a stored pixel is
// 12 bits: Y[7:0] plus the chroma nibble carried on C[7:4]. One field of
// 720 x 288 such pixels is 2,488,320 bits, which is why field storage lives
// outside the FPGA. Raster numbers (720 active + 144 blanking clocks per line)
// follow the standard 27 MHz digital video line; 288 active and 312 total
// lines per 50 Hz field are the usual 625-line values (this design's choice of
// 312 for the half line of a 312.5-line field).
package video_pkg;

  typedef logic [7:0] pix_t;

  // One pixel as held in a field memory: luminance and 4:1:1 chroma nibble.
  typedef struct packed {
    logic [7:0] y;
    logic [3:0] c;
  } fm_word_t;

  localparam int unsigned H_ACTIVE_DEF = 720;  // active pixels per line
  localparam int unsigned H_TOTAL_DEF  = 864;  // 720 active + 144 blanking clocks
  localparam int unsigned V_ACTIVE_DEF = 288;  // active lines per field
  localparam int unsigned V_TOTAL_DEF  = 312;  // lines per 50 Hz field

  // Absolute difference of two pixels.
  function automatic pix_t absdiff(input pix_t a, input pix_t b);
    return (a > b) ? pix_t'(a - b) : pix_t'(b - a);
  endfunction

  // Median of three pixels.
  function automatic pix_t median3(input pix_t a, input pix_t b, input pix_t c);
    pix_t lo, hi;
    lo = (a < b) ? a : b;
    hi = (a < b) ? b : a;
    if (c <= lo)      return lo;
    else if (c >= hi) return hi;
    else              return c;
  endfunction

endpackage
