// line_mem: one-line delay for a pixel stream (the "LineMem" block).
//
// out_data carries, in the same enabled cycle, the sample that entered
// in_data exactly DEPTH enabled cycles earlier: with DEPTH equal to the clocks
// in a line, the pixel at (x, y-1) leaves while the pixel at (x, y) enters.
//
// The delay has to read and write one location per pixel, but there is only
// one clock and no second RAM port. The memory is therefore DEPTH/2 words of
// 2*WIDTH bits and is accessed in pairs of cycles: in the even cycle of a pair
// the word holding the next two old pixels is read; in the odd cycle the two
// new pixels of the current pair are written as one word. The read runs one
// pair ahead of the write, so every word is read before it is overwritten.
// The double-width word and the read-then-write cycle pair are the
// document's; the look-ahead of one pair that lines the output up with the
// input is this design's.
//
// Interface: en is a pixel clock enable; nothing moves while it is low.
// Timing: out_data = in_data delayed by DEPTH enabled cycles. The RAM is not
// cleared, so the first DEPTH outputs after reset are undefined. DEPTH must be
// even. Default DEPTH is a full line of 864 clocks (720 active + 144 blanking)
// so the delay also runs freely through horizontal blanking.
module line_mem #(
  parameter int unsigned WIDTH = 8,
  parameter int unsigned DEPTH = 864
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en,
  input  logic [WIDTH-1:0] in_data,
  output logic [WIDTH-1:0] out_data
);
  localparam int unsigned WORDS = DEPTH / 2;
  localparam int unsigned AW    = (WORDS > 1) ? $clog2(WORDS) : 1;

  logic [2*WIDTH-1:0] ram [WORDS];
  logic [AW-1:0]      pair;      // pair index of the current sample
  logic               odd;       // second sample of the pair
  logic [WIDTH-1:0]   lo_hold;   // first new sample of the pair
  logic [2*WIDTH-1:0] rword;     // word read in the even cycle
  logic [WIDTH-1:0]   hi_hold;   // second old sample, kept for the odd cycle
  logic [AW-1:0]      ahead;
  logic [AW-1:0]      addr;

  if (DEPTH % 2 != 0 || DEPTH < 2) begin : g_bad_depth
    $error("line_mem: DEPTH must be even and at least 2");
  end

  assign ahead = (pair == AW'(WORDS - 1)) ? '0 : pair + 1'b1;
  // Single port: one address per cycle, read in even cycles, write in odd ones.
  assign addr  = odd ? pair : ahead;

  always_ff @(posedge clk) begin
    if (en) begin
      if (odd) ram[addr] <= {in_data, lo_hold};
      else     rword     <= ram[addr];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pair    <= '0;
      odd     <= 1'b0;
      lo_hold <= '0;
      hi_hold <= '0;
    end else if (en) begin
      odd <= ~odd;
      if (!odd) begin
        lo_hold <= in_data;
        hi_hold <= rword[2*WIDTH-1:WIDTH];
      end else begin
        pair <= ahead;
      end
    end
  end

  // Even cycle: low half of the word read one pair ago. Odd cycle: its high
  // half, saved before the new read replaced it.
  assign out_data = odd ? hi_hold : rword[WIDTH-1:0];

endmodule
