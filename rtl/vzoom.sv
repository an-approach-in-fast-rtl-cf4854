// vzoom: row mapping for vertical expansion of the output picture.
//
// In movie mode the useful picture is a band between black areas above and
// below. Expansion stretches that band over the whole screen height: output
// row j shows source row first + floor(j * step / 256), step being the number
// of source rows per output row in 1/256 units (192 = 3/4, an expansion by
// 4/3). Rows beyond the last source row repeat it. With zoom_en low the
// mapping is the identity. The document asks only for the possibility of
// this expansion; nearest-row mapping with a start row and a fixed-point step
// is this design's choice.
//
// Timing: combinational.
module vzoom #(
  parameter int unsigned V_ACTIVE = 288,
  localparam int unsigned RW = $clog2(V_ACTIVE + 1)
) (
  input  logic          zoom_en,
  input  logic [RW-1:0] first,
  input  logic [8:0]    step,
  input  logic [RW-1:0] row_out,
  output logic [RW-1:0] row_src
);
  logic [RW+9-1:0] prod;
  logic [RW+1-1:0] src;

  always_comb begin
    prod = (RW + 9)'(row_out) * (RW + 9)'(step);
    src  = (RW + 1)'(first) + (RW + 1)'(prod >> 8);
    if (!zoom_en)                          row_src = row_out;
    else if (src > (RW + 1)'(V_ACTIVE - 1)) row_src = RW'(V_ACTIVE - 1);
    else                                   row_src = src[RW-1:0];
  end
endmodule
