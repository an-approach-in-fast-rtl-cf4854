// field_mem_model: behavioural model of one external field memory bank.
//
// Not synthesizable RTL of the design: it stands in for an off-chip field
// store (one field of 4:1:1 pixels, 12 bits each) in simulation. One write
// port, two read ports; reads are synchronous and return the word one clock
// after the address, showing the old word when a location is read and
// written in the same clock. The array starts cleared to zero.
module field_mem_model
  import video_pkg::*;
#(
  parameter int unsigned DEPTH = 720 * 288,
  localparam int unsigned AW = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  fm_word_t      wdata,
  input  logic [AW-1:0] raddr [2],
  output fm_word_t      rdata [2]
);
  fm_word_t mem [DEPTH];

  initial begin
    for (int i = 0; i < int'(DEPTH); i++) mem[i] = '0;
    rdata[0] = '0;
    rdata[1] = '0;
  end

  always @(posedge clk) begin
    for (int p = 0; p < 2; p++) rdata[p] <= mem[raddr[p]];
    if (we) mem[waddr] <= wdata;
  end
endmodule
