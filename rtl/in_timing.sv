// in_timing: position decoder for an incoming digital video stream.
//
// The stream is framed by three signals: VS pulses at the start of each
// field, AV is high while the data lines carry active pixels (one run per
// line, left to right, lines top to bottom) and INTERLC tells which field of
// the interlaced pair is being sent. This block turns them into the row and
// column of the current active pixel, a field-start strobe and the field's
// parity. Rows count completed AV runs since the last VS; columns count AV
// samples since AV rose.
//
// Interface: all inputs are sampled when en is high (one pixel per enabled
// cycle). sof is high in the enabled cycle in which VS rises. row and col are
// valid for the current sample whenever av is high. parity holds the INTERLC
// level taken at the last VS rise (0 = field A, the even lines; 1 = field B,
// the odd lines). Timing: row, col and sof are combinational from the inputs
// and internal counters; parity is registered.
module in_timing #(
  parameter int unsigned H_ACTIVE = 720,
  parameter int unsigned V_ACTIVE = 288,
  localparam int unsigned CW = $clog2(H_ACTIVE + 1),
  localparam int unsigned RW = $clog2(V_ACTIVE + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          en,
  input  logic          av,
  input  logic          vs,
  input  logic          interlc,
  output logic          sof,
  output logic [RW-1:0] row,
  output logic [CW-1:0] col,
  output logic          parity
);
  logic          av_d, vs_d;
  logic [RW-1:0] row_cnt;
  logic [CW-1:0] col_cnt;

  assign sof = en && vs && !vs_d;
  assign row = row_cnt;
  assign col = col_cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      av_d    <= 1'b0;
      vs_d    <= 1'b0;
      row_cnt <= '0;
      col_cnt <= '0;
      parity  <= 1'b0;
    end else if (en) begin
      av_d    <= av;
      vs_d    <= vs;
      col_cnt <= av ? col_cnt + 1'b1 : '0;
      if (sof) begin
        row_cnt <= '0;
        parity  <= interlc;
      end else if (av_d && !av) begin
        row_cnt <= row_cnt + 1'b1;
      end
    end
  end
endmodule
