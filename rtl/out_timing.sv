// out_timing: raster generator for the 100 Hz output.
//
// Every input field period is split into two output fields of V_TOTAL lines
// of H_TOTAL clocks each, so with the core clock at twice the input pixel
// rate the output runs at twice the input field rate (50 Hz in, 100 Hz out).
// The raster restarts on each sync pulse (the input field start), which keeps
// the two rates locked without a second clock. If an input field is longer
// than two output fields, the second output field stays blank in its last
// line until the next sync.
//
// Outputs, all registered-derived: vs is high during the first line of each
// output field, av is high for the first H_ACTIVE clocks of the V_ACTIVE
// lines starting at line V_START, row/col give the active position and phase
// is 0 in the first and 1 in the second output field of a period.
// Line shape (720 active + 144 blanking) follows the standard digital video
// line; the vertical start, the one-line VS and the restart on sync are this
// design's choices.
module out_timing #(
  parameter int unsigned H_ACTIVE = 720,
  parameter int unsigned H_TOTAL  = 864,
  parameter int unsigned V_ACTIVE = 288,
  parameter int unsigned V_TOTAL  = 312,
  parameter int unsigned V_START  = 20,
  localparam int unsigned HW = $clog2(H_TOTAL),
  localparam int unsigned VW = $clog2(V_TOTAL),
  localparam int unsigned RW = $clog2(V_ACTIVE + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          sync,
  output logic          vs,
  output logic          av,
  output logic          phase,
  output logic [RW-1:0] row,
  output logic [HW-1:0] col
);
  logic [HW-1:0] hcnt;
  logic [VW-1:0] vcnt;
  logic          vact;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hcnt  <= '0;
      vcnt  <= VW'(V_TOTAL - 1);   // idle (blank) until the first sync
      phase <= 1'b1;
    end else if (sync) begin
      hcnt  <= '0;
      vcnt  <= '0;
      phase <= 1'b0;
    end else if (hcnt == HW'(H_TOTAL - 1)) begin
      hcnt <= '0;
      if (vcnt == VW'(V_TOTAL - 1)) begin
        if (!phase) begin
          vcnt  <= '0;
          phase <= 1'b1;
        end
      end else begin
        vcnt <= vcnt + 1'b1;
      end
    end else begin
      hcnt <= hcnt + 1'b1;
    end
  end

  assign vact = (vcnt >= VW'(V_START)) && (vcnt < VW'(V_START + V_ACTIVE));
  assign vs   = (vcnt == '0);
  assign av   = vact && (hcnt < HW'(H_ACTIVE));
  assign row  = vact ? RW'(vcnt - VW'(V_START)) : '0;
  assign col  = hcnt;
endmodule
