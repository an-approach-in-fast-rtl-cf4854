// tb_video_ic_top: end-to-end test of the scan-rate converter on a small
// raster (16 x 8 active pixels, 24 x 12 total) over six input fields; see
// video_ic_env for what is driven and checked.
module tb_video_ic_top;
  video_ic_env #(
    .FULL(1'b0), .H_ACTIVE(16), .H_TOTAL(24), .V_ACTIVE(8), .V_TOTAL(12),
    .OUT_V_START(2), .IN_VSTART(2), .NF(6), .Z_FIRST(1), .Z_STEP(192)
  ) u_env ();
endmodule
