// tb_video_ic_full: end-to-end test of the scan-rate converter at its
// default size (720 x 288 active pixels per field, 864 x 312 total), four
// input fields plus one blank field; see video_ic_env.
module tb_video_ic_full;
  video_ic_env #(.FULL(1'b1), .NF(4)) u_env ();
endmodule
