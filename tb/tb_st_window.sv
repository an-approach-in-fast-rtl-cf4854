// tb_st_window: checks the spatial-temporal window in three shapes: 3 fields
// x 3 lines x 3 pixels with a short line (LINE = 8), a purely temporal window
// (H = 1) of 3 fields x 3 pixels, and the default parameters (3 x 3 x 3,
// LINE = 864). Each field stream gets its own random data, with an enable on
// every second clock; every tap is compared with the stream's history once
// that much history exists.
module tb_st_window;
  import video_pkg::*;
  localparam int unsigned D = 3, H = 3, W = 3, LINE = 8, LINE_DEF = 864;
  localparam int unsigned N = 4 * LINE_DEF;

  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  pix_t din [D];
  pix_t win  [D][H][W];
  pix_t twin [D][1][W];
  pix_t dwin [D][H][W];
  pix_t hist [D][N];
  int unsigned checks = 0, failures = 0;

  always #5 clk = ~clk;

  st_window #(.D(D), .H(H), .W(W), .LINE(LINE)) u_dut (.clk, .rst_n, .en, .field_in(din), .win);
  st_window #(.D(D), .H(1), .W(W), .LINE(LINE)) u_temporal (.clk, .rst_n, .en, .field_in(din), .win(twin));
  st_window u_def (.clk, .rst_n, .en, .field_in(din), .win(dwin));

  task automatic check(pix_t got, pix_t exp, string what, int t);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL t %0d %s: %0h expected %0h", t, what, got, exp);
    end
  endtask

  initial begin
    for (int d = 0; d < int'(D); d++) din[d] = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    for (int t = 0; t < int'(N); t++) begin
      @(posedge clk);
      en <= 1'b1;
      for (int d = 0; d < int'(D); d++) din[d] <= pix_t'($urandom);
      @(posedge clk);
      en <= 1'b0;
      for (int d = 0; d < int'(D); d++) hist[d][t] = din[d];
      if (t >= int'((H - 1) * LINE + W)) begin
        for (int d = 0; d < int'(D); d++)
          for (int c = 0; c < int'(W); c++) begin
            for (int r = 0; r < int'(H); r++)
              check(win[d][r][c], hist[d][t - (int'(H) - 1 - r) * int'(LINE) - (int'(W) - 1 - c)], "st tap", t);
            check(twin[d][0][c], hist[d][t - (int'(W) - 1 - c)], "temporal tap", t);
          end
      end
      if (t >= int'((H - 1) * LINE_DEF + W)) begin
        for (int d = 0; d < int'(D); d++)
          for (int r = 0; r < int'(H); r++)
            for (int c = 0; c < int'(W); c++)
              check(dwin[d][r][c], hist[d][t - (int'(H) - 1 - r) * int'(LINE_DEF) - (int'(W) - 1 - c)], "default-size tap", t);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (4 * N + 100) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
