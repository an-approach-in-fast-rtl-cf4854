// tb_spatial_window: drives one random pixel stream, with an enable on every
// second clock, into two 3 x 3 windows: one with a short line (LINE = 10) and
// one with the default parameters (LINE = 864). Every tap win[r][c] of each is
// checked against the sample that entered (H-1-r) lines and (W-1-c) pixels
// earlier, once that many samples exist.
module tb_spatial_window;
  import video_pkg::*;
  localparam int unsigned H = 3, W = 3, LINE = 10, LINE_DEF = 864;
  localparam int unsigned N = 4 * LINE_DEF;

  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  pix_t din = '0;
  pix_t win [H][W];
  pix_t win_def [H][W];
  pix_t hist [N];
  int unsigned checks = 0, failures = 0;

  always #5 clk = ~clk;

  spatial_window #(.H(H), .W(W), .LINE(LINE)) u_dut (.clk, .rst_n, .en, .pix_in(din), .win);
  spatial_window u_def (.clk, .rst_n, .en, .pix_in(din), .win(win_def));

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    for (int t = 0; t < int'(N); t++) begin
      @(posedge clk);
      en  <= 1'b1;
      din <= pix_t'($urandom);
      @(posedge clk);
      en  <= 1'b0;
      hist[t] = din;
      if (t >= int'((H - 1) * LINE + W)) begin
        for (int r = 0; r < int'(H); r++)
          for (int c = 0; c < int'(W); c++) begin
            automatic int age = (int'(H) - 1 - r) * int'(LINE) + (int'(W) - 1 - c);
            checks++;
            if (win[r][c] !== hist[t - age]) begin
              failures++;
              if (failures < 10) $display("FAIL t %0d tap [%0d][%0d]: %0h expected %0h", t, r, c, win[r][c], hist[t - age]);
            end
          end
      end
      if (t >= int'((H - 1) * LINE_DEF + W)) begin
        for (int r = 0; r < int'(H); r++)
          for (int c = 0; c < int'(W); c++) begin
            automatic int age = (int'(H) - 1 - r) * int'(LINE_DEF) + (int'(W) - 1 - c);
            checks++;
            if (win_def[r][c] !== hist[t - age]) begin
              failures++;
              if (failures < 10) $display("FAIL default size t %0d tap [%0d][%0d]: %0h expected %0h", t, r, c, win_def[r][c], hist[t - age]);
            end
          end
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
