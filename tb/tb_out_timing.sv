// tb_out_timing: checks the 100 Hz raster on a small frame (6 x 4 active in
// 10 x 7 clocks, active lines from line 2). Sync pulses come every two output
// fields, and once after a longer gap; every clock is compared with a model
// counting clocks since the last sync: two fields per sync, VS in the first
// line of each, AV over the active window with the right row and column, and
// a blank hold after the second field until the next sync. The same checks
// then run on an instance with the default parameters (720 x 288 active in
// 864 x 312 clocks, active lines from line 20) for three sync periods, the
// second of them longer than two output fields.
module tb_out_timing;
  import video_pkg::*;
  localparam int unsigned HA = 6, HT = 10, VA = 4, VT = 7, VS0 = 2;
  localparam int unsigned FT = VT * HT;
  localparam int unsigned VS0_D = 20, FT_D = V_TOTAL_DEF * H_TOTAL_DEF;

  logic       clk = 1'b0, rst_n = 1'b0, sync = 1'b0;
  logic       vs, av, phase;
  logic [2:0] row;
  logic [3:0] col;
  int unsigned checks = 0, failures = 0, n_av = 0, n_exp = 0, n_vs_rise = 0, n_hold = 0;
  int t = -1;   // clocks since the last sync, -1 before the first
  bit vs_q = 1'b0;

  logic       sync_d = 1'b0;
  logic       vs_d, av_d, phase_d;
  logic [8:0] row_d;
  logic [9:0] col_d;
  int unsigned n_av_d = 0, n_exp_d = 0, n_vs_rise_d = 0, n_hold_d = 0;
  int t_d = -1;
  bit vs_dq = 1'b0;

  always #5 clk = ~clk;

  out_timing #(.H_ACTIVE(HA), .H_TOTAL(HT), .V_ACTIVE(VA), .V_TOTAL(VT), .V_START(VS0)) u_dut (
    .clk, .rst_n, .sync, .vs, .av, .phase, .row, .col
  );
  out_timing u_def (
    .clk, .rst_n, .sync(sync_d), .vs(vs_d), .av(av_d), .phase(phase_d), .row(row_d), .col(col_d)
  );

  task automatic expect_eq(int got, int exp, string what);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL t=%0d %s: %0d expected %0d", t, what, got, exp);
    end
  endtask

  always @(negedge clk) if (rst_n && t >= 0) begin
    automatic int f = t / int'(FT);
    automatic int line = (t % int'(FT)) / int'(HT);
    automatic int h = t % int'(HT);
    automatic bit e_av = (f < 2) && line >= int'(VS0) && line < int'(VS0 + VA) && h < int'(HA);
    if (f >= 2) n_hold++;
    expect_eq(int'(vs), int'((f < 2) && line == 0), "vs");
    expect_eq(int'(av), int'(e_av), "av");
    expect_eq(int'(phase), (f == 0) ? 0 : 1, "phase");
    if (e_av) begin
      expect_eq(int'(row), line - int'(VS0), "row");
      expect_eq(int'(col), h, "col");
      n_exp++;
    end
    if (av) n_av++;
    if (vs && !vs_q) n_vs_rise++;
    vs_q = vs;
  end

  always @(posedge clk) begin
    if (sync) t <= 0;
    else if (t >= 0) t <= t + 1;
  end

  // Same model for the default-size instance.
  always @(negedge clk) if (rst_n && t_d >= 0) begin
    automatic int f = t_d / int'(FT_D);
    automatic int line = (t_d % int'(FT_D)) / int'(H_TOTAL_DEF);
    automatic int h = t_d % int'(H_TOTAL_DEF);
    automatic bit e_av = (f < 2) && line >= int'(VS0_D) && line < int'(VS0_D + V_ACTIVE_DEF)
                         && h < int'(H_ACTIVE_DEF);
    if (f >= 2) n_hold_d++;
    expect_eq(int'(vs_d), int'((f < 2) && line == 0), "default-size vs");
    expect_eq(int'(av_d), int'(e_av), "default-size av");
    expect_eq(int'(phase_d), (f == 0) ? 0 : 1, "default-size phase");
    if (e_av) begin
      expect_eq(int'(row_d), line - int'(VS0_D), "default-size row");
      expect_eq(int'(col_d), h, "default-size col");
      n_exp_d++;
    end
    if (av_d) n_av_d++;
    if (vs_d && !vs_dq) n_vs_rise_d++;
    vs_dq = vs_d;
  end

  always @(posedge clk) begin
    if (sync_d) t_d <= 0;
    else if (t_d >= 0) t_d <= t_d + 1;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    repeat (5) @(posedge clk);
    expect_eq(int'(av), 0, "idle before first sync");
    for (int p = 0; p < 4; p++) begin
      @(posedge clk);
      sync <= 1'b1;
      @(posedge clk);
      sync <= 1'b0;
      // The third period is longer than two output fields.
      repeat (2 * FT - 1 + ((p == 2) ? 25 : 0)) @(posedge clk);
    end
    expect_eq(n_av, n_exp, "active pixels");
    expect_eq(n_av, 8 * HA * VA, "eight full output fields");
    expect_eq(n_vs_rise, 8, "output fields started");
    checks++;
    if (n_hold == 0) begin
      failures++;
      $display("FAIL blank hold never exercised");
    end
    expect_eq(int'(av_d), 0, "default size idle before first sync");
    for (int p = 0; p < 3; p++) begin
      @(posedge clk);
      sync_d <= 1'b1;
      @(posedge clk);
      sync_d <= 1'b0;
      // The second period is longer than two output fields.
      repeat (2 * FT_D - 1 + ((p == 1) ? 3000 : 0)) @(posedge clk);
    end
    expect_eq(n_av_d, n_exp_d, "default-size active pixels");
    expect_eq(n_av_d, 6 * H_ACTIVE_DEF * V_ACTIVE_DEF, "six full default-size output fields");
    expect_eq(n_vs_rise_d, 6, "default-size output fields started");
    checks++;
    if (n_hold_d == 0) begin
      failures++;
      $display("FAIL default-size blank hold never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20 * FT + 8 * FT_D) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
