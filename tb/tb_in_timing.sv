// tb_in_timing: drives rasters of alternating parity, with random idle cycles
// between enabled ones, and checks the field-start strobe, the row and column
// of every active pixel and the parity taken at VS. First four fields of a
// small raster (6 x 4 active pixels in 9 x 7 clocks) are checked on an
// instance with small parameters, then two full-size fields (720 x 288 active
// in 864 x 312) on an instance with the default parameters. Both instances see
// the same stimulus; only the one matching the raster is checked.
module tb_in_timing;
  import video_pkg::*;
  localparam int unsigned HA = 6, HT = 9, VA = 4, VT = 7, VSTART = 2, NF = 4;
  localparam int unsigned VSTART_D = 22, NF_D = 2;

  logic       clk = 1'b0, rst_n = 1'b0;
  logic       en = 1'b0, av = 1'b0, vs = 1'b0, interlc = 1'b0;
  logic       sof, parity, sof_d, parity_d;
  logic [2:0] row;
  logic [2:0] col;
  logic [8:0] row_d;
  logic [9:0] col_d;
  int unsigned checks = 0, failures = 0, n_sof = 0;

  always #5 clk = ~clk;

  in_timing #(.H_ACTIVE(HA), .V_ACTIVE(VA)) u_dut (.clk, .rst_n, .en, .av, .vs, .interlc, .sof, .row, .col, .parity);
  in_timing u_def (.clk, .rst_n, .en, .av, .vs, .interlc, .sof(sof_d), .row(row_d), .col(col_d), .parity(parity_d));

  task automatic expect_eq(int got, int exp, string what);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: %0d expected %0d", what, got, exp);
    end
  endtask

  // Drives nf fields of the given raster; checks u_def if full, else u_dut.
  task automatic run(int ha, int ht, int va, int vt, int vstart, int nf, bit full);
    for (int k = 0; k < nf; k++)
      for (int line = 0; line < vt; line++)
        for (int h = 0; h < ht; h++) begin
          automatic int r = line - vstart;
          automatic bit g_sof;
          while ($urandom_range(2) == 0) begin
            @(posedge clk);
            en <= 1'b0;
          end
          @(posedge clk);
          en      <= 1'b1;
          vs      <= (line == 0);
          interlc <= k[0];
          av      <= (r >= 0 && r < va && h < ha);
          #1;
          g_sof = full ? sof_d : sof;
          expect_eq(int'(g_sof), int'(line == 0 && h == 0), full ? "default-size sof" : "sof");
          if (g_sof) n_sof++;
          if (av) begin
            expect_eq(full ? int'(row_d) : int'(row), r, full ? "default-size row" : "row");
            expect_eq(full ? int'(col_d) : int'(col), h, full ? "default-size col" : "col");
            expect_eq(full ? int'(parity_d) : int'(parity), k % 2, full ? "default-size parity" : "parity");
          end
        end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    run(HA, HT, VA, VT, VSTART, NF, 1'b0);
    expect_eq(n_sof, NF, "field starts");
    n_sof = 0;
    run(H_ACTIVE_DEF, H_TOTAL_DEF, V_ACTIVE_DEF, V_TOTAL_DEF, VSTART_D, NF_D, 1'b1);
    expect_eq(n_sof, NF_D, "default-size field starts");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat ((NF * VT * HT + NF_D * V_TOTAL_DEF * H_TOTAL_DEF) * 10) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
