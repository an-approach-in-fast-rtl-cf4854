// tb_vzoom: checks the row mapping for every output row at the default
// 288-row field, with zoom off (identity), with the 4/3 letterbox expansion
// (first row 36, step 192/256), with a step of 1.0 and with a start row that
// runs past the bottom (clamped to the last row).
module tb_vzoom;
  localparam int unsigned V = 288;
  logic       zoom_en;
  logic [8:0] first, row_out, row_src;
  logic [8:0] step;
  int unsigned checks = 0, failures = 0, clamps = 0;

  vzoom u_dut (.zoom_en, .first, .step, .row_out, .row_src);

  task automatic sweep(bit en, int f, int st);
    zoom_en = en; first = 9'(f); step = 9'(st);
    for (int j = 0; j < int'(V); j++) begin
      int exp = en ? f + (j * st) / 256 : j;
      if (exp > int'(V) - 1) begin exp = int'(V) - 1; clamps++; end
      row_out = 9'(j);
      #1;
      checks++;
      if (int'(row_src) != exp) begin
        failures++;
        if (failures < 10) $display("FAIL en %0b first %0d step %0d row %0d: %0d expected %0d", en, f, st, j, row_src, exp);
      end
    end
  endtask

  initial begin
    sweep(1'b0, 36, 192);
    sweep(1'b1, 36, 192);
    sweep(1'b1, 0, 256);
    sweep(1'b1, 100, 200);
    checks++;
    if (clamps == 0) begin
      failures++;
      $display("FAIL clamp never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
