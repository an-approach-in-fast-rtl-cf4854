// tb_nr_filter: random and directed 3 x 3 windows with a previous-picture
// pixel; the expected output is computed here: the previous pixel replaces
// the centre only when NR is enabled, the pixel is not on the border, it
// differs from the previous pixel by more than th and from each of its
// eight neighbours by more than th.
module tb_nr_filter;
  import video_pkg::*;

  logic en_nr, border, fwd;
  pix_t th, prev, y_out;
  pix_t cur [3][3];
  int unsigned checks = 0, failures = 0, n_fwd = 0;

  nr_filter u_dut (.en_nr, .th, .border, .cur, .prev, .y_out, .fwd);

  function automatic int pdiff(int a, int b);
    return (a > b) ? a - b : b - a;
  endfunction

  task automatic check_one();
    bit exp_fwd = en_nr && !border && pdiff(cur[1][1], prev) > th;
    for (int r = 0; r < 3; r++)
      for (int c = 0; c < 3; c++)
        if ((r != 1 || c != 1) && pdiff(cur[1][1], cur[r][c]) <= th) exp_fwd = 1'b0;
    #1;
    checks++;
    if (fwd !== exp_fwd || y_out !== (exp_fwd ? prev : cur[1][1])) begin
      failures++;
      if (failures < 10) $display("FAIL centre %0d prev %0d th %0d: y %0d fwd %0b", cur[1][1], prev, th, y_out, fwd);
    end
    if (exp_fwd) n_fwd++;
  endtask

  initial begin
    for (int i = 0; i < 20000; i++) begin
      automatic int base = $urandom_range(255);
      en_nr  = ($urandom_range(7) != 0);
      border = ($urandom_range(7) == 0);
      th     = pix_t'($urandom_range(60));
      // Smooth neighbourhood, then sometimes a spike in the centre.
      for (int r = 0; r < 3; r++)
        for (int c = 0; c < 3; c++)
          cur[r][c] = pix_t'((base + $urandom_range(20)) & 255);
      if ($urandom_range(1)) cur[1][1] = cur[1][1] ^ 8'h80;
      if (i % 5 == 0) cur[$urandom_range(2)][0] = cur[1][1];   // one close neighbour
      prev = ($urandom_range(1)) ? pix_t'($urandom) : cur[1][1] ^ pix_t'($urandom_range(15));
      check_one();
    end
    checks++;
    if (n_fwd == 0) begin
      failures++;
      $display("FAIL no replacement exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
