// tb_deint_interp: compares the missing-line pixel with a reference that
// sorts the three median inputs and forms
// (median + (above + below + 1) / 2 + 1) / 2, over random inputs and the
// extreme corners.
module tb_deint_interp;
  import video_pkg::*;

  pix_t above, below, prev, y_out;
  int unsigned checks = 0, failures = 0;

  deint_interp u_dut (.above, .below, .prev, .y_out);

  task automatic check_one(int a, int b, int p);
    int s [3];
    int exp;
    s[0] = a; s[1] = b; s[2] = p;
    s.sort();
    exp = (s[1] + (a + b + 1) / 2 + 1) / 2;
    above = pix_t'(a); below = pix_t'(b); prev = pix_t'(p);
    #1;
    checks++;
    if (int'(y_out) != exp) begin
      failures++;
      if (failures < 10) $display("FAIL a %0d b %0d p %0d: %0d expected %0d", a, b, p, y_out, exp);
    end
  endtask

  initial begin
    int v [4] = '{0, 1, 254, 255};
    foreach (v[i]) foreach (v[j]) foreach (v[k]) check_one(v[i], v[j], v[k]);
    for (int i = 0; i < 50000; i++) check_one($urandom_range(255), $urandom_range(255), $urandom_range(255));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
