// tb_line_mem: checks that line_mem delays its input by exactly DEPTH
// enabled cycles, at the default line length of 864 and with an irregular
// clock enable, against a history of every sample driven.
module tb_line_mem;
  localparam int unsigned DEPTH = 864;
  localparam int unsigned N = 5 * DEPTH;

  logic       clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  logic [7:0] din = '0, dout;
  logic [7:0] hist [N];
  int unsigned checks = 0, failures = 0;

  always #5 clk = ~clk;

  line_mem u_dut (.clk, .rst_n, .en, .in_data(din), .out_data(dout));

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    for (int t = 0; t < int'(N); t++) begin
      // Idle cycles in between must not disturb the delay.
      while ($urandom_range(3) == 0) begin
        @(posedge clk);
        en <= 1'b0;
      end
      @(posedge clk);
      en  <= 1'b1;
      din <= 8'($urandom);
      #1;
      hist[t] = din;
      if (t >= int'(DEPTH)) begin
        #1;
        checks++;
        if (dout !== hist[t - DEPTH]) begin
          failures++;
          if (failures < 10) $display("FAIL sample %0d: out %0h expected %0h", t, dout, hist[t - DEPTH]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20 * N) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
