`timescale 1ps/1fs
// tb_code_averager: feeds random codes to the max/min averager with the
// default 256-sample window (and idle cycles with sample low in between)
// and checks that each window ends with avg_code = (max + min) / 2 of
// exactly the 256 sampled codes, on the cycle after the 256th sample.
module tb_code_averager;
  logic clk = 1'b0, rst_n = 1'b1, sample = 1'b0;
  logic [16:0] code = '0, avg_code;
  logic avg_valid;
  int checks = 0, failures = 0;

  code_averager dut (.*);
  initial forever #5000 clk = ~clk;

  initial begin
    #100000000; failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int mx, mn, c;
    #10 rst_n = 1'b0;
    #20000 rst_n = 1'b1;
    checks++;
    if (avg_valid !== 1'b0) failures++;
    for (int w = 0; w < 4; w++) begin
      mx = -1; mn = 1 << 20;
      for (int i = 0; i < 256; i++) begin
        @(negedge clk);
        // some idle cycles that must not count
        if ($urandom_range(0, 3) == 0) begin sample = 1'b0; @(negedge clk); end
        c = 1000 * w + int'($urandom_range(0, 4000));
        code = 17'(c); sample = 1'b1;
        if (c > mx) mx = c;
        if (c < mn) mn = c;
        if (i < 255) begin
          @(posedge clk); #1;
          // before the window closes the output keeps the previous window
          if (w == 0) begin checks++; if (avg_valid) failures++; end
        end
      end
      @(posedge clk); #1;
      sample = 1'b0;
      checks++;
      if (!avg_valid || int'(avg_code) != (mx + mn) / 2) begin
        failures++;
        $display("FAIL window %0d: avg=%0d expected %0d", w, avg_code, (mx + mn) / 2);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
