`timescale 1ps/1fs
// tb_clk_divider: checks the counter divider for ratios 1 to 9: the output
// period is div input periods, the high time is ceil(div/2) input periods
// (div = 1 passes the input), and a restart edge makes the next output
// rising edge come exactly div input periods after the first input edge
// that follows the restart.
module tb_clk_divider;
  logic clk_in = 1'b0, rst_n = 1'b1, restart = 1'b0, clk_out;
  logic [6:0] div = 7'd1;
  int checks = 0, failures = 0;
  localparam realtime P = 1000.0;

  clk_divider dut (.*);
  initial forever #(P/2.0) clk_in = ~clk_in;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #10000000; failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    realtime t0, t1, tf, tr;
    #10 rst_n = 1'b0;
    #3000 rst_n = 1'b1;
    for (int d = 1; d <= 9; d++) begin
      div = 7'(d);
      repeat (2 * d + 2) @(posedge clk_out);
      t0 = $realtime;
      @(negedge clk_out) tf = $realtime;
      @(posedge clk_out) t1 = $realtime;
      check(t1 - t0 > d * P - 1.0 && t1 - t0 < d * P + 1.0, $sformatf("period for div %0d", d));
      check(tf - t0 > ((d + 1) / 2) * P - (d == 1 ? P / 2.0 : 0.0) - 1.0 &&
            tf - t0 < ((d + 1) / 2) * P - (d == 1 ? P / 2.0 : 0.0) + 1.0, $sformatf("high time for div %0d", d));
      if (d > 1) begin
        // restart in the middle of an output period
        @(posedge clk_in); #(P/4.0) restart = 1'b1;
        @(posedge clk_in) tr = $realtime;
        #(P/4.0) restart = 1'b0;
        @(posedge clk_out) t1 = $realtime;
        check(t1 - tr > d * P - 1.0 && t1 - tr < d * P + 1.0, $sformatf("restart alignment for div %0d", d));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
