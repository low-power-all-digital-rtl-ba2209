`timescale 1ps/1fs
// tb_flash_tdc_2level: drives the 2-level flash TDC with references of
// known half period h (in cells) and checks the thermometer outputs
// against q1 = ones(min(4, floor(h/8))), q2 = ones(min(8, floor(h-8*L1)))
// and that done rises at the second falling edge.
module tb_flash_tdc_2level;
  logic start_n = 1'b1, ref_n = 1'b0;
  logic [3:0] q1;
  logic [7:0] q2;
  logic done;
  int checks = 0, failures = 0;
  localparam real T = 165.0;   // the TDC's default cell delay

  flash_tdc_2level dut (.start_n, .ref_n, .q1, .q2, .done);

  function automatic logic [7:0] therm(input int n);
    return 8'((1 << n) - 1);
  endfunction

  task automatic measure(input real h_cells);
    real hp;
    int l1, l2, nfall;
    hp = h_cells * T;
    l1 = int'($floor(h_cells / 8.0)); if (l1 > 4) l1 = 4;
    l2 = int'($floor(h_cells - 8.0 * l1)); if (l2 > 8) l2 = 8;
    start_n = 1'b0; ref_n = 1'b0; #1000;
    start_n = 1'b1; #1000;
    nfall = 0;
    repeat (3) begin
      ref_n = 1'b1; #(hp); ref_n = 1'b0; nfall++;
      #1;
      checks++;
      if (done !== (nfall >= 2)) begin failures++; $display("FAIL done=%0b after %0d edges", done, nfall); end
      #(hp - 1.0);
    end
    checks++;
    if (q1 !== therm(l1)[3:0] || q2 !== therm(l2)) begin
      failures++;
      $display("FAIL h=%0.2f q1=%b q2=%b expected L1=%0d L2=%0d", h_cells, q1, q2, l1, l2);
    end
  endtask

  initial begin
    #10ms; failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    measure(18.5);   // the 36-cell period example: L1=2, L2=2
    measure(30.3);
    measure(3.5);
    measure(8.5);
    measure(39.5);
    measure(60.0);   // beyond range: all ones
    for (int i = 0; i < 20; i++) measure(0.5 + real'($urandom_range(0, 4000)) / 100.0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
