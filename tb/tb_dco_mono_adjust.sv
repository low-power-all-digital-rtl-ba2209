`timescale 1ps/1fs
// tb_dco_mono_adjust: checks the boundary compensation of the 18-bit DCO
// code (8 coarse, 2 + 5 + 3 fine bits).  Directed cases: the example of a
// 2nd/3rd fine boundary (...0111 -> ...1000 becomes ...1100, +4), steps
// inside one stage (no change), 1st/2nd fine (+/-48) and coarse/1st fine
// (+/-320) crossings, and saturation.  Then random +/-1 steps compared with
// a reference computed here.
module tb_dco_mono_adjust;
  logic [17:0] cur_code, next_code, adj_code;
  logic crossed;
  int checks = 0, failures = 0;

  dco_mono_adjust dut (.*);

  function automatic int ref_adj(input int c, input int n);
    int comp;
    if ((c >> 10) != (n >> 10)) comp = 320;
    else if (((c >> 8) & 3) != ((n >> 8) & 3)) comp = 48;
    else if (((c >> 3) & 31) != ((n >> 3) & 31)) comp = 4;
    else comp = 0;
    if (n > c) n = n + comp;
    else if (n < c) n = n - comp;
    if (n < 0) n = 0;
    if (n > 262143) n = 262143;
    return n;
  endfunction

  task automatic t(input int c, input int n, input int e);
    cur_code = 18'(c); next_code = 18'(n); #1;
    checks++;
    if (int'(adj_code) != e) begin
      failures++;
      $display("FAIL %0d -> %0d: got %0d expected %0d", c, n, adj_code, e);
    end
  endtask

  initial begin
    #100000000; failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    t(18'b0111, 18'b1000, 18'b1100);                 // example of the boundary rule
    t(18'b1100, 18'b1011, 18'b1011);                 // inside the 3rd fine stage
    t(18'b1000, 18'b0111, 18'b0011);                 // borrow: -4
    t(5, 6, 6);
    t(255, 256, 256 + 48);                           // into the 1st fine stage
    t(256 + 48, 255 + 0, 255 - 48);
    t(1023, 1024, 1024 + 320);                       // into the coarse stage
    t(1024, 1023, 1023 - 320);
    t(262143 - 100, 262143, 262143);                 // no boundary: plain step
    t(260000, 262100, 262143);                       // saturation high
    t(1024, 100, 0);                                 // saturation low
    for (int i = 0; i < 2000; i++) begin
      int c, n;
      c = int'($urandom_range(1, 262142));
      n = ($urandom_range(0, 1) == 1) ? c + 1 : c - 1;
      t(c, n, ref_adj(c, n));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
