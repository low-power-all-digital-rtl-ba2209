`timescale 1ps/1fs
// tb_bb_pfd: checks the bang-bang detector with two free-running clocks.
// The feedback clock is placed before or after the reference edge by a
// known offset, and with a higher or lower frequency; lead/lag sampled at
// each reference edge must match the expected relation.  In realign mode
// the detector must report lead when a feedback edge fell inside the last
// reference period and lag when none did (feedback clock stopped).
module tb_bb_pfd;
  logic rst_n = 1'b1;
  logic ref_clk = 1'b0, fb_clk = 1'b0;
  logic lead, lag;
  logic realign = 1'b0, fb_stop = 1'b0;
  int checks = 0, failures = 0;

  bb_pfd dut (.rst_n, .ref_clk, .fb_clk, .realign, .lead, .lag);

  // scenario control
  realtime ref_per = 10000.0, fb_per = 10000.0, fb_ofs = 0.0;
  int expect_lead = -1;   // -1: do not check

  initial forever begin #(ref_per/2.0) ref_clk = ~ref_clk; end
  // fb starts at 3 ns; fb_ofs adds a one-time extra delay (phase shift)
  initial begin
    #3000.0;
    forever begin
      realtime extra;
      fb_clk = ~fb_stop; #(fb_per/2.0); fb_clk = 1'b0;
      extra = fb_ofs; fb_ofs = 0.0;
      #(fb_per/2.0 + extra);
    end
  end

  always @(posedge ref_clk) if (rst_n && expect_lead >= 0) begin
    checks++;
    if (lead !== (expect_lead == 1) || lag !== (expect_lead == 0)) begin
      failures++;
      $display("FAIL t=%0t lead=%0b lag=%0b exp_lead=%0d", $realtime, lead, lag, expect_lead);
    end
  end

  initial begin
    #3000000; $display("watchdog"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    // ref rises at 5000, 15000, ...; fb starts with a rising edge at 0 + ofs
    // fb edges at 3 ns + k*10 ns: 2 ns before ref -> lead
    #10 rst_n = 1'b0;
    #990 rst_n = 1'b1;
    #30000 expect_lead = 1;
    #100000 expect_lead = -1;
    // move fb 4 ns later: fb edges now 2 ns after the ref edges -> lag
    fb_ofs = 4000.0;
    #30000 expect_lead = 0;
    #100000 expect_lead = -1;
    // fb much faster than ref -> lead (frequency detection)
    fb_per = 6000.0;
    #40000 expect_lead = 1;
    #100000 expect_lead = -1;
    // fb much slower -> lag
    fb_per = 17000.0;
    #60000 expect_lead = 0;
    #200000 expect_lead = -1;
    // realign mode: one fb edge per period -> lead; fb stopped -> lag
    fb_per = 10000.0; realign = 1'b1;
    #30000 expect_lead = 1;
    #100000 expect_lead = -1;
    fb_stop = 1'b1;
    #30000 expect_lead = 0;
    #100000 expect_lead = -1;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
