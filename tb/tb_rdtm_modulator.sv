`timescale 1ps/1fs
// tb_rdtm_modulator: checks the RDTM sequence for every SEC_SEL that keeps
// the run short (COUNT = 8, 16, 32, 64) and two STEP values.  It
// integrates +/-_SS and S_SS into a code offset and checks: the offset
// equals the reported level times S, each group of four sub-sections sums
// to zero (group_end arrives when the running sum of the group is zero),
// each level +/-1..+/-Q appears exactly twice per cycle, the largest
// change between neighbouring sub-sections is (Q+1)*S, and leaving spread
// mode returns the integrated offset to 0.
module tb_rdtm_modulator;
  logic clk = 1'b0, rst_n = 1'b1, enable = 1'b0;
  logic [2:0] sec_sel = '0, step = '0;
  logic ss_valid, ss_add, group_end;
  logic [15:0] ss_step;
  logic signed [17:0] offset;
  int checks = 0, failures = 0;

  rdtm_modulator dut (.*);
  initial forever #5000 clk = ~clk;

  // integrate the outputs
  int acc = 0;
  always @(posedge clk) if (ss_valid) acc = ss_add ? acc + int'(ss_step) : acc - int'(ss_step);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #100000000; failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    #10 rst_n = 1'b0;
    #20000 rst_n = 1'b1;
    for (int ss = 0; ss < 4; ss++) begin
      for (int st = 1; st < 5; st += 3) begin
        int count, q, s, gsum, maxj, prev, lv;
        int hist [int];
        bit ok_groups, ok_track;
        count = 8 << ss; q = count / 4; s = 2 << st;
        hist.delete();
        sec_sel = 3'(ss); step = 3'(st);
        @(negedge clk) enable = 1'b1;
        gsum = 0; maxj = 0; prev = 0; ok_groups = 1; ok_track = 1;
        for (int k = 0; k < count; k++) begin
          // the registered step of this sub-section is visible now
          @(posedge clk); #1;
          lv = int'(offset) / s;
          if (acc != int'(offset)) ok_track = 0;
          if (hist.exists(lv)) hist[lv]++; else hist[lv] = 1;
          if (k > 0 && (lv - prev > maxj || prev - lv > maxj)) maxj = (lv > prev) ? lv - prev : prev - lv;
          prev = lv;
          gsum += lv;
          if (k % 4 == 3) begin
            if (gsum != 0) ok_groups = 0;
            gsum = 0;
          end
          @(negedge clk);
        end
        check(ok_track, $sformatf("COUNT=%0d S=%0d: S_SS steps add up to the offset", count, s));
        check(ok_groups, $sformatf("COUNT=%0d: every group of four sums to zero", count));
        begin
          bit ok_h;
          ok_h = (hist.num() == 2 * q);
          for (int l = 1; l <= q; l++) begin
            if (!hist.exists(l) || hist[l] != 2) ok_h = 0;
            if (!hist.exists(-l) || hist[-l] != 2) ok_h = 0;
          end
          check(ok_h, $sformatf("COUNT=%0d: each level +/-1..%0d twice", count, q));
        end
        check(maxj == q + 1, $sformatf("COUNT=%0d: largest neighbour change %0d = Q+1", count, maxj));
        enable = 1'b0;
        repeat (3) @(posedge clk);
        #1 check(acc == 0 && offset == 0, "back to the centre after spread mode");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
