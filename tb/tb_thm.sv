// tb_thm: drives random thruster status patterns, counts in a reference model how many
// selected-clock enables each thruster was on for, and after a falling edge of his_mon_lp
// checks that every history word is {count 2k, count 2k+1} (mod 256); as the reference restarts
// from zero each window, this also checks that the counters restarted. One window is long enough to wrap a counter.
module tb_thm;
  logic                 clk = 1'b0, por = 1'b1, tick = 1'b0, lp = 1'b1;
  logic [15:0]          sts = '0;
  logic [7:0][15:0]     his;
  int                   ref_cnt [16];
  int                   checks = 0, failures = 0, cyc = 0;

  always #500 clk = ~clk;

  thm dut (.clk(clk), .por(por), .sel_tick(tick), .thr_sts(sts), .his_mon_lp(lp), .hisout(his));

  initial begin
    #3_000_000_000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // enable every 10 clocks; reference counts what the design should count
  always @(posedge clk) begin
    cyc  <= cyc + 1;
    tick <= ((cyc % 10) == 9);
  end

  initial begin
    repeat (3) @(negedge clk);
    por = 1'b0;
    for (int w = 0; w < 6; w++) begin
      foreach (ref_cnt[i]) ref_cnt[i] = 0;
      // count while waiting; windows of a few hundred enables
      repeat ((w == 2) ? 3200 : $urandom_range(200, 2000)) begin
        @(negedge clk);
        if ($urandom_range(0, 30) == 0) sts = 16'($urandom);
        if (tick) foreach (ref_cnt[i]) ref_cnt[i] += int'(sts[i]);
      end
      // falling edge of his_mon_lp between enables (enables are every 10 clocks)
      do begin
        @(negedge clk);
        if (tick) foreach (ref_cnt[i]) ref_cnt[i] += int'(sts[i]);
      end while (!tick);
      @(posedge clk);
      #100 lp = 1'b0;
      repeat (4) @(negedge clk);
      for (int k = 0; k < 8; k++) begin
        checks++;
        if (his[k] !== {8'(ref_cnt[2*k]), 8'(ref_cnt[2*k+1])}) begin
          failures++;
          $display("FAIL window %0d word %0d: %h expected %h", w, k, his[k],
                   {8'(ref_cnt[2*k]), 8'(ref_cnt[2*k+1])});
        end
      end
      lp = 1'b1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
