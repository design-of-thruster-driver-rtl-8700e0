// tb_clk_mode_gen: runs the clock and mode generator at 1 MHz for 40 000 clocks. For every
// rate it checks that the enables come exactly every 1e6/f clocks (mode: every 16 clocks of
// 40 kHz = 400 clocks), that each square wave rises exactly in the cycle of its enable and
// never otherwise, and that the 40 kHz and 1 kHz waves are high 12 of 25 and 500 of 1000 clocks.
module tb_clk_mode_gen;
  import tdm_pkg::*;
  logic   clk = 1'b0, por = 1'b1;
  ticks_t ticks;
  logic   c40k, c20k, c1k, c500, c250, c125, mode;
  int     checks = 0, failures = 0;

  always #500 clk = ~clk;

  clk_mode_gen dut (.clk(clk), .por(por), .ticks(ticks), .clk_40k(c40k), .clk_20k(c20k),
                    .clk_1k(c1k), .clk_500(c500), .clk_250(c250), .clk_125(c125), .mode(mode));

  localparam int NR = 7;
  localparam int PERIOD [NR] = '{25, 50, 1000, 2000, 4000, 8000, 400};
  logic [NR-1:0] tk, lv, lv_d;
  int            last [NR];
  int            seen [NR];
  int            cyc = 0, hi40 = 0, hi1k = 0;

  assign tk = {ticks.tmode, ticks.t125, ticks.t250, ticks.t500, ticks.t1k, ticks.t20k, ticks.t40k};
  assign lv = {mode, c125, c250, c500, c1k, c20k, c40k};

  always @(posedge clk) begin
    if (!por) begin
      cyc++;
      for (int r = 0; r < NR; r++) begin
        if (tk[r]) begin
          if (seen[r] > 0) begin
            checks++;
            if (cyc - last[r] != PERIOD[r]) begin
              failures++;
              $display("FAIL rate %0d: enables %0d clocks apart, expected %0d", r, cyc - last[r], PERIOD[r]);
            end
          end
          seen[r]++;
          last[r] = cyc;
        end
        // the wave rises exactly with its enable (after the first, partial, periods)
        if (cyc > 1000 && ((lv[r] && !lv_d[r]) != tk[r])) begin
          failures++;
          $display("FAIL rate %0d: wave edge and enable disagree at clock %0d", r, cyc);
        end
      end
      if (ticks.t40k && seen[0] > 1) begin
        checks++;
        if (hi40 != 12) begin failures++; $display("FAIL 40 kHz high for %0d clocks", hi40); end
      end
      if (ticks.t1k && seen[2] > 1) begin
        checks++;
        if (hi1k != 500) begin failures++; $display("FAIL 1 kHz high for %0d clocks", hi1k); end
      end
      if (ticks.t40k) hi40 = 0;
      if (ticks.t1k)  hi1k = 0;
      hi40 += int'(c40k);
      hi1k += int'(c1k);
      lv_d <= lv;
    end
  end

  initial begin
    #50_000_000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < NR; r++) begin last[r] = 0; seen[r] = 0; end
    repeat (3) @(negedge clk);
    por = 1'b0;
    repeat (40_000) @(negedge clk);
    for (int r = 0; r < NR; r++) begin
      checks++;
      if (seen[r] < 40_000 / PERIOD[r] - 1) begin
        failures++;
        $display("FAIL rate %0d: only %0d enables", r, seen[r]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
