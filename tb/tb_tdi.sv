// tb_tdi: exercises the three thruster modes with enables generated here (1 kHz every 1000
// clocks, 500/250/125 Hz every 2000/4000/8000).
//  Direct: random words written at 0100H must appear on thr_out one clock later.
//  Timer:  after writing a thruster word and a duration d (14 = 000EH, and others), thr_en and
//          the gated word must last more than d-1 and at most d ms, then drop to 0.
//  Serial: 16 random words written to 0109H..0118H must come out, MSB first, one bit per
//          selected-clock enable on each thruster line, for every clock selection.
// thr_ored_sts is compared with the OR of thr_out on every clock.
module tb_tdi;
  import tdm_pkg::*;
  logic              clk = 1'b0, por = 1'b1, wr = 1'b0;
  logic [NUM_CS-1:0] csn = '1;
  logic [15:0]       inbus = '0;
  ticks_t            ticks;
  clk_sel_e          cs = CLKSEL_1K;
  logic              sel_thr = 1'b1, ten = 1'b0;
  logic              sel_tick, thr_en, ored;
  logic [15:0]       thr_out;
  int                checks = 0, failures = 0, cyc = 0;

  always #500 clk = ~clk;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    ticks       <= '0;
    ticks.t1k   <= (cyc % 1000) == 999;
    ticks.t500  <= (cyc % 2000) == 1999;
    ticks.t250  <= (cyc % 4000) == 3999;
    ticks.t125  <= (cyc % 8000) == 7999;
  end

  tdi dut (.clk(clk), .por(por), .wr_stb(wr), .csn(csn), .inbus(inbus), .ticks(ticks),
           .clk_sel(cs), .sel_thr(sel_thr), .thr_timer_en(ten), .sel_tick(sel_tick),
           .thr_out(thr_out), .thr_en(thr_en), .thr_ored_sts(ored));

  always @(negedge clk)
    if (!por && ored !== |thr_out) begin
      failures++;
      $display("FAIL thr_ored_sts %b for thr_out %h", ored, thr_out);
    end

  initial begin
    #3_000_000_000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic write(input int k, input logic [15:0] d);
    csn = '1; csn[k] = 1'b0; inbus = d; wr = 1'b1;
    @(negedge clk);
    wr = 1'b0; csn = '1; inbus = 16'($urandom);
  endtask

  initial begin
    logic [15:0] w, words [16];
    int          t0, len, dur;
    repeat (3) @(negedge clk);
    por = 1'b0;
    // direct mode
    sel_thr = 1'b1;
    repeat (20) begin
      w = 16'($urandom);
      write(CS_DIRECT, w);
      @(negedge clk);
      checks++;
      if (thr_out !== w) begin failures++; $display("FAIL direct %h got %h", w, thr_out); end
    end
    // timer mode
    sel_thr = 1'b0; ten = 1'b1;
    for (int n = 0; n < 4; n++) begin
      dur = (n == 0) ? 14 : $urandom_range(1, 40);
      w   = 16'($urandom) | 16'h1;
      write(CS_DIRECT, w);
      repeat ($urandom_range(0, 999)) @(negedge clk);
      write(CS_TIMER, 16'(dur));
      @(negedge clk);
      t0 = cyc;
      checks++;
      if (!thr_en || thr_out !== w) begin failures++; $display("FAIL timer start: en %b out %h", thr_en, thr_out); end
      while (thr_en && cyc - t0 < 100_000) @(negedge clk);
      len = cyc - t0;
      @(negedge clk);
      checks++;
      if (len <= (dur - 1) * 1000 || len > dur * 1000 || thr_out !== 16'h0) begin
        failures++;
        $display("FAIL timer %0d ms: on for %0d clocks, then %h", dur, len, thr_out);
      end
    end
    // serial mode, every clock selection
    ten = 1'b0;
    for (int c = 0; c < 4; c++) begin
      cs = clk_sel_e'(c);
      for (int i = 0; i < 16; i++) begin
        words[i] = (i == 0) ? 16'h9F15 : 16'($urandom);
        write(CS_PSC0 + i, words[i]);
      end
      for (int b = 15; b >= 0; b--) begin
        while (!sel_tick) @(negedge clk);
        @(negedge clk);
        @(negedge clk);
        for (int i = 0; i < 16; i++) begin
          checks++;
          if (thr_out[i] !== words[i][b]) begin
            failures++;
            $display("FAIL serial sel %0d line %0d bit %0d", c, i, b);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
