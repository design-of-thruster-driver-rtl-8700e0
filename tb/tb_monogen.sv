// tb_monogen: gives a 1 kHz enable every 1000 clocks of a 1 MHz clock and fires each of the four
// widths several times from random phases. The pulse must start 1 to 3 clocks after the falling
// edge of the start bit and last more than (N-1) ms and at most N ms plus the start delay, for
// N = 16, 64, 128, 256. A restart during a pulse is also checked.
module tb_monogen;
  logic       clk = 1'b0, por = 1'b1, tick = 1'b0, startp = 1'b0;
  logic [1:0] sel = '0;
  logic       pulse;
  int         checks = 0, failures = 0, cyc = 0;

  always #500 clk = ~clk;
  always @(posedge clk) begin
    cyc  <= cyc + 1;
    tick <= ((cyc % 1000) == 999);
  end

  monogen dut (.clk(clk), .por(por), .tick_1k(tick), .startp(startp), .monosel(sel),
               .pulse_out(pulse));

  initial begin
    #3_000_000_000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic fire(input logic [1:0] s, input int wait_ms, output int width, output int delay);
    int t0;
    sel    = s;
    startp = 1'b1;
    repeat ($urandom_range(3, 2000)) @(negedge clk);
    startp = 1'b0;
    t0     = cyc;
    while (!pulse) @(negedge clk);
    delay = cyc - t0;
    t0    = cyc;
    while (pulse && (cyc - t0) < wait_ms * 1000) @(negedge clk);
    width = cyc - t0;
  endtask

  initial begin
    int n, w, d;
    repeat (3) @(negedge clk);
    por = 1'b0;
    for (int s = 0; s < 4; s++)
      repeat (3) begin
        n = (s == 0) ? 16 : (s == 1) ? 64 : (s == 2) ? 128 : 256;
        fire(2'(s), 300, w, d);
        checks++;
        if (d < 1 || d > 3 || w <= (n - 1) * 1000 || w > n * 1000) begin
          failures++;
          $display("FAIL width code %0d: delay %0d, width %0d clocks", s, d, w);
        end
      end
    // restart: start a 64 ms pulse, after 30 ms start a 16 ms one: the pulse ends 15-16 ms later
    fire(2'b01, 30, w, d);
    checks++;
    if (!pulse) begin failures++; $display("FAIL pulse ended before restart"); end
    fire(2'b00, 300, w, d);
    checks++;
    if (w <= 15_000 || w > 16_000) begin failures++; $display("FAIL restart width %0d", w); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
