// tb_cmd_gen: issues commands on both links. For each command the tb checks that exactly the
// decoded output (one-hot of bits 2:0) goes high 1-3 clocks after bit 9 falls, stays high for
// the selected width (16 ms here, plus one 64 ms case), and that a command with a non-zero
// bits 8:3 produces nothing. Two commands on different links at once must appear ORed.
module tb_cmd_gen;
  logic        clk = 1'b0, por = 1'b1, tick = 1'b0;
  logic [11:0] l1 = '0, l2 = '0;
  logic [7:0]  cmd;
  int          checks = 0, failures = 0, cyc = 0;

  always #500 clk = ~clk;
  always @(posedge clk) begin
    cyc  <= cyc + 1;
    tick <= ((cyc % 1000) == 999);
  end

  cmd_gen dut (.clk(clk), .por(por), .tick_1k(tick), .l1cmd(l1), .l2cmd(l2), .cmd_out(cmd));

  initial begin
    #3_000_000_000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // measure how long cmd equals exp after the start edge
  task automatic measure(input logic [7:0] exp, output int delay, output int width);
    int t0 = cyc;
    while (cmd == 8'd0 && cyc - t0 < 10) @(negedge clk);
    delay = cyc - t0;
    t0 = cyc;
    while (cmd == exp && cyc - t0 < 300_000) @(negedge clk);
    width = cyc - t0;
    checks++;
    if (cmd != 8'd0) begin failures++; $display("FAIL cmd %b after pulse, expected 0", cmd); end
  endtask

  initial begin
    int d, w;
    logic [2:0] c;
    logic       link;
    repeat (3) @(negedge clk);
    por = 1'b0;
    repeat (12) begin
      c = 3'($urandom);
      link = 1'($urandom);
      if (link) l2 = {2'b00, 1'b1, 6'd0, c}; else l1 = {2'b00, 1'b1, 6'd0, c};
      repeat ($urandom_range(2, 900)) @(negedge clk);
      if (link) l2[9] = 1'b0; else l1[9] = 1'b0;
      measure(8'd1 << c, d, w);
      checks++;
      if (d < 1 || d > 3 || w <= 15_000 || w > 16_000) begin
        failures++;
        $display("FAIL link %0d cmd %0d: delay %0d width %0d", link + 1, c, d, w);
      end
    end
    // 64 ms on link 1, command 5
    l1 = {2'b01, 1'b1, 6'd0, 3'd5};
    repeat (10) @(negedge clk);
    l1[9] = 1'b0;
    measure(8'b0010_0000, d, w);
    checks++;
    if (w <= 63_000 || w > 64_000) begin failures++; $display("FAIL 64 ms width %0d", w); end
    // qualifier: bits 8:3 non-zero gives no command
    l1 = {2'b00, 1'b1, 6'b000100, 3'd2};
    repeat (10) @(negedge clk);
    l1[9] = 1'b0;
    repeat (20_000) begin
      @(negedge clk);
      if (cmd != 8'd0) break;
    end
    checks++;
    if (cmd != 8'd0) begin failures++; $display("FAIL unqualified command issued"); end
    // both links at once: outputs ORed
    l1 = {2'b00, 1'b1, 6'd0, 3'd1};
    l2 = {2'b00, 1'b1, 6'd0, 3'd6};
    repeat (10) @(negedge clk);
    l1[9] = 1'b0; l2[9] = 1'b0;
    repeat (5000) @(negedge clk);
    checks++;
    if (cmd != 8'b0100_0010) begin failures++; $display("FAIL ORed commands %b", cmd); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
