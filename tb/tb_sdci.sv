// tb_sdci: shifts random 16-bit words into all 18 channels, one bit per 40 kHz enable (every 25
// clocks) with a mode enable on every 16th, and checks that each mode leaves each channel's
// last 16 bits, first bit in the MSB, on its output. It then repeats on the second clock/mode
// pair, checks that nothing moves while rdinh is low, and holds the example input 2A7DBH.
module tb_sdci;
  localparam int NCH = 18;
  logic                   clk = 1'b0, por = 1'b1, rdinh = 1'b0, src = 1'b0;
  logic                   ca = 1'b0, ma = 1'b0, cb = 1'b0, mb = 1'b0;
  logic [NCH-1:0]         sd = '0;
  logic [NCH-1:0][15:0]   dout;
  logic [NCH-1:0][15:0]   words;
  int                     checks = 0, failures = 0;

  always #500 clk = ~clk;

  sdci dut (.clk(clk), .por(por), .rdinh(rdinh), .src_sel(src), .sclk_a(ca), .mode_a(ma),
            .sclk_b(cb), .mode_b(mb), .sdig_ch(sd), .dout(dout));

  initial begin
    #1_000_000_000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // send one 16-bit frame per channel on pair p; mode on the 16th clock
  task automatic frame(input bit p);
    for (int i = 0; i < NCH; i++) words[i] = 16'($urandom);
    for (int b = 15; b >= 0; b--) begin
      for (int i = 0; i < NCH; i++) sd[i] = words[i][b];
      repeat (24) @(negedge clk);
      if (p) begin cb = 1'b1; mb = (b == 0); end
      else   begin ca = 1'b1; ma = (b == 0); end
      @(negedge clk);
      {ca, ma, cb, mb} = '0;
    end
  endtask

  initial begin
    logic [NCH-1:0][15:0] held;
    repeat (3) @(negedge clk);
    por = 1'b0;
    rdinh = 1'b1;
    for (int f = 0; f < 10; f++) begin
      src = (f >= 6);
      frame(src);
      for (int i = 0; i < NCH; i++) begin
        checks++;
        if (dout[i] !== words[i]) begin
          failures++;
          $display("FAIL frame %0d ch %0d: %h expected %h", f, i, dout[i], words[i]);
        end
      end
    end
    // the other pair must not act
    src = 1'b0;
    held = dout;
    frame(1'b1);
    checks++;
    if (dout !== held) begin failures++; $display("FAIL unselected pair changed outputs"); end
    // disabled
    rdinh = 1'b0;
    frame(1'b0);
    checks++;
    if (dout !== held) begin failures++; $display("FAIL outputs changed with rdinh low"); end
    // the example input 2A7DBH held on the 18 lines for a whole frame: each word is all ones or
    // all zeros, following its line
    rdinh = 1'b1;
    sd = 18'h2A7DB;
    for (int b = 15; b >= 0; b--) begin
      repeat (24) @(negedge clk);
      ca = 1'b1; ma = (b == 0);
      @(negedge clk);
      {ca, ma} = '0;
    end
    for (int i = 0; i < NCH; i++) begin
      checks++;
      if (dout[i] !== {16{sd[i]}}) begin
        failures++;
        $display("FAIL 2A7DBH channel %0d: %h", i, dout[i]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
