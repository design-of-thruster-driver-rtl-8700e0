// tb_sync_edge: drives an asynchronous trigger with random high and low times and random
// sub-clock offsets into a rising-edge and a falling-edge sync_edge. Each edge of the trigger
// must give exactly one clock-wide pulse, seen at one rising clock edge, within two rising
// edges of the trigger edge; no pulse may appear otherwise.
module tb_sync_edge;
  logic clk = 1'b0, por = 1'b1, trig = 1'b0;
  logic p_rise, p_fall;
  int   checks = 0, failures = 0;
  int   n_rise = 0, n_fall = 0, edges = 0;
  int   since_rise = 99, since_fall = 99;

  always #5 clk = ~clk;

  sync_edge #(.RISING(1'b1)) dut_r (.clk(clk), .por(por), .trig(trig), .sync_trig(p_rise));
  sync_edge #(.RISING(1'b0)) dut_f (.clk(clk), .por(por), .trig(trig), .sync_trig(p_fall));

  // count rising clock edges since the last trigger edge of each kind
  always @(posedge trig) since_rise = 0;
  always @(negedge trig) since_fall = 0;

  always @(posedge clk) begin
    if (!por) begin
      since_rise++; since_fall++;
      if (p_rise) begin
        n_rise++; checks++;
        if (since_rise > 2) begin
          failures++; $display("FAIL rising pulse %0d clocks after edge", since_rise);
        end
        since_rise = 99;
      end
      if (p_fall) begin
        n_fall++; checks++;
        if (since_fall > 2) begin
          failures++; $display("FAIL falling pulse %0d clocks after edge", since_fall);
        end
        since_fall = 99;
      end
    end
  end

  initial begin
    #200_000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #23 por = 1'b0;
    #40;
    repeat (60) begin
      #(20 + $urandom_range(0, 40) + $urandom_range(0, 9)) trig = 1'b1;
      #(20 + $urandom_range(0, 40) + $urandom_range(0, 9)) trig = 1'b0;
      edges++;
    end
    #100;
    checks += 2;
    if (n_rise != edges) begin failures++; $display("FAIL %0d rising pulses for %0d edges", n_rise, edges); end
    if (n_fall != edges) begin failures++; $display("FAIL %0d falling pulses for %0d edges", n_fall, edges); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
