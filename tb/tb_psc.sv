// tb_psc: loads random words (and 9F15H) and checks that the following 16 shift enables put
// the word on ser_out MSB first, followed by zeros; shift enables arrive at random intervals.
module tb_psc;
  logic        clk = 1'b0, por = 1'b1, load = 1'b0, shift = 1'b0;
  logic [15:0] data = '0;
  logic        so;
  int          checks = 0, failures = 0;

  always #500 clk = ~clk;

  psc dut (.clk(clk), .por(por), .load(load), .data(data), .shift(shift), .ser_out(so));

  initial begin
    #1_000_000_000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] w;
    repeat (3) @(negedge clk);
    por = 1'b0;
    for (int n = 0; n < 40; n++) begin
      w = (n == 0) ? 16'h9F15 : 16'($urandom);
      data = w; load = 1'b1;
      @(negedge clk);
      load = 1'b0; data = 16'($urandom);
      for (int b = 0; b < 20; b++) begin
        repeat ($urandom_range(0, 5)) @(negedge clk);
        shift = 1'b1;
        @(negedge clk);
        shift = 1'b0;
        checks++;
        if (so !== ((b < 16) ? w[15 - b] : 1'b0)) begin
          failures++;
          $display("FAIL word %h bit %0d: ser_out %b", w, b, so);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
