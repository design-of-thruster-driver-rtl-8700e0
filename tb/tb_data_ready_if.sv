// tb_data_ready_if: sends pulses of random width on six data-ready inputs. A pulse high for at
// least 188 clocks (187.5 us at 1 MHz, plus synchroniser margin checked below) must set its
// latch, one of 187 clocks or fewer must not; a set latch holds through further pulses until
// dt_clr, and stays clear while dt_clr is high. Includes 1EH on all six, as one word.
module tb_data_ready_if;
  localparam int N = 6;
  logic         clk = 1'b0, por = 1'b1;
  logic [N-1:0] rdy = '0, clr = '0, lat;
  logic [N-1:0] exp_lat = '0;
  int           checks = 0, failures = 0;

  always #500 clk = ~clk;

  data_ready_if dut (.clk(clk), .por(por), .dt_rdy(rdy), .dt_clr(clr), .drdy_lat(lat));

  initial begin
    #3_000_000_000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // pulse channel mask m for w clocks, then let it settle
  task automatic pulse(input logic [N-1:0] m, input int w);
    rdy = m;
    repeat (w) @(negedge clk);
    rdy = '0;
    repeat (5) @(negedge clk);
  endtask

  initial begin
    int w;
    logic [N-1:0] m;
    repeat (3) @(negedge clk);
    por = 1'b0;
    // the example word 1EH: long pulse sets bits 4:1
    pulse(6'h1E, 300);
    exp_lat = 6'h1E;
    checks++;
    if (lat !== exp_lat) begin failures++; $display("FAIL 1EH latched as %h", lat); end
    for (int n = 0; n < 80; n++) begin
      m = 6'($urandom);
      w = (n % 3 == 0) ? $urandom_range(1, 187) : (n % 3 == 1) ? $urandom_range(188, 400)
                        : $urandom_range(180, 195);
      pulse(m, w);
      if (w >= 188) exp_lat |= m;
      checks++;
      if (lat !== exp_lat) begin
        failures++;
        $display("FAIL pulse %h width %0d: latches %h expected %h", m, w, lat, exp_lat);
      end
      if (n % 7 == 6) begin
        m = 6'($urandom);
        clr = m;
        // a pulse while cleared is not latched on the cleared channels, but is on the others
        pulse(6'h3F, 250);
        clr = '0;
        @(negedge clk);
        exp_lat = (exp_lat | 6'h3F) & ~m;
        checks++;
        if (lat !== exp_lat) begin
          failures++;
          $display("FAIL clear %h: latches %h expected %h", m, lat, exp_lat);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
