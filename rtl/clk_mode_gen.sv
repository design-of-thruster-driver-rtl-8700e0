// clk_mode_gen: derives every slower rate of the module from the 1 MHz clock.
// A divide-by-25 counter gives 40 kHz and a toggle on it 20 kHz; a divide-by-1000 counter gives
// 1 kHz and a 3-bit counter on that gives 500, 250 and 125 Hz; a 4-bit counter on the 40 kHz
// ticks gives the mode pulse once every 16 clocks of 40 kHz. Each rate comes out twice: as a
// square wave (clk_*), to be sent off the module to the serial-data subsystems, and as a one
// clock wide enable (ticks.*) on the cycle in which the square wave rises, for the logic inside.
// The rates and the mode period of 16 clocks follow the published design; the counter
// arrangement, the 12/13 duty cycle of the odd 40 kHz division and the shape of the mode output
// (high for the whole 16th 40 kHz period) are this design's choices.
module clk_mode_gen #(
  parameter int unsigned CLK_HZ = tdm_pkg::CLK_HZ
) (
  input  logic            clk,
  input  logic            por,
  output tdm_pkg::ticks_t ticks,
  output logic            clk_40k,
  output logic            clk_20k,
  output logic            clk_1k,
  output logic            clk_500,
  output logic            clk_250,
  output logic            clk_125,
  output logic            mode
);
  localparam int unsigned DIV40 = CLK_HZ / 40_000;
  localparam int unsigned DIV1K = CLK_HZ / 1_000;

  logic [$clog2(DIV40)-1:0] c40;
  logic [$clog2(DIV1K)-1:0] c1k;
  logic [2:0]               c8;
  logic [3:0]               c16;
  logic                     t20;
  logic                     w40, w1k;

  assign w40 = (c40 == $bits(c40)'(DIV40 - 1));
  assign w1k = (c1k == $bits(c1k)'(DIV1K - 1));

  always_ff @(posedge clk or posedge por) begin
    if (por) begin
      c40 <= '0; c1k <= '0; c8 <= '0; c16 <= '0; t20 <= 1'b0;
      ticks <= '0;
      clk_40k <= 1'b0; clk_1k <= 1'b0; mode <= 1'b0;
    end else begin
      c40 <= w40 ? '0 : c40 + 1'b1;
      c1k <= w1k ? '0 : c1k + 1'b1;
      if (w40) begin
        t20 <= ~t20;
        c16 <= c16 + 1'b1;
      end
      if (w1k) c8 <= c8 + 1'b1;
      // enables coincide with the rising edge of the matching square wave
      ticks.t40k  <= w40;
      ticks.t20k  <= w40 & ~t20;
      ticks.t1k   <= w1k;
      ticks.t500  <= w1k & (c8[0]   == 1'b0);
      ticks.t250  <= w1k & (c8[1:0] == 2'b01);
      ticks.t125  <= w1k & (c8      == 3'b011);
      ticks.tmode <= w40 & (c16     == 4'd14);
      // square waves are registered copies of "next count in the first half of the period"
      clk_40k <= w40 || (c40 < $bits(c40)'(DIV40 / 2 - 1));
      clk_1k  <= w1k || (c1k < $bits(c1k)'(DIV1K / 2 - 1));
      mode    <= w40 ? (c16 == 4'd14) : (c16 == 4'd15);
    end
  end

  assign clk_20k = t20;
  assign clk_500 = c8[0];
  assign clk_250 = c8[1];
  assign clk_125 = c8[2];
endmodule
