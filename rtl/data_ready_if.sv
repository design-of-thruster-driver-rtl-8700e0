// data_ready_if: qualifies and latches the data-ready inputs. Each input passes a two-flip-flop
// synchroniser; a counter then measures how long it has been high without a break. When it has
// been high for QUAL_CYCLES clocks (188 us at 1 MHz, the first whole clock past 187.5 us) the
// channel's latch is set; anything shorter is taken as a glitch and ignored. A pulse sets the
// latch once however long it lasts. The latch holds until the processor, having read it, sets
// the channel's dt_clr bit; while dt_clr is high the latch stays clear. The 187.5 us qualifying
// width, the latching and the clear from the output port follow the published design; the
// six channels are read from the figures; counting 1 MHz clocks instead of 1.5 periods of an
// 8 kHz clock and the active-high input sense are this design's choices.
module data_ready_if #(
  parameter int unsigned N           = tdm_pkg::NUM_DRDY,
  parameter int unsigned QUAL_CYCLES = 188
) (
  input  logic         clk,
  input  logic         por,
  input  logic [N-1:0] dt_rdy,
  input  logic [N-1:0] dt_clr,
  output logic [N-1:0] drdy_lat
);
  localparam int unsigned CW = $clog2(QUAL_CYCLES + 1);

  logic [N-1:0]         s1, s2;
  logic [N-1:0][CW-1:0] hcnt;

  always_ff @(posedge clk or posedge por) begin
    if (por) begin
      s1       <= '0;
      s2       <= '0;
      hcnt     <= '0;
      drdy_lat <= '0;
    end else begin
      s1 <= dt_rdy;
      s2 <= s1;
      for (int i = 0; i < N; i++) begin
        if (!s2[i])                             hcnt[i] <= '0;
        else if (hcnt[i] != CW'(QUAL_CYCLES))   hcnt[i] <= hcnt[i] + 1'b1;
        if (dt_clr[i])                                           drdy_lat[i] <= 1'b0;
        else if (s2[i] && hcnt[i] == CW'(QUAL_CYCLES - 1))       drdy_lat[i] <= 1'b1;
      end
    end
  end
endmodule
