// monogen: pulse-command generator of one link. The falling edge of the start bit (bit 9 of
// the link's command word) is synchronised to the 1 MHz clock by sync_edge and starts a pulse
// whose length is chosen by the two select bits (bits 11:10): 00 -> 16 ms, 01 -> 64 ms,
// 10 -> 128 ms, 11 -> 256 ms. An 8-bit counter counts the 1 kHz enables while the pulse is high
// and ends it on the Nth one, so the pulse lasts between N-1 and N ms depending on the phase of
// the free-running 1 kHz clock. A new start edge during a pulse restarts it.
// The four widths, the start bit, the select bits, the 8-bit counter and the 1 kHz clock follow
// the published design; the select-code order, the restart rule and the free-running 1 kHz phase
// are this design's choices.
module monogen (
  input  logic       clk,
  input  logic       por,
  input  logic       tick_1k,    // one-cycle 1 kHz enable
  input  logic       startp,     // command bit 9
  input  logic [1:0] monosel,    // command bits 11:10
  output logic       pulse_out
);
  logic       start;
  logic [7:0] cnt;
  logic [7:0] last;

  sync_edge #(.RISING(1'b0)) u_sync (.clk(clk), .por(por), .trig(startp), .sync_trig(start));

  // index of the final 1 kHz enable of the pulse
  always_comb
    unique case (monosel)
      2'b00: last = 8'd15;
      2'b01: last = 8'd63;
      2'b10: last = 8'd127;
      2'b11: last = 8'd255;
    endcase

  always_ff @(posedge clk or posedge por) begin
    if (por) begin
      pulse_out <= 1'b0;
      cnt       <= '0;
    end else if (start) begin
      pulse_out <= 1'b1;
      cnt       <= '0;
    end else if (pulse_out && tick_1k) begin
      if (cnt == last) pulse_out <= 1'b0;
      cnt <= cnt + 1'b1;
    end
  end

  // a pulse only starts on a synchronised start edge
  a_start: assert property (@(posedge clk) disable iff (por) $rose(pulse_out) |-> $past(start));
endmodule
