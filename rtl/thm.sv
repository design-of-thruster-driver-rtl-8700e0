// thm: thruster history monitoring. One 8-bit counter per thruster counts the enables of the
// selected clock while that thruster's status line is high, measuring how long it has fired.
// The falling edge of his_mon_lp, synchronised to the 1 MHz clock by sync_edge, copies all
// counters into the history words, word k = {counter 2k, counter 2k+1}, and restarts them: a
// counter that would count in that same cycle restarts at 1, so no clock is lost. The words hold
// until the next his_mon_lp. Counters wrap at 255. The sixteen 8-bit counters, the pairing into
// 16-bit latches, the synchronised falling edge and the selected clock follow the published
// design; clearing the counters in the latch cycle (rather than a few cycles later) and wrapping
// are this design's choices. thr_sts must already be synchronous to clk.
module thm #(
  parameter int unsigned NTHR = tdm_pkg::NUM_THR
) (
  input  logic                      clk,
  input  logic                      por,
  input  logic                      sel_tick,
  input  logic [NTHR-1:0]           thr_sts,
  input  logic                      his_mon_lp,
  output logic [NTHR/2-1:0][15:0]   hisout
);
  logic                  load;
  logic [NTHR-1:0][7:0]  cnt;

  sync_edge #(.RISING(1'b0)) u_sync (.clk(clk), .por(por), .trig(his_mon_lp), .sync_trig(load));

  always_ff @(posedge clk or posedge por) begin
    if (por) begin
      cnt    <= '0;
      hisout <= '0;
    end else begin
      for (int i = 0; i < NTHR; i++) begin
        if (load)                       cnt[i] <= {7'd0, sel_tick & thr_sts[i]};
        else if (sel_tick && thr_sts[i]) cnt[i] <= cnt[i] + 8'd1;
      end
      if (load)
        for (int k = 0; k < NTHR/2; k++) hisout[k] <= {cnt[2*k], cnt[2*k+1]};
    end
  end
endmodule
