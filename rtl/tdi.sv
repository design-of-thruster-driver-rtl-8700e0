// tdi: thruster driver interface, driving NTHR thruster lines in one of three modes.
//  Direct: the word written at 0100H is latched and drives the thrusters as it stands.
//  Timer:  the word written at 0108H is a duration in 1 kHz clocks; a 16-bit counter holds
//          thren high for that many clocks and the latched direct word is ANDed with thren.
//  Serial: the words written at 0109H..0118H load one parallel-to-serial converter per thruster,
//          which shifts its word out MSB first on the selected clock (1 kHz, 2, 4 or 8 ms).
// sel_thr=1 picks direct mode; otherwise thr_timer_en picks timer (1) or serial (0) mode. The
// chosen word is registered before it leaves the block (one clock of latency), and thr_ored_sts
// is the OR of the registered lines. sel_tick, the selected clock as a one-cycle enable, is also
// given to the history monitor. The modes, the chip selects, the ANDing logic, the two
// multiplexers and the clock choices follow the published design. A timer duration of d gives an
// on-time between d-1 and d ms because the 1 kHz clock runs free; writing 0 stops the timer.
// The order of the clock-select codes and the output register are this design's choices.
module tdi
  import tdm_pkg::*;
#(
  parameter int unsigned NTHR = tdm_pkg::NUM_THR
) (
  input  logic              clk,
  input  logic              por,
  input  logic              wr_stb,
  input  logic [NUM_CS-1:0] csn,
  input  logic [15:0]       inbus,
  input  ticks_t            ticks,
  input  clk_sel_e          clk_sel,
  input  logic              sel_thr,
  input  logic              thr_timer_en,
  output logic              sel_tick,
  output logic [NTHR-1:0]   thr_out,
  output logic              thr_en,
  output logic              thr_ored_sts
);
  logic [NTHR-1:0] thr_out_int;   // direct latch
  logic [15:0]     tval, tcnt;    // timer value and count
  logic            thren;
  logic [NTHR-1:0] throut;        // direct word gated by the timer
  logic [NTHR-1:0] thr_serout;    // serial-mode lines
  logic [NTHR-1:0] thr_dump_out;

  always_comb
    unique case (clk_sel)
      CLKSEL_1K:  sel_tick = ticks.t1k;
      CLKSEL_2MS: sel_tick = ticks.t500;
      CLKSEL_4MS: sel_tick = ticks.t250;
      CLKSEL_8MS: sel_tick = ticks.t125;
    endcase

  always_ff @(posedge clk or posedge por) begin
    if (por) begin
      thr_out_int <= '0;
      tval        <= '0;
      tcnt        <= '0;
      thren       <= 1'b0;
    end else begin
      if (wr_stb && !csn[CS_DIRECT]) thr_out_int <= inbus[NTHR-1:0];
      if (wr_stb && !csn[CS_TIMER]) begin
        tval  <= inbus;
        tcnt  <= '0;
        thren <= (inbus != 16'd0);
      end else if (thren && ticks.t1k) begin
        if (tcnt + 16'd1 == tval) thren <= 1'b0;
        tcnt <= tcnt + 16'd1;
      end
    end
  end

  assign throut = thr_out_int & {NTHR{thren}};

  for (genvar i = 0; i < NTHR; i++) begin : g_psc
    psc #(.W(16)) u_psc (
      .clk(clk), .por(por),
      .load(wr_stb & ~csn[CS_PSC0 + i]),
      .data(inbus),
      .shift(sel_tick),
      .ser_out(thr_serout[i])
    );
  end

  assign thr_dump_out = thr_timer_en ? throut : thr_serout;

  always_ff @(posedge clk or posedge por)
    if (por) thr_out <= '0;
    else     thr_out <= sel_thr ? thr_out_int : thr_dump_out;

  assign thr_ored_sts = |thr_out;
  assign thr_en       = thren;

  // the timer never runs without a duration, and the gated word only exists while it runs
  a_timer: assert property (@(posedge clk) disable iff (por) thren |-> tval != 16'd0);
  a_gate:  assert property (@(posedge clk) disable iff (por) !thren |-> throut == '0);
endmodule
