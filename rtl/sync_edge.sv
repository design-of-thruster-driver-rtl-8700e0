// sync_edge: brings an asynchronous trigger (a processor strobe or a command bit) onto the
// 1 MHz clock and turns one chosen edge of it into a pulse one clock period long.
// Three D flip-flops form a master-slave chain: the first samples on the falling clock edge,
// the second on the rising edge and the third on the falling edge again, so q3 is q1 delayed by
// exactly one clock period. For the falling edge the pulse is (not q1) and q3, for the rising
// edge q1 and (not q3). The pulse rises and falls on falling clock edges, so logic clocked on the
// rising edge sees it high at exactly one edge: it is used as a clock enable there, never as a
// clock. The flip-flop chain, the edges each stage uses and the gating follow the published
// technique; the asynchronous active-high power-on reset clears all three stages.
// Ports: clk, por, trig (asynchronous), sync_trig (one period, 1.5 to 2.5 periods after the edge).
module sync_edge #(
  parameter bit RISING = 1'b0   // 0: falling-edge detector, 1: rising-edge detector
) (
  input  logic clk,
  input  logic por,
  input  logic trig,
  output logic sync_trig
);
  logic q1, q2, q3;

  always_ff @(negedge clk or posedge por)
    if (por) q1 <= 1'b0;
    else     q1 <= trig;

  always_ff @(posedge clk or posedge por)
    if (por) q2 <= 1'b0;
    else     q2 <= q1;

  always_ff @(negedge clk or posedge por)
    if (por) q3 <= 1'b0;
    else     q3 <= q2;

  assign sync_trig = RISING ? (q1 & ~q3) : (~q1 & q3);

  // a synchronised pulse is seen at one rising clock edge only
  a_one_clock: assert property (@(posedge clk) disable iff (por) sync_trig |=> !sync_trig);
endmodule
