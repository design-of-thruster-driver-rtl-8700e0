// cmd_gen: internal command decoding. Each of the two links (the two interchangeable BMU ports)
// has a command word: bit 9 starts a pulse, bits 11:10 choose its width (monogen), bits 8:3
// must be zero to qualify it and bits 2:0 choose one of eight commands through a 3-to-8 decoder.
// The two decoders are ORed, so either link can issue any command. Output bits, in order:
// BMU1Blk1On, BMU1Blk2On, BMU2Blk1On, BMU2Blk2On, BMU1Blk1Off, BMU1Blk2Off, BMU2Blk1Off,
// BMU2Blk2Off. The structure and the output names follow the published design; reading "bits 8:3
// all zero" as the qualifier is this design's interpretation. The decoders are combinational on
// the pulse and the live command bits, so a command lasts exactly as long as its pulse.
module cmd_gen (
  input  logic        clk,
  input  logic        por,
  input  logic        tick_1k,
  input  logic [11:0] l1cmd,
  input  logic [11:0] l2cmd,
  output logic [7:0]  cmd_out
);
  logic       pulse1, pulse2;
  logic       en1, en2;
  logic [7:0] dec1, dec2;

  monogen u_link1 (.clk(clk), .por(por), .tick_1k(tick_1k), .startp(l1cmd[9]),
                   .monosel(l1cmd[11:10]), .pulse_out(pulse1));
  monogen u_link2 (.clk(clk), .por(por), .tick_1k(tick_1k), .startp(l2cmd[9]),
                   .monosel(l2cmd[11:10]), .pulse_out(pulse2));

  assign en1 = pulse1 & (l1cmd[8:3] == 6'd0);
  assign en2 = pulse2 & (l2cmd[8:3] == 6'd0);

  assign dec1 = en1 ? (8'd1 << l1cmd[2:0]) : 8'd0;
  assign dec2 = en2 ? (8'd1 << l2cmd[2:0]) : 8'd0;

  assign cmd_out = dec1 | dec2;
endmodule
