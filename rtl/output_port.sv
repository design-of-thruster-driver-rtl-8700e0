// output_port: the processor-written registers of the module. On the synchronised write strobe
// (one 1 MHz clock wide, see sync_edge) the word on inbus goes into the register whose chip select
// is low: 0101H link-1 command word, 0102H link-2 command word, 0103H control word (ctrl_t),
// 0104H..0107H the 59 spare output lines, 16 bits at a time. The link command words and the
// spare output lines are named by the published design; which address holds which register and
// the control-word layout are this design's own. All registers clear at power-on reset.
// Timing: a register changes at the rising clock edge on which wr_stb is high.
module output_port
  import tdm_pkg::*;
(
  input  logic                   clk,
  input  logic                   por,
  input  logic                   wr_stb,
  input  logic [NUM_CS-1:0]      csn,
  input  logic [15:0]            inbus,
  output logic [11:0]            l1cmd,
  output logic [11:0]            l2cmd,
  output ctrl_t                  ctrl,
  output logic [SPARE_OUT_W-1:0] spare_out
);
  logic [63:0] spare_q;

  always_ff @(posedge clk or posedge por) begin
    if (por) begin
      l1cmd   <= '0;
      l2cmd   <= '0;
      ctrl    <= '0;
      spare_q <= '0;
    end else if (wr_stb) begin
      if (!csn[CS_L1CMD]) l1cmd <= inbus[11:0];
      if (!csn[CS_L2CMD]) l2cmd <= inbus[11:0];
      if (!csn[CS_CTRL])  ctrl  <= ctrl_t'(inbus);
      for (int w = 0; w < 4; w++)
        if (!csn[CS_SPARE0 + w]) spare_q[16*w +: 16] <= inbus;
    end
  end

  // the decoder never selects two registers at once
  a_one_cs: assert property (@(posedge clk) disable iff (por) wr_stb |-> $countones(~csn) <= 1);

  assign spare_out = spare_q[SPARE_OUT_W-1:0];
endmodule
