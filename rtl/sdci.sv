// sdci: serial digital channel interface. Each of NCH serial data lines is shifted, MSB first,
// into a 16-bit shift register on the selected shift clock (40 kHz) and the register is copied
// to the channel's parallel output word on the selected mode pulse, which comes once every 16
// shift clocks, so each word holds the last 16 bits received. The block only works while rdinh
// is high; otherwise it holds. Two clock/mode pairs can drive it: src_sel=0 picks pair a (the
// module's own 40 kHz clock and mode), src_sel=1 pair b. When a mode pulse and a shift clock
// coincide the word takes the bit shifted in that cycle. All inputs are one-cycle enables of the
// 1 MHz clock; a word changes one cycle after its mode enable. The 18 channels, the 40 kHz shift
// clock, the strobe every 16 pulses and the rdinh enable follow the published design; the bit
// order and the selection between two clock/mode pairs are this design's reading of it.
module sdci #(
  parameter int unsigned NCH = tdm_pkg::NUM_SDC,
  parameter int unsigned W   = 16
) (
  input  logic               clk,
  input  logic               por,
  input  logic               rdinh,
  input  logic               src_sel,
  input  logic               sclk_a,
  input  logic               mode_a,
  input  logic               sclk_b,
  input  logic               mode_b,
  input  logic [NCH-1:0]     sdig_ch,
  output logic [NCH-1:0][W-1:0] dout
);
  logic                 sel_clk, sel_mode;
  logic [NCH-1:0][W-1:0] sh, sh_next;

  assign sel_clk  = src_sel ? sclk_b : sclk_a;
  assign sel_mode = src_sel ? mode_b : mode_a;

  always_comb
    for (int i = 0; i < NCH; i++)
      sh_next[i] = sel_clk ? {sh[i][W-2:0], sdig_ch[i]} : sh[i];

  always_ff @(posedge clk or posedge por) begin
    if (por) begin
      sh   <= '0;
      dout <= '0;
    end else if (rdinh) begin
      sh <= sh_next;
      if (sel_mode) dout <= sh_next;
    end
  end
endmodule
