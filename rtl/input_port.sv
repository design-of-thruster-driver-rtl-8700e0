// input_port: the 31:1 read multiplexer onto the 16-bit processor data bus. While rden1 is high
// the word at address 0100H + ia[4:0] is driven on dout, otherwise dout is 0:
//   0100H..0111H  serial digital channel words 0..17
//   0112H..0119H  thruster history words (thrusters 1-2 .. 15-16)
//   011AH         thruster status lines
//   011BH         spare inputs 15:0
//   011CH         status word: thr_ored_sts, thr_en, eight pulse commands, six data-ready latches
//   011DH         spare inputs 31:16
//   011EH         spare inputs 35:32 in bits 3:0
// The 31:1 multiplexer and the kinds of word it carries follow the published design; the address
// of each word is this design's choice. Purely combinational.
module input_port
  import tdm_pkg::*;
(
  input  logic                          rden1,
  input  logic [4:0]                    ia,
  input  logic [NUM_SDC-1:0][15:0]      sdc_word,
  input  logic [NUM_HIS-1:0][15:0]      his_word,
  input  logic [NUM_THR-1:0]            thr_sts,
  input  status_t                       status,
  input  logic [SPARE_IN_W-1:0]         spare_in,
  output logic [15:0]                   dout
);
  logic [NUM_RD-1:0][15:0] words;

  always_comb begin
    for (int k = 0; k < NUM_SDC; k++) words[RD_SDC0 + k] = sdc_word[k];
    for (int k = 0; k < NUM_HIS; k++) words[RD_HIS0 + k] = his_word[k];
    words[RD_THR_STS] = thr_sts;
    words[RD_SPARE0]  = spare_in[15:0];
    words[RD_STATUS]  = status;
    words[RD_SPARE1]  = spare_in[31:16];
    words[RD_SPARE2]  = {12'd0, spare_in[35:32]};
  end

  always_comb
    if (rden1 && ia < 5'(NUM_RD)) dout = words[ia];
    else                          dout = '0;
endmodule
