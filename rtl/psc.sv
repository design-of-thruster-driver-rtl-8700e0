// psc: parallel-to-serial converter of one thruster line in serial mode. A 16-bit word is loaded
// on the write enable and shifted out MSB first, one bit per shift enable, through a 17th
// flip-flop that drives ser_out (master-slave: the shift register is the master, the output
// flip-flop the slave). Zeros are shifted in behind the word, so the line returns to 0 after 16
// shifts. A load has priority over a shift. The 17-bit array, the left shift and the grounded
// serial input follow the published design; the load priority is this design's choice.
// ser_out takes bit 15 of the word at the first shift enable after the load.
module psc #(
  parameter int unsigned W = 16
) (
  input  logic         clk,
  input  logic         por,
  input  logic         load,
  input  logic [W-1:0] data,
  input  logic         shift,
  output logic         ser_out
);
  logic [W-1:0] sr;

  always_ff @(posedge clk or posedge por) begin
    if (por) begin
      sr      <= '0;
      ser_out <= 1'b0;
    end else if (load) begin
      sr <= data;
    end else if (shift) begin
      ser_out <= sr[W-1];
      sr      <= {sr[W-2:0], 1'b0};
    end
  end
endmodule
