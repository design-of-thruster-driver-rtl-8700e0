// io_decoder: address decoder of the processor I/O bus. An I/O cycle is one with IO_DIS low and
// M_ION low (I/O rather than memory). In such a cycle an address 0100H + k, k = 0..24, pulls
// chip select csn[k] low; output-port registers use these with the write strobe. Reads use the
// same addresses, told apart only by rdn/wrn: rden1 is high while rdn is low on an input-port
// address, 0100H..011EH, the 31 words of the input-port multiplexer. The chip selects, their
// active-low sense and the 0100H..0118H range follow the published design; the polarity of IO_DIS
// and M_ION, the active-high rden1 and its wider 011EH end are this design's choices.
// Purely combinational.
module io_decoder
  import tdm_pkg::*;
(
  input  logic              io_dis,
  input  logic              m_ion,
  input  logic              rdn,
  input  logic [11:0]       ia,
  output logic [NUM_CS-1:0] csn,
  output logic              rden1
);
  logic        io_cycle;
  logic [11:0] offset;

  assign io_cycle = ~io_dis & ~m_ion;
  assign offset   = ia - IO_BASE;

  always_comb begin
    csn = '1;
    if (io_cycle && ia >= IO_BASE && offset < 12'(NUM_CS))
      csn[offset[4:0]] = 1'b0;
  end

  assign rden1 = io_cycle & ~rdn & (ia >= IO_BASE) & (offset < 12'(NUM_RD));
endmodule
