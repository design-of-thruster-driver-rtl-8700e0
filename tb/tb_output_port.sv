// tb_output_port: issues 400 random writes to random chip selects and keeps a reference copy of
// every register; after each write all outputs must match it. Writes without the strobe, or to
// chip selects the port does not own, must change nothing.
module tb_output_port;
  import tdm_pkg::*;
  logic                   clk = 1'b0, por = 1'b1, wr_stb = 1'b0;
  logic [NUM_CS-1:0]      csn = '1;
  logic [15:0]            inbus = '0;
  logic [11:0]            l1, l2;
  ctrl_t                  ctrl;
  logic [SPARE_OUT_W-1:0] spare;
  logic [11:0]            r_l1 = '0, r_l2 = '0;
  logic [15:0]            r_ctrl = '0;
  logic [63:0]            r_sp = '0;
  int                     checks = 0, failures = 0;

  always #500 clk = ~clk;

  output_port dut (.clk(clk), .por(por), .wr_stb(wr_stb), .csn(csn), .inbus(inbus),
                   .l1cmd(l1), .l2cmd(l2), .ctrl(ctrl), .spare_out(spare));

  initial begin
    #1_000_000_000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int k;
    logic strobe;
    repeat (2) @(negedge clk);
    por = 1'b0;
    repeat (400) begin
      k      = $urandom_range(0, NUM_CS - 1);
      strobe = ($urandom_range(0, 4) != 0);
      inbus  = 16'($urandom);
      csn    = '1;
      csn[k] = 1'b0;
      wr_stb = strobe;
      @(negedge clk);
      wr_stb = 1'b0;
      if (strobe) begin
        if (k == CS_L1CMD) r_l1 = inbus[11:0];
        if (k == CS_L2CMD) r_l2 = inbus[11:0];
        if (k == CS_CTRL)  r_ctrl = inbus;
        if (k >= CS_SPARE0 && k < CS_SPARE0 + 4) r_sp[16*(k - CS_SPARE0) +: 16] = inbus;
      end
      checks++;
      if (l1 !== r_l1 || l2 !== r_l2 || 16'(ctrl) !== r_ctrl || spare !== r_sp[SPARE_OUT_W-1:0]) begin
        failures++;
        $display("FAIL after write cs=%0d strobe=%b", k, strobe);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
