// tb_input_port: fills every source with random data and reads all 32 addresses of ia[4:0]
// with and without rden1, checking each against the address map worked out here.
module tb_input_port;
  import tdm_pkg::*;
  logic                      rden1;
  logic [4:0]                ia;
  logic [NUM_SDC-1:0][15:0]  sdc;
  logic [NUM_HIS-1:0][15:0]  his;
  logic [NUM_THR-1:0]        sts;
  status_t                   status;
  logic [SPARE_IN_W-1:0]     spare;
  logic [15:0]               dout, exp;
  int                        checks = 0, failures = 0;

  input_port dut (.rden1(rden1), .ia(ia), .sdc_word(sdc), .his_word(his), .thr_sts(sts),
                  .status(status), .spare_in(spare), .dout(dout));

  initial begin
    #100_000_000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < 20; r++) begin
      foreach (sdc[i]) sdc[i] = 16'($urandom);
      foreach (his[i]) his[i] = 16'($urandom);
      sts    = 16'($urandom);
      status = status_t'(16'($urandom));
      spare  = {4'($urandom), 32'($urandom)};
      for (int a = 0; a < 32; a++)
        for (int e = 0; e < 2; e++) begin
          ia = 5'(a); rden1 = 1'(e);
          #1;
          if (!rden1 || a > 30) exp = '0;
          else if (a < 18)      exp = sdc[a];
          else if (a < 26)      exp = his[a - 18];
          else if (a == 26)     exp = sts;
          else if (a == 27)     exp = spare[15:0];
          else if (a == 28)     exp = 16'(status);
          else if (a == 29)     exp = spare[31:16];
          else                  exp = {12'd0, spare[35:32]};
          checks++;
          if (dout !== exp) begin
            failures++;
            $display("FAIL ia=%0d rden1=%b: %h expected %h", a, rden1, dout, exp);
          end
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
