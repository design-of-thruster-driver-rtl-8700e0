// tb_io_decoder: walks every 12-bit address with every combination of io_dis, m_ion and rdn and
// compares the chip selects and rden1 with a reference worked out here: exactly one chip select
// low for 0100H..0118H in an I/O cycle, none otherwise; rden1 for reads of 0100H..011EH.
module tb_io_decoder;
  import tdm_pkg::*;
  logic              io_dis, m_ion, rdn;
  logic [11:0]       ia;
  logic [NUM_CS-1:0] csn, exp_csn;
  logic              rden1, exp_rd;
  int                checks = 0, failures = 0;

  io_decoder dut (.io_dis(io_dis), .m_ion(m_ion), .rdn(rdn), .ia(ia), .csn(csn), .rden1(rden1));

  initial begin
    #100_000_000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int c = 0; c < 8; c++)
      for (int a = 0; a < 4096; a++) begin
        {io_dis, m_ion, rdn} = 3'(c);
        ia = 12'(a);
        #1;
        exp_csn = '1;
        if (!io_dis && !m_ion && a >= 'h100 && a <= 'h118) exp_csn[a - 'h100] = 1'b0;
        exp_rd = !io_dis && !m_ion && !rdn && a >= 'h100 && a <= 'h11E;
        checks++;
        if (csn !== exp_csn || rden1 !== exp_rd) begin
          failures++;
          if (failures < 10)
            $display("FAIL ia=%h dis=%b m=%b rdn=%b csn=%h exp %h rden1=%b exp %b",
                     ia, io_dis, m_ion, rdn, csn, exp_csn, rden1, exp_rd);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
