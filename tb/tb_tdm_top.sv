// tb_tdm_top: end-to-end test of the whole thruster driver module at its default sizes, driven
// only through its pins, as the processor and the outside subsystems would. Every register is
// written with a real wrn strobe (address and data held 4 us) and read back through the
// decoder and the 31:1 read multiplexer. In turn it runs:
//   direct, timer (000EH = 14 ms) and serial (9F15H on thruster 1) thruster modes;
//   a 256 ms command on link 1 and a 16 ms one on link 2, measured on bmu_cmd;
//   serial digital frames on all 18 channels, on the internal 40 kHz/mode pair and on an
//   external clock/mode pair, read back at 0100H..0111H, and a frame with rdinh low;
//   thruster history over a window, read back at 0112H..0119H;
//   data-ready: a qualified 1EH pulse, a glitch, and a clear;
//   spare lines in both directions and the periods of the outgoing clocks.
// Each mechanism is counted; one that never happened counts as a failure.
module tb_tdm_top;
  import tdm_pkg::*;
  logic              clk = 1'b0, por = 1'b1;
  logic [11:0]       ia = '0;
  logic              m_ion = 1'b1, io_dis = 1'b1, rdn = 1'b1, wrn = 1'b1;
  logic [15:0]       inbus = '0, dout;
  logic              dout_en;
  logic [17:0]       sdig = '0;
  logic              e2_clk = 1'b0, e2_mode = 1'b0;
  logic [15:0]       thr_sts = '0, thr_out;
  logic              thr_en, thr_ored;
  logic [7:0]        bmu_cmd;
  logic [5:0]        dt_rdy = '0;
  logic [35:0]       spare_in = '0;
  logic [58:0]       spare_out;
  logic              c40k, c20k, c1k, c500, c250, c125, mode;
  int                checks = 0, failures = 0, cyc = 0;
  ctrl_t             ctrl_sh = '0;

  // mechanism counters
  int n_wr = 0, n_rd = 0, n_direct = 0, n_timer = 0, n_serial = 0, n_cmd = 0, n_sdc_int = 0,
      n_sdc_ext = 0, n_rdinh = 0, n_hist = 0, n_drdy = 0, n_glitch = 0, n_clr = 0, n_spare = 0,
      n_clk = 0;

  always #500 clk = ~clk;     // 1 MHz, 1 ns units
  always @(posedge clk) cyc <= cyc + 1;

  tdm_top dut (.clk(clk), .por(por), .ia(ia), .m_ion(m_ion), .io_dis(io_dis), .rdn(rdn), .wrn(wrn),
               .inbus(inbus), .dout(dout), .dout_en(dout_en), .sdig_ch(sdig), .e2_clk(e2_clk),
               .e2_mode(e2_mode), .thr_sts(thr_sts), .thr_out(thr_out), .thr_en(thr_en),
               .thr_ored_sts(thr_ored), .bmu_cmd(bmu_cmd), .dt_rdy(dt_rdy), .spare_in(spare_in),
               .spare_out(spare_out), .clk_40k(c40k), .clk_20k(c20k), .clk_1k(c1k),
               .clk_500(c500), .clk_250(c250), .clk_125(c125), .mode(mode));

  initial begin
    #2_000_000_000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // processor bus cycles, asynchronous to clk (offset 137 ns)
  task automatic bus_write(input logic [11:0] a, input logic [15:0] d);
    @(posedge clk); #137;
    ia = a; inbus = d; m_ion = 1'b0; io_dis = 1'b0;
    #200 wrn = 1'b0;
    #4000 wrn = 1'b1;
    #300 m_ion = 1'b1; io_dis = 1'b1; inbus = 16'hDEAD; ia = 12'hFFF;
    n_wr++;
  endtask

  task automatic bus_read(input logic [11:0] a, output logic [15:0] d);
    @(posedge clk); #137;
    ia = a; m_ion = 1'b0; io_dis = 1'b0;
    #200 rdn = 1'b0;
    #400;
    check(dout_en, "read enable");
    d = dout;
    rdn = 1'b1;
    #200 m_ion = 1'b1; io_dis = 1'b1; ia = 12'hFFF;
    n_rd++;
  endtask

  task automatic write_ctrl();
    bus_write(IO_BASE + 12'(CS_CTRL), 16'(ctrl_sh));
  endtask

  task automatic wait_us(input int n);
    repeat (n) @(posedge clk);
  endtask

  // ---------------- serial digital channels: subsystem model ----------------
  // Bits change on falling edges of the shift clock the module sends; a frame of 16 bits is
  // closed by the mode pulse that comes with its 16th clock.
  logic [17:0][15:0] frame_words;
  task automatic sdc_frame_int();
    foreach (frame_words[i]) frame_words[i] = 16'($urandom);
    @(posedge mode);                     // align: next frame starts after this mode
    for (int b = 15; b >= 0; b--) begin
      @(negedge c40k);
      foreach (frame_words[i]) sdig[i] = frame_words[i][b];
    end
    @(posedge mode);
    wait_us(3);
  endtask

  task automatic sdc_frame_ext();
    foreach (frame_words[i]) frame_words[i] = 16'($urandom);
    for (int b = 15; b >= 0; b--) begin
      #3100;
      foreach (frame_words[i]) sdig[i] = frame_words[i][b];
      #10000 e2_clk = 1'b1; e2_mode = (b == 0);
      #10000 e2_clk = 1'b0; e2_mode = 1'b0;
    end
    wait_us(5);
  endtask

  task automatic sdc_check(input string what, output bit all_ok);
    logic [15:0] d;
    all_ok = 1'b1;
    for (int i = 0; i < 18; i++) begin
      bus_read(IO_BASE + 12'(RD_SDC0 + i), d);
      check(d == frame_words[i], $sformatf("%s channel %0d: %h expected %h", what, i, d, frame_words[i]));
      if (d != frame_words[i]) all_ok = 1'b0;
    end
  endtask

  // ---------------- clock output periods ----------------
  int last_rise [6], nrise [6];
  logic [5:0] cl, cl_d;
  localparam int CPER [6] = '{25, 50, 1000, 2000, 4000, 8000};
  assign cl = {c125, c250, c500, c1k, c20k, c40k};
  always @(posedge clk) begin
    cl_d <= cl;
    if (!por)
      for (int r = 0; r < 6; r++)
        if (cl[r] && !cl_d[r]) begin
          if (nrise[r] > 1) begin
            checks++;
            if (cyc - last_rise[r] != CPER[r]) begin
              failures++;
              $display("FAIL clock %0d period %0d", r, cyc - last_rise[r]);
            end else if (r == 5) n_clk++;
          end
          nrise[r]++;
          last_rise[r] = cyc;
        end
  end

  initial begin
    logic [15:0] d;
    int          t0, w;
    bit          ok;
    int          ref_cnt [16];
    foreach (nrise[r]) begin nrise[r] = 0; last_rise[r] = 0; end
    #3300 por = 1'b0;
    wait_us(20);

    // ---- spare lines ----
    spare_in = {4'hA, 32'h1234_5678};
    bus_write(IO_BASE + 12'(CS_SPARE0 + 0), 16'hCAFE);
    bus_write(IO_BASE + 12'(CS_SPARE0 + 1), 16'hBEEF);
    bus_write(IO_BASE + 12'(CS_SPARE0 + 2), 16'h0123);
    bus_write(IO_BASE + 12'(CS_SPARE0 + 3), 16'h07FF);
    check(spare_out == {11'h7FF, 16'h0123, 16'hBEEF, 16'hCAFE}, "spare outputs");
    bus_read(IO_BASE + 12'(RD_SPARE0), d); check(d == 16'h5678, "spare in 15:0");
    bus_read(IO_BASE + 12'(RD_SPARE1), d); check(d == 16'h1234, "spare in 31:16");
    bus_read(IO_BASE + 12'(RD_SPARE2), d); check(d == 16'h000A, "spare in 35:32");
    if (spare_out == {11'h7FF, 16'h0123, 16'hBEEF, 16'hCAFE} && d == 16'h000A) n_spare++;

    // ---- direct mode ----
    ctrl_sh.sel_thr = 1'b1;
    write_ctrl();
    bus_write(IO_BASE + 12'(CS_DIRECT), 16'hA5C3);
    wait_us(2);
    check(thr_out == 16'hA5C3 && thr_ored, "direct mode word");
    if (thr_out == 16'hA5C3) n_direct++;

    // ---- timer mode: 000EH ms on the thrusters of the direct word ----
    ctrl_sh.sel_thr = 1'b0; ctrl_sh.thr_timer_en = 1'b1;
    write_ctrl();
    bus_write(IO_BASE + 12'(CS_TIMER), 16'h000E);
    wait_us(2);
    check(thr_en && thr_out == 16'hA5C3, "timer mode started");
    t0 = cyc;
    while (thr_en && cyc - t0 < 100_000) @(posedge clk);
    w = cyc - t0 + 6;     // the timer started about 6 us before t0
    wait_us(2);
    check(w > 13_000 && w <= 14_010 && thr_out == 16'h0 && !thr_ored,
          $sformatf("timer on for %0d us", w));
    if (w > 13_000 && w <= 14_010) n_timer++;
    bus_read(IO_BASE + 12'(RD_STATUS), d);
    check(st_of(d).thr_en == 1'b0, "status thr_en after timer");

    // ---- serial mode: 9F15H on thruster 1 (0109H), 1 kHz shift clock ----
    ctrl_sh.thr_timer_en = 1'b0; ctrl_sh.clk_sel = CLKSEL_1K;
    write_ctrl();
    bus_write(IO_BASE + 12'(CS_PSC0), 16'h9F15);
    bus_write(IO_BASE + 12'(CS_PSC0 + 15), 16'h8001);
    begin
      logic [15:0] got0, got15;
      for (int b = 15; b >= 0; b--) begin
        @(posedge c1k);
        wait_us(4);
        got0[b]  = thr_out[0];
        got15[b] = thr_out[15];
      end
      check(got0 == 16'h9F15 && got15 == 16'h8001,
            $sformatf("serial mode streams %h %h", got0, got15));
      if (got0 == 16'h9F15) n_serial++;
    end

    // ---- command generation: link 1, 256 ms, command 0 (BMU1Blk1On) ----
    bus_write(IO_BASE + 12'(CS_L1CMD), {4'd0, 2'b11, 1'b1, 6'd0, 3'd0});
    bus_write(IO_BASE + 12'(CS_L1CMD), {4'd0, 2'b11, 1'b0, 6'd0, 3'd0});
    t0 = cyc;
    while (bmu_cmd == 8'd0 && cyc - t0 < 20) @(posedge clk);
    check(bmu_cmd == 8'b0000_0001, "link 1 command decoded");
    t0 = cyc;
    while (bmu_cmd != 8'd0 && cyc - t0 < 300_000) @(posedge clk);
    w = cyc - t0;
    check(w > 255_000 && w <= 256_000, $sformatf("256 ms command lasted %0d us", w));
    if (w > 255_000 && w <= 256_000) n_cmd++;
    // link 2, 16 ms, command 7 (BMU2Blk2Off), read from the status word while it is high
    bus_write(IO_BASE + 12'(CS_L2CMD), {4'd0, 2'b00, 1'b1, 6'd0, 3'd7});
    bus_write(IO_BASE + 12'(CS_L2CMD), {4'd0, 2'b00, 1'b0, 6'd0, 3'd7});
    wait_us(5);
    bus_read(IO_BASE + 12'(RD_STATUS), d);
    check(st_of(d).cmd == 8'b1000_0000, $sformatf("status shows link 2 command %h", d));
    t0 = cyc;
    while (bmu_cmd != 8'd0 && cyc - t0 < 30_000) @(posedge clk);
    w = cyc - t0 + 12;
    check(w > 15_000 && w <= 16_000, $sformatf("16 ms command lasted %0d us", w));
    if (w > 15_000 && w <= 16_000) n_cmd++;

    // ---- serial digital channels, internal clock and mode ----
    ctrl_sh.rdinh = 1'b1; ctrl_sh.sdc_src_sel = 1'b0;
    write_ctrl();
    repeat (2) begin
      sdc_frame_int();
      sdc_check("internal frame", ok);
      if (ok) n_sdc_int++;
    end
    // external pair
    ctrl_sh.sdc_src_sel = 1'b1;
    write_ctrl();
    sdc_frame_ext();
    sdc_check("external frame", ok);
    if (ok) n_sdc_ext++;
    // rdinh low: the words must hold
    begin
      logic [17:0][15:0] held;
      held = frame_words;
      ctrl_sh.rdinh = 1'b0;
      write_ctrl();
      sdc_frame_ext();
      frame_words = held;
      sdc_check("frame with rdinh low", ok);
      if (ok) n_rdinh++;
    end

    // ---- thruster history: 1 kHz counting over about 60 ms ----
    ctrl_sh.his_mon_lp = 1'b1;
    write_ctrl();
    ctrl_sh.his_mon_lp = 1'b0;
    write_ctrl();                      // falling edge: counters restart
    thr_sts = 16'hBA1E;
    wait_us(60_000);
    thr_sts = 16'h0000;
    wait_us(2_000);
    ctrl_sh.his_mon_lp = 1'b1;
    write_ctrl();
    ctrl_sh.his_mon_lp = 1'b0;
    write_ctrl();                      // falling edge: latch
    ok = 1'b1;
    for (int k = 0; k < 8; k++) begin
      logic [7:0] hi, lo;
      bus_read(IO_BASE + 12'(RD_HIS0 + k), d);
      hi = d[15:8]; lo = d[7:0];
      // on thrusters counted 60 (+-1) 1 kHz clocks, off thrusters 0
      if (!((thr_sts_pat(2*k) ? (hi >= 59 && hi <= 61) : hi == 0) &&
            (thr_sts_pat(2*k+1) ? (lo >= 59 && lo <= 61) : lo == 0))) ok = 1'b0;
      check(ok, $sformatf("history word %0d = %h", k, d));
    end
    bus_read(IO_BASE + 12'(RD_THR_STS), d);
    check(d == 16'h0000, "thruster status read");
    if (ok) n_hist++;

    // ---- data ready: 1EH qualified, a glitch on bit 0, then a clear ----
    dt_rdy = 6'h1E;
    wait_us(250);
    dt_rdy = 6'h00;
    wait_us(10);
    dt_rdy = 6'h01;
    wait_us(120);
    dt_rdy = 6'h00;
    wait_us(10);
    bus_read(IO_BASE + 12'(RD_STATUS), d);
    check(st_of(d).drdy == 6'h1E, $sformatf("data ready latched %h", st_of(d).drdy));
    if (st_of(d).drdy[4:1] == 4'hF) n_drdy++;
    if (st_of(d).drdy[0] == 1'b0) n_glitch++;
    ctrl_sh.dt_clr = 6'h06;
    write_ctrl();
    ctrl_sh.dt_clr = 6'h00;
    write_ctrl();
    bus_read(IO_BASE + 12'(RD_STATUS), d);
    check(st_of(d).drdy == 6'h18, "data ready after clearing bits 1 and 2");
    if (st_of(d).drdy == 6'h18) n_clr++;

    // ---- every mechanism happened ----
    check(n_wr > 0 && n_rd > 0, "bus writes and reads");
    check(n_direct > 0, "direct mode");
    check(n_timer > 0, "timer mode");
    check(n_serial > 0, "serial mode");
    check(n_cmd == 2, "both link commands");
    check(n_sdc_int > 0, "serial channels on the internal clock");
    check(n_sdc_ext > 0, "serial channels on the external clock");
    check(n_rdinh > 0, "serial channels disabled");
    check(n_hist > 0, "history monitoring");
    check(n_drdy > 0 && n_glitch > 0 && n_clr > 0, "data ready qualify, reject, clear");
    check(n_spare > 0, "spare lines");
    check(n_clk > 0, "outgoing clocks");
    $display("mechanisms: wr=%0d rd=%0d direct=%0d timer=%0d serial=%0d cmd=%0d sdc_int=%0d sdc_ext=%0d rdinh=%0d hist=%0d drdy=%0d glitch=%0d clr=%0d spare=%0d clk125_periods=%0d",
             n_wr, n_rd, n_direct, n_timer, n_serial, n_cmd, n_sdc_int, n_sdc_ext, n_rdinh,
             n_hist, n_drdy, n_glitch, n_clr, n_spare, n_clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic status_t st_of(input logic [15:0] w);
    return status_t'(w);
  endfunction

  function automatic bit thr_sts_pat(input int i);
    logic [15:0] p = 16'hBA1E;
    return p[i];
  endfunction
endmodule
