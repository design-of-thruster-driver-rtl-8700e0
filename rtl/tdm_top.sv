// tdm_top: the thruster driver module. Everything runs on one 1 MHz clock; every asynchronous
// event from outside (the processor write strobe, external serial clock and mode, thruster status,
// data-ready lines) is brought onto that clock before it is used.
// Processor side: io_decoder turns the I/O address into chip selects and a read enable; the
// falling edge of wrn, synchronised by sync_edge, is the write strobe with which output_port and
// the thruster driver interface take inbus (address and data must stay valid for 3 us after wrn
// falls); reads return input_port's multiplexer on dout.
// Functions: clk_mode_gen (all slower clocks), cmd_gen (link pulse commands), sdci (serial
// digital channels), tdi (thruster drivers in direct, timer or serial mode), thm (thruster
// history) and data_ready_if (qualified data-ready latches).
// The set of interfaces and the way they connect follow the published block diagram; the
// register map, the status-word layout and the synchronisers on the external inputs are this
// design's own. The 87-in/96-out pin router of the original module is not modelled: every
// functional signal is a port of its own.
module tdm_top
  import tdm_pkg::*;
(
  input  logic                    clk,          // 1 MHz
  input  logic                    por,          // power-on reset, active high
  // processor I/O bus
  input  logic [11:0]             ia,
  input  logic                    m_ion,
  input  logic                    io_dis,
  input  logic                    rdn,
  input  logic                    wrn,
  input  logic [15:0]             inbus,
  output logic [15:0]             dout,
  output logic                    dout_en,
  // serial digital channels
  input  logic [NUM_SDC-1:0]      sdig_ch,
  input  logic                    e2_clk,       // external shift clock
  input  logic                    e2_mode,      // external mode
  // thrusters
  input  logic [NUM_THR-1:0]      thr_sts,
  output logic [NUM_THR-1:0]      thr_out,
  output logic                    thr_en,
  output logic                    thr_ored_sts,
  // pulse commands: BMU1Blk1On, BMU1Blk2On, BMU2Blk1On, BMU2Blk2On, then the four Off
  output logic [7:0]              bmu_cmd,
  // data ready
  input  logic [NUM_DRDY-1:0]     dt_rdy,
  // spare lines
  input  logic [SPARE_IN_W-1:0]   spare_in,
  output logic [SPARE_OUT_W-1:0]  spare_out,
  // clocks and mode sent to the serial-data subsystems
  output logic                    clk_40k,
  output logic                    clk_20k,
  output logic                    clk_1k,
  output logic                    clk_500,
  output logic                    clk_250,
  output logic                    clk_125,
  output logic                    mode
);
  logic [NUM_CS-1:0]          csn;
  logic                       rden1;
  logic                       wr_stb;
  ticks_t                     ticks;
  logic [11:0]                l1cmd, l2cmd;
  ctrl_t                      ctrl;
  logic                       e2_clk_tick, e2_mode_tick;
  logic [NUM_SDC-1:0][15:0]   sdc_word;
  logic                       sel_tick;
  logic [NUM_THR-1:0]         sts_s1, sts_s2;
  logic [NUM_HIS-1:0][15:0]   his_word;
  logic [NUM_DRDY-1:0]        drdy_lat;
  status_t                    status;

  io_decoder u_iodec (.io_dis(io_dis), .m_ion(m_ion), .rdn(rdn), .ia(ia), .csn(csn),
                      .rden1(rden1));

  sync_edge #(.RISING(1'b0)) u_wr_sync (.clk(clk), .por(por), .trig(wrn), .sync_trig(wr_stb));

  clk_mode_gen u_clk (.clk(clk), .por(por), .ticks(ticks), .clk_40k(clk_40k), .clk_20k(clk_20k),
                      .clk_1k(clk_1k), .clk_500(clk_500), .clk_250(clk_250), .clk_125(clk_125),
                      .mode(mode));

  output_port u_oport (.clk(clk), .por(por), .wr_stb(wr_stb), .csn(csn), .inbus(inbus),
                       .l1cmd(l1cmd), .l2cmd(l2cmd), .ctrl(ctrl), .spare_out(spare_out));

  cmd_gen u_cmd (.clk(clk), .por(por), .tick_1k(ticks.t1k), .l1cmd(l1cmd), .l2cmd(l2cmd),
                 .cmd_out(bmu_cmd));

  sync_edge #(.RISING(1'b1)) u_e2clk_sync  (.clk(clk), .por(por), .trig(e2_clk),
                                            .sync_trig(e2_clk_tick));
  sync_edge #(.RISING(1'b1)) u_e2mode_sync (.clk(clk), .por(por), .trig(e2_mode),
                                            .sync_trig(e2_mode_tick));

  sdci u_sdci (.clk(clk), .por(por), .rdinh(ctrl.rdinh), .src_sel(ctrl.sdc_src_sel),
               .sclk_a(ticks.t40k), .mode_a(ticks.tmode), .sclk_b(e2_clk_tick),
               .mode_b(e2_mode_tick), .sdig_ch(sdig_ch), .dout(sdc_word));

  tdi u_tdi (.clk(clk), .por(por), .wr_stb(wr_stb), .csn(csn), .inbus(inbus), .ticks(ticks),
             .clk_sel(ctrl.clk_sel), .sel_thr(ctrl.sel_thr), .thr_timer_en(ctrl.thr_timer_en),
             .sel_tick(sel_tick), .thr_out(thr_out), .thr_en(thr_en),
             .thr_ored_sts(thr_ored_sts));

  // thruster status lines come from the drivers: two-flip-flop synchroniser
  always_ff @(posedge clk or posedge por)
    if (por) begin
      sts_s1 <= '0;
      sts_s2 <= '0;
    end else begin
      sts_s1 <= thr_sts;
      sts_s2 <= sts_s1;
    end

  thm u_thm (.clk(clk), .por(por), .sel_tick(sel_tick), .thr_sts(sts_s2),
             .his_mon_lp(ctrl.his_mon_lp), .hisout(his_word));

  data_ready_if u_drdy (.clk(clk), .por(por), .dt_rdy(dt_rdy), .dt_clr(ctrl.dt_clr),
                        .drdy_lat(drdy_lat));

  assign status = '{thr_ored_sts: thr_ored_sts, thr_en: thr_en, cmd: bmu_cmd, drdy: drdy_lat};

  input_port u_iport (.rden1(rden1), .ia(ia[4:0]), .sdc_word(sdc_word), .his_word(his_word),
                      .thr_sts(sts_s2), .status(status), .spare_in(spare_in), .dout(dout));

  assign dout_en = rden1;
endmodule
